// rr_arbiter: round-robin choice of one requester for a shared memory
// controller.
//
// A requester raises req[i] and keeps it high for as long as it needs the
// controller; the grant stays with it until it drops req. When the owner
// releases, the next requester after it in circular order is granted on the
// following clock. gnt_valid/gnt_idx name the owner. The source says the
// memory controllers iterate round-robin over the ports and serve requests
// atomically and serially; holding the grant for a whole request is how this
// design makes a request atomic.
module rr_arbiter #(
  parameter int unsigned N = 25,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx
);
  logic [IW-1:0] last;     // most recent owner
  logic [IW-1:0] pick;
  logic          pick_ok;

  // First requester after `last`, circularly.
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!pick_ok && req[c]) begin
        pick    = IW'(c);
        pick_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_valid <= 1'b0;
      gnt_idx   <= '0;
      last      <= IW'(N - 1);
    end else if (gnt_valid && req[gnt_idx]) begin
      // owner keeps the grant
    end else if (pick_ok) begin
      gnt_valid <= 1'b1;
      gnt_idx   <= pick;
      last      <= pick;
    end else begin
      gnt_valid <= 1'b0;
    end
  end
endmodule
