// m9k_controller: serves word commands from the round-robin multiplexer on
// the on-chip block RAM.
//
// One command at a time: a valid command is issued to the RAM, and ack (with
// rdata for a read) is returned as a one-cycle pulse two clocks later. A
// command that is still valid in the ack cycle is not reissued, so the
// requester may update it on the ack edge. Only the low address bits index
// the RAM; the top bit of the universal address, which routes the command
// here, is ignored. The source names this controller and says there is one
// for all ports; its cycle behaviour is this design's choice.
module m9k_controller
  import ml_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_cmd_t    cmd,
  output mem_ack_t    ack,
  // block RAM side
  output logic        ram_en,
  output logic        ram_we,
  output logic [AW-1:0] ram_addr,
  output word_t       ram_d,
  input  word_t       ram_q
);
  logic pending;

  assign ram_en   = cmd.valid && !pending && !ack.ack;
  assign ram_we   = cmd.we;
  assign ram_addr = cmd.addr[AW-1:0];
  assign ram_d    = cmd.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      ack       <= '0;
    end else begin
      ack.ack <= 1'b0;
      if (pending) begin
        pending   <= 1'b0;
        ack.ack   <= 1'b1;
        ack.rdata <= ram_q;
      end else if (ram_en) begin
        pending <= 1'b1;
      end
    end
  end
endmodule
