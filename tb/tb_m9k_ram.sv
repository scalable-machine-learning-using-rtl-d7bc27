// tb_m9k_ram: writes random words to random addresses of the block RAM,
// reads them back and checks data and the one-cycle read latency against a
// copy kept here.
// Follows the source's on-chip M9K memory; width and depth are this
// design's choice.
module tb_m9k_ram;
  logic clk = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int W = 256;
  logic en, we;
  logic [7:0] addr;
  logic [31:0] d, q;
  logic [31:0] ref_m [W];

  m9k_ram #(.WORDS(W)) dut (.clk, .en, .we, .addr, .d, .q);

  initial begin
    en = 0; we = 0; addr = 0; d = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); d = $urandom; ref_m[i] = d;
    end
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(W - 1);
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        en = 1; we = 1; addr = 8'(a); d = $urandom; ref_m[a] = d;
      end else begin
        en = 1; we = 0; addr = 8'(a);
        @(negedge clk); en = 0;
        checks++;
        if (q !== ref_m[a]) begin failures++; $display("FAIL addr %0d got %h exp %h", a, q, ref_m[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
