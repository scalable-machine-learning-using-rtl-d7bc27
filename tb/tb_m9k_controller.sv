// tb_m9k_controller: the block RAM controller with a block RAM behind it.
// Issues random word writes and reads the way a port controller does (command
// held until ack, next command on the ack edge), checks read data against a
// copy kept here, that ack is a single pulse two clocks after a command is
// presented, and that a command left valid in the ack cycle is not re-run.
// Follows the source's M9K controller role; the two-clock acknowledge is
// this design's choice.
module tb_m9k_controller;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int W = 512;
  mem_cmd_t cmd;
  mem_ack_t ack;
  logic ram_en, ram_we;
  logic [8:0] ram_addr;
  word_t ram_d, ram_q;
  word_t ref_m [W];
  int n_en;

  m9k_controller #(.WORDS(W)) dut (.clk, .rst_n, .cmd, .ack, .ram_en, .ram_we, .ram_addr, .ram_d, .ram_q);
  m9k_ram #(.WORDS(W)) u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .d(ram_d), .q(ram_q));

  always @(posedge clk) if (ram_en) n_en++;

  task automatic access(logic w, int a, word_t v, output word_t r);
    int lat;
    lat = 0;
    @(negedge clk);   // leave the previous ack cycle
    cmd.req = 1; cmd.valid = 1; cmd.we = w; cmd.addr = addr_t'(a) | 24'h800000; cmd.wdata = v;
    do begin @(posedge clk); lat++; @(negedge clk); end while (!ack.ack);
    r = ack.rdata;
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    word_t r;
    cmd = '0; n_en = 0;
    foreach (ref_m[i]) ref_m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < W; i++) begin ref_m[i] = $urandom; access(1, i, ref_m[i], r); end
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(W - 1);
      if ($urandom_range(2) == 0) begin ref_m[a] = $urandom; access(1, a, ref_m[a], r); end
      else begin
        access(0, a, '0, r);
        checks++;
        if (r !== ref_m[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, r, ref_m[a]); end
      end
    end
    // a command left valid in the ack cycle, then dropped: must run only once
    n_en = 0;
    access(0, 3, '0, r);
    cmd = '0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_en != 1) begin failures++; $display("FAIL %0d RAM accesses for one command", n_en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
