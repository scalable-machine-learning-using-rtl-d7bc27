// tb_sdram_controller: the SDRAM controller driving the behavioural SDRAM
// chip model. After the initialisation sequence it writes random words to
// random addresses across all banks, reads them back in random order and
// compares with a copy kept here. It also checks that the chip saw the mode
// register load and periodic refreshes, no protocol error, and the cycle
// count of one read and one write (ACTIVATE, tRCD, command, CAS latency or
// write recovery, precharge, ack).
// Follows the source's SDRAM controller role; all timing numbers are this
// design's choice for a generic SDR SDRAM at 50 MHz.
module tb_sdram_controller;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  mem_cmd_t cmd;
  mem_ack_t ack;
  logic init_done, cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] a;
  logic [15:0] dq_o, dq_i;

  sdram_controller #(.INIT_WAIT(50), .REFRESH_INTERVAL(100)) dut (
    .clk, .rst_n, .cmd, .ack, .init_done,
    .sd_cke(cke), .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_addr(a), .sd_dqm(dqm), .sd_dq_out(dq_o), .sd_dq_oe(dq_oe), .sd_dq_in(dq_i)
  );
  sdram_model #(.CAS(2)) u_chip (
    .clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr(a), .dqm, .dq_in(dq_o), .dq_oe, .dq_out(dq_i)
  );

  int lat;
  task automatic access(logic w, addr_t ad, word_t v, output word_t r);
    @(negedge clk);
    cmd.req = 1; cmd.valid = 1; cmd.we = w; cmd.addr = ad; cmd.wdata = v;
    lat = 0;
    do begin @(posedge clk); lat++; @(negedge clk); end while (!ack.ack);
    r = ack.rdata;
    cmd = '0;
  endtask

  addr_t addrs [64];
  word_t vals  [64];

  initial begin
    word_t r;
    int min_rd, min_wr;
    cmd = '0;
    min_rd = 1000; min_wr = 1000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (3) @(posedge clk);
    checks++;
    if (u_chip.n_mrs != 1) begin failures++; $display("FAIL mode register loads %0d", u_chip.n_mrs); end
    for (int i = 0; i < 64; i++) begin
      addrs[i] = addr_t'({$urandom} % (1 << 23));
      for (int j = 0; j < i; j++) if (addrs[j] == addrs[i]) addrs[i] = addr_t'(i);
      vals[i] = $urandom;
      access(1, addrs[i], vals[i], r);
      if (lat < min_wr) min_wr = lat;
    end
    for (int n = 0; n < 64; n++) begin
      int i;
      i = (n * 37) % 64;
      access(0, addrs[i], '0, r);
      if (lat < min_rd) min_rd = lat;
      checks++;
      if (r !== vals[i]) begin failures++; $display("FAIL addr %h got %h exp %h", addrs[i], r, vals[i]); end
    end
    // counted from the clock edge that first sees the command to the ack:
    // ACT, tRCD wait (2), READ, CAS wait (2), beat 0, beat 1, tRP wait (2), ack
    checks++;
    if (min_rd != 11) begin failures++; $display("FAIL read latency %0d", min_rd); end
    // ACT, tRCD wait (2), WRITE beat 0, beat 1, recovery + precharge (4), ack
    checks++;
    if (min_wr != 10) begin failures++; $display("FAIL write latency %0d", min_wr); end
    checks++;
    if (u_chip.n_ref < 5) begin failures++; $display("FAIL only %0d refreshes", u_chip.n_ref); end
    checks++;
    if (u_chip.n_err != 0) begin failures++; $display("FAIL %0d protocol errors", u_chip.n_err); end
    $display("read %0d cycles, write %0d cycles, %0d refreshes", min_rd, min_wr, u_chip.n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
