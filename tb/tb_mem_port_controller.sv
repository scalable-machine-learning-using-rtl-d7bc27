// tb_mem_port_controller: one memory port controller in front of a memory
// modelled here that acknowledges each word after a random delay. A client
// issues random reads and writes in its region, some with read_through or
// write_through, and occasional flushes; every read is compared with a copy
// kept here. Checks the lazy write policy (writes that hit cost no memory
// traffic; a miss writes back exactly the dirty words), that after a flush
// memory equals the copy, and that no word outside the region is written.
// Timing: the memory behind the port answers after random delays. Follows
// the source's lazy write-back port cache; line size and the flush
// request are this design's.
module tb_mem_port_controller;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int RB = 100, RE = 203, LINE = 8;

  mh_req_t  req;
  mh_rsp_t  rsp;
  mem_cmd_t mcmd;
  mem_ack_t mack;
  logic hit_evt, miss_evt;
  mem_port_controller #(.LINE(LINE)) dut (.clk, .rst_n, .req, .rsp, .mcmd, .mack, .hit_evt, .miss_evt);

  // backing memory
  word_t bmem [512];
  word_t cref [512];
  int    n_bwr, n_hit, n_miss, n_oob_wr, dly;
  initial begin dly = -1; mack = '0; end
  always @(posedge clk) begin
    mack.ack <= 1'b0;
    if (hit_evt) n_hit++;
    if (miss_evt) n_miss++;
    if (mcmd.valid && !mack.ack) begin
      if (dly < 0) dly = int'($urandom_range(3));
      else if (dly == 0) begin
        dly = -1;
        mack.ack <= 1'b1;
        if (mcmd.we) begin
          bmem[int'(mcmd.addr)] = mcmd.wdata; n_bwr++;
          if (int'(mcmd.addr) < RB || int'(mcmd.addr) >= RE) n_oob_wr++;
        end else mack.rdata <= bmem[int'(mcmd.addr)];
      end else dly--;
    end
  end

  task automatic op(logic w, logic rt, logic wt, logic fl, int a, word_t v, output word_t r);
    @(negedge clk);
    req.ptr = addr_t'(a); req.r_en = !w && !fl; req.w_en = w; req.flush = fl;
    req.read_through = rt; req.write_through = wt; req.data_store = v;
    do @(negedge clk); while (!rsp.done);
    r = rsp.data_load;
    req.r_en = 0; req.w_en = 0; req.flush = 0;
  endtask

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", s, got, exp); end
  endtask

  initial begin
    word_t r;
    int base_w;
    req = '0; req.region_begin = RB; req.region_end = RE;
    n_bwr = 0; n_hit = 0; n_miss = 0; n_oob_wr = 0;
    for (int i = 0; i < 512; i++) begin bmem[i] = $urandom; cref[i] = bmem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      int a, k;
      a = RB + $urandom_range(RE - RB - 1);
      k = $urandom_range(19);
      if (k < 8) begin
        op(0, 0, 0, 0, a, '0, r);
        checks++;
        if (r !== cref[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, r, cref[a]); end
      end else if (k < 10) begin
        op(0, 1, 0, 0, a, '0, r);
        checks++;
        if (r !== cref[a]) begin failures++; $display("FAIL read_through %0d got %h exp %h", a, r, cref[a]); end
      end else if (k < 17) begin
        cref[a] = $urandom; op(1, 0, 0, 0, a, cref[a], r);
      end else if (k < 19) begin
        cref[a] = $urandom; op(1, 0, 1, 0, a, cref[a], r);
      end else op(0, 0, 0, 1, a, '0, r);
    end
    op(0, 0, 0, 1, RB, '0, r);
    for (int i = 0; i < 512; i++) begin
      checks++;
      if (bmem[i] !== cref[i]) begin failures++; $display("FAIL memory %0d after flush", i); end
    end
    chk("writes outside the region", n_oob_wr, 0);
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL hits %0d misses %0d", n_hit, n_miss); end
    // lazy write-back
    op(0, 0, 0, 0, 120, '0, r);           // fill line 120..127
    base_w = n_bwr;
    for (int i = 120; i < 125; i++) begin cref[i] = $urandom; op(1, 0, 0, 0, i, cref[i], r); end
    chk("memory writes on write hits", n_bwr - base_w, 0);
    op(0, 0, 0, 0, 140, '0, r);           // miss: writes back 5 dirty words
    chk("dirty words written on miss", n_bwr - base_w, 5);
    for (int i = 120; i < 125; i++) chk("written back", int'(bmem[i] == cref[i]), 1);
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
