// tb_mmu: the memory management unit with three handle ports, the SDRAM
// chip model and a block RAM. Ports 0 and 1 own SDRAM regions, port 2 a block
// RAM region; all three run random reads, writes and flushes at the same
// time, each checking its reads against its own copy. At the end every
// region is flushed and read back with read_through. Checks that the two
// SDRAM ports really competed for the controller (round-robin service) and
// that the chip saw no protocol error.
// Timing: SDRAM at its real command timing, M9K with a two-clock acknowledge.
// Follows the source's MMU (port caches, round-robin controllers); sizes
// are this design's.
module tb_mmu;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int NP = 3;
  localparam int RSZ = 48;
  localparam addr_t RB [NP] = '{24'd0, 24'd1000, 24'h800010};

  mh_req_t req [NP];
  mh_rsp_t rsp [NP];
  logic [NP-1:0] hit_evt, miss_evt;
  logic init_done, cke, cs_n, ras_n, cas_n, we_n, dq_oe, ram_en, ram_we;
  logic [1:0] ba, dqm;
  logic [12:0] a;
  logic [15:0] dq_o, dq_i;
  logic [9:0] ram_addr;
  word_t ram_d, ram_q;

  mmu #(.NPORTS(NP), .LINE(8), .M9K_WORDS(1024), .SD_INIT_WAIT(20), .SD_REFRESH(200)) dut (
    .clk, .rst_n, .req, .rsp, .hit_evt, .miss_evt, .sd_init_done(init_done),
    .sd_cke(cke), .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_addr(a), .sd_dqm(dqm), .sd_dq_out(dq_o), .sd_dq_oe(dq_oe), .sd_dq_in(dq_i),
    .ram_en, .ram_we, .ram_addr, .ram_d, .ram_q
  );
  sdram_model #(.CAS(2)) u_chip (
    .clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr(a), .dqm, .dq_in(dq_o), .dq_oe, .dq_out(dq_i)
  );
  m9k_ram #(.WORDS(1024)) u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .d(ram_d), .q(ram_q));

  int contention, finished;
  always @(posedge clk) if (dut.req_s[0] && dut.req_s[1]) contention++;

  word_t cref [NP][RSZ];

  task automatic op(int p, logic w, logic rt, logic fl, int off, word_t v, output word_t r);
    @(negedge clk);
    req[p].ptr = RB[p] + addr_t'(off); req[p].r_en = !w && !fl; req[p].w_en = w; req[p].flush = fl;
    req[p].read_through = rt; req[p].data_store = v;
    do @(negedge clk); while (!rsp[p].done);
    r = rsp[p].data_load;
    req[p].r_en = 0; req[p].w_en = 0; req[p].flush = 0; req[p].read_through = 0;
  endtask

  task automatic client(int p);
    word_t r;
    for (int i = 0; i < RSZ; i++) begin cref[p][i] = $urandom; op(p, 1, 0, 0, i, cref[p][i], r); end
    for (int n = 0; n < 300; n++) begin
      int off, k;
      off = $urandom_range(RSZ - 1);
      k = $urandom_range(9);
      if (k < 5) begin
        op(p, 0, 0, 0, off, '0, r);
        checks++;
        if (r !== cref[p][off]) begin failures++; $display("FAIL port %0d read %0d got %h exp %h", p, off, r, cref[p][off]); end
      end else if (k < 9) begin cref[p][off] = $urandom; op(p, 1, 0, 0, off, cref[p][off], r); end
      else op(p, 0, 0, 1, off, '0, r);
    end
    op(p, 0, 0, 1, 0, '0, r);
    for (int i = 0; i < RSZ; i++) begin
      op(p, 0, 1, 0, i, '0, r);
      checks++;
      if (r !== cref[p][i]) begin failures++; $display("FAIL port %0d memory %0d got %h exp %h", p, i, r, cref[p][i]); end
    end
    finished++;
  endtask

  initial begin
    contention = 0; finished = 0;
    for (int p = 0; p < NP; p++) begin
      req[p] = '0; req[p].region_begin = RB[p]; req[p].region_end = RB[p] + addr_t'(RSZ);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    fork
      client(0);
      client(1);
      client(2);
    join
    checks++;
    if (contention == 0) begin failures++; $display("FAIL SDRAM ports never competed"); end
    checks++;
    if (u_chip.n_err != 0) begin failures++; $display("FAIL SDRAM protocol errors %0d", u_chip.n_err); end
    $display("contention cycles %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
