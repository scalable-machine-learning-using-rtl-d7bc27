// tb_workload_5x5: times one SGD step (forward, backward, update) of a 5x5
// linear layer with MSE loss on the worker at its default parameters, with
// 1, 2, 4 and 8 copies of the model trained on the same sample, once with
// all scratch areas (z, dz, dW, db) in SDRAM and once in block RAM.
// The host side is the same SPI master as tb_worker_top. The time is counted
// in system clocks from the first Model Manager entering FORWARD until the
// last one reports training done.
// Checks: every model finishes; block RAM scratch is faster than SDRAM
// scratch at every model count; more models never take less time; and the
// loss each Model Manager reports is the same for every copy (the copies
// are identical). Prints one "workload" line per case.
// The workload is the source's 5x5 linear-layer cycle comparison; the model
// image layout and the placement of scratch by address are this design's.
module tb_workload_5x5;
  import ml_pkg::*;
  import tb_ref_pkg::*;
  localparam int NM = 8;
  localparam int NP = 1 + 3 * NM;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #50 clk = !clk;                  // 100 time units per system clock
  int checks = 0, failures = 0;

  logic sclk, cs_n, mosi, miso;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe, sd_init_done;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_addr;
  logic [15:0] sd_dq_out, sd_dq_in;
  logic [7:0] status;
  mm_phase_e mm_phase [NM];
  logic model_evt, sample_evt;
  logic [NM-1:0] train_evt, op_evt;
  logic [NP-1:0] hit_evt, miss_evt;

  worker_top dut (
    .clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in, .sd_init_done, .status, .mm_phase,
    .model_evt, .sample_evt, .train_evt, .op_evt, .hit_evt, .miss_evt);

  sdram_model u_sd (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm), .dq_in(sd_dq_out),
    .dq_oe(sd_dq_oe), .dq_out(sd_dq_in));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------ event counters
  int n_model, n_sample, n_train [NM], n_op [NM], n_hit, n_miss, n_both;
  bit seen_phase [6];
  bit seen_training;
  initial begin
    n_model = 0; n_sample = 0; n_hit = 0; n_miss = 0; n_both = 0; seen_training = 0;
    for (int i = 0; i < NM; i++) begin n_train[i] = 0; n_op[i] = 0; end
    for (int p = 0; p < 6; p++) seen_phase[p] = 0;
  end
  always @(posedge clk) if (rst_n) begin
    int busy_mm;
    busy_mm = 0;
    if (model_evt) n_model++;
    if (sample_evt) n_sample++;
    for (int i = 0; i < NM; i++) begin
      if (train_evt[i]) n_train[i]++;
      if (op_evt[i]) n_op[i]++;
      seen_phase[int'(mm_phase[i])] = 1;
      if (mm_phase[i] == MM_FORWARD || mm_phase[i] == MM_BACKWARD) busy_mm++;
    end
    if (busy_mm == NM) n_both++;
    n_hit  += $countones(hit_evt);
    n_miss += $countones(miss_evt);
    if (status[1]) seen_training = 1;
  end

  // ------------------------------------------------------------ host
  task automatic xfer(byte unsigned o, output byte unsigned in, input int pause = 0);
    for (int b = 7; b >= 0; b--) begin
      mosi = o[b];
      #160 sclk = 1; in[b] = miso;
      #160 sclk = 0;
    end
    #(100 * pause);
  endtask
  task automatic send(byte unsigned o);
    byte unsigned in;
    xfer(o, in);
  endtask
  task automatic send_word(word_t w);
    for (int s = 3; s >= 0; s--) send(w[8*s +: 8]);
  endtask
  // no-op bytes until two status bytes in a row show not busy
  task automatic wait_ready(output byte unsigned st);
    byte unsigned in;
    int quiet, t;
    quiet = 0; t = 0;
    while (quiet < 2 && t < 20000) begin
      xfer(8'h00, in, 40); t++;
      if (in[7:4] == 0 && !in[0]) quiet++; else quiet = 0;
      st = in;
    end
    check(t < 20000, "worker becomes ready");
  endtask
  task automatic get_reply(int nwords, output word_t got []);
    byte unsigned in;
    int t;
    t = 0;
    got = new[nwords];
    do begin xfer(8'h00, in, 100); t++; end while (in != 8'hA5 && t < 20000);
    check(in == 8'hA5, "reply marker");
    for (int k = 0; k < nwords; k++)
      for (int s = 3; s >= 0; s--) begin
        xfer(8'h00, in, 100);
        got[k][8*s +: 8] = in;
      end
  endtask


  // 5x5 linear layer + MSE: header 4, one descriptor, W (25) and b (5),
  // then z, dz and dW/db, either after the parameters (SDRAM) or in M9K.
  function automatic img_t img5(bit m9k, int base, int m);
    img_t im = new[12 + 30];
    int sc;
    foreach (im[i]) im[i] = '0;
    im[0] = 1; im[1] = word_t'(-32'sd3277); im[2] = 5;
    im[4] = LAYER_LINEAR; im[5] = 5; im[6] = 5; im[7] = 12;
    sc = m9k ? ((32'h801000 + 64 * m - base) & 32'hFFFFFF) : 42;
    im[8] = sc; im[9] = (sc + 5) & 32'hFFFFFF; im[10] = (sc + 10) & 32'hFFFFFF;
    for (int i = 0; i < 30; i++) im[12 + i] = wts[i];
    return im;
  endfunction
  word_t wts [30];
  int t0, t_end, cyc;
  int cyc_tab [2][4];
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    byte unsigned st;
    img_t im;
    int base, sz;
    word_t got [];
    word_t loss0;
    cyc = 0;
    foreach (wts[i]) wts[i] = rnd_small();
    sclk = 0; cs_n = 0; mosi = 0;
    for (int m9k = 0; m9k < 2; m9k++)
      for (int kk = 0; kk < 4; kk++) begin
        int k, done_n;
        k = 1 << kk;
        rst_n = 0; repeat (3) @(posedge clk); rst_n = 1; cs_n = 1;
        wait (sd_init_done); repeat (10) @(posedge clk);
        cs_n = 0; #400; wait_ready(st);
        base = 0;
        for (int m = 0; m < k; m++) begin
          im = img5(m9k, base, m);
          sz = m9k ? 12 + 30 : 12 + 30 + 40;
          send(PKT_ASN_MODEL); send(8'd0); send_word(sz);
          for (int w = 0; w < sz; w++) send_word(w < im.size() ? im[w] : 0);
          base += sz;
          wait_ready(st);
        end
        send(PKT_SAMPLE); send(8'd0); send_word(10);
        for (int w = 0; w < 10; w++) send_word(32'(w * 9000 - 40000));
        wait (mm_phase[0] == MM_FORWARD); t0 = cyc;
        done_n = 0;
        while (done_n < k) begin @(posedge clk); done_n += $countones(train_evt); end
        t_end = cyc;
        $display("workload 5x5 scratch=%s models=%0d cycles=%0d", m9k ? "M9K" : "SDRAM", k, t_end - t0);
        cyc_tab[m9k][kk] = t_end - t0;
        check(t_end - t0 < 200000, "all models finished");
        wait_ready(st);
        for (int m = 0; m < k; m++) begin
          send(PKT_GET_METRIC); send(8'(m));
          get_reply(1, got);
          if (m == 0) loss0 = got[0];
          check(got[0] == loss0 && got[0] != 0, $sformatf("loss of copy %0d %h vs %h", m, got[0], loss0));
          wait_ready(st);
        end
        #400 cs_n = 1;
      end
    for (int kk = 0; kk < 4; kk++)
      check(cyc_tab[1][kk] < cyc_tab[0][kk], $sformatf("block RAM scratch faster at %0d models", 1 << kk));
    for (int m9k = 0; m9k < 2; m9k++)
      for (int kk = 1; kk < 4; kk++)
        check(cyc_tab[m9k][kk] >= cyc_tab[m9k][kk-1], "more models take no less time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
