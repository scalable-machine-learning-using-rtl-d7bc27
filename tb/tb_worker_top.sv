// tb_worker_top: end-to-end test of the worker through its pins. A host
// modelled here talks SPI mode 0 at 3.2 system clocks per bit; the SDRAM is
// the behavioural chip model. Reduced configuration: two Model Managers (and
// two Job Managers) and a short SDRAM power-up wait.
//
// The host assigns two different models (a 3-4-2 network with a ReLU) to
// data pipeline 0, streams three samples, reads both losses (GET_METRIC) and
// both whole model images (GET_MODEL), and compares every word with the
// reference SGD step of tb_ref_pkg. It then sends a third model with no free
// Model Manager and expects the error status bit.
//
// Host rules followed here: between packets it polls the status byte (no-op
// bytes) until busy is low; while reading a reply it leaves a pause between
// bytes so the reply's next byte is always staged in time, and it skips
// status bytes until the 0xA5 marker.
//
// Mechanisms counted (each must happen at least once): model assignment,
// sample hand-out, training done per Model Manager, FPU operation steps on
// every Job Manager, port cache hits and misses, both models training at
// the same time, SDRAM activate/read/write/refresh, mode register set, every
// Model Manager phase, training and error status bits.
// Timing: 3.2 clocks per SPI bit, SDRAM model at real command timing.
// Follows the source's block structure and training flow; the packet
// format and the reduced sizes are this design's.
module tb_worker_top;
  import ml_pkg::*;
  import tb_ref_pkg::*;
  localparam int NM = 2;
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

  worker_top #(.NUM_MM(NM), .SD_INIT_WAIT(200)) dut (
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

  img_t ref_img [NM];
  word_t smp [];
  initial begin
    byte unsigned st;
    word_t got [];
    sclk = 0; cs_n = 0; mosi = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; cs_n = 1;
    wait (sd_init_done);
    repeat (10) @(posedge clk);
    cs_n = 0; #400;
    wait_ready(st);
    // two models for pipeline 0
    ref_img[0] = make_image(word_t'(-32'sd3277));   // learning rate -0.05
    ref_img[1] = make_image(word_t'(-32'sd6554));   // learning rate -0.1
    for (int m = 0; m < NM; m++) begin
      send(PKT_ASN_MODEL); send(8'd0); send_word(IMG_WORDS);
      for (int k = 0; k < IMG_WORDS; k++) send_word(ref_img[m][k]);
      wait_ready(st);
    end
    check(mm_phase[0] == MM_ASSIGNED && mm_phase[NM-1] == MM_ASSIGNED, "Model Managers assigned");
    // three samples
    for (int s = 0; s < 3; s++) begin
      smp = new[IN0 + NOUT];
      foreach (smp[i]) smp[i] = rnd_small();
      send(PKT_SAMPLE); send(8'd0); send_word(IN0 + NOUT);
      foreach (smp[i]) send_word(smp[i]);
      for (int m = 0; m < NM; m++) train(ref_img[m], smp);
      wait_ready(st);
      while (status[1]) xfer(8'h00, st, 40);        // training finished
      wait_ready(st);
    end
    for (int m = 0; m < NM; m++) check(n_train[m] == 3, $sformatf("mm%0d trained 3 times (%0d)", m, n_train[m]));
    // losses and models
    for (int m = 0; m < NM; m++) begin
      send(PKT_GET_METRIC); send(8'(m));
      get_reply(1, got);
      check(got[0] == ref_img[m][HDR_LOSS], $sformatf("mm%0d loss %h exp %h", m, got[0], ref_img[m][HDR_LOSS]));
      wait_ready(st);
      send(PKT_GET_MODEL); send(8'(m));
      get_reply(IMG_WORDS, got);
      for (int k = 0; k < IMG_WORDS; k++)
        check(got[k] == ref_img[m][k], $sformatf("mm%0d model word %0d got %h exp %h", m, k, got[k], ref_img[m][k]));
      wait_ready(st);
    end
    // one model too many
    check(st[3] == 1'b0 && st[2] == 1'b0, "no error or overflow so far");
    send(PKT_ASN_MODEL); send(8'd1); send_word(2); send_word(1); send_word(2);
    wait_ready(st);
    check(st[3] == 1'b1, "error status for a model with no free Model Manager");
    #400 cs_n = 1;
    repeat (20) @(posedge clk);

    // every mechanism must have happened
    check(n_model == NM, $sformatf("model assignments %0d", n_model));
    check(n_sample == 3, $sformatf("samples handed out %0d", n_sample));
    for (int j = 0; j < NM; j++) check(n_op[j] > 0, $sformatf("Job Manager %0d steps %0d", j, n_op[j]));
    check(n_hit > 0, $sformatf("cache hits %0d", n_hit));
    check(n_miss > 0, $sformatf("cache misses %0d", n_miss));
    check(n_both > 0, $sformatf("cycles with both models training %0d", n_both));
    check(u_sd.n_act > 0 && u_sd.n_rd > 0 && u_sd.n_wr > 0, "SDRAM activates, reads and writes");
    check(u_sd.n_ref > 0, $sformatf("SDRAM refreshes %0d", u_sd.n_ref));
    check(u_sd.n_mrs == 1, "SDRAM mode register set once");
    check(u_sd.n_err == 0, $sformatf("SDRAM protocol errors %0d", u_sd.n_err));
    for (int p = 0; p < 6; p++) check(seen_phase[p], $sformatf("Model Manager phase %0d reached", p));
    check(seen_training, "training status bit seen");
    $display("ops %0d %0d hits %0d misses %0d both %0d refresh %0d", n_op[0], n_op[1], n_hit, n_miss, n_both, u_sd.n_ref);
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
