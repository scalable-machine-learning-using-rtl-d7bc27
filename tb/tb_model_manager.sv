// tb_model_manager: a Model Manager driving a one-port FPU Bank, on a
// behavioural memory. A three-layer network (linear 3->4, ReLU, linear 4->2)
// is assigned and trained on several random samples; after each sample the
// whole model image (outputs, gradients, weights, loss) is compared with the
// reference SGD step. Then the loss and the whole image are exported and
// checked, and the manager is reassigned to a second model and trained
// again. Counts the states visited and requires each of the state diagram's
// states to occur.
// Timing: memory answers 1 to 3 clocks after each request, jobs take as
// long as the real FPU Bank needs. The model image layout is this design's;
// the passes (forward, backward, update) follow the source.
module tb_model_manager;
  import ml_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, train_evt, ex_valid, ex_last, ex_ready, job_waiting, job_done;
  mm_cmd_e cmd_op;
  addr_t cmd_begin, cmd_end;
  mm_phase_e phase;
  logic [7:0] dp_id;
  word_t ex_data;
  mh_req_t h_req [3], bank_h_in [3], bank_h_out [3];
  mh_rsp_t h_rsp [3];
  fpu_job_t job;
  fpu_job_t jobs [1];
  logic [0:0] jdone, op_evt;
  mh_req_t b_in [1][3], b_out [1][3];
  mh_rsp_t b_rsp [1][3];

  model_manager dut (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_begin, .cmd_end, .cmd_dp(8'd7), .cmd_ready,
    .phase, .dp_id, .train_evt, .ex_valid, .ex_data, .ex_last, .ex_ready,
    .h_req, .h_rsp, .job, .job_waiting, .job_done, .bank_h_in, .bank_h_out
  );
  assign jobs[0] = job;
  assign job_done = jdone[0];
  always_comb for (int k = 0; k < 3; k++) begin
    b_in[0][k] = bank_h_in[k]; bank_h_out[k] = b_out[0][k]; b_rsp[0][k] = h_rsp[k];
  end
  fpu_bank #(.NPORTS(1), .NUM_JM(1)) u_bank (
    .clk, .rst_n, .job(jobs), .waiting(job_waiting), .done(jdone),
    .h_in(b_in), .h_out(b_out), .h_rsp(b_rsp), .op_evt
  );
  tb_handle_mem #(.NH(3)) u_mem (.clk, .req(h_req), .rsp(h_rsp));

  int seen [6];
  always @(posedge clk) seen[int'(phase)]++;

  localparam int MB = 5000, MB2 = 7000, SB = 9000;
  img_t img;

  task automatic command(mm_cmd_e op, int b, int e);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_begin = addr_t'(b); cmd_end = addr_t'(e);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);   // taken at the edge in between
    cmd_valid = 0;
  endtask

  task automatic compare_image(int base, string what);
    for (int i = 0; i < IMG_WORDS; i++) begin
      checks++;
      if (u_mem.mem[base + i] !== img[i]) begin
        failures++;
        $display("FAIL %s word %0d got %h exp %h", what, i, u_mem.mem[base + i], img[i]);
      end
    end
  endtask

  task automatic train_one(int base);
    word_t smp [];
    smp = new[IN0 + NOUT];
    foreach (smp[i]) begin smp[i] = rnd_small(); u_mem.mem[SB + i] = smp[i]; end
    command(MMC_TRAIN, SB, SB + IN0 + NOUT);
    wait (train_evt);
    @(negedge clk);
    train(img, smp);
    compare_image(base, "after training");
  endtask

  initial begin
    cmd_valid = 0; cmd_op = MMC_ASSIGN; cmd_begin = '0; cmd_end = '0; ex_ready = 0;
    foreach (seen[i]) seen[i] = 0;
    img = make_image(word_t'(-32'sd3277));  // learning rate -0.05
    foreach (img[i]) u_mem.mem[MB + i] = img[i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (phase != MM_UNASSIGNED) begin failures++; $display("FAIL not UNASSIGNED after reset"); end
    command(MMC_ASSIGN, MB, MB + IMG_WORDS);
    repeat (20) @(negedge clk);
    checks++; if (phase != MM_ASSIGNED || dp_id != 8'd7) begin failures++; $display("FAIL not ASSIGNED"); end
    for (int s = 0; s < 3; s++) train_one(MB);
    // export the loss
    command(MMC_METRIC, 0, 0);
    wait (ex_valid); @(negedge clk);
    checks++; if (ex_data !== img[HDR_LOSS] || !ex_last) begin failures++; $display("FAIL metric %h exp %h", ex_data, img[HDR_LOSS]); end
    ex_ready = 1; @(negedge clk); ex_ready = 0;
    // export the model
    command(MMC_MODEL, 0, 0);
    for (int i = 0; i < IMG_WORDS; i++) begin
      while (!ex_valid) @(negedge clk);
      checks++;
      if (ex_data !== img[i] || ex_last != (i == IMG_WORDS - 1)) begin
        failures++; $display("FAIL export word %0d got %h exp %h last %0b", i, ex_data, img[i], ex_last);
      end
      ex_ready = 1; @(negedge clk); ex_ready = 0;
    end
    repeat (5) @(negedge clk);
    checks++; if (phase != MM_ASSIGNED) begin failures++; $display("FAIL not back in ASSIGNED"); end
    // reassign to a second model
    img = make_image(word_t'(-32'sd6554));
    foreach (img[i]) u_mem.mem[MB2 + i] = img[i];
    command(MMC_ASSIGN, MB2, MB2 + IMG_WORDS);
    repeat (20) @(negedge clk);
    train_one(MB2);
    for (int p = 0; p < 6; p++) begin
      checks++; if (seen[p] == 0) begin failures++; $display("FAIL state %0d never reached", p); end
    end
    checks++; if (u_mem.n_oob != 0) begin failures++; $display("FAIL %0d accesses outside their region", u_mem.n_oob); end
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
