// tb_fpu_job_manager: runs every FPU operation once on a single Job Manager
// with two ports, on random operands in a behavioural memory, and compares
// each result word with values computed here. Jobs are placed on port 1 so
// the manager has to search past port 0. Also checks that done is a single
// pulse and that no access leaves its region.
// Operations are the source's equations 3 to 12; the fixed-point reference
// and the stimulus are this design's own.
module tb_fpu_job_manager;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [1:0] waiting;
  logic       want, busy, done, op_evt;
  logic [0:0] portno;
  fpu_job_t   job;
  addr_t      base [3];
  mh_req_t    acc [3], mreq [3];
  mh_rsp_t    rsp [3];

  fpu_job_manager #(.NPORTS(2)) dut (
    .clk, .rst_n, .waiting, .in_use(2'b00), .claim_ok(1'b1), .want, .busy,
    .portno, .done, .job, .base, .acc, .rsp, .op_evt
  );
  always_comb for (int k = 0; k < 3; k++) begin
    mreq[k] = acc[k];
    mreq[k].region_end = base[k] + 24'd100;
  end
  tb_handle_mem #(.NH(3)) u_mem (.clk, .req(mreq), .rsp(rsp));

  localparam int B1 = 1000, B2 = 2000, B3 = 3000;
  localparam int NO = 3, NI = 2;

  function automatic word_t rnd();
    return word_t'(int'($urandom_range(262143)) - 131072);
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(fpu_op_e op, word_t lr);
    int n_done;
    n_done = 0;
    job = '{op: op, n_out: 16'(NO), n_in: 16'(NI), scalar: lr};
    waiting = 2'b10;
    while (n_done == 0) begin
      @(posedge clk);
      if (done) begin
        n_done++;
        check("served port", word_t'(portno), 1);
      end
    end
    waiting = 2'b00;
    repeat (3) @(posedge clk);
    check("single done pulse", word_t'(n_done), 1);
  endtask

  word_t W [NO*NI + NO], X [8], Y [8], E [16];
  word_t lr;

  initial begin
    base[0] = B1; base[1] = B2; base[2] = B3;
    waiting = '0; job = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lr = word_t'(-32'sd6554);   // -0.1

    // LIN_FWD
    foreach (W[i]) begin W[i] = rnd(); u_mem.mem[B1 + i] = W[i]; end
    for (int i = 0; i < NI; i++) begin X[i] = rnd(); u_mem.mem[B2 + i] = X[i]; end
    run(OP_LIN_FWD, lr);
    for (int o = 0; o < NO; o++) begin
      word_t a;
      a = W[NO*NI + o];
      for (int i = 0; i < NI; i++) a += fx_mul(W[i*NO + o], X[i]);
      check("lin_fwd", u_mem.mem[B3 + o], a);
    end
    // LIN_BWD: dx = W^T dz
    for (int o = 0; o < NO; o++) begin X[o] = rnd(); u_mem.mem[B2 + o] = X[o]; end
    run(OP_LIN_BWD, lr);
    for (int i = 0; i < NI; i++) begin
      word_t a;
      a = '0;
      for (int o = 0; o < NO; o++) a += fx_mul(W[i*NO + o], X[o]);
      check("lin_bwd", u_mem.mem[B3 + i], a);
    end
    // LIN_WGRAD: h1 = x, h2 = dz
    for (int i = 0; i < NI; i++) begin Y[i] = rnd(); u_mem.mem[B1 + i] = Y[i]; end
    run(OP_LIN_WGRAD, lr);
    for (int i = 0; i < NI; i++)
      for (int o = 0; o < NO; o++) check("lin_wgrad", u_mem.mem[B3 + i*NO + o], fx_mul(Y[i], X[o]));
    // LIN_BGRAD
    run(OP_LIN_BGRAD, lr);
    for (int o = 0; o < NO; o++) check("lin_bgrad", u_mem.mem[B3 + o], X[o]);
    // LIN_WUPD and LIN_BUPD: h1 = W|b, h2 = dW|db
    foreach (W[i]) begin W[i] = rnd(); u_mem.mem[B1 + i] = W[i]; E[i] = rnd(); u_mem.mem[B2 + i] = E[i]; end
    run(OP_LIN_WUPD, lr);
    for (int k = 0; k < NO*NI; k++) check("lin_wupd", u_mem.mem[B1 + k], W[k] + fx_mul(lr, E[k]));
    for (int k = 0; k < NO; k++) check("wupd leaves b", u_mem.mem[B1 + NO*NI + k], W[NO*NI + k]);
    run(OP_LIN_BUPD, lr);
    for (int k = 0; k < NO; k++) check("lin_bupd", u_mem.mem[B1 + NO*NI + k], W[NO*NI + k] + fx_mul(lr, E[NO*NI + k]));
    // RELU_FWD on h2
    for (int k = 0; k < NO; k++) begin X[k] = rnd(); u_mem.mem[B2 + k] = X[k]; end
    run(OP_RELU_FWD, lr);
    for (int k = 0; k < NO; k++) check("relu_fwd", u_mem.mem[B3 + k], ($signed(X[k]) > 0) ? X[k] : '0);
    // RELU_BWD: h1 = x, h2 = dz
    for (int k = 0; k < NO; k++) begin Y[k] = rnd(); u_mem.mem[B1 + k] = Y[k]; end
    run(OP_RELU_BWD, lr);
    for (int k = 0; k < NO; k++) check("relu_bwd", u_mem.mem[B3 + k], ($signed(Y[k]) > 0) ? X[k] : '0);
    // MSE_FWD / MSE_BWD: h1 = y, h2 = yhat
    run(OP_MSE_FWD, lr);
    begin
      word_t l;
      l = '0;
      for (int k = 0; k < NO; k++) l += fx_mul(Y[k] - X[k], Y[k] - X[k]);
      check("mse_fwd", u_mem.mem[B3], l);
    end
    run(OP_MSE_BWD, lr);
    for (int k = 0; k < NO; k++) check("mse_bwd", u_mem.mem[B3 + k], word_t'(-((Y[k] - X[k]) <<< 1)));
    check("accesses in region", word_t'(u_mem.n_oob), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
