// tb_fpu_bank: an FPU Bank with two ports and two Job Managers on a
// behavioural memory. Both ports post a linear-forward job at once, several
// rounds in a row; checks each result against values computed here, that
// each port gets exactly one done per job, that the two jobs ran at the same
// time on different Job Managers, and that no port was served by two.
// Timing: memory answers 1 to 3 clocks after each request. Follows the
// source's one-port-per-Model-Manager bank; the checks are this design's.
module tb_fpu_bank;
  import ml_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int NO = 3, NI = 4;

  fpu_job_t job [2];
  logic [1:0] waiting, done, op_evt;
  mh_req_t h_in [2][3], h_out [2][3], mreq [6];
  mh_rsp_t h_rsp [2][3], mrsp [6];

  fpu_bank #(.NPORTS(2), .NUM_JM(2)) dut (.clk, .rst_n, .job, .waiting, .done, .h_in, .h_out, .h_rsp, .op_evt);
  always_comb for (int p = 0; p < 2; p++) for (int k = 0; k < 3; k++) begin
    mreq[3*p + k] = h_out[p][k];
    h_rsp[p][k]   = mrsp[3*p + k];
  end
  tb_handle_mem #(.NH(6)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  int overlap, dbl, n_done [2];
  always @(posedge clk) begin
    if (dut.busy == 2'b11) overlap++;
    if (dut.busy == 2'b11 && dut.pno[0] == dut.pno[1]) dbl++;
    for (int p = 0; p < 2; p++) if (done[p]) n_done[p]++;
  end

  function automatic word_t rnd();
    return word_t'(int'($urandom_range(262143)) - 131072);
  endfunction

  word_t W [2][NO*NI + NO], X [2][NI];

  initial begin
    overlap = 0; dbl = 0; n_done[0] = 0; n_done[1] = 0;
    waiting = '0;
    for (int p = 0; p < 2; p++) begin
      job[p] = '{op: OP_LIN_FWD, n_out: 16'(NO), n_in: 16'(NI), scalar: '0};
      for (int k = 0; k < 3; k++) begin
        h_in[p][k] = '0;
        h_in[p][k].region_begin = addr_t'(1000 * (3*p + k + 1));
        h_in[p][k].region_end   = addr_t'(1000 * (3*p + k + 1) + 100);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int p = 0; p < 2; p++) begin
        foreach (W[p][i]) begin W[p][i] = rnd(); u_mem.mem[1000 * (3*p + 1) + i] = W[p][i]; end
        foreach (X[p][i]) begin X[p][i] = rnd(); u_mem.mem[1000 * (3*p + 2) + i] = X[p][i]; end
      end
      @(negedge clk);
      waiting = 2'b11;
      fork
        begin wait (done[0]); @(negedge clk); waiting[0] = 0; end
        begin wait (done[1]); @(negedge clk); waiting[1] = 0; end
      join
      repeat (3) @(negedge clk);
      for (int p = 0; p < 2; p++)
        for (int o = 0; o < NO; o++) begin
          word_t acc;
          acc = W[p][NO*NI + o];
          for (int i = 0; i < NI; i++) acc += fx_mul(W[p][i*NO + o], X[p][i]);
          checks++;
          if (u_mem.mem[1000 * (3*p + 3) + o] !== acc) begin
            failures++; $display("FAIL round %0d port %0d z[%0d]", round, p, o);
          end
        end
    end
    checks++; if (n_done[0] != 4 || n_done[1] != 4) begin failures++; $display("FAIL done counts %0d %0d", n_done[0], n_done[1]); end
    checks++; if (overlap == 0) begin failures++; $display("FAIL Job Managers never ran together"); end
    checks++; if (dbl != 0) begin failures++; $display("FAIL a port was served twice"); end
    checks++; if (u_mem.n_oob != 0) begin failures++; $display("FAIL access outside region"); end
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
