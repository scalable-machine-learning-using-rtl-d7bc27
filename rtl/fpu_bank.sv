// fpu_bank: shell around a bank of FPU Job Managers, with one port per Model
// Manager.
//
// Port p carries the Model Manager's job (operation, sizes, learning rate),
// its job_waiting flag, the regions of its three memory handles, and returns
// done. While a Job Manager serves the port, the bank hands it the port's
// handle regions and responses, and drives the port's handle pointers and
// strobes from that Job Manager (h_out); the Model Manager forwards them to
// its memory ports. A port is "in use" while a Job Manager serves it; if two
// Job Managers find the same waiting port in one cycle, the lower-numbered
// one takes it. The bank has no state of its own.
//
// From the source: the bank is a stateless shell, one port per Model Manager,
// and by default one Job Manager per Model Manager (NUM_JM = NPORTS); the
// number of Job Managers is a parameter because the bank is meant to work
// with any number of them. Arbitration between Job Managers is this design's
// choice.
module fpu_bank
  import ml_pkg::*;
#(
  parameter int unsigned NPORTS = 8,
  parameter int unsigned NUM_JM = NPORTS,
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fpu_job_t          job     [NPORTS],
  input  logic [NPORTS-1:0] waiting,
  output logic [NPORTS-1:0] done,
  input  mh_req_t           h_in    [NPORTS][3],   // regions from the Model Manager
  output mh_req_t           h_out   [NPORTS][3],   // regions + Job Manager strobes
  input  mh_rsp_t           h_rsp   [NPORTS][3],
  output logic [NUM_JM-1:0] op_evt
);
  logic [NUM_JM-1:0] want, busy, jdone, claim_ok;
  logic [PW-1:0]     pno   [NUM_JM];
  mh_req_t           jacc  [NUM_JM][3];
  addr_t             jbase [NUM_JM][3];
  mh_rsp_t           jrsp  [NUM_JM][3];
  fpu_job_t          jjob  [NUM_JM];
  logic [NPORTS-1:0] in_use_all;
  logic [NPORTS-1:0] in_use_x [NUM_JM];
  logic [NPORTS-1:0] wait_eff;

  // ports being served, and ports finishing this cycle (still flagged waiting)
  always_comb begin
    in_use_all = '0;
    done       = '0;
    for (int j = 0; j < NUM_JM; j++) begin
      if (busy[j])  in_use_all[pno[j]] = 1'b1;
      if (jdone[j]) done[pno[j]]       = 1'b1;
    end
    wait_eff = waiting & ~done;
  end

  for (genvar jj = 0; jj < NUM_JM; jj++) begin : g_jm
    always_comb begin
      claim_ok[jj] = 1'b1;
      for (int i = 0; i < jj; i++)
        if (want[i] && pno[i] == pno[jj]) claim_ok[jj] = 1'b0;
      in_use_x[jj] = in_use_all;
      jjob[jj] = job[pno[jj]];
      for (int k = 0; k < 3; k++) begin
        jbase[jj][k] = h_in[pno[jj]][k].region_begin;
        jrsp[jj][k]  = h_rsp[pno[jj]][k];
      end
    end

    fpu_job_manager #(.NPORTS(NPORTS)) u_jm (
      .clk, .rst_n,
      .waiting(wait_eff), .in_use(in_use_x[jj]), .claim_ok(claim_ok[jj]),
      .want(want[jj]), .busy(busy[jj]), .portno(pno[jj]), .done(jdone[jj]),
      .job(jjob[jj]), .base(jbase[jj]), .acc(jacc[jj]), .rsp(jrsp[jj]),
      .op_evt(op_evt[jj])
    );
  end

  // handle strobes towards each port
  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int k = 0; k < 3; k++) begin
        h_out[p][k]               = h_in[p][k];
        h_out[p][k].ptr           = h_in[p][k].region_begin;
        h_out[p][k].r_en          = 1'b0;
        h_out[p][k].w_en          = 1'b0;
        h_out[p][k].flush         = 1'b0;
        h_out[p][k].read_through  = 1'b0;
        h_out[p][k].write_through = 1'b0;
        h_out[p][k].data_store    = '0;
      end
    for (int j = 0; j < NUM_JM; j++)
      if (busy[j])
        for (int k = 0; k < 3; k++) begin
          h_out[pno[j]][k].ptr        = jacc[j][k].ptr;
          h_out[pno[j]][k].r_en       = jacc[j][k].r_en;
          h_out[pno[j]][k].w_en       = jacc[j][k].w_en;
          h_out[pno[j]][k].flush      = jacc[j][k].flush;
          h_out[pno[j]][k].data_store = jacc[j][k].data_store;
        end
  end
endmodule
