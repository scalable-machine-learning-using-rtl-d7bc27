// model_manager: controls the training of one model. It holds the model's
// place in memory and, for each training sample, runs stochastic gradient
// descent as a sequence of jobs on its FPU Bank port: a forward pass, the
// loss, a backward pass and the weight update.
//
// States follow the Model Manager state diagram: UNASSIGNED until the Data
// Pipeline Router assigns a model (and ASSIGNED may be reassigned), then
// ASSIGNED; a TRAIN command runs FORWARD and then BACKWARD/UPDATE and returns
// to ASSIGNED; EXPORT_METRIC and EXPORT_MODEL return the loss word or the
// whole model image on the export stream and return to ASSIGNED.
//
// Model image (written by the host, word offsets from the model's base):
//   0 number of layers, 1 learning rate, 2 output size, 3 loss (written here),
//   4 + 8*l: layer l descriptor: type (1 linear, 2 ReLU), inputs, outputs,
//   offset of W|b, of the output z, of the output gradient dz, of dW|db.
// A sample region holds the input x followed by the target y.
//
// Per sample: for each layer, fetch its descriptor (and the previous layer's
// z and dz offsets) through handle 1, then issue one job: LIN_FWD or
// RELU_FWD. Then MSE_FWD (loss) and MSE_BWD (gradient of the last output).
// Then from the last layer down: linear layers get LIN_WGRAD, LIN_BGRAD,
// LIN_BWD (skipped for layer 0), LIN_WUPD, LIN_BUPD; ReLU layers RELU_BWD
// (skipped for layer 0). A job is issued by placing the operation, sizes and
// the three handle regions on the port and raising job_waiting until done.
// While a job runs the handles' pointers and strobes come from the FPU Bank;
// otherwise the Model Manager drives handle 1 itself.
//
// Interface: cmd_* from the router (cmd_ready high when a command is taken),
// ex_* export stream (valid/ready), h_* three memory handle ports to the
// memory unit, job/job_waiting/job_done/bank_h_* the FPU Bank port.
// From the source: the state diagram, the forward/backward/update sequence,
// the port signals (three handles, opcode, job waiting, done). This design's
// choices: the model image layout, the job order inside the backward pass
// and the export stream.
//
// Timing: a job is offered with job_waiting and held until the bank's
// job_done pulse; one training step therefore takes the sum of its jobs'
// memory-bound run times (a few thousand clocks for small models).
module model_manager
  import ml_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // commands from the Data Pipeline Router
  input  logic       cmd_valid,
  input  mm_cmd_e    cmd_op,
  input  addr_t      cmd_begin,
  input  addr_t      cmd_end,
  input  logic [7:0] cmd_dp,
  output logic       cmd_ready,
  output mm_phase_e  phase,
  output logic [7:0] dp_id,
  output logic       train_evt,     // pulse: one sample trained
  // export stream
  output logic       ex_valid,
  output word_t      ex_data,
  output logic       ex_last,
  input  logic       ex_ready,
  // memory handles to the memory unit
  output mh_req_t    h_req [3],
  input  mh_rsp_t    h_rsp [3],
  // FPU Bank port
  output fpu_job_t   job,
  output logic       job_waiting,
  input  logic       job_done,
  output mh_req_t    bank_h_in  [3],   // regions offered to the bank
  input  mh_req_t    bank_h_out [3]    // regions + strobes from the bank
);
  typedef enum logic [3:0] {
    S_UNASSIGNED, S_LOADHDR, S_ASSIGNED, S_FETCH, S_JOB, S_NEXT, S_ADV,
    S_EXP_RD, S_EXP_OUT
  } sub_e;
  typedef enum logic [1:0] {P_FWD, P_LOSS, P_BWD} pass_e;

  sub_e        st;
  pass_e       pass;
  mm_phase_e   ph;
  addr_t       mbase, mend, sbase;
  word_t       nlayers, lr, nout, in0;
  logic [15:0] layer;
  logic [2:0]  jstep;
  logic [3:0]  fidx;          // fetch index
  word_t       d [9];         // descriptor words; 7,8 = previous layer z, dz
  addr_t       rd_ptr;
  addr_t       ex_ptr;
  logic        ex_is_model;

  // ---------------------------------------------------------------- jobs
  typedef struct packed {
    logic      valid;
    fpu_op_e   op;
    logic [15:0] n_out, n_in;
    addr_t     b1, e1, b2, e2, b3, e3;
  } jspec_t;

  jspec_t js;
  addr_t  x_b, x_e, dx_b, dx_e, w_b, w_e, z_b, z_e, dz_b, dz_e, g_b, g_e, y_b, y_e;
  logic [31:0] n_oi;
  logic [15:0] nin, nou;

  always_comb begin
    nin  = d[D_IN][15:0];
    nou  = d[D_OUT][15:0];
    n_oi = 32'(nin) * 32'(nou);
    x_b  = (layer == 0) ? sbase : mbase + addr_t'(d[7]);
    x_e  = x_b + addr_t'(nin);
    dx_b = mbase + addr_t'(d[8]);
    dx_e = dx_b + addr_t'(nin);
    w_b  = mbase + addr_t'(d[D_PARAM]);
    w_e  = w_b + addr_t'(n_oi) + addr_t'(nou);
    z_b  = mbase + addr_t'(d[D_Z]);
    z_e  = z_b + addr_t'(nou);
    dz_b = mbase + addr_t'(d[D_DZ]);
    dz_e = dz_b + addr_t'(nou);
    g_b  = mbase + addr_t'(d[D_GRAD]);
    g_e  = g_b + addr_t'(n_oi) + addr_t'(nou);
    y_b  = sbase + addr_t'(in0);
    y_e  = y_b + addr_t'(nout);

    js = '0;
    js.n_out = nou;
    js.n_in  = nin;
    unique case (pass)
      P_FWD: begin
        js.valid = (jstep == 0);
        if (d[D_TYPE] == LAYER_LINEAR) begin
          js.op = OP_LIN_FWD;
          {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {w_b, w_e, x_b, x_e, z_b, z_e};
        end else begin
          js.op = OP_RELU_FWD;
          {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {w_b, w_b, x_b, x_e, z_b, z_e};
        end
      end
      P_LOSS: begin
        // d[] still holds the last layer
        js.valid = (jstep < 2);
        js.op    = (jstep == 0) ? OP_MSE_FWD : OP_MSE_BWD;
        js.n_out = nout[15:0];
        js.n_in  = 16'd1;
        {js.b1, js.e1, js.b2, js.e2} = {y_b, y_e, z_b, z_e};
        if (jstep == 0) {js.b3, js.e3} = {mbase + addr_t'(HDR_LOSS), mbase + addr_t'(HDR_LOSS + 1)};
        else            {js.b3, js.e3} = {dz_b, dz_e};
      end
      default: begin  // P_BWD
        if (d[D_TYPE] == LAYER_LINEAR) begin
          unique case (jstep)
            3'd0: begin js.valid = 1; js.op = OP_LIN_WGRAD;
                        {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {x_b, x_e, dz_b, dz_e, g_b, g_e}; end
            3'd1: begin js.valid = 1; js.op = OP_LIN_BGRAD;
                        {js.b1, js.e1, js.b2, js.e2} = {x_b, x_e, dz_b, dz_e};
                        {js.b3, js.e3} = {g_b + addr_t'(n_oi), g_e}; end
            3'd2: begin js.valid = (layer != 0); js.op = OP_LIN_BWD;
                        {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {w_b, w_e, dz_b, dz_e, dx_b, dx_e}; end
            3'd3: begin js.valid = 1; js.op = OP_LIN_WUPD;
                        {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {w_b, w_e, g_b, g_e, g_b, g_e}; end
            3'd4: begin js.valid = 1; js.op = OP_LIN_BUPD;
                        {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {w_b, w_e, g_b, g_e, g_b, g_e}; end
            default: js.valid = 0;
          endcase
        end else begin
          js.valid = (jstep == 0) && (layer != 0);
          js.op    = OP_RELU_BWD;
          {js.b1, js.e1, js.b2, js.e2, js.b3, js.e3} = {x_b, x_e, dz_b, dz_e, dx_b, dx_e};
        end
      end
    endcase
  end

  localparam logic [2:0] LAST_STEP_FWD = 3'd0, LAST_STEP_LOSS = 3'd1, LAST_STEP_BWD = 3'd4;
  logic [2:0] last_step;
  always_comb
    unique case (pass)
      P_FWD:   last_step = LAST_STEP_FWD;
      P_LOSS:  last_step = LAST_STEP_LOSS;
      default: last_step = LAST_STEP_BWD;
    endcase

  assign job.op      = js.op;
  assign job.n_out   = js.n_out;
  assign job.n_in    = js.n_in;
  assign job.scalar  = lr;
  assign job_waiting = (st == S_JOB);

  always_comb begin
    for (int k = 0; k < 3; k++) bank_h_in[k] = '0;
    bank_h_in[0].region_begin = js.b1; bank_h_in[0].region_end = js.e1;
    bank_h_in[1].region_begin = js.b2; bank_h_in[1].region_end = js.e2;
    bank_h_in[2].region_begin = js.b3; bank_h_in[2].region_end = js.e3;
  end

  // --------------------------------------------------------- own handle
  logic own_rd;
  assign own_rd = (st == S_LOADHDR) || (st == S_FETCH) || (st == S_EXP_RD);
  always_comb begin
    if (st == S_JOB) begin
      for (int k = 0; k < 3; k++) h_req[k] = bank_h_out[k];
    end else begin
      for (int k = 0; k < 3; k++) h_req[k] = '0;
      h_req[0].region_begin = mbase;
      h_req[0].region_end   = mend;
      h_req[0].ptr          = rd_ptr;
      h_req[0].r_en         = own_rd;
      h_req[0].read_through = (st == S_EXP_RD);   // loss / weights straight from memory
    end
  end

  always_comb begin
    rd_ptr = mbase;
    unique case (st)
      S_LOADHDR: rd_ptr = mbase + addr_t'(fidx);
      S_FETCH:   rd_ptr = (fidx < 7) ? mbase + addr_t'(HDR_WORDS) + addr_t'(32'(layer) * DESC_WORDS) + addr_t'(fidx)
                                     : mbase + addr_t'(HDR_WORDS) + addr_t'((32'(layer) - 1) * DESC_WORDS)
                                       + addr_t'((fidx == 7) ? D_Z : D_DZ);
      S_EXP_RD:  rd_ptr = ex_ptr;
      default: ;
    endcase
  end

  // ----------------------------------------------------------- control
  assign cmd_ready = (st == S_UNASSIGNED && cmd_op == MMC_ASSIGN) || (st == S_ASSIGNED);
  assign phase     = ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_UNASSIGNED; ph <= MM_UNASSIGNED; pass <= P_FWD;
      mbase <= '0; mend <= '0; sbase <= '0;
      nlayers <= '0; lr <= '0; nout <= '0; in0 <= '0;
      layer <= '0; jstep <= '0; fidx <= '0; dp_id <= '0;
      for (int k = 0; k < 9; k++) d[k] <= '0;
      ex_valid <= 1'b0; ex_data <= '0; ex_last <= 1'b0; ex_ptr <= '0; ex_is_model <= 1'b0;
      train_evt <= 1'b0;
    end else begin
      train_evt <= 1'b0;
      unique case (st)
        S_UNASSIGNED, S_ASSIGNED: begin
          if (cmd_valid && cmd_ready) begin
            unique case (cmd_op)
              MMC_ASSIGN: begin
                mbase <= cmd_begin; mend <= cmd_end; dp_id <= cmd_dp;
                fidx  <= '0;
                ph    <= MM_ASSIGNED;   // reassignment stays in ASSIGNED
                st    <= S_LOADHDR;
              end
              MMC_TRAIN: begin
                sbase <= cmd_begin;
                layer <= '0; fidx <= '0; jstep <= '0;
                pass  <= P_FWD;
                ph    <= MM_FORWARD;
                st    <= S_FETCH;
              end
              MMC_METRIC: begin
                ex_ptr <= mbase + addr_t'(HDR_LOSS); ex_is_model <= 1'b0;
                ph <= MM_EXPORT_METRIC; st <= S_EXP_RD;
              end
              default: begin
                ex_ptr <= mbase; ex_is_model <= 1'b1;
                ph <= MM_EXPORT_MODEL; st <= S_EXP_RD;
              end
            endcase
          end
        end
        S_LOADHDR: begin
          if (h_rsp[0].done) begin
            unique case (fidx)
              4'd0: nlayers <= h_rsp[0].data_load;
              4'd1: lr      <= h_rsp[0].data_load;
              default: nout <= h_rsp[0].data_load;
            endcase
            fidx <= fidx + 4'd1;
            if (fidx == 4'd2) st <= S_ASSIGNED;
          end
        end
        S_FETCH: begin
          if (h_rsp[0].done) begin
            d[fidx] <= h_rsp[0].data_load;
            if (layer == 0 && fidx == 4'(D_IN)) in0 <= h_rsp[0].data_load;
            if (fidx == 4'd8 || (fidx == 4'd6 && layer == 0)) begin
              fidx <= '0; jstep <= '0; st <= S_NEXT;
            end else begin
              fidx <= fidx + 4'd1;
            end
          end
        end
        S_NEXT: begin
          // skip steps that do not apply to this layer
          if (js.valid) st <= S_JOB;
          else if (jstep != last_step) jstep <= jstep + 3'd1;
          else st <= S_ADV;
        end
        S_JOB: begin
          if (job_done) begin
            if (jstep != last_step) begin
              jstep <= jstep + 3'd1;
              st    <= S_NEXT;
            end else begin
              st <= S_ADV;
            end
          end
        end
        S_ADV: begin
          jstep <= '0;
          unique case (pass)
            P_FWD: begin
              if (32'(layer) == nlayers - 1) begin pass <= P_LOSS; st <= S_NEXT; end
              else begin layer <= layer + 16'd1; st <= S_FETCH; end
            end
            P_LOSS: begin
              pass <= P_BWD; ph <= MM_BACKWARD; st <= S_NEXT;   // d[] holds the last layer
            end
            default: begin
              if (layer == 0) begin
                ph <= MM_ASSIGNED; st <= S_ASSIGNED; train_evt <= 1'b1;
              end else begin
                layer <= layer - 16'd1; st <= S_FETCH;
              end
            end
          endcase
        end
        S_EXP_RD: begin
          if (h_rsp[0].done) begin
            ex_valid <= 1'b1;
            ex_data  <= h_rsp[0].data_load;
            ex_last  <= !ex_is_model || (ex_ptr + addr_t'(1) == mend);
            st       <= S_EXP_OUT;
          end
        end
        S_EXP_OUT: begin
          if (ex_ready) begin
            ex_valid <= 1'b0;
            if (ex_last) begin
              ph <= MM_ASSIGNED; st <= S_ASSIGNED;
            end else begin
              ex_ptr <= ex_ptr + addr_t'(1);
              st <= S_EXP_RD;
            end
          end
        end
        default: st <= S_ASSIGNED;
      endcase
    end
  end
endmodule
