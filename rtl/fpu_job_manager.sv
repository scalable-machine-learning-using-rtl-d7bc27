// fpu_job_manager: one FPU Job Manager of the FPU Bank. It finds a Model
// Manager port with a job waiting, carries the job out by reading and
// writing memory through that port's three memory handles, and signals done.
//
// Search: in SEARCHING it looks at port `portno`; if that port has a job
// waiting and no other Job Manager is serving it, it claims the port (FOUND),
// otherwise it moves on to the next port. After a job it moves on as well,
// so ports are served round-robin.
//
// Execution: every operation is a pair of nested loops over word indices.
// Each step reads operands through handle 1 (h1) and handle 2 (h2), one word
// at a time, and writes a result through h3 (or back through h1 for the
// weight and bias updates). Addresses are offsets from the handles' region
// starts; matrices are column-major, W[o][i] at i*n_out + o, with the bias
// stored after W and the bias gradient after dW. The operations are:
//   LIN_FWD   z[o]  = b[o] + sum_i W[o][i] x[i]     h1=W|b h2=x  h3=z
//   LIN_BWD   dx[i] = sum_o W[o][i] dz[o]           h1=W   h2=dz h3=dx
//   LIN_WGRAD dW[o][i] = dz[o] x[i]                 h1=x   h2=dz h3=dW
//   LIN_BGRAD db[o] = dz[o]                                h2=dz h3=db
//   LIN_WUPD  W += lr dW    LIN_BUPD b += lr db     h1=W|b h2=dW|db
//   RELU_FWD  z = max(x,0)                                 h2=x  h3=z
//   RELU_BWD  dx = x > 0 ? dz : 0                   h1=x   h2=dz h3=dx
//   MSE_FWD   L = sum (y - yhat)^2                  h1=y   h2=yhat h3=L
//   MSE_BWD   dyhat = -2 (y - yhat)                 h1=y   h2=yhat h3=dyhat
// A multiply-accumulate unit in fixed point is the "FPU". When the loops
// finish, all three handle caches are flushed so the next job, which may read
// the results through a different handle, sees them; then done pulses for
// one cycle on the served port.
//
// From the source: the SEARCHING/FOUND machine and its port increments, one
// Job Manager able to perform every operation, the list of operations, and
// column-major storage. This design's choices: the operand-to-handle
// assignment, the loop order, fixed-point arithmetic, the update written as
// W + lr dW exactly as the source writes it (the learning rate passed by the
// host is therefore negative), MSE backward taken element by element, and the
// final flush.
module fpu_job_manager
  import ml_pkg::*;
#(
  parameter int unsigned NPORTS = 8,
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // port status
  input  logic [NPORTS-1:0] waiting,      // job waiting on each port
  input  logic [NPORTS-1:0] in_use,       // port served by another Job Manager
  input  logic              claim_ok,     // no lower-numbered manager claims the same port now
  output logic              want,         // about to claim port `portno`
  output logic              busy,         // serving port `portno`
  output logic [PW-1:0]     portno,
  output logic              done,         // job on port `portno` finished
  // the served port's job and handles
  input  fpu_job_t          job,
  input  addr_t             base [3],     // region_begin of h1..h3
  output mh_req_t           acc [3],      // pointer and strobes of h1..h3
  input  mh_rsp_t           rsp [3],
  output logic              op_evt        // one pulse per finished job
);
  typedef enum logic [3:0] {
    S_SEARCH, S_OUTER, S_PRE, S_IA, S_IB, S_CALC, S_IW, S_POST, S_FLUSH, S_DONE
  } state_e;

  state_e        st;
  fpu_job_t      j;                  // latched job
  logic [31:0]   oc, ic;             // loop counts
  logic [31:0]   u, v;               // loop indices
  word_t         acc_r, a_r, b_r, w_val;
  logic [2:0]    fdone;
  logic [31:0]   n_oi;

  // operation properties
  logic pre_bias, pre_a, in_a, in_b, in_w, post_w, w_to_h1;
  always_comb begin
    {pre_bias, pre_a, in_a, in_b, in_w, post_w, w_to_h1} = '0;
    unique case (j.op)
      OP_LIN_FWD:   begin pre_bias = 1; in_a = 1; in_b = 1; post_w = 1; end
      OP_LIN_BWD:   begin in_a = 1; in_b = 1; post_w = 1; end
      OP_LIN_WGRAD: begin pre_a = 1; in_b = 1; in_w = 1; end
      OP_LIN_BGRAD: begin in_b = 1; in_w = 1; end
      OP_LIN_WUPD,
      OP_LIN_BUPD:  begin in_a = 1; in_b = 1; in_w = 1; w_to_h1 = 1; end
      OP_RELU_FWD:  begin in_b = 1; in_w = 1; end
      OP_RELU_BWD:  begin in_a = 1; in_b = 1; in_w = 1; end
      OP_MSE_FWD:   begin in_a = 1; in_b = 1; post_w = 1; end
      OP_MSE_BWD:   begin in_a = 1; in_b = 1; in_w = 1; end
      default: ;
    endcase
  end

  assign n_oi = 32'(j.n_out) * 32'(j.n_in);

  // word offsets for the current (u, v)
  logic [31:0] off_pre, off_a, off_b, off_w, off_post;
  always_comb begin
    off_pre  = '0; off_a = v; off_b = v; off_w = v; off_post = u;
    unique case (j.op)
      OP_LIN_FWD:   begin off_pre = n_oi + u; off_a = v * 32'(j.n_out) + u; end
      OP_LIN_BWD:   begin off_a = u * 32'(j.n_out) + v; end
      OP_LIN_WGRAD: begin off_pre = u; off_w = u * 32'(j.n_out) + v; end
      OP_LIN_BUPD:  begin off_a = n_oi + v; off_b = n_oi + v; off_w = n_oi + v; end
      OP_MSE_FWD:   begin off_post = '0; end
      default: ;
    endcase
  end

  // value computed from the operands of one inner step
  word_t diff;
  assign diff = a_r - b_r;
  always_comb begin
    w_val = '0;
    unique case (j.op)
      OP_LIN_WGRAD: w_val = fx_mul(a_r, b_r);
      OP_LIN_BGRAD: w_val = b_r;
      OP_LIN_WUPD,
      OP_LIN_BUPD:  w_val = a_r + fx_mul(j.scalar, b_r);
      OP_RELU_FWD:  w_val = $signed(b_r) > 0 ? b_r : '0;
      OP_RELU_BWD:  w_val = $signed(a_r) > 0 ? b_r : '0;
      OP_MSE_BWD:   w_val = word_t'(-(diff <<< 1));
      default: ;
    endcase
  end

  // memory handle strobes
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      acc[k]            = '0;
      acc[k].region_begin = base[k];
      acc[k].flush      = (st == S_FLUSH) && !fdone[k];
    end
    unique case (st)
      S_PRE: begin
        if (pre_bias || pre_a) begin
          acc[0].r_en = 1'b1;
          acc[0].ptr  = base[0] + addr_t'(off_pre);
        end
      end
      S_IA: begin
        acc[0].r_en = 1'b1;
        acc[0].ptr  = base[0] + addr_t'(off_a);
      end
      S_IB: begin
        acc[1].r_en = 1'b1;
        acc[1].ptr  = base[1] + addr_t'(off_b);
      end
      S_IW: begin
        if (w_to_h1) begin
          acc[0].w_en       = 1'b1;
          acc[0].ptr        = base[0] + addr_t'(off_w);
          acc[0].data_store = w_val;
        end else begin
          acc[2].w_en       = 1'b1;
          acc[2].ptr        = base[2] + addr_t'(off_w);
          acc[2].data_store = w_val;
        end
      end
      S_POST: begin
        acc[2].w_en       = 1'b1;
        acc[2].ptr        = base[2] + addr_t'(off_post);
        acc[2].data_store = acc_r;
      end
      default: ;
    endcase
  end

  assign want = (st == S_SEARCH) && waiting[portno] && !in_use[portno] && !done;
  assign busy = (st != S_SEARCH);

  function automatic state_e first_inner(logic ia, logic ib);
    return ia ? S_IA : (ib ? S_IB : S_CALC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_SEARCH;
      portno <= '0;
      done   <= 1'b0;
      op_evt <= 1'b0;
      j      <= '0;
      oc     <= '0;
      ic     <= '0;
      u      <= '0;
      v      <= '0;
      acc_r  <= '0;
      a_r    <= '0;
      b_r    <= '0;
      fdone  <= '0;
    end else begin
      done   <= 1'b0;
      op_evt <= 1'b0;
      unique case (st)
        S_SEARCH: begin
          if (want && claim_ok) begin
            j  <= job;
            st <= S_OUTER;
            u  <= '0;
            unique case (job.op)
              OP_LIN_FWD:               begin oc <= 32'(job.n_out); ic <= 32'(job.n_in); end
              OP_LIN_BWD, OP_LIN_WGRAD: begin oc <= 32'(job.n_in);  ic <= 32'(job.n_out); end
              OP_LIN_WUPD:              begin oc <= 32'd1; ic <= 32'(job.n_out) * 32'(job.n_in); end
              default:                  begin oc <= 32'd1; ic <= 32'(job.n_out); end
            endcase
          end else if (!done) begin
            portno <= (portno == PW'(NPORTS - 1)) ? '0 : portno + PW'(1);
          end
        end
        S_OUTER: begin
          acc_r <= '0;
          v     <= '0;
          st    <= (pre_bias || pre_a) ? S_PRE : first_inner(in_a, in_b);
        end
        S_PRE: begin
          if (rsp[0].done) begin
            if (pre_bias) acc_r <= rsp[0].data_load;
            else          a_r   <= rsp[0].data_load;
            st <= first_inner(in_a, in_b);
          end
        end
        S_IA: begin
          if (rsp[0].done) begin
            a_r <= rsp[0].data_load;
            st  <= in_b ? S_IB : S_CALC;
          end
        end
        S_IB: begin
          if (rsp[1].done) begin
            b_r <= rsp[1].data_load;
            st  <= S_CALC;
          end
        end
        S_CALC: begin
          unique case (j.op)
            OP_LIN_FWD, OP_LIN_BWD: acc_r <= acc_r + fx_mul(a_r, b_r);
            OP_MSE_FWD:             acc_r <= acc_r + fx_mul(diff, diff);
            default: ;
          endcase
          if (in_w) st <= S_IW;
          else if (v == ic - 1) st <= post_w ? S_POST : S_OUTER;
          else begin
            v  <= v + 1;
            st <= first_inner(in_a, in_b);
          end
          if (!in_w && v == ic - 1 && !post_w) u <= u + 1;
          if (!in_w && v == ic - 1 && !post_w && u == oc - 1) st <= S_FLUSH;
        end
        S_IW: begin
          if (rsp[w_to_h1 ? 0 : 2].done) begin
            if (v == ic - 1) begin
              u  <= u + 1;
              st <= (u == oc - 1) ? S_FLUSH : S_OUTER;
            end else begin
              v  <= v + 1;
              st <= first_inner(in_a, in_b);
            end
          end
        end
        S_POST: begin
          if (rsp[2].done) begin
            u  <= u + 1;
            st <= (u == oc - 1) ? S_FLUSH : S_OUTER;
          end
        end
        S_FLUSH: begin
          for (int k = 0; k < 3; k++) if (rsp[k].done) fdone[k] <= 1'b1;
          if ((fdone | {rsp[2].done, rsp[1].done, rsp[0].done}) == 3'b111) begin
            fdone <= '0;
            st    <= S_DONE;
          end
        end
        S_DONE: begin
          done   <= 1'b1;
          op_evt <= 1'b1;
          st     <= S_SEARCH;
        end
        default: st <= S_SEARCH;
      endcase
    end
  end
endmodule
