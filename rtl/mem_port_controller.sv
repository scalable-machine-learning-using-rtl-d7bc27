// mem_port_controller: one memory handle port of the memory management unit,
// with a small write-back cache.
//
// The client (Data Pipeline Router, Model Manager or FPU Job Manager) drives
// a memory handle: a private region, a pointer and r_en / w_en strobes held
// until a one-cycle done pulse. The port keeps one cache line of LINE words.
// A hit is answered from the line in two cycles without touching the shared
// memory. On a miss the line's dirty words are written back first (lazily:
// nothing is written while hits continue), then the new line is fetched and
// the request served from it. read_through / write_through go straight to
// memory for a missing address, and keep the line up to date on a hit.
// flush writes back all dirty words and invalidates the line.
//
// Towards memory it issues word commands; cmd.req is held for a whole
// write-back, fill or single access, so the round-robin multiplexer serves
// the port's burst without interleaving others, and it drops for one cycle
// between bursts.
//
// From the source: one controller per handle port, a small cache, lazy write
// of the cache only when a request misses, safe because no two handles share
// a region. This design's choices: a single line, per-word dirty bits so only
// written words go back (a line may reach past the region's end), and the
// flush request.
//
// The reset is asynchronous; the only other use of rst_n is to switch the
// region assertion off during reset, which lint tools report as a reset
// used both ways. It drives no logic.
module mem_port_controller
  import ml_pkg::*;
#(
  parameter int unsigned LINE = 8,
  localparam int unsigned LB  = $clog2(LINE)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mh_req_t  req,
  output mh_rsp_t  rsp,
  output mem_cmd_t mcmd,
  input  mem_ack_t mack,
  output logic     hit_evt,   // a request was served from the cache
  output logic     miss_evt   // a request caused a fill
);
  typedef enum logic [2:0] {S_IDLE, S_WB, S_FILL, S_SINGLE, S_GAP, S_FLUSHED} state_e;

  state_e           st, after_gap;
  word_t            line [LINE];
  logic [LINE-1:0]  dirty;
  logic             lvalid;
  addr_t            tag;        // address of word 0 of the cached line
  addr_t            new_tag;
  logic [LB-1:0]    idx;
  logic             done_r;
  word_t            load_r;

  addr_t  ptr_base;
  logic   hit;
  logic   active;
  logic [LB-1:0] ofs;

  assign ptr_base = {req.ptr[ADDR_W-1:LB], {LB{1'b0}}};
  assign ofs      = req.ptr[LB-1:0];
  assign hit      = lvalid && (ptr_base == tag);
  assign active   = (req.r_en || req.w_en || req.flush) && !done_r;

  always_comb begin
    mcmd       = '0;
    mcmd.req   = (st == S_WB) || (st == S_FILL) || (st == S_SINGLE);
    unique case (st)
      S_WB: begin
        mcmd.valid = dirty[idx];
        mcmd.we    = 1'b1;
        mcmd.addr  = tag + addr_t'(idx);
        mcmd.wdata = line[idx];
      end
      S_FILL: begin
        mcmd.valid = 1'b1;
        mcmd.addr  = new_tag + addr_t'(idx);
      end
      S_SINGLE: begin
        mcmd.valid = 1'b1;
        mcmd.we    = req.w_en;
        mcmd.addr  = req.ptr;
        mcmd.wdata = req.data_store;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      after_gap <= S_IDLE;
      dirty     <= '0;
      lvalid    <= 1'b0;
      tag       <= '0;
      new_tag   <= '0;
      idx       <= '0;
      done_r    <= 1'b0;
      load_r    <= '0;
      hit_evt   <= 1'b0;
      miss_evt  <= 1'b0;
    end else begin
      done_r <= 1'b0;
      hit_evt  <= 1'b0;
      miss_evt <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (active) begin
            if (req.flush) begin
              idx       <= '0;
              after_gap <= S_FLUSHED;
              st        <= (|dirty) ? S_WB : S_FLUSHED;
            end else if (hit) begin
              done_r <= 1'b1;
              hit_evt  <= 1'b1;
              if (req.r_en) load_r <= line[ofs];
              if (req.w_en) begin
                line[ofs] <= req.data_store;
                if (req.write_through) st <= S_SINGLE;
                else dirty[ofs] <= 1'b1;
                done_r <= !req.write_through;
              end
            end else if ((req.r_en && req.read_through) || (req.w_en && req.write_through)) begin
              st <= S_SINGLE;
            end else begin
              miss_evt  <= 1'b1;
              new_tag   <= ptr_base;
              idx       <= '0;
              after_gap <= S_FILL;
              st        <= (|dirty) ? S_WB : S_FILL;
            end
          end
        end
        S_WB: begin
          if (!dirty[idx] || mack.ack) begin
            if (mack.ack) dirty[idx] <= 1'b0;
            idx <= idx + LB'(1);
            if (idx == LB'(LINE - 1)) st <= S_GAP;
          end
        end
        S_FILL: begin
          if (mack.ack) begin
            line[idx] <= mack.rdata;
            idx <= idx + LB'(1);
            if (idx == LB'(LINE - 1)) begin
              tag       <= new_tag;
              lvalid    <= 1'b1;
              dirty     <= '0;
              after_gap <= S_IDLE;
              st        <= S_GAP;
            end
          end
        end
        S_SINGLE: begin
          if (mack.ack) begin
            if (req.r_en) load_r <= mack.rdata;
            done_r  <= 1'b1;
            after_gap <= S_IDLE;
            st        <= S_GAP;
          end
        end
        S_GAP: st <= after_gap;
        S_FLUSHED: begin
          lvalid   <= 1'b0;
          done_r <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp.avail     = (st == S_IDLE);
    rsp.done      = done_r;
    rsp.data_load = load_r;
  end

  // A client only touches its own region.
  a_in_region: assert property (@(posedge clk) disable iff (!rst_n)
    (req.r_en || req.w_en) |-> (req.ptr >= req.region_begin && req.ptr < req.region_end));
endmodule
