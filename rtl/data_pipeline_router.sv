// data_pipeline_router: the worker's front end. It decodes the host's
// packets arriving over the SPI client, stores models and samples in memory,
// hands models to Model Managers, starts training, and returns metrics and
// weights.
//
// Packets (bytes, multi-byte fields most significant byte first):
//   0x00                                  no-op (clocks out a response byte)
//   0x01 dp[1] n[4] word[4]*n   ASN_MODEL: store an n-word model image in
//        SDRAM and assign it to the lowest-numbered unassigned Model Manager,
//        which then belongs to data pipeline dp
//   0x02 dp[1] n[4] word[4]*n   SAMPLE: store x followed by y in block RAM
//        and make every Model Manager of pipeline dp train on it
//   0x03 mm[1]                  GET_METRIC: return Model Manager mm's loss
//   0x04 mm[1]                  GET_MODEL: return mm's whole model image
// Replies go out on the SPI link as the marker byte 0xA5 followed by the
// words; at other times the link returns the status byte {4'b0, error,
// overflow, training, busy}: busy while a packet is being handled, training
// while any Model Manager is training, overflow (sticky) when a word arrived
// with the word queue full or a header arrived while busy, error (sticky)
// when a model arrived with no free Model Manager.
//
// Incoming words go through a WQ-deep queue to the writer, which writes them
// through the router's own memory handle with write-through, so memory holds
// them when the Model Managers are told. Models are placed one after the
// other from SDRAM address 0. A sample overwrites the single sample buffer
// at the start of block RAM, so the writer first waits until no Model Manager
// of that pipeline is still training on the previous sample. It then sends
// TRAIN with the buffer's region to each of them in turn.
//
// From the source: the router's role, writing models to SDRAM and samples to
// on-chip memory, one memory handle to the memory unit, a pipeline id sent
// with each sample, and memory handle + opcode + active signals to each Model
// Manager. The packet format, status byte, queue and buffer placement are
// this design's choices, as the host protocol itself is not given.
module data_pipeline_router
  import ml_pkg::*;
#(
  parameter int unsigned NUM_MM = 8,
  parameter int unsigned WQ     = 16,
  localparam int unsigned MW = (NUM_MM > 1) ? $clog2(NUM_MM) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPI client
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic        tx_valid,
  output logic [7:0]  tx_byte,
  input  logic        tx_ready,
  output logic [7:0]  status,
  // Model Managers
  output logic [NUM_MM-1:0] mm_cmd_valid,
  output mm_cmd_e     mm_cmd_op,
  output addr_t       mm_cmd_begin,
  output addr_t       mm_cmd_end,
  output logic [7:0]  mm_cmd_dp,
  input  logic [NUM_MM-1:0] mm_cmd_ready,
  input  mm_phase_e   mm_phase [NUM_MM],
  input  logic [7:0]  mm_dp    [NUM_MM],
  input  logic [NUM_MM-1:0] ex_valid,
  input  word_t       ex_data  [NUM_MM],
  input  logic [NUM_MM-1:0] ex_last,
  output logic [NUM_MM-1:0] ex_ready,
  // memory handle
  output mh_req_t     h_req,
  input  mh_rsp_t     h_rsp,
  // events
  output logic        model_evt,    // a model was assigned
  output logic        sample_evt    // a sample was handed to its models
);
  localparam addr_t SAMPLE_BASE = addr_t'(1) << (ADDR_W - 1);
  localparam logic [7:0] MARKER = 8'hA5;
  localparam int unsigned QW = $clog2(WQ);

  // ----------------------------------------------------------- parser
  typedef enum logic [2:0] {R_OP, R_DP, R_N, R_WORD, R_MM} rstate_e;
  rstate_e     rs;
  logic [7:0]  p_op, p_dp;
  logic [31:0] p_n, wcnt;
  logic [1:0]  bcnt;
  logic [31:0] wsh;
  logic        start_pkt;
  logic        overflow, error;

  // word queue
  word_t       q [WQ];
  logic [QW:0] q_wp, q_rp;
  logic        q_push, q_pop, q_full, q_empty;
  word_t       q_din;
  assign q_full  = (q_wp - q_rp) == (QW + 1)'(WQ);
  assign q_empty = q_wp == q_rp;

  // ---------------------------------------------------------- executor
  typedef enum logic [3:0] {
    E_IDLE, E_ASN_WR, E_ASN_CMD, E_SMP_WAIT, E_SMP_WR, E_SMP_CMD,
    E_EXP_CMD, E_EXP_MARK, E_EXP_GET, E_EXP_WORD, E_DROP
  } estate_e;
  estate_e     es;
  logic [7:0]  x_op, x_dp;
  logic [31:0] x_n, x_cnt;
  logic [MW-1:0] x_mm;
  addr_t       alloc;
  addr_t       x_base;
  word_t       x_word;
  logic [1:0]  x_byte;
  logic        x_last;

  logic busy;
  assign busy = (es != E_IDLE) || (rs != R_OP);

  // free Model Manager, and members of the packet's pipeline still training
  logic          free_ok;
  logic [MW-1:0] free_idx;
  logic          dp_training, any_training;
  always_comb begin
    free_ok = 1'b0; free_idx = '0;
    dp_training = 1'b0; any_training = 1'b0;
    for (int i = NUM_MM - 1; i >= 0; i--)
      if (mm_phase[i] == MM_UNASSIGNED) begin free_ok = 1'b1; free_idx = MW'(i); end
    for (int i = 0; i < NUM_MM; i++) begin
      if (mm_phase[i] == MM_FORWARD || mm_phase[i] == MM_BACKWARD) begin
        any_training = 1'b1;
        if (mm_dp[i] == x_dp) dp_training = 1'b1;
      end
    end
  end

  assign status = {4'b0, error, overflow, any_training, busy};

  // parser: bytes to header fields and words
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_OP; p_op <= '0; p_dp <= '0; p_n <= '0; wcnt <= '0; bcnt <= '0; wsh <= '0;
      start_pkt <= 1'b0; overflow <= 1'b0;
    end else begin
      start_pkt <= 1'b0;
      if (rx_valid) begin
        unique case (rs)
          R_OP: begin
            p_op <= rx_byte;
            if (rx_byte == PKT_ASN_MODEL || rx_byte == PKT_SAMPLE) rs <= R_DP;
            else if (rx_byte == PKT_GET_METRIC || rx_byte == PKT_GET_MODEL) rs <= R_MM;
            if (rx_byte != 8'h00 && es != E_IDLE) overflow <= 1'b1;
          end
          R_DP: begin p_dp <= rx_byte; bcnt <= '0; rs <= R_N; end
          R_N: begin
            p_n  <= {p_n[23:0], rx_byte};
            bcnt <= bcnt + 2'd1;
            if (bcnt == 2'd3) begin
              start_pkt <= 1'b1;   // executor takes p_op/p_dp/p_n
              wcnt <= '0;
              rs   <= ({p_n[23:0], rx_byte} == 0) ? R_OP : R_WORD;
            end
          end
          R_WORD: begin
            wsh  <= {wsh[23:0], rx_byte};
            bcnt <= bcnt + 2'd1;
            if (bcnt == 2'd3) begin
              if (q_full) overflow <= 1'b1;
              wcnt <= wcnt + 1;
              if (wcnt + 1 == p_n) rs <= R_OP;
            end
          end
          R_MM: begin p_dp <= rx_byte; start_pkt <= 1'b1; rs <= R_OP; end
          default: rs <= R_OP;
        endcase
      end
    end
  end

  assign q_push = rx_valid && rs == R_WORD && bcnt == 2'd3 && !q_full;
  assign q_din  = {wsh[23:0], rx_byte};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wp <= '0; q_rp <= '0;
    end else begin
      if (q_push) begin q[q_wp[QW-1:0]] <= q_din; q_wp <= q_wp + 1'b1; end
      if (q_pop)  q_rp <= q_rp + 1'b1;
    end
  end

  // writer / command issuer
  logic wr_go;
  assign wr_go = (es == E_ASN_WR || es == E_SMP_WR) && !q_empty;
  assign q_pop = (wr_go && h_rsp.done) || (es == E_DROP && !q_empty && x_cnt != x_n);

  always_comb begin
    h_req = '0;
    h_req.region_begin  = x_base;
    h_req.region_end    = x_base + addr_t'(x_n);
    h_req.ptr           = x_base + addr_t'(x_cnt);
    h_req.w_en          = wr_go;
    h_req.write_through = 1'b1;
    h_req.data_store    = q[q_rp[QW-1:0]];
  end

  always_comb begin
    mm_cmd_valid = '0;
    mm_cmd_begin = x_base;
    mm_cmd_end   = x_base + addr_t'(x_n);
    mm_cmd_dp    = x_dp;
    mm_cmd_op    = MMC_ASSIGN;
    unique case (es)
      E_ASN_CMD: begin mm_cmd_op = MMC_ASSIGN; mm_cmd_valid[x_mm] = 1'b1; end
      E_SMP_CMD: begin
        mm_cmd_op = MMC_TRAIN;
        mm_cmd_valid[x_mm] = (mm_phase[x_mm] == MM_ASSIGNED) && (mm_dp[x_mm] == x_dp);
      end
      E_EXP_CMD: begin
        mm_cmd_op = (x_op == PKT_GET_METRIC) ? MMC_METRIC : MMC_MODEL;
        mm_cmd_valid[x_mm] = 1'b1;
      end
      default: ;
    endcase
  end

  always_comb begin
    ex_ready = '0;
    if (es == E_EXP_GET) ex_ready[x_mm] = ex_valid[x_mm];
    tx_valid = (es == E_EXP_MARK) || (es == E_EXP_WORD);
    tx_byte  = (es == E_EXP_MARK) ? MARKER : x_word[31:24];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es <= E_IDLE; x_op <= '0; x_dp <= '0; x_n <= '0; x_cnt <= '0; x_mm <= '0;
      alloc <= '0; x_base <= '0; x_word <= '0; x_byte <= '0; x_last <= 1'b0;
      error <= 1'b0; model_evt <= 1'b0; sample_evt <= 1'b0;
    end else begin
      model_evt  <= 1'b0;
      sample_evt <= 1'b0;
      unique case (es)
        E_IDLE: begin
          if (start_pkt) begin
            x_op <= p_op; x_dp <= p_dp; x_n <= p_n; x_cnt <= '0;
            unique case (p_op)
              PKT_ASN_MODEL: begin
                if (free_ok) begin
                  x_mm <= free_idx; x_base <= alloc; alloc <= alloc + addr_t'(p_n);
                  es <= E_ASN_WR;
                end else begin
                  error <= 1'b1; x_cnt <= '0; es <= E_DROP;
                end
              end
              PKT_SAMPLE: begin x_base <= SAMPLE_BASE; es <= E_SMP_WAIT; end
              default: begin
                x_mm <= MW'(p_dp); x_last <= 1'b0;
                es <= (32'(p_dp) < NUM_MM) ? E_EXP_CMD : E_IDLE;
              end
            endcase
          end
        end
        E_ASN_WR, E_SMP_WR: begin
          if (x_cnt == x_n) begin
            x_cnt <= '0;
            es    <= (es == E_ASN_WR) ? E_ASN_CMD : E_SMP_CMD;
            if (es == E_SMP_WR) x_mm <= '0;
          end else if (wr_go && h_rsp.done) begin
            x_cnt <= x_cnt + 1;
          end
        end
        E_ASN_CMD: begin
          if (mm_cmd_ready[x_mm]) begin model_evt <= 1'b1; es <= E_IDLE; end
        end
        E_SMP_WAIT: if (!dp_training) es <= E_SMP_WR;
        E_SMP_CMD: begin
          // offer TRAIN to every Model Manager of this pipeline in turn
          if (!mm_cmd_valid[x_mm] || mm_cmd_ready[x_mm]) begin
            if (32'(x_mm) == NUM_MM - 1) begin sample_evt <= 1'b1; es <= E_IDLE; end
            else x_mm <= x_mm + MW'(1);
          end
        end
        E_EXP_CMD: if (mm_cmd_ready[x_mm]) es <= E_EXP_MARK;
        E_EXP_MARK: if (tx_ready) es <= E_EXP_GET;
        E_EXP_GET: begin
          if (ex_valid[x_mm]) begin
            x_word <= ex_data[x_mm];
            x_last <= ex_last[x_mm];
            x_byte <= '0;
            es     <= E_EXP_WORD;
          end
        end
        E_EXP_WORD: begin
          if (tx_ready) begin
            x_word <= {x_word[23:0], 8'h00};
            x_byte <= x_byte + 2'd1;
            if (x_byte == 2'd3) es <= x_last ? E_IDLE : E_EXP_GET;
          end
        end
        E_DROP: begin
          // no free Model Manager: discard the model's words
          if (x_cnt == x_n) es <= E_IDLE;
          else if (!q_empty) x_cnt <= x_cnt + 1;
        end
        default: es <= E_IDLE;
      endcase
    end
  end
endmodule
