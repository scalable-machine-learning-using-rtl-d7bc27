// worker_top: the FPGA side of one Worker Board. It trains up to NUM_MM
// small fully connected networks at the same time on the same stream of
// samples, so that each sample is fetched once and used by every model of its
// data pipeline, and keeps all weights, gradients and scratch data in one
// shared memory space.
//
// Blocks and connections (after the source's top-level block diagram):
//   SPI pins -> spi_slave -> data_pipeline_router: host packets in, replies out.
//   data_pipeline_router -> NUM_MM model_manager: assign / train / export
//     commands with memory regions; export words back.
//   model_manager i <-> fpu_bank port i: job, job waiting, done, three
//     memory handles. The bank holds NUM_JM fpu_job_manager.
//   mmu: memory handle ports 0 (router) and 1+3i..3+3i (Model Manager i,
//     driven by the Job Manager while a job runs); round-robin SDRAM and
//     block RAM controllers behind the port caches.
//   m9k_ram: the on-chip block RAM; the SDRAM chip sits on the sd_* pins
//     (dq split into out / output enable / in for an outside pad).
// Event outputs pulse once per occurrence so a board or test can count them.
// Every parameter default is the configuration described as the main one:
// eight Model Managers, one Job Manager each, 32 MB SDRAM, 50 MHz clock.
module worker_top
  import ml_pkg::*;
#(
  parameter int unsigned NUM_MM       = 8,
  parameter int unsigned NUM_JM       = NUM_MM,
  parameter int unsigned LINE         = 8,
  parameter int unsigned M9K_WORDS    = 16384,
  parameter int unsigned WQ           = 16,
  parameter int unsigned SD_INIT_WAIT = 5000,
  parameter int unsigned SD_REFRESH   = 390,
  localparam int unsigned NPORTS = 1 + 3 * NUM_MM,
  localparam int unsigned MAW    = $clog2(M9K_WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPI link to the Raspberry Pi
  input  logic        spi_sclk,
  input  logic        spi_cs_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  // SDRAM
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_addr,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_in,
  // observation
  output logic        sd_init_done,
  output logic [7:0]  status,
  output mm_phase_e   mm_phase [NUM_MM],
  output logic        model_evt,
  output logic        sample_evt,
  output logic [NUM_MM-1:0] train_evt,
  output logic [NUM_JM-1:0] op_evt,
  output logic [NPORTS-1:0] hit_evt,
  output logic [NPORTS-1:0] miss_evt
);
  // SPI client <-> router
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_byte, tx_byte;

  spi_slave u_spi (
    .clk, .rst_n,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .rx_valid, .rx_byte, .tx_valid, .tx_byte, .tx_ready, .status
  );

  // router <-> Model Managers
  logic [NUM_MM-1:0] cmd_valid, cmd_ready, ex_valid, ex_last, ex_ready;
  mm_cmd_e           cmd_op;
  addr_t             cmd_begin, cmd_end;
  logic [7:0]        cmd_dp;
  logic [7:0]        mm_dp   [NUM_MM];
  word_t             ex_data [NUM_MM];

  // memory handles
  mh_req_t mreq [NPORTS];
  mh_rsp_t mrsp [NPORTS];

  data_pipeline_router #(.NUM_MM(NUM_MM), .WQ(WQ)) u_dpr (
    .clk, .rst_n,
    .rx_valid, .rx_byte, .tx_valid, .tx_byte, .tx_ready, .status,
    .mm_cmd_valid(cmd_valid), .mm_cmd_op(cmd_op), .mm_cmd_begin(cmd_begin),
    .mm_cmd_end(cmd_end), .mm_cmd_dp(cmd_dp), .mm_cmd_ready(cmd_ready),
    .mm_phase, .mm_dp, .ex_valid, .ex_data, .ex_last, .ex_ready,
    .h_req(mreq[0]), .h_rsp(mrsp[0]),
    .model_evt, .sample_evt
  );

  // Model Managers <-> FPU Bank
  fpu_job_t          job     [NUM_MM];
  logic [NUM_MM-1:0] waiting, jdone;
  mh_req_t           bh_in   [NUM_MM][3];
  mh_req_t           bh_out  [NUM_MM][3];
  mh_rsp_t           bh_rsp  [NUM_MM][3];

  for (genvar i = 0; i < NUM_MM; i++) begin : g_mm
    mh_req_t hq [3];
    mh_rsp_t hr [3];
    for (genvar k = 0; k < 3; k++) begin : g_h
      assign mreq[1 + 3*i + k] = hq[k];
      assign hr[k]             = mrsp[1 + 3*i + k];
      assign bh_rsp[i][k]      = mrsp[1 + 3*i + k];
    end
    model_manager u_mm (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[i]), .cmd_op, .cmd_begin, .cmd_end, .cmd_dp,
      .cmd_ready(cmd_ready[i]), .phase(mm_phase[i]), .dp_id(mm_dp[i]),
      .train_evt(train_evt[i]),
      .ex_valid(ex_valid[i]), .ex_data(ex_data[i]), .ex_last(ex_last[i]),
      .ex_ready(ex_ready[i]),
      .h_req(hq), .h_rsp(hr),
      .job(job[i]), .job_waiting(waiting[i]), .job_done(jdone[i]),
      .bank_h_in(bh_in[i]), .bank_h_out(bh_out[i])
    );
  end

  fpu_bank #(.NPORTS(NUM_MM), .NUM_JM(NUM_JM)) u_bank (
    .clk, .rst_n,
    .job, .waiting, .done(jdone),
    .h_in(bh_in), .h_out(bh_out), .h_rsp(bh_rsp),
    .op_evt
  );

  // memory
  logic           ram_en, ram_we;
  logic [MAW-1:0] ram_addr;
  word_t          ram_d, ram_q;

  mmu #(
    .NPORTS(NPORTS), .LINE(LINE), .M9K_WORDS(M9K_WORDS),
    .SD_INIT_WAIT(SD_INIT_WAIT), .SD_REFRESH(SD_REFRESH)
  ) u_mmu (
    .clk, .rst_n,
    .req(mreq), .rsp(mrsp), .hit_evt, .miss_evt, .sd_init_done,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr,
    .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .ram_en, .ram_we, .ram_addr, .ram_d, .ram_q
  );

  m9k_ram #(.WORDS(M9K_WORDS), .DATA_W(DATA_W)) u_m9k (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .d(ram_d), .q(ram_q)
  );
endmodule
