// mmu: memory management unit. Gives every memory handle in the worker its
// own port onto one universal word address space made of off-chip SDRAM
// (addresses with the top bit clear) and on-chip block RAM (top bit set).
//
// It has no state machine of its own: it is a shell around NPORTS memory port
// controllers (each with its small cache), two round-robin multiplexers, the
// SDRAM controller and the block RAM controller. Each port's memory command
// is routed to the controller its address falls in; each controller serves
// one port's burst at a time and then moves on to the next requesting port.
// Port i's handle is req[i]/rsp[i]. The block RAM array itself sits outside
// the unit, behind the ram_* pins, as does the SDRAM chip behind the sd_*
// pins. hit/miss pulses per port are brought out for performance counting.
// The structure follows the source's memory hierarchy figure; the routing by
// address bit is this design's choice.
module mmu
  import ml_pkg::*;
#(
  parameter int unsigned NPORTS    = 25,
  parameter int unsigned LINE      = 8,
  parameter int unsigned M9K_WORDS = 16384,
  parameter int unsigned SD_INIT_WAIT = 5000,
  parameter int unsigned SD_REFRESH   = 390,
  localparam int unsigned MAW = $clog2(M9K_WORDS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mh_req_t      req [NPORTS],
  output mh_rsp_t      rsp [NPORTS],
  output logic [NPORTS-1:0] hit_evt,
  output logic [NPORTS-1:0] miss_evt,
  output logic         sd_init_done,
  // SDRAM pins
  output logic         sd_cke,
  output logic         sd_cs_n,
  output logic         sd_ras_n,
  output logic         sd_cas_n,
  output logic         sd_we_n,
  output logic [1:0]   sd_ba,
  output logic [12:0]  sd_addr,
  output logic [1:0]   sd_dqm,
  output logic [15:0]  sd_dq_out,
  output logic         sd_dq_oe,
  input  logic [15:0]  sd_dq_in,
  // block RAM
  output logic         ram_en,
  output logic         ram_we,
  output logic [MAW-1:0] ram_addr,
  output word_t        ram_d,
  input  word_t        ram_q
);
  localparam int unsigned IW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  mem_cmd_t pcmd [NPORTS];
  mem_ack_t pack [NPORTS];
  logic [NPORTS-1:0] req_s, req_m;
  logic          gv_s, gv_m;
  logic [IW-1:0] gi_s, gi_m;
  mem_cmd_t      cmd_s, cmd_m;
  mem_ack_t      ack_s, ack_m;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    mem_port_controller #(.LINE(LINE)) u_pc (
      .clk, .rst_n,
      .req(req[p]), .rsp(rsp[p]),
      .mcmd(pcmd[p]), .mack(pack[p]),
      .hit_evt(hit_evt[p]), .miss_evt(miss_evt[p])
    );
    assign req_s[p] = pcmd[p].req && !pcmd[p].addr[ADDR_W-1];
    assign req_m[p] = pcmd[p].req &&  pcmd[p].addr[ADDR_W-1];
    always_comb begin
      pack[p] = '0;
      if (gv_s && gi_s == IW'(p)) pack[p] = ack_s;
      else if (gv_m && gi_m == IW'(p)) pack[p] = ack_m;
    end
  end

  rr_arbiter #(.N(NPORTS)) u_arb_s (.clk, .rst_n, .req(req_s), .gnt_valid(gv_s), .gnt_idx(gi_s));
  rr_arbiter #(.N(NPORTS)) u_arb_m (.clk, .rst_n, .req(req_m), .gnt_valid(gv_m), .gnt_idx(gi_m));

  always_comb begin
    cmd_s = '0;
    cmd_m = '0;
    if (gv_s && req_s[gi_s]) cmd_s = pcmd[gi_s];
    if (gv_m && req_m[gi_m]) cmd_m = pcmd[gi_m];
  end

  sdram_controller #(.INIT_WAIT(SD_INIT_WAIT), .REFRESH_INTERVAL(SD_REFRESH)) u_sdc (
    .clk, .rst_n, .cmd(cmd_s), .ack(ack_s), .init_done(sd_init_done),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr,
    .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  m9k_controller #(.WORDS(M9K_WORDS)) u_m9c (
    .clk, .rst_n, .cmd(cmd_m), .ack(ack_m),
    .ram_en, .ram_we, .ram_addr, .ram_d, .ram_q
  );
endmodule
