// sdram_controller: serves word commands from the round-robin multiplexer on
// the board's off-chip SDR SDRAM (32 MB, 16-bit data bus, 4 banks of 8192
// rows by 512 columns).
//
// After reset it waits INIT_WAIT cycles, precharges all banks, gives two
// auto-refreshes and loads the mode register (burst length 2, CAS latency
// CAS). It then serves one 32-bit word per command with a closed-page
// policy: ACTIVATE, then READ or WRITE with auto-precharge, moving the low
// half-word on the first beat and the high half-word on the second. An
// auto-refresh is inserted every REFRESH_INTERVAL cycles, between commands.
// The command interface is the same as the block RAM controller's: a valid
// command completes with a one-cycle ack (rdata valid with it), and is not
// reissued in the ack cycle.
//
// Word address mapping: bank = addr[22:21], row = addr[20:8], column =
// {addr[7:0], 0}. The data bus is split into dq_out / dq_oe / dq_in; the
// tri-state pad joining them sits outside the controller.
// The source only names this controller and states that there is a single
// one, shared round-robin by all ports; the sequence and timings here follow
// common SDR SDRAM practice at a 50 MHz clock and are this design's choice.
module sdram_controller
  import ml_pkg::*;
#(
  parameter int unsigned INIT_WAIT        = 5000, // 100 us at 50 MHz
  parameter int unsigned REFRESH_INTERVAL = 390,  // 64 ms / 8192 rows at 50 MHz
  parameter int unsigned T_RP             = 2,
  parameter int unsigned T_RC             = 4,
  parameter int unsigned T_RCD            = 2,
  parameter int unsigned T_WR_RP          = 4,    // write recovery + precharge
  parameter int unsigned CAS              = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_cmd_t    cmd,
  output mem_ack_t    ack,
  output logic        init_done,
  // SDRAM pins
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
  input  logic [15:0] sd_dq_in
);
  typedef enum logic [3:0] {
    S_INIT, S_PALL, S_REF1, S_REF2, S_MRS, S_WAIT, S_IDLE, S_REF,
    S_ACT, S_WR0, S_WR1, S_RD, S_RDW, S_RD1, S_DONE
  } state_e;

  // command encodings {cs_n, ras_n, cas_n, we_n}
  localparam logic [3:0] C_NOP  = 4'b0111;
  localparam logic [3:0] C_ACT  = 4'b0011;
  localparam logic [3:0] C_RD   = 4'b0101;
  localparam logic [3:0] C_WR   = 4'b0100;
  localparam logic [3:0] C_PRE  = 4'b0010;
  localparam logic [3:0] C_REF  = 4'b0001;
  localparam logic [3:0] C_MRS  = 4'b0000;

  localparam logic [12:0] MODE = {3'b000, 1'b0, 2'b00, 3'(CAS), 1'b0, 3'b001};

  state_e      st, after_wait;
  logic [15:0] wait_cnt;
  logic [15:0] ref_cnt;
  logic        ref_due;
  logic [3:0]  sd_cmd;
  logic [15:0] lo_half;

  logic [1:0]  a_bank;
  logic [12:0] a_row;
  logic [8:0]  a_col;
  assign a_bank = cmd.addr[22:21];
  assign a_row  = cmd.addr[20:8];
  assign a_col  = {cmd.addr[7:0], 1'b0};

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = sd_cmd;
  assign sd_cke = 1'b1;
  assign sd_dqm = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_INIT;
      after_wait <= S_IDLE;
      wait_cnt   <= 16'(INIT_WAIT);
      ref_cnt    <= '0;
      ref_due    <= 1'b0;
      sd_cmd     <= C_NOP;
      sd_ba      <= '0;
      sd_addr    <= '0;
      sd_dq_out  <= '0;
      sd_dq_oe   <= 1'b0;
      ack        <= '0;
      lo_half    <= '0;
      init_done  <= 1'b0;
    end else begin
      sd_cmd   <= C_NOP;
      sd_dq_oe <= 1'b0;
      ack.ack  <= 1'b0;

      if (init_done) begin
        if (ref_cnt == 16'(REFRESH_INTERVAL - 1)) begin
          ref_cnt <= '0;
          ref_due <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt + 16'd1;
        end
      end

      unique case (st)
        S_INIT: begin
          if (wait_cnt == 0) st <= S_PALL;
          else wait_cnt <= wait_cnt - 16'd1;
        end
        S_PALL: begin
          sd_cmd      <= C_PRE;
          sd_addr[10] <= 1'b1;           // all banks
          wait_cnt    <= 16'(T_RP - 1);
          after_wait  <= S_REF1;
          st          <= S_WAIT;
        end
        S_REF1, S_REF2: begin
          sd_cmd     <= C_REF;
          wait_cnt   <= 16'(T_RC - 1);
          after_wait <= (st == S_REF1) ? S_REF2 : S_MRS;
          st         <= S_WAIT;
        end
        S_MRS: begin
          sd_cmd     <= C_MRS;
          sd_ba      <= 2'b00;
          sd_addr    <= MODE;
          wait_cnt   <= 16'd1;
          after_wait <= S_IDLE;
          init_done  <= 1'b1;
          st         <= S_WAIT;
        end
        S_WAIT: begin
          if (wait_cnt == 0) st <= after_wait;
          else wait_cnt <= wait_cnt - 16'd1;
        end
        S_IDLE: begin
          if (ref_due) begin
            st <= S_REF;
          end else if (cmd.valid && !ack.ack) begin
            sd_cmd   <= C_ACT;
            sd_ba    <= a_bank;
            sd_addr  <= a_row;
            wait_cnt <= 16'(T_RCD - 1);
            after_wait <= cmd.we ? S_WR0 : S_RD;
            st       <= S_WAIT;
          end
        end
        S_REF: begin
          ref_due    <= 1'b0;
          sd_cmd     <= C_REF;
          wait_cnt   <= 16'(T_RC - 1);
          after_wait <= S_IDLE;
          st         <= S_WAIT;
        end
        S_WR0: begin
          sd_cmd    <= C_WR;
          sd_addr   <= {2'b00, 1'b1, 1'b0, a_col};   // A10: auto-precharge
          sd_dq_out <= cmd.wdata[15:0];
          sd_dq_oe  <= 1'b1;
          st        <= S_WR1;
        end
        S_WR1: begin
          sd_dq_out  <= cmd.wdata[31:16];
          sd_dq_oe   <= 1'b1;
          wait_cnt   <= 16'(T_WR_RP - 1);
          after_wait <= S_DONE;
          st         <= S_WAIT;
        end
        S_RD: begin
          sd_cmd     <= C_RD;
          sd_addr    <= {2'b00, 1'b1, 1'b0, a_col};
          // data beat 0 is on dq_in CAS cycles after the command is on the pins,
          // which is one cycle after this register stage
          wait_cnt   <= 16'(CAS - 1);
          after_wait <= S_RDW;
          st         <= S_WAIT;
        end
        S_RDW: begin
          lo_half <= sd_dq_in;
          st      <= S_RD1;
        end
        S_RD1: begin
          ack.rdata <= {sd_dq_in, lo_half};
          wait_cnt   <= 16'(T_RP - 1);
          after_wait <= S_DONE;
          st         <= S_WAIT;
        end
        S_DONE: begin
          ack.ack <= 1'b1;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
