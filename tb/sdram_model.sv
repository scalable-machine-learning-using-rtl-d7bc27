// sdram_model: behavioural model of the board's 16-bit SDR SDRAM chip, for
// simulation only (not synthesizable).
//
// It decodes ACTIVATE, READ, WRITE, PRECHARGE, AUTO REFRESH and LOAD MODE
// from the command pins at each rising clock edge, keeps the open row of each
// bank, and stores data sparsely in an associative array, so the full 32 MB
// costs memory only for the words used. Reads return burst-length-2 data
// CAS clocks after the command (dq_out valid from the edge before it is
// sampled); writes take the first beat with the command and the second on
// the next edge. It counts commands and flags protocol errors (access to a
// bank with no open row, or activate of an open bank without precharge
// when auto-precharge was not used).
// Follows the source only in that the board carries a 32 MB SDRAM; the
// command decoding follows common SDR SDRAM behaviour and is this design's
// choice, as the source does not name the chip.
module sdram_model #(
  parameter int unsigned CAS = 2
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] addr,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_in,     // from the controller
  input  logic        dq_oe,
  output logic [15:0] dq_out     // to the controller
);
  logic [15:0] mem [logic [23:0]];
  logic [12:0] open_row [4];
  logic        row_open [4];
  logic [15:0] pipe_d [CAS + 2];
  logic        wr_second;
  logic [23:0] wr_addr2;
  int          n_act, n_rd, n_wr, n_ref, n_mrs, n_err;

  initial begin
    for (int b = 0; b < 4; b++) begin row_open[b] = 0; open_row[b] = 0; end
    for (int i = 0; i < CAS + 2; i++) pipe_d[i] = '0;
    wr_second = 0; wr_addr2 = 0;
    n_act = 0; n_rd = 0; n_wr = 0; n_ref = 0; n_mrs = 0; n_err = 0;
  end

  assign dq_out = pipe_d[0];

  function automatic logic [15:0] rd(logic [23:0] a);
    return mem.exists(a) ? mem[a] : 16'h0000;
  endfunction

  always @(posedge clk) begin
    logic [23:0] a;
    for (int i = 0; i < CAS + 1; i++) pipe_d[i] <= pipe_d[i+1];
    pipe_d[CAS + 1] <= '0;
    if (wr_second) begin
      if (dq_oe && dqm == 2'b00) mem[wr_addr2] = dq_in;
      wr_second <= 0;
    end
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACTIVATE
          if (row_open[ba]) begin n_err++; $display("sdram_model: ACTIVATE of open bank %0d at %0t", ba, $time); end
          row_open[ba] <= 1; open_row[ba] <= addr; n_act++;
        end
        3'b101: begin  // READ
          if (!row_open[ba]) begin n_err++; $display("sdram_model: access to closed bank %0d at %0t", ba, $time); end
          a = {ba, open_row[ba], addr[8:0]};
          pipe_d[CAS - 1] <= rd(a);
          pipe_d[CAS]     <= rd(a + 24'd1);
          if (addr[10]) row_open[ba] <= 0;
          n_rd++;
        end
        3'b100: begin  // WRITE
          if (!row_open[ba]) begin n_err++; $display("sdram_model: access to closed bank %0d at %0t", ba, $time); end
          a = {ba, open_row[ba], addr[8:0]};
          if (dq_oe) mem[a] = dq_in; else n_err++;
          wr_second <= 1; wr_addr2 <= a + 24'd1;
          if (addr[10]) row_open[ba] <= 0;
          n_wr++;
        end
        3'b010: begin  // PRECHARGE
          if (addr[10]) for (int b = 0; b < 4; b++) row_open[b] <= 0;
          else row_open[ba] <= 0;
        end
        3'b001: n_ref++;
        3'b000: n_mrs++;
        default: ;
      endcase
    end
  end
endmodule
