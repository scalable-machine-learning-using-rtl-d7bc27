// m9k_ram: the on-chip block RAM (the FPGA's M9K blocks) seen as one array of
// words.
//
// Single-port synchronous RAM: a write happens at the clock edge when we is
// high; read data for addr appears on q one clock after en. The size is this
// design's choice: 16384 32-bit words (512 Kbit), which fits in the block RAM
// of the Cyclone IV part the worker targets.
module m9k_ram #(
  parameter int unsigned WORDS  = 16384,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= d;
      q <= mem[addr];
    end
  end
endmodule
