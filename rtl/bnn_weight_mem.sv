// bnn_weight_mem: shared weight memory of one layer.
// Holds DEPTH words of WIDTH weight bits (WIDTH = POC*PIC*K*K, DEPTH =
// SOC*SIC) and returns a whole word per cycle, so that all PEs of the layer
// get their weights at once. The word is split over NBANK = ceil(WIDTH/32)
// banks of 32-bit entries ("weights for 32 channels packed"), written
// separately and read in parallel: the memory is one array of NBANK-lane
// words with a write enable per lane, which synthesis splits into as many
// block or distributed RAMs as it needs. Bank b holds bits [32b+31:32b] of
// every word. Writing: one 32-bit entry per cycle, chosen by wr_bank_i and
// wr_addr_i. Reading: synchronous, rd_data_o shows the word at rd_addr_i one
// clock after rd_en_i. The banking follows the document; the write port and
// the one-cycle read latency are this design's choices.
module bnn_weight_mem
  import bnn_pkg::*;
#(
  parameter int unsigned WIDTH = 11616,
  parameter int unsigned DEPTH = 3,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en_i,
  input  logic [15:0]       wr_bank_i,
  input  logic [AW-1:0]     wr_addr_i,
  input  logic [PACK_W-1:0] wr_data_i,
  input  logic              rd_en_i,
  input  logic [AW-1:0]     rd_addr_i,
  output logic [WIDTH-1:0]  rd_data_o
);

  localparam int unsigned NBANK = cdiv(WIDTH, PACK_W);

  // DEPTH words of NBANK 32-bit lanes; each lane has its own write enable.
  logic [NBANK-1:0][PACK_W-1:0] mem [DEPTH];
  logic [NBANK-1:0][PACK_W-1:0] rd_word;
  logic [NBANK*PACK_W-1:0]      rd_flat;

  always_ff @(posedge clk) begin
    if (wr_en_i && wr_bank_i < 16'(NBANK)) mem[wr_addr_i][wr_bank_i] <= wr_data_i;
    if (rd_en_i) rd_word <= mem[rd_addr_i];
  end

  assign rd_flat   = rd_word;
  assign rd_data_o = rd_flat[WIDTH-1:0];

endmodule
