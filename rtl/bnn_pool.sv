// bnn_pool: shared pooling buffer, 2x2 max pooling with stride 2.
// Input: the PEs' outputs as a stream of POC-bit words, SOC words per pixel,
// pixels of an IN_W x IN_H map in raster order. With 1 = +1 and 0 = -1 the
// maximum of binary values is their OR. The first pixel of each horizontal
// pair is held in a register per output-channel group; the OR of the pair
// is stored in a row buffer of IN_W/2 pixels on even rows and OR-ed with
// the stored value on odd rows, which produces the pooled pixel. A last odd
// row or column is dropped (floor). Output: the same word format, an
// (IN_W/2) x (IN_H/2) map. Interface: valid/ready on both sides; the output
// is registered, so a pooled word appears the cycle after its last input.
// The buffer is named in the document; window size 2x2 follows its example,
// everything else is this design's choice.
module bnn_pool #(
  parameter int unsigned IN_W = 55,
  parameter int unsigned IN_H = 55,
  parameter int unsigned POC  = 32,
  parameter int unsigned SOC  = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid_i,
  output logic           in_ready_o,
  input  logic [POC-1:0] in_data_i,
  output logic           out_valid_o,
  input  logic           out_ready_i,
  output logic [POC-1:0] out_data_o
);

  localparam int unsigned OW = IN_W / 2;
  localparam int unsigned RW = $clog2(IN_H + 1);
  localparam int unsigned CW = $clog2(IN_W + 1);
  localparam int unsigned SW = $clog2(SOC + 1);
  localparam int unsigned BW = $clog2(OW * SOC + 1);

  logic [RW-1:0]  row_q;
  logic [CW-1:0]  col_q;
  logic [SW-1:0]  soc_q;
  logic [POC-1:0] hold_q [SOC];
  logic [POC-1:0] rowbuf [OW * SOC];
  logic [POC-1:0] pair;
  logic [BW-1:0]  baddr;
  logic           in_map, accept;

  assign in_map     = (row_q < RW'(2 * (IN_H / 2))) && (col_q < CW'(2 * OW));
  assign in_ready_o = !out_valid_o || out_ready_i;
  assign accept     = in_valid_i && in_ready_o;
  assign pair       = hold_q[soc_q] | in_data_i;
  assign baddr      = BW'((32'(col_q) >> 1) * SOC + 32'(soc_q));

  always_ff @(posedge clk) begin
    if (accept && in_map) begin
      if (!col_q[0]) hold_q[soc_q] <= in_data_i;
      else if (!row_q[0]) rowbuf[baddr] <= pair;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q       <= '0;
      col_q       <= '0;
      soc_q       <= '0;
      out_valid_o <= 1'b0;
      out_data_o  <= '0;
    end else begin
      if (out_ready_i) out_valid_o <= 1'b0;
      if (accept) begin
        if (in_map && col_q[0] && row_q[0]) begin
          out_valid_o <= 1'b1;
          out_data_o  <= rowbuf[baddr] | pair;
        end
        if (soc_q == SW'(SOC - 1)) begin
          soc_q <= '0;
          if (col_q == CW'(IN_W - 1)) begin
            col_q <= '0;
            row_q <= (row_q == RW'(IN_H - 1)) ? '0 : row_q + 1'b1;
          end else begin
            col_q <= col_q + 1'b1;
          end
        end else begin
          soc_q <= soc_q + 1'b1;
        end
      end
    end
  end

endmodule
