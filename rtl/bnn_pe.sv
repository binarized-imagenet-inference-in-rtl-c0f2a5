// bnn_pe: one processing element of a binarized CONV/FC layer.
// Each cycle in which valid_i is high the PE takes one slice of the input
// window (KKP = K*K*PIC activation bits) and the matching KKP weight bits,
// XNORs them (XNOR engine), counts the matching bits (POPCOUNT engine) and
// adds the count to its accumulator; first_i restarts the accumulator. After
// the SIC-th slice (last_i) the total number of matches p gives the +/-1 dot
// product x = 2p - KKP*SIC, and the Comparison Layer that replaces the
// activation, batch normalisation and binarisation sub-layers outputs
//   bit_o = 1 (+1)  if max(x, 0) >= T,   0 (-1) otherwise,
// with T the integer threshold at the head of the local threshold buffer,
// which then rotates to the next output channel. The comparison follows the
// document's fused form; the +/-1 dot product as x, the accumulator over
// sequential input-channel groups and the registered output are this
// design's reading. Timing: bit_o is registered and changes on the edge that
// consumes the last slice; en_i stalls the PE without losing state.
module bnn_pe
  import bnn_pkg::*;
#(
  parameter int unsigned KKP = 363,  // K*K*PIC bits per slice
  parameter int unsigned SIC = 1,    // slices per output value
  parameter int unsigned SOC = 3     // output channels handled in turn
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic                    valid_i,
  input  logic                    first_i,
  input  logic                    last_i,
  input  logic [KKP-1:0]          act_i,
  input  logic [KKP-1:0]          wgt_i,
  input  logic                    thr_load_i,
  input  logic signed [THR_W-1:0] thr_i,
  output logic                    bit_o
);

  localparam int unsigned NTOT = KKP * SIC;
  localparam int unsigned PCW  = $clog2(KKP + 1);
  localparam int unsigned ACW  = $clog2(NTOT + 1) + 2;  // signed, room for 2p
  localparam int unsigned CMPW = ((ACW > THR_W) ? ACW : THR_W) + 1;

  logic [KKP-1:0]          match;
  logic [PCW-1:0]          pop;
  logic [ACW-1:0]          acc_q, acc_sum;
  logic signed [ACW-1:0]   x, act;
  logic signed [THR_W-1:0] thr_head;
  logic                    fire;

  // XNOR engine: 1 where activation and weight agree.
  assign match = ~(act_i ^ wgt_i);

  bnn_popcount #(.N(KKP), .CW(PCW)) u_pop (.bits_i(match), .count_o(pop));

  assign acc_sum = (first_i ? '0 : acc_q) + ACW'(pop);
  assign fire    = en_i && valid_i && last_i;

  // Comparison Layer (activation, normalisation and binarisation fused).
  assign x   = signed'(acc_sum << 1) - signed'(ACW'(NTOT));
  assign act = (x > 0) ? x : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      bit_o <= 1'b0;
    end else if (en_i && valid_i) begin
      acc_q <= acc_sum;
      if (last_i) bit_o <= (CMPW'(act) >= CMPW'(thr_head));
    end
  end

  bnn_thresh_buf #(.DEPTH(SOC)) u_thr (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_i  (thr_load_i),
    .thr_i   (thr_i),
    .rotate_i(fire),
    .head_o  (thr_head)
  );

endmodule
