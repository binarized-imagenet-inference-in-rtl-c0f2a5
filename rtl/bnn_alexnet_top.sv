// bnn_alexnet_top: binarized AlexNet with all layers resident on chip and
// fused into one fine-grained inter-layer pipeline.
// Every layer is its own bnn_layer instance with its own PEs, weights and
// thresholds (model parallelism: nothing is reconfigured between layers).
// Layer i's output stream feeds layer i+1's SIDM directly, so a layer starts
// computing as soon as its first window is complete instead of waiting for
// the previous layer to finish the image, and all CONV layers work on the
// same image at once. Between layers the stream carries POC_i-bit words
// (SOC_i per pixel), which requires PIC_{i+1} = POC_i; with pooling the
// next layer's map is half as wide and high. FC layers are 1x1 maps with
// K = 1: the previous layer's pixels, read in raster order with channels
// innermost, become one input vector of SIC*PIC neurons.
// Interfaces: img_* streams the binarized input image (PIC_0 channel bits
// per pixel, raster order); res_* streams the last layer's binary outputs
// (POC bits per word, SOC words per image); cfg_i loads weights and
// thresholds of any layer (see bnn_layer). stall_o and busy_o give, per
// layer, the SIDM back-pressure and PE-activity flags of bnn_layer.
// The network, its default sizes and the per-layer parallelism are set by
// the parameter arrays, which default to bnn_pkg's AlexNet table.
module bnn_alexnet_top
  import bnn_pkg::*;
#(
  parameter int unsigned NL = ALEX_NL,
  parameter int unsigned L_IN_W   [NL] = ALEX_IN_W,
  parameter int unsigned L_IN_H   [NL] = ALEX_IN_H,
  parameter int unsigned L_PAD    [NL] = ALEX_PAD,
  parameter int unsigned L_K      [NL] = ALEX_K,
  parameter int unsigned L_STRIDE [NL] = ALEX_STRIDE,
  parameter int unsigned L_PIC    [NL] = ALEX_PIC,
  parameter int unsigned L_SIC    [NL] = ALEX_SIC,
  parameter int unsigned L_POC    [NL] = ALEX_POC,
  parameter int unsigned L_SOC    [NL] = ALEX_SOC,
  parameter int unsigned L_POOL   [NL] = ALEX_POOL
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  cfg_req_t                   cfg_i,
  input  logic                       img_valid_i,
  output logic                       img_ready_o,
  input  logic [L_PIC[0]-1:0]        img_data_i,
  output logic                       res_valid_o,
  input  logic                       res_ready_i,
  output logic [L_POC[NL-1]-1:0]     res_data_o,
  output logic [NL-1:0]              stall_o,
  output logic [NL-1:0]              busy_o
);

  localparam int unsigned MAXW = 64;

  logic            s_valid [NL+1];
  logic            s_ready [NL+1];
  logic [MAXW-1:0] s_data  [NL+1];

  assign s_valid[0]  = img_valid_i;
  assign img_ready_o = s_ready[0];
  assign s_data[0]   = MAXW'(img_data_i);

  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam int unsigned PIC = L_PIC[i];
    localparam int unsigned POC = L_POC[i];
    logic [POC-1:0] out_data;

    if (i > 0) begin : g_chk
      if (L_PIC[i] != L_POC[i-1]) begin : g_err
        $error("layer %0d: PIC must equal the previous POC", i);
      end
    end
    if (PIC > MAXW || POC > MAXW) begin : g_wchk
      $error("layer %0d: stream wider than %0d bits", i, MAXW);
    end

    bnn_layer #(
      .LAYER_ID(i),
      .IN_W    (L_IN_W[i]),
      .IN_H    (L_IN_H[i]),
      .PAD     (L_PAD[i]),
      .K       (L_K[i]),
      .STRIDE  (L_STRIDE[i]),
      .PIC     (PIC),
      .SIC     (L_SIC[i]),
      .POC     (POC),
      .SOC     (L_SOC[i]),
      .POOL    (L_POOL[i] != 0)
    ) u_layer (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg_i      (cfg_i),
      .in_valid_i (s_valid[i]),
      .in_ready_o (s_ready[i]),
      .in_data_i  (s_data[i][PIC-1:0]),
      .out_valid_o(s_valid[i+1]),
      .out_ready_i(s_ready[i+1]),
      .out_data_o (out_data),
      .stall_o    (stall_o[i]),
      .busy_o     (busy_o[i])
    );

    assign s_data[i+1] = MAXW'(out_data);
  end

  assign res_valid_o    = s_valid[NL];
  assign s_ready[NL]    = res_ready_i;
  assign res_data_o     = s_data[NL][L_POC[NL-1]-1:0];

endmodule
