// bnn_layer: one binarized CONV layer (or FC layer, as a 1x1 map with K=1).
// The layer's parallelism is set by four parameters: PIC input and POC
// output channels are processed in parallel, SIC input-channel groups and
// SOC output-channel groups one after the other, so the layer has
// C_in = PIC*SIC input and C_out = POC*SOC output channels, POC PEs, and
// spends SIC*SOC cycles per output pixel.
// Dataflow: the input stream (PIC-bit words, SIC per pixel) fills the SIDM;
// each completed KxK window is worked on by the POC PEs, which all receive
// the same window slice (K*K*PIC bits) and each their own K*K*PIC weights
// from the shared weight memory (one POC*K*K*PIC-bit word per cycle); every
// SIC cycles they emit one POC-bit word of output channels. With POOL set,
// those words go through the 2x2 pooling buffer before leaving the layer.
// Weight word soc*SIC+sic holds PE p's weights at bits [p*K*K*PIC +:
// K*K*PIC], laid out like the window slice ((ky*K+kx)*PIC + c, input
// channel sic*PIC+c, output channel soc*POC+p).
// Configuration: writes on cfg_i whose layer field equals LAYER_ID go to
// this layer's weight memory or, for thresholds, are shifted into PE
// cfg_i.bank's threshold buffer (SOC writes per PE, channel group 0 first).
// Interface: valid/ready streams in and out; stall_o flags a cycle in which
// the SIDM held its input back because the PEs were still busy; busy_o
// flags a cycle in which the PEs did useful work.
// The structure (SIDM, lockstep PEs, shared weight memory, pooling buffer)
// follows the document; the stream format and configuration bus are this
// design's own.
module bnn_layer
  import bnn_pkg::*;
#(
  parameter int unsigned LAYER_ID = 0,
  parameter int unsigned IN_W     = 224,
  parameter int unsigned IN_H     = 224,
  parameter int unsigned PAD      = 2,
  parameter int unsigned K        = 11,
  parameter int unsigned STRIDE   = 4,
  parameter int unsigned PIC      = 3,
  parameter int unsigned SIC      = 1,
  parameter int unsigned POC      = 32,
  parameter int unsigned SOC      = 3,
  parameter bit          POOL     = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_req_t       cfg_i,
  input  logic           in_valid_i,
  output logic           in_ready_o,
  input  logic [PIC-1:0] in_data_i,
  output logic           out_valid_o,
  input  logic           out_ready_i,
  output logic [POC-1:0] out_data_o,
  output logic           stall_o,
  output logic           busy_o
);

  localparam int unsigned KKP   = K * K * PIC;
  localparam int unsigned WW    = POC * KKP;
  localparam int unsigned DEPTH = SIC * SOC;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned SW    = (SIC > 1) ? $clog2(SIC) : 1;
  localparam int unsigned OUT_W = (IN_W + 2 * PAD - K) / STRIDE + 1;
  localparam int unsigned OUT_H = (IN_H + 2 * PAD - K) / STRIDE + 1;

  logic                    win_valid, win_release, issue, en;
  logic [SIC-1:0][KKP-1:0] win;
  logic                    rd_en, v1, first1, last1;
  logic [AW-1:0]           rd_addr;
  logic [SW-1:0]           sic_sel;
  logic [KKP-1:0]          slice_q;
  logic [WW-1:0]           wgt;
  logic [POC-1:0]          pe_bits;
  logic                    pe_valid_q, pe_ready;
  logic                    cfg_hit;

  assign cfg_hit = cfg_i.we && (cfg_i.layer == 4'(LAYER_ID));

  bnn_sidm #(
    .IN_W(IN_W), .IN_H(IN_H), .PAD(PAD), .K(K), .STRIDE(STRIDE), .PIC(PIC), .SIC(SIC)
  ) u_sidm (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid_i   (in_valid_i),
    .in_ready_o   (in_ready_o),
    .in_data_i    (in_data_i),
    .win_valid_o  (win_valid),
    .win_o        (win),
    .win_release_i(win_release),
    .stall_o      (stall_o)
  );

  // The PE pipeline moves unless a finished word is waiting downstream.
  assign en = !pe_valid_q || pe_ready;

  bnn_layer_ctrl #(.SIC(SIC), .SOC(SOC), .AW(AW), .SW(SW)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .en_i         (en),
    .win_valid_i  (win_valid),
    .win_release_o(win_release),
    .issue_o      (issue),
    .rd_en_o      (rd_en),
    .rd_addr_o    (rd_addr),
    .sic_o        (sic_sel),
    .valid1_o     (v1),
    .first1_o     (first1),
    .last1_o      (last1)
  );

  bnn_weight_mem #(.WIDTH(WW), .DEPTH(DEPTH), .AW(AW)) u_wmem (
    .clk      (clk),
    .wr_en_i  (cfg_hit && cfg_i.kind == CFG_WEIGHT),
    .wr_bank_i(cfg_i.bank),
    .wr_addr_i(AW'(cfg_i.word)),
    .wr_data_i(cfg_i.data),
    .rd_en_i  (rd_en),
    .rd_addr_i(rd_addr),
    .rd_data_o(wgt)
  );

  // Window slice broadcast to all PEs, latched alongside the weight read.
  always_ff @(posedge clk) begin
    if (issue) slice_q <= win[sic_sel];
  end

  for (genvar p = 0; p < POC; p++) begin : g_pe
    bnn_pe #(.KKP(KKP), .SIC(SIC), .SOC(SOC)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .en_i      (en),
      .valid_i   (v1),
      .first_i   (first1),
      .last_i    (last1),
      .act_i     (slice_q),
      .wgt_i     (wgt[p*KKP +: KKP]),
      .thr_load_i(cfg_hit && cfg_i.kind == CFG_THRESHOLD && cfg_i.bank == 16'(p)),
      .thr_i     (cfg_i.data[THR_W-1:0]),
      .bit_o     (pe_bits[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pe_valid_q <= 1'b0;
    else if (en) pe_valid_q <= v1 && last1;
  end

  assign busy_o = issue;

  if (POOL) begin : g_pool
    bnn_pool #(.IN_W(OUT_W), .IN_H(OUT_H), .POC(POC), .SOC(SOC)) u_pool (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid_i (pe_valid_q),
      .in_ready_o (pe_ready),
      .in_data_i  (pe_bits),
      .out_valid_o(out_valid_o),
      .out_ready_i(out_ready_i),
      .out_data_o (out_data_o)
    );
  end else begin : g_nopool
    assign out_valid_o = pe_valid_q;
    assign pe_ready    = out_ready_i;
    assign out_data_o  = pe_bits;
  end

endmodule
