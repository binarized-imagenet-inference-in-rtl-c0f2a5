// tb_bnn_layer: tests one bnn_layer on its own, with padding, stride 2,
// two input- and three output-channel groups and 2x2 pooling, over two
// images with input gaps and output back-pressure. tb_bnn_net_ref loads the
// weights and thresholds over the configuration bus, compares every output
// bit with its loop model and checks that the PEs were busy for exactly
// output pixels x SIC x SOC cycles (one weight word per cycle).
module tb_bnn_layer;
  import bnn_pkg::*;

  localparam int unsigned L_IN_W   [1] = '{9};
  localparam int unsigned L_IN_H   [1] = '{8};
  localparam int unsigned L_PAD    [1] = '{1};
  localparam int unsigned L_K      [1] = '{3};
  localparam int unsigned L_STRIDE [1] = '{2};
  localparam int unsigned L_PIC    [1] = '{3};
  localparam int unsigned L_SIC    [1] = '{2};
  localparam int unsigned L_POC    [1] = '{5};
  localparam int unsigned L_SOC    [1] = '{3};
  localparam int unsigned L_POOL   [1] = '{1};

  logic           clk = 1'b0;
  logic           rst_n;
  cfg_req_t       cfg;
  logic           img_valid, img_ready, res_valid, res_ready;
  logic [2:0]     img_data;
  logic [4:0]     res_data;
  logic           stall, busy;

  always #5 clk = ~clk;

  bnn_layer #(
    .LAYER_ID(0), .IN_W(9), .IN_H(8), .PAD(1), .K(3), .STRIDE(2),
    .PIC(3), .SIC(2), .POC(5), .SOC(3), .POOL(1)
  ) dut (
    .clk(clk), .rst_n(rst_n), .cfg_i(cfg),
    .in_valid_i(img_valid), .in_ready_o(img_ready), .in_data_i(img_data),
    .out_valid_o(res_valid), .out_ready_i(res_ready), .out_data_o(res_data),
    .stall_o(stall), .busy_o(busy)
  );

  tb_bnn_net_ref #(
    .NL(1), .L_IN_W(L_IN_W), .L_IN_H(L_IN_H), .L_PAD(L_PAD), .L_K(L_K),
    .L_STRIDE(L_STRIDE), .L_PIC(L_PIC), .L_SIC(L_SIC), .L_POC(L_POC),
    .L_SOC(L_SOC), .L_POOL(L_POOL), .N_IMG(2), .GAP_PCT(10), .BP_PCT(30),
    .MAX_CYCLES(100_000)
  ) u_ref (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .img_valid(img_valid), .img_ready(img_ready), .img_data(img_data),
    .res_valid(res_valid), .res_ready(res_ready), .res_data(res_data),
    .stall(stall), .busy(busy)
  );

endmodule
