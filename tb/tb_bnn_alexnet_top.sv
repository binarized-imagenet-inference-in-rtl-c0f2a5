// tb_bnn_alexnet_top: end-to-end test of the pipelined network at a reduced
// size: two CONV layers (the first with 2x2 pooling, the second with stride
// 2) and two FC layers, three images streamed back to back with gaps in the
// input and random back-pressure on the results. tb_bnn_net_ref loads all
// weights and thresholds, checks every result bit against its loop model,
// checks each layer's PE-busy cycle count and requires SIDM stalls,
// output back-pressure, overlapping layers and overlapping images to occur.
module tb_bnn_alexnet_top;
  import bnn_pkg::*;

  localparam int unsigned NL = 4;
  localparam int unsigned L_IN_W   [NL] = '{10, 5, 1, 1};
  localparam int unsigned L_IN_H   [NL] = '{10, 5, 1, 1};
  localparam int unsigned L_PAD    [NL] = '{ 1, 1, 0, 0};
  localparam int unsigned L_K      [NL] = '{ 3, 3, 1, 1};
  localparam int unsigned L_STRIDE [NL] = '{ 1, 2, 1, 1};
  localparam int unsigned L_PIC    [NL] = '{ 2, 4, 4, 4};
  localparam int unsigned L_SIC    [NL] = '{ 1, 2, 18, 3};
  localparam int unsigned L_POC    [NL] = '{ 4, 4, 4, 5};
  localparam int unsigned L_SOC    [NL] = '{ 2, 2, 3, 2};
  localparam int unsigned L_POOL   [NL] = '{ 1, 0, 0, 0};

  logic                   clk = 1'b0;
  logic                   rst_n;
  cfg_req_t               cfg;
  logic                   img_valid, img_ready, res_valid, res_ready;
  logic [L_PIC[0]-1:0]    img_data;
  logic [L_POC[NL-1]-1:0] res_data;
  logic [NL-1:0]          stall, busy;

  always #5 clk = ~clk;

  bnn_alexnet_top #(
    .NL(NL), .L_IN_W(L_IN_W), .L_IN_H(L_IN_H), .L_PAD(L_PAD), .L_K(L_K),
    .L_STRIDE(L_STRIDE), .L_PIC(L_PIC), .L_SIC(L_SIC), .L_POC(L_POC),
    .L_SOC(L_SOC), .L_POOL(L_POOL)
  ) dut (
    .clk(clk), .rst_n(rst_n), .cfg_i(cfg),
    .img_valid_i(img_valid), .img_ready_o(img_ready), .img_data_i(img_data),
    .res_valid_o(res_valid), .res_ready_i(res_ready), .res_data_o(res_data),
    .stall_o(stall), .busy_o(busy)
  );

  tb_bnn_net_ref #(
    .NL(NL), .L_IN_W(L_IN_W), .L_IN_H(L_IN_H), .L_PAD(L_PAD), .L_K(L_K),
    .L_STRIDE(L_STRIDE), .L_PIC(L_PIC), .L_SIC(L_SIC), .L_POC(L_POC),
    .L_SOC(L_SOC), .L_POOL(L_POOL), .N_IMG(3), .GAP_PCT(10), .BP_PCT(30),
    .MAX_CYCLES(200_000)
  ) u_ref (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .img_valid(img_valid), .img_ready(img_ready), .img_data(img_data),
    .res_valid(res_valid), .res_ready(res_ready), .res_data(res_data),
    .stall(stall), .busy(busy)
  );

endmodule
