// tb_bnn_alexnet_full: two images through the full-size binarized AlexNet
// (bnn_alexnet_top with all parameters at their defaults). All 62.4 million
// weights and the thresholds are loaded over the configuration bus, two
// random 224x224x3 binary images are streamed in back to back, and the
// 2 x 1000 output bits are compared with tb_bnn_net_ref's loop model of the same network. The
// PE-busy cycles of every layer, the cycle count from first pixel to last
// result and the pipeline mechanisms are reported and checked.
module tb_bnn_alexnet_full;
  import bnn_pkg::*;

  logic                       clk = 1'b0;
  logic                       rst_n;
  cfg_req_t                   cfg;
  logic                       img_valid, img_ready, res_valid, res_ready;
  logic [ALEX_PIC[0]-1:0]     img_data;
  logic [ALEX_POC[ALEX_NL-1]-1:0] res_data;
  logic [ALEX_NL-1:0]         stall, busy;

  always #5 clk = ~clk;

  bnn_alexnet_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_i(cfg),
    .img_valid_i(img_valid), .img_ready_o(img_ready), .img_data_i(img_data),
    .res_valid_o(res_valid), .res_ready_i(res_ready), .res_data_o(res_data),
    .stall_o(stall), .busy_o(busy)
  );

  tb_bnn_net_ref #(.N_IMG(2), .BP_PCT(20), .MAX_CYCLES(64'd4_000_000)) u_ref (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .img_valid(img_valid), .img_ready(img_ready), .img_data(img_data),
    .res_valid(res_valid), .res_ready(res_ready), .res_data(res_data),
    .stall(stall), .busy(busy)
  );

endmodule
