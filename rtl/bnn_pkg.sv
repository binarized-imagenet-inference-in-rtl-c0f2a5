// bnn_pkg: types and constants shared by the binarized-network pipeline.
// Activations and weights are single bits, 1 standing for +1 and 0 for -1,
// so a product of two of them is an XNOR. Channels travel and are stored in
// words of 32 packed channels (PACK_W); weights are written into the weight
// memories through a 32-bit configuration bus described by cfg_kind_e.
package bnn_pkg;

  // Width of one packed word: 32 channels per memory word.
  localparam int unsigned PACK_W = 32;

  // Width of the integer thresholds of the Comparison Layer.
  localparam int unsigned THR_W = 16;

  // What a configuration-bus write goes to.
  typedef enum logic [0:0] {
    CFG_WEIGHT    = 1'b0,  // cfg_bank = 32-bit bank, cfg_word = word address
    CFG_THRESHOLD = 1'b1   // cfg_bank = PE index, data = threshold, shifted in
  } cfg_kind_e;

  // One configuration-bus write.
  typedef struct packed {
    logic        we;
    logic [3:0]  layer;
    cfg_kind_e   kind;
    logic [15:0] bank;
    logic [15:0] word;
    logic [31:0] data;
  } cfg_req_t;

  // Binarized AlexNet as the default network of bnn_alexnet_top: five
  // CONV layers and three FC layers, FC layers mapped onto 1x1 maps with
  // K = 1 whose single pixel carries all input channels. Geometry is the
  // standard AlexNet one (224x224x3 input, 96/256/384/384/256 channels,
  // kernels 11/5/3/3/3, 4096/4096/1000 neurons) with 2x2 pooling after
  // layers 1, 2 and 5, which gives the usual 55/27/13/6 map sizes. The
  // per-layer parallelism (PIC, SIC, POC, SOC) is chosen so that every
  // layer keeps up with the one before it.
  localparam int unsigned ALEX_NL = 8;
  typedef int unsigned layer_arr_t [ALEX_NL];
  localparam layer_arr_t ALEX_IN_W   = '{224, 27, 13, 13, 13,   1,   1,   1};
  localparam layer_arr_t ALEX_IN_H   = '{224, 27, 13, 13, 13,   1,   1,   1};
  localparam layer_arr_t ALEX_PAD    = '{  2,  2,  1,  1,  1,   0,   0,   0};
  localparam layer_arr_t ALEX_K      = '{ 11,  5,  3,  3,  3,   1,   1,   1};
  localparam layer_arr_t ALEX_STRIDE = '{  4,  1,  1,  1,  1,   1,   1,   1};
  localparam layer_arr_t ALEX_PIC    = '{  3, 32, 32, 32, 32,  32,  32,  32};
  localparam layer_arr_t ALEX_SIC    = '{  1,  3,  8, 12, 12, 288, 128, 128};
  localparam layer_arr_t ALEX_POC    = '{ 32, 32, 32, 32, 32,  32,  32,  40};
  localparam layer_arr_t ALEX_SOC    = '{  3,  8, 12, 12,  8, 128, 128,  25};
  localparam layer_arr_t ALEX_POOL   = '{  1,  1,  0,  0,  1,   0,   0,   0};

  // Integer ceiling of a/b for positive operands.
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
