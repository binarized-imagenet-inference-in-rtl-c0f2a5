// bnn_thresh_buf: local threshold buffer of one processing element.
// A shift register of DEPTH integer thresholds, one per output channel the
// PE handles sequentially (DEPTH = SOC). The head entry is the threshold of
// the output channel being computed; after that channel's comparison the
// register rotates by one so the head moves to the next channel and wraps
// after DEPTH steps. Thresholds are loaded by shifting them in at the tail
// (load_i), first channel first; after DEPTH loads the first one is at the
// head. Rotation and loading happen on the rising clock edge; head_o is read
// combinationally. The document describes this buffer as a shift register
// in distributed RAM; the load port and reset to zero are this design's own.
module bnn_thresh_buf
  import bnn_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_i,    // shift thr_i in at the tail
  input  logic signed [THR_W-1:0] thr_i,
  input  logic                    rotate_i,  // advance to the next channel
  output logic signed [THR_W-1:0] head_o
);

  logic signed [THR_W-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (load_i || rotate_i) begin
      for (int unsigned i = 0; i + 1 < DEPTH; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= load_i ? thr_i : sr[0];
    end
  end

  assign head_o = sr[0];

endmodule
