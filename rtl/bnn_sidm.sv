// bnn_sidm: Shared Input Data Memory of one layer.
// Takes the previous layer's output as a stream of PIC-bit words, SIC words
// per pixel (channel groups in interleaved order), pixels in raster order,
// and forms the KxK window over all PIC*SIC input channels. K-1 row FIFOs
// of (IN_W+2*PAD)*SIC words are linked head to tail: every accepted word
// enters FIFO 0 while each FIFO passes its oldest word on to the next, so
// FIFO k delivers the word from k+1 rows earlier. Together with the incoming
// word they form one window column, and the window shifts by one column per
// pixel. Zero-padding of PAD pixels on every side is generated here (padding
// words are 0, i.e. -1) without consuming input. When a pixel completes a
// window position (stride STRIDE, valid convolution over the padded image)
// the whole window is copied into a second register that the PEs work on
// (win_o, win_valid_o) until the control unit pulses win_release_i. If a new
// window completes while that register is still in use the stream stalls
// (stall_o). Interface: valid/ready on the input. Timing: win_valid_o rises
// on the clock edge that accepts the last word of a window.
// The FIFO structure follows the document; padding, the second window
// register and the handshake are this design's choices.
module bnn_sidm #(
  parameter int unsigned IN_W   = 224,
  parameter int unsigned IN_H   = 224,
  parameter int unsigned PAD    = 2,
  parameter int unsigned K      = 11,
  parameter int unsigned STRIDE = 4,
  parameter int unsigned PIC    = 3,
  parameter int unsigned SIC    = 1,
  localparam int unsigned KKP   = K * K * PIC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid_i,
  output logic                    in_ready_o,
  input  logic [PIC-1:0]          in_data_i,
  output logic                    win_valid_o,
  output logic [SIC-1:0][KKP-1:0] win_o,
  input  logic                    win_release_i,
  output logic                    stall_o
);

  localparam int unsigned WP    = IN_W + 2 * PAD;
  localparam int unsigned HP    = IN_H + 2 * PAD;
  localparam int unsigned DEPTH = WP * SIC;
  localparam int unsigned RW    = $clog2(HP + 1);
  localparam int unsigned CW    = $clog2(WP + 1);
  localparam int unsigned SW    = $clog2(SIC + 1);
  localparam int unsigned PW    = $clog2(DEPTH + 1);

  logic [RW-1:0] row_q;
  logic [CW-1:0] col_q;
  logic [SW-1:0] sic_q;
  logic [PW-1:0] ptr_q;

  logic           interior, win_pos, completes, blocked, advance;
  logic [PIC-1:0] word;
  logic [PIC-1:0] colw [K];
  logic [PIC-1:0] win_q [K][K][SIC];
  logic [PIC-1:0] win_n [K][K][SIC];

  assign interior  = (row_q >= RW'(PAD)) && (row_q < RW'(IN_H + PAD)) &&
                     (col_q >= CW'(PAD)) && (col_q < CW'(IN_W + PAD));
  assign win_pos   = (row_q >= RW'(K - 1)) && (col_q >= CW'(K - 1)) &&
                     ((32'(row_q) - (K - 1)) % STRIDE == 0) &&
                     ((32'(col_q) - (K - 1)) % STRIDE == 0);
  assign completes = (sic_q == SW'(SIC - 1)) && win_pos;
  assign blocked   = completes && win_valid_o && !win_release_i;
  assign advance   = !blocked && (interior ? in_valid_i : 1'b1);
  assign in_ready_o = interior && !blocked;
  assign stall_o   = blocked;
  assign word      = interior ? in_data_i : '0;

  // Row FIFOs linked head to tail.
  if (K > 1) begin : g_fifo
    logic [PIC-1:0] fifo [K-1][DEPTH];
    always_ff @(posedge clk) begin
      if (advance) begin
        fifo[0][ptr_q] <= word;
        for (int unsigned k = 1; k < K - 1; k++) fifo[k][ptr_q] <= fifo[k-1][ptr_q];
      end
    end
    always_comb begin
      for (int unsigned ky = 0; ky < K - 1; ky++) colw[ky] = fifo[K-2-ky][ptr_q];
      colw[K-1] = word;
    end
  end else begin : g_nofifo
    assign colw[0] = word;
  end

  // Next window: shift one column at the first word of a pixel, then fill
  // the newest column word by word.
  always_comb begin
    win_n = win_q;
    if (sic_q == '0) begin
      for (int unsigned ky = 0; ky < K; ky++)
        for (int unsigned kx = 0; kx + 1 < K; kx++) win_n[ky][kx] = win_q[ky][kx+1];
    end
    for (int unsigned ky = 0; ky < K; ky++) win_n[ky][K-1][sic_q] = colw[ky];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q <= '0;
      col_q <= '0;
      sic_q <= '0;
      ptr_q <= '0;
      win_valid_o <= 1'b0;
      for (int unsigned ky = 0; ky < K; ky++)
        for (int unsigned kx = 0; kx < K; kx++)
          for (int unsigned s = 0; s < SIC; s++) win_q[ky][kx][s] <= '0;
    end else begin
      if (win_release_i) win_valid_o <= 1'b0;
      if (advance) begin
        win_q <= win_n;
        ptr_q <= (ptr_q == PW'(DEPTH - 1)) ? '0 : ptr_q + 1'b1;
        if (sic_q == SW'(SIC - 1)) begin
          sic_q <= '0;
          if (col_q == CW'(WP - 1)) begin
            col_q <= '0;
            row_q <= (row_q == RW'(HP - 1)) ? '0 : row_q + 1'b1;
          end else begin
            col_q <= col_q + 1'b1;
          end
        end else begin
          sic_q <= sic_q + 1'b1;
        end
        if (completes) win_valid_o <= 1'b1;
      end
    end
  end

  // Window register the PEs read: slice s holds word s of every tap, tap
  // (ky, kx) at bits [(ky*K+kx)*PIC +: PIC], row 0 / column 0 the oldest.
  always_ff @(posedge clk) begin
    if (advance && completes) begin
      for (int unsigned s = 0; s < SIC; s++)
        for (int unsigned ky = 0; ky < K; ky++)
          for (int unsigned kx = 0; kx < K; kx++)
            win_o[s][(ky*K+kx)*PIC +: PIC] <= win_n[ky][kx][s];
    end
  end

endmodule
