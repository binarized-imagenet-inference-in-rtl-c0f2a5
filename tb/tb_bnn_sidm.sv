// tb_bnn_sidm: streams two random 6x5 images (PIC = 2 bits per word, SIC =
// 2 words per pixel) with random gaps into an SIDM with K = 3, stride 2 and
// one pixel of padding, takes each window after a random number of cycles
// and compares it, tap by tap and slice by slice, with the window cut
// directly from the image (zero outside it). Also checks the number of
// windows per image and that the input stalled while a window was held.
module tb_bnn_sidm;
  localparam int unsigned IN_W = 6, IN_H = 5, PAD = 1, K = 3, S = 2, PIC = 2, SIC = 2;
  localparam int unsigned KKP = K * K * PIC;
  localparam int unsigned NX = (IN_W + 2 * PAD - K) / S + 1;
  localparam int unsigned NY = (IN_H + 2 * PAD - K) / S + 1;
  localparam int unsigned NIMG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, win_valid, release_w = 1'b0, stall;
  logic [PIC-1:0] in_data = '0;
  logic [SIC-1:0][KKP-1:0] win;
  bit img [NIMG][IN_H][IN_W][SIC*PIC];
  int unsigned checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  bnn_sidm #(.IN_W(IN_W), .IN_H(IN_H), .PAD(PAD), .K(K), .STRIDE(S), .PIC(PIC), .SIC(SIC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .win_valid_o(win_valid), .win_o(win), .win_release_i(release_w), .stall_o(stall)
  );

  always @(posedge clk) if (stall) n_stall++;

  // Source.
  initial begin
    foreach (img[i, y, x, c]) img[i][y][x][c] = 1'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(NIMG); i++)
      for (int y = 0; y < int'(IN_H); y++)
        for (int x = 0; x < int'(IN_W); x++)
          for (int s = 0; s < int'(SIC); s++) begin
            while ($urandom % 4 == 0) begin
              @(negedge clk);
              in_valid = 1'b0;
            end
            @(negedge clk);
            in_valid = 1'b1;
            for (int c = 0; c < int'(PIC); c++) in_data[c] = img[i][y][x][s*PIC+c];
            #1;
            while (!in_ready) begin
              @(negedge clk);
              #1;
            end
          end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // Window consumer and checker.
  initial begin
    int iy, ix;
    bit e;
    @(posedge rst_n);
    for (int i = 0; i < int'(NIMG); i++)
      for (int oy = 0; oy < int'(NY); oy++)
        for (int ox = 0; ox < int'(NX); ox++) begin
          @(negedge clk);
          while (!win_valid) @(negedge clk);
          for (int s = 0; s < int'(SIC); s++)
            for (int ky = 0; ky < int'(K); ky++)
              for (int kx = 0; kx < int'(K); kx++)
                for (int c = 0; c < int'(PIC); c++) begin
                  iy = oy * int'(S) + ky - int'(PAD);
                  ix = ox * int'(S) + kx - int'(PAD);
                  e = (iy >= 0 && iy < int'(IN_H) && ix >= 0 && ix < int'(IN_W)) ?
                      img[i][iy][ix][s*PIC+c] : 1'b0;
                  checks++;
                  if (win[s][(ky*K+kx)*PIC+c] !== e) begin
                    failures++;
                    if (failures < 10)
                      $display("img %0d window (%0d,%0d) slice %0d tap (%0d,%0d) ch %0d: %0b expected %0b",
                               i, oy, ox, s, ky, kx, c, win[s][(ky*K+kx)*PIC+c], e);
                  end
                end
          repeat ($urandom % 6) @(negedge clk);
          release_w = 1'b1;
          @(negedge clk);
          release_w = 1'b0;
        end
    repeat (20) @(negedge clk);
    checks++;
    if (win_valid) begin
      failures++;
      $display("more windows than expected");
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("input never stalled");
    end
    $display("windows checked: %0d, stall cycles: %0d", NIMG * NX * NY, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
