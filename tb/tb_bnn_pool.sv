// tb_bnn_pool: streams two random 7x5 maps (POC = 4 bits per word, SOC = 3
// words per pixel) through the pooling buffer with random input gaps and
// random output back-pressure, and compares every pooled word with the OR
// of the 2x2 block it covers (last odd row and column dropped), in order.
module tb_bnn_pool;
  localparam int unsigned IN_W = 7, IN_H = 5, POC = 4, SOC = 3, NIMG = 2;
  localparam int unsigned OW = IN_W / 2, OH = IN_H / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [POC-1:0] in_data = '0, out_data;
  logic [POC-1:0] map [NIMG][IN_H][IN_W][SOC];
  logic [POC-1:0] expq [$];
  int unsigned checks = 0, failures = 0, got = 0, n_bp = 0;

  always #5 clk = ~clk;

  bnn_pool #(.IN_W(IN_W), .IN_H(IN_H), .POC(POC), .SOC(SOC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data)
  );

  initial begin
    foreach (map[i, y, x, s]) map[i][y][x][s] = POC'($urandom);
    for (int i = 0; i < int'(NIMG); i++)
      for (int y = 0; y < int'(OH); y++)
        for (int x = 0; x < int'(OW); x++)
          for (int s = 0; s < int'(SOC); s++)
            expq.push_back(map[i][2*y][2*x][s] | map[i][2*y][2*x+1][s] |
                           map[i][2*y+1][2*x][s] | map[i][2*y+1][2*x+1][s]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(NIMG); i++)
      for (int y = 0; y < int'(IN_H); y++)
        for (int x = 0; x < int'(IN_W); x++)
          for (int s = 0; s < int'(SOC); s++) begin
            while ($urandom % 4 == 0) begin
              @(negedge clk);
              in_valid = 1'b0;
            end
            @(negedge clk);
            in_valid = 1'b1;
            in_data = map[i][y][x][s];
            #1;
            while (!in_ready) begin
              @(negedge clk);
              #1;
            end
          end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (50) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d pooled words missing", expq.size());
    end
    checks++;
    if (n_bp == 0) failures++;
    $display("pooled words: %0d, back-pressure cycles: %0d", got, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      got++;
      if (expq.size() == 0) failures++;
      else if (out_data !== expq.pop_front()) begin
        failures++;
        $display("pooled word %0d wrong", got - 1);
      end
    end
    if (out_valid && !out_ready) n_bp++;
    out_ready <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
