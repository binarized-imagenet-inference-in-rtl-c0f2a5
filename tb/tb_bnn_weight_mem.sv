// tb_bnn_weight_mem: fills a 70-bit x 6-word weight memory (three 32-bit
// banks, the last one partly used) bank by bank in random order, then reads
// every word in random order, checking the one-cycle read latency, that a
// read without rd_en keeps the last word, and that bank writes do not
// disturb the other banks.
module tb_bnn_weight_mem;
  localparam int unsigned WIDTH = 70, DEPTH = 6, AW = 3;

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [15:0] wr_bank = '0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0;
  logic [WIDTH-1:0] rd_data;
  logic [95:0] model [DEPTH];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  bnn_weight_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) dut (
    .clk(clk), .wr_en_i(wr_en), .wr_bank_i(wr_bank), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data)
  );

  task automatic write(int a, int b, logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_bank = 16'(b); wr_data = d;
    model[a][b*32 +: 32] = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++)
      for (int b = 0; b < 3; b++) write(i, b, $urandom);
    for (int t = 0; t < 10; t++) write($urandom % DEPTH, $urandom % 3, $urandom);
    for (int t = 0; t < 40; t++) begin
      a = $urandom % DEPTH;
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0; rd_addr = AW'((a + 1) % DEPTH);
      checks++;
      if (rd_data !== model[a][WIDTH-1:0]) begin
        failures++;
        $display("word %0d: %h, expected %h", a, rd_data, model[a][WIDTH-1:0]);
      end
      @(negedge clk);
      checks++;
      if (rd_data !== model[a][WIDTH-1:0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
