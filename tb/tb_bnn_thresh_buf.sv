// tb_bnn_thresh_buf: loads DEPTH thresholds by shifting, then checks that
// the head walks through them in load order and wraps around, that holding
// (no rotate) keeps the head, and that reloading replaces the contents.
module tb_bnn_thresh_buf;
  import bnn_pkg::*;
  localparam int unsigned DEPTH = 5;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, rot = 1'b0;
  logic signed [THR_W-1:0] thr_in = '0, head;
  logic signed [THR_W-1:0] vals [DEPTH];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  bnn_thresh_buf #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .thr_i(thr_in), .rotate_i(rot), .head_o(head)
  );

  task automatic expect_head(logic signed [THR_W-1:0] e);
    checks++;
    if (head !== e) begin
      failures++;
      $display("head %0d, expected %0d", head, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_head('0);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < DEPTH; i++) vals[i] = THR_W'($urandom % 4000) - 16'sd100;
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        load = 1'b1; thr_in = vals[i];
      end
      @(negedge clk);
      load = 1'b0;
      for (int r = 0; r < 3 * DEPTH; r++) begin
        expect_head(vals[r % DEPTH]);
        rot = 1'b1;
        @(negedge clk);
        rot = 1'b0;
        if (r % 4 == 0) begin
          @(negedge clk);
        end
      end
      expect_head(vals[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
