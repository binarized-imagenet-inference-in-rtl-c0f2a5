// tb_bnn_pe: drives one PE (K*K*PIC = 18 bits per slice, SIC = 3 slices per
// output, SOC = 2 output channels in turn) with random activations and
// weights, biased so the dot product lands near the thresholds, with stall
// cycles (en low) in between. After each last slice it checks the output bit
// against max(2*matches - 54, 0) >= threshold, the threshold alternating
// between the two loaded channel values. Negative and zero thresholds are
// included (the output must then be +1).
module tb_bnn_pe;
  import bnn_pkg::*;
  localparam int unsigned KKP = 18, SIC = 3, SOC = 2, NTOT = KKP * SIC;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b1, valid = 1'b0, first = 1'b0, last = 1'b0, tload = 1'b0;
  logic [KKP-1:0] act = '0, wgt = '0;
  logic signed [THR_W-1:0] thr_in = '0;
  logic bit_o;
  logic signed [THR_W-1:0] thr [SOC];
  int unsigned checks = 0, failures = 0, ones = 0;

  always #5 clk = ~clk;

  bnn_pe #(.KKP(KKP), .SIC(SIC), .SOC(SOC)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .valid_i(valid), .first_i(first), .last_i(last),
    .act_i(act), .wgt_i(wgt), .thr_load_i(tload), .thr_i(thr_in), .bit_o(bit_o)
  );

  initial begin
    int m, x, bias;
    bit expected;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      for (int o = 0; o < SOC; o++) begin
        thr[o] = (round == 3) ? THR_W'(o) - 16'sd1 : THR_W'(1 + $urandom % 10);
        @(negedge clk);
        tload = 1'b1; thr_in = thr[o];
      end
      @(negedge clk);
      tload = 1'b0;
      for (int n = 0; n < 40; n++) begin
        m = 0;
        bias = 40 + int'($urandom % 25);
        for (int s = 0; s < int'(SIC); s++) begin
          if ($urandom % 3 == 0) begin   // a stalled cycle
            en = 1'b0; valid = 1'b1; first = 1'b1; last = 1'b1; act = KKP'($urandom);
            @(negedge clk);
            en = 1'b1;
          end
          wgt = KKP'($urandom);
          for (int i = 0; i < int'(KKP); i++) act[i] = (($urandom % 100) < bias) ? wgt[i] : ~wgt[i];
          for (int i = 0; i < int'(KKP); i++) m += (act[i] == wgt[i]);
          valid = 1'b1; first = (s == 0); last = (s == int'(SIC) - 1);
          @(negedge clk);
          valid = 1'b0; first = 1'b0; last = 1'b0;
          if ($urandom % 2 == 0) @(negedge clk);
        end
        x = 2 * m - int'(NTOT);
        if (x < 0) x = 0;
        expected = (x >= int'(thr[n % SOC]));
        checks++;
        ones += expected;
        if (bit_o !== expected) begin
          failures++;
          $display("output %0d: matches %0d thr %0d bit %0d expected %0d", n, m, thr[n % SOC],
                   bit_o, expected);
        end
      end
    end
    checks++;
    if (ones == 0 || ones == checks - 1) begin
      failures++;
      $display("stimulus never produced both output values");
    end
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
