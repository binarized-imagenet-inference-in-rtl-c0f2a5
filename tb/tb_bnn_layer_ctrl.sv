// tb_bnn_layer_ctrl: hands the control unit (SIC = 3, SOC = 2) a series of
// windows, at random times and with random stalls (en low), and checks the
// issued sequence: weight addresses soc*SIC+sic in order, window slice
// sic, the first/last flags one cycle later, exactly one release per window
// on its SIC*SOC-th step, and that nothing is issued while en is low or no
// window is present. Also checks that an unstalled window takes exactly
// SIC*SOC cycles.
module tb_bnn_layer_ctrl;
  localparam int unsigned SIC = 3, SOC = 2, AW = 3, SW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b1, win_valid = 1'b0;
  logic release_w, issue, rd_en, v1, first1, last1;
  logic [AW-1:0] rd_addr;
  logic [SW-1:0] sic;
  int unsigned checks = 0, failures = 0;
  int unsigned step = 0, windows = 0, released = 0;
  int unsigned exp_first_q [$], exp_last_q [$];
  bit stall_mode = 1'b1, last_step;
  longint unsigned t0, cyc = 0;

  always #5 clk = ~clk;

  bnn_layer_ctrl #(.SIC(SIC), .SOC(SOC), .AW(AW), .SW(SW)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .win_valid_i(win_valid), .win_release_o(release_w),
    .issue_o(issue), .rd_en_o(rd_en), .rd_addr_o(rd_addr), .sic_o(sic),
    .valid1_o(v1), .first1_o(first1), .last1_o(last1)
  );

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, msg);
  endtask

  // Checker, sampling just before each rising edge.
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      checks++;
      if (issue !== (en && win_valid)) fail("issue does not follow en && window");
      if (en && v1) begin
        checks++;
        if (exp_first_q.size() == 0) fail("stage-1 step without issue");
        else if (first1 !== exp_first_q.pop_front() || last1 !== exp_last_q.pop_front())
          fail("first/last flag wrong");
      end
      if (issue) begin
        checks += 3;
        if (rd_addr !== AW'(step)) fail($sformatf("address %0d, expected %0d", rd_addr, step));
        if (sic !== SW'(step % SIC)) fail("slice index wrong");
        if (!rd_en) fail("no read enable");
        exp_first_q.push_back(step % SIC == 0);
        exp_last_q.push_back(step % SIC == SIC - 1);
        checks++;
        if (release_w !== (step == SIC * SOC - 1)) fail("release at the wrong step");
        if (release_w) released++;
        step = (step + 1) % (SIC * SOC);
      end else begin
        checks++;
        if (release_w) fail("release without issue");
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 12; w++) begin
      stall_mode = (w < 8);
      repeat ($urandom % 3) @(negedge clk);
      win_valid = 1'b1;
      t0 = cyc;
      forever begin
        en = stall_mode ? (($urandom % 3) != 0) : 1'b1;
        #1;
        last_step = release_w && en;
        @(negedge clk);
        if (last_step) break;
      end
      if (!stall_mode) begin
        checks++;
        if (cyc - t0 != SIC * SOC) fail($sformatf("window took %0d cycles", cyc - t0));
      end
      win_valid = 1'b0;
      en = 1'b1;
      windows++;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (released != windows) fail($sformatf("%0d releases for %0d windows", released, windows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
