// tb_bnn_popcount: checks the POPCOUNT engine at the width of an AlexNet
// first-layer PE (363 bits) and at a small odd width, with all-zero,
// all-one, single-bit and random vectors, against a bit-by-bit count.
module tb_bnn_popcount;
  localparam int unsigned N1 = 363, N2 = 7;

  logic [N1-1:0]            v1;
  logic [N2-1:0]            v2;
  logic [$clog2(N1+1)-1:0]  c1;
  logic [$clog2(N2+1)-1:0]  c2;
  int unsigned checks = 0, failures = 0;

  bnn_popcount #(.N(N1)) dut1 (.bits_i(v1), .count_o(c1));
  bnn_popcount #(.N(N2)) dut2 (.bits_i(v2), .count_o(c2));

  function automatic int unsigned ref_count1(logic [N1-1:0] v);
    int unsigned n = 0;
    for (int i = 0; i < N1; i++) n += v[i];
    return n;
  endfunction
  function automatic int unsigned ref_count2(logic [N2-1:0] v);
    int unsigned n = 0;
    for (int i = 0; i < N2; i++) n += v[i];
    return n;
  endfunction

  task automatic check();
    #1;
    checks += 2;
    if (c1 != ref_count1(v1)) begin
      failures++;
      $display("N=%0d: got %0d, expected %0d", N1, c1, ref_count1(v1));
    end
    if (c2 != ref_count2(v2)) begin
      failures++;
      $display("N=%0d: got %0d, expected %0d", N2, c2, ref_count2(v2));
    end
  endtask

  initial begin
    v1 = '0; v2 = '0; check();
    v1 = '1; v2 = '1; check();
    for (int i = 0; i < N1; i++) begin
      v1 = '0; v1[i] = 1'b1; v2 = N2'(1) << (i % N2); check();
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N1; i++) v1[i] = ($urandom % 100) < (t % 100);
      v2 = N2'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
