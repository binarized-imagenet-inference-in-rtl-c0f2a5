// tb_bnn_net_ref: stimulus and reference model for a network of bnn_layer
// stages (a single bnn_layer or a whole bnn_alexnet_top).
// It generates every weight and threshold from a hash of its indices, loads
// them through the configuration bus, streams N_IMG random binary images,
// computes each image's expected outputs with a plain loop model (padding
// -1, +/-1 dot product, max(x,0) >= threshold, 2x2 OR-pooling, FC inputs in
// raster-then-channel order) and compares every result word. It also
// counts the pipeline mechanisms: SIDM stalls, output back-pressure, layers
// computing in the same cycle, a new image entering before the previous
// one has left, and the PE-busy cycles of each layer, which must equal
// output pixels x SIC x SOC. Ends with the TB_RESULT line.
module tb_bnn_net_ref
  import bnn_pkg::*;
#(
  parameter int unsigned NL = ALEX_NL,
  parameter int unsigned L_IN_W   [NL] = ALEX_IN_W,
  parameter int unsigned L_IN_H   [NL] = ALEX_IN_H,
  parameter int unsigned L_PAD    [NL] = ALEX_PAD,
  parameter int unsigned L_K      [NL] = ALEX_K,
  parameter int unsigned L_STRIDE [NL] = ALEX_STRIDE,
  parameter int unsigned L_PIC    [NL] = ALEX_PIC,
  parameter int unsigned L_SIC    [NL] = ALEX_SIC,
  parameter int unsigned L_POC    [NL] = ALEX_POC,
  parameter int unsigned L_SOC    [NL] = ALEX_SOC,
  parameter int unsigned L_POOL   [NL] = ALEX_POOL,
  parameter int unsigned N_IMG       = 1,
  parameter int unsigned GAP_PCT     = 0,   // % of cycles the image source idles
  parameter int unsigned BP_PCT      = 0,   // % of cycles results are refused
  parameter bit          NEED_OVERLAP = 1'b1,
  parameter longint unsigned MAX_CYCLES = 64'd20_000_000
) (
  input  logic                   clk,
  output logic                   rst_n,
  output cfg_req_t               cfg,
  output logic                   img_valid,
  input  logic                   img_ready,
  output logic [L_PIC[0]-1:0]    img_data,
  input  logic                   res_valid,
  output logic                   res_ready,
  input  logic [L_POC[NL-1]-1:0] res_data,
  input  logic [NL-1:0]          stall,
  input  logic [NL-1:0]          busy
);

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  // Layer geometry.
  function automatic int unsigned cin(int l);  return L_PIC[l] * L_SIC[l]; endfunction
  function automatic int unsigned cout(int l); return L_POC[l] * L_SOC[l]; endfunction
  function automatic int unsigned cw(int l);
    return (L_IN_W[l] + 2 * L_PAD[l] - L_K[l]) / L_STRIDE[l] + 1;
  endfunction
  function automatic int unsigned ch(int l);
    return (L_IN_H[l] + 2 * L_PAD[l] - L_K[l]) / L_STRIDE[l] + 1;
  endfunction
  function automatic int unsigned ow(int l); return L_POOL[l] != 0 ? cw(l) / 2 : cw(l); endfunction
  function automatic int unsigned oh(int l); return L_POOL[l] != 0 ? ch(l) / 2 : ch(l); endfunction

  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c,
                                      int unsigned d, int unsigned e);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ d * 32'h27D4EB2F ^
        e * 32'h165667B1 ^ 32'h5bd1e995;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic bit wbit(int l, int oc, int ic, int ky, int kx);
    int unsigned h;
    h = mix(l + 1, oc, ic, ky, kx);
    return h[16];
  endfunction

  function automatic int thr(int l, int oc);
    int unsigned n, r;
    n = L_K[l] * L_K[l] * cin(l);
    r = 1;
    while ((r + 1) * (r + 1) <= n) r++;
    return 1 + int'(mix(l + 101, oc, 7, 3, 1) % r);
  endfunction

  // Reference activations, one flat HWC vector per layer boundary.
  bit          cur [];   // input of the layer being modelled
  bit          nxt [];   // its output
  bit          expq [$];

  task automatic ref_layer(int l);
    int unsigned w, h, c, owc, ohc, co, n, k, s, p, mt;
    int          iy, ix, x, idx, t, i00, i01, i10, i11;
    int unsigned pw, ph;
    bit          conv [];
    bit          a;
    w = L_IN_W[l]; h = L_IN_H[l]; c = cin(l);
    owc = cw(l); ohc = ch(l); co = cout(l); k = L_K[l]; s = L_STRIDE[l]; p = L_PAD[l];
    n = k * k * c;
    conv = new[owc * ohc * co];
    for (int oy = 0; oy < int'(ohc); oy++)
      for (int ox = 0; ox < int'(owc); ox++)
        for (int oc = 0; oc < int'(co); oc++) begin
          mt = 0;
          for (int ky = 0; ky < int'(k); ky++)
            for (int kx = 0; kx < int'(k); kx++) begin
              iy = oy * int'(s) + ky - int'(p);
              ix = ox * int'(s) + kx - int'(p);
              for (int ic = 0; ic < int'(c); ic++) begin
                a = 1'b0;
                if (iy >= 0 && iy < int'(h) && ix >= 0 && ix < int'(w)) begin
                  idx = (iy * int'(w) + ix) * int'(c) + ic;
                  a = cur[idx];
                end
                if (a == wbit(l, oc, ic, ky, kx)) mt++;
              end
            end
          x = 2 * int'(mt) - int'(n);
          if (x < 0) x = 0;
          t   = thr(l, oc);
          idx = (oy * int'(owc) + ox) * int'(co) + oc;
          conv[idx] = (x >= t);
        end
    pw = ow(l); ph = oh(l);
    nxt = new[pw * ph * co];
    if (L_POOL[l] != 0) begin
      for (int oy = 0; oy < int'(ph); oy++)
        for (int ox = 0; ox < int'(pw); ox++)
          for (int oc = 0; oc < int'(co); oc++) begin
            idx = (oy * int'(pw) + ox) * int'(co) + oc;
            i00 = ((2*oy)   * int'(owc) + 2*ox)   * int'(co) + oc;
            i01 = ((2*oy)   * int'(owc) + 2*ox+1) * int'(co) + oc;
            i10 = ((2*oy+1) * int'(owc) + 2*ox)   * int'(co) + oc;
            i11 = ((2*oy+1) * int'(owc) + 2*ox+1) * int'(co) + oc;
            nxt[idx] = conv[i00] | conv[i01] | conv[i10] | conv[i11];
          end
    end else begin
      foreach (conv[i]) nxt[i] = conv[i];
    end
  endtask

  // Configuration: weights word by word, bank by bank; thresholds per PE.
  task automatic load_layer(int l);
    int unsigned kkp, nbank, depth, j, pe, r, tap, c;
    logic [31:0] d;
    kkp   = L_K[l] * L_K[l] * L_PIC[l];
    nbank = (L_POC[l] * kkp + 31) / 32;
    depth = L_SIC[l] * L_SOC[l];
    for (int unsigned a = 0; a < depth; a++)
      for (int unsigned b = 0; b < nbank; b++) begin
        for (int unsigned i = 0; i < 32; i++) begin
          j = b * 32 + i;
          d[i] = 1'b0;
          if (j < L_POC[l] * kkp) begin
            pe = j / kkp; r = j % kkp; tap = r / L_PIC[l]; c = r % L_PIC[l];
            d[i] = wbit(l, int'((a / L_SIC[l]) * L_POC[l] + pe),
                        int'((a % L_SIC[l]) * L_PIC[l] + c),
                        int'(tap / L_K[l]), int'(tap % L_K[l]));
          end
        end
        @(negedge clk);
        cfg = '{we: 1'b1, layer: 4'(l), kind: CFG_WEIGHT, bank: 16'(b), word: 16'(a), data: d};
      end
    for (int unsigned p = 0; p < L_POC[l]; p++)
      for (int unsigned so = 0; so < L_SOC[l]; so++) begin
        d = 32'(thr(l, int'(so * L_POC[l] + p)));
        @(negedge clk);
        cfg = '{we: 1'b1, layer: 4'(l), kind: CFG_THRESHOLD, bank: 16'(p), word: '0, data: d};
      end
    @(negedge clk);
    cfg = '0;
  endtask

  // Mechanism counters.
  longint unsigned n_stall = 0, n_bp = 0, n_overlap = 0, n_img_overlap = 0;
  longint unsigned n_busy [NL];
  longint unsigned t_first_in = 0, t_first_out = 0, t_last_out = 0;
  int unsigned     imgs_in = 0, imgs_out = 0, words_out = 0, cur_img = 0;
  int unsigned     words_per_img;
  bit              started = 0;
  bit              done = 0;

  bit images [][];

  // Always 0, but known only at run time: keeps the compiler from unrolling
  // the per-layer loops of the model for every layer.
  int rt0;

  initial begin
    int          ii;
    int unsigned cin0, co_last, npx_out;
    rt0     = $test$plusargs("tb_never_set") ? 1 : 0;
    cin0    = cin(0);
    co_last = cout(NL-1);
    npx_out = ow(NL-1) * oh(NL-1);
    for (int l = 0; l < int'(NL); l++) n_busy[l] = 0;
    words_per_img = ow(NL-1) * oh(NL-1) * L_SOC[NL-1];
    images = new[N_IMG];
    rst_n = 1'b0;
    cfg = '0;
    img_valid = 1'b0;
    img_data = '0;
    res_ready = 1'b0;
    // Reference model, image by image.
    for (int im = 0; im < int'(N_IMG); im++) begin
      images[im] = new[L_IN_W[0] * L_IN_H[0] * cin0];
      foreach (images[im][i]) images[im][i] = 1'($urandom);
      cur = images[im];
      for (int l = 0; l < int'(NL); l++) begin
        ref_layer(l + rt0);
        cur = nxt;
      end
      for (int px = 0; px < int'(npx_out); px++)
        for (int so = 0; so < int'(L_SOC[NL-1]); so++)
          for (int p = 0; p < int'(L_POC[NL-1]); p++) begin
            ii = px * int'(co_last) + so * int'(L_POC[NL-1]) + p;
            expq.push_back(cur[ii]);
          end
    end
    $display("reference model done, %0d result bits expected", expq.size());
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < int'(NL); l++) load_layer(l + rt0);
    $display("configuration loaded at cycle %0d", cyc);
    started = 1;
    // Stream the images back to back, pixel by pixel, SIC words per pixel.
    // Inputs change on the falling edge; a word moves on the rising edge
    // after a falling edge at which ready was high.
    for (int im = 0; im < int'(N_IMG); im++) begin
      cur_img = im;
      for (int px = 0; px < int'(L_IN_W[0] * L_IN_H[0]); px++)
        for (int s = 0; s < int'(L_SIC[0]); s++) begin
          while (($urandom % 100) < GAP_PCT) begin
            @(negedge clk);
            img_valid = 1'b0;
          end
          @(negedge clk);
          img_valid = 1'b1;
          for (int c = 0; c < int'(L_PIC[0]); c++) begin
            ii = px * int'(cin0) + s * int'(L_PIC[0]) + c;
            img_data[c] = images[im][ii];
          end
          #1;
          while (!img_ready) begin
            @(negedge clk);
            #1;
          end
          if (t_first_in == 0) t_first_in = cyc;
        end
      imgs_in++;
    end
    @(negedge clk);
    img_valid = 1'b0;
  end

  // Result side: random back-pressure, compare each word.
  always @(posedge clk) begin
    if (rst_n && started) begin
      if (res_valid && res_ready) begin
        if (t_first_out == 0) t_first_out = cyc;
        t_last_out = cyc;
        for (int p = 0; p < int'(L_POC[NL-1]); p++) begin
          checks++;
          if (expq.size() == 0) begin
            failures++;
          end else if (res_data[p] !== expq.pop_front()) begin
            failures++;
            if (failures < 10)
              $display("mismatch: image %0d word %0d bit %0d", imgs_out,
                       words_out, p);
          end
        end
        words_out++;
        if (words_out == words_per_img) begin
          words_out = 0;
          imgs_out++;
          $display("image %0d done at cycle %0d", imgs_out, cyc);
          if (imgs_out == N_IMG) done = 1'b1;
        end
      end
      if (res_valid && !res_ready) n_bp++;
      if (img_valid && img_ready && cur_img > imgs_out) n_img_overlap++;
      res_ready <= (($urandom % 100) >= BP_PCT);
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && started) begin
      if (stall != '0) n_stall++;
      for (int l = 0; l < int'(NL); l++) if (busy[l]) n_busy[l]++;
      for (int l = 0; l + 1 < int'(NL); l++) if (busy[l] && busy[l+1]) begin
        n_overlap++;
        break;
      end
    end
  end

  // After the last result, let dropped (unpooled) border pixels finish so
  // the busy-cycle count is complete, then report.
  initial begin
    wait (done);
    repeat (2000) @(posedge clk);
    report();
  end

  task automatic report();
    longint unsigned want;
    $display("first pixel in %0d, first result %0d, last result %0d (cycles)",
             t_first_in, t_first_out, t_last_out);
    $display("%0d cycles from the first input pixel to the last result",
             t_last_out - t_first_in);
    for (int l = 0; l < int'(NL); l++) begin
      want = longint'(N_IMG) * cw(l) * ch(l) * L_SIC[l] * L_SOC[l];
      checks++;
      if (n_busy[l] != want) begin
        failures++;
        $display("layer %0d: %0d busy cycles, expected %0d", l, n_busy[l], want);
      end else begin
        $display("layer %0d: %0d PE cycles (%0d output pixels x SIC %0d x SOC %0d per image)",
                 l, n_busy[l], cw(l) * ch(l), L_SIC[l], L_SOC[l]);
      end
    end
    $display("mechanisms: sidm_stall=%0d output_backpressure=%0d layer_overlap=%0d image_overlap=%0d",
             n_stall, n_bp, n_overlap, n_img_overlap);
    checks++; if (expq.size() != 0) failures++;
    checks++; if (NL > 1 && n_overlap == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (BP_PCT > 0 && n_bp == 0) failures++;
    checks++; if (NEED_OVERLAP && N_IMG > 1 && n_img_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Watchdog.
  initial begin
    wait (cyc >= MAX_CYCLES);
    failures++;
    $display("watchdog: timeout after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
