// tb_cnn_layers: convolution layers of LeNet-5, AlexNet and VGG16/VGG19 run
// through the three engines at their default size, with the host tiling each
// layer into engine units.
//
// Each layer is lowered to Y (N x Wo*Ho) = H (N x C*K*K) * X (C*K*K x Wo*Ho)
// on the fly (stride and zero padding included) and run on:
//   OS  when C*K*K fits the 27-deep buffers: 4 filters x 4 pixels per unit
//   WS  9 pixels x 4 filters per pass; the filter buffer is refilled with
//       27-deep chunks of the reduction, each chunk run as 4-deep units that
//       accumulate in the ofmap buffer
//   IS  4 pixels x 4 filters per pass, the ifmap buffer refilled with
//       27-deep chunks in the same way
// Operand values come from a fixed integer hash of their coordinates, so no
// large tables are stored. Every engine result is compared with a direct
// convolution computed here. Large layers are run on a slice of their output
// pixels and filters (printed). The array cycles of every layer are checked
// against units x unit time, and the analytic total-time estimate for the
// same slice is printed next to them.
module tb_cnn_layers;
  import sa_pkg::*;
  localparam int P = 4, DW = 8, DB = 27, MB = 9, NB = 4, ACC_W = 21;
  logic clk = 0, rst_n = 0;
  logic os_start = 0, os_busy, os_done, os_wr_en = 0;
  buf_sel_e os_wr_buf = BUF_IFMAP;
  logic [1:0] os_wr_bank = 0, os_rd_bank = 0, os_rd_addr = 0;
  logic [4:0] os_wr_addr = 0;
  logic [DW-1:0] os_wr_data = 0;
  logic [ACC_W-1:0] os_rd_data;
  logic ws_start = 0, ws_acc = 0, ws_busy, ws_done, ws_wr_en = 0;
  logic [4:0] ws_k0 = 0, ws_wr_addr = 0;
  buf_sel_e ws_wr_buf = BUF_IFMAP;
  logic [1:0] ws_wr_bank = 0, ws_rd_bank = 0;
  logic [3:0] ws_rd_addr = 0;
  logic [DW-1:0] ws_wr_data = 0;
  logic [ACC_W-1:0] ws_rd_data;
  logic is_start = 0, is_acc = 0, is_busy, is_done, is_wr_en = 0;
  logic [4:0] is_k0 = 0, is_wr_addr = 0;
  buf_sel_e is_wr_buf = BUF_IFMAP;
  logic [1:0] is_wr_bank = 0, is_rd_bank = 0, is_rd_addr = 0;
  logic [DW-1:0] is_wr_data = 0;
  logic [ACC_W-1:0] is_rd_data;

  int checks = 0, failures = 0;
  int layers_run = 0;

  // current layer
  int L_id, L_C, L_K, L_S, L_PAD, L_W, L_N, L_Wo;
  int L_D, L_M;         // reduction length, output pixels in the slice
  int L_pix0, L_nf;     // first output pixel of the slice, filters used
  int cyc_unit;

  sa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Signed 8-bit pseudo-random value of a coordinate tuple.
  function automatic int hval(int a, int b, int c, int d);
    int unsigned h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(c) * 32'hC2B2AE3D ^ 32'(d) * 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'(h & 32'hFF) - 128;
  endfunction

  function automatic int ifm(int c, int y, int x);
    if (y < 0 || x < 0 || y >= L_W || x >= L_W) return 0;   // zero padding
    return hval(L_id, c, y, x);
  endfunction

  function automatic int flt(int n, int k);
    return hval(L_id + 1000, n, k, 7);
  endfunction

  // Lowered operands: k = (c*K + ky)*K + kx, p = oy*Wo + ox (absolute pixel).
  function automatic int xm(int k, int p);
    int c, ky, kx, oy, ox;
    if (k >= L_D || p >= L_pix0 + L_M) return 0;
    c  = k / (L_K * L_K);
    ky = (k / L_K) % L_K;
    kx = k % L_K;
    oy = p / L_Wo;
    ox = p % L_Wo;
    return ifm(c, oy * L_S - L_PAD + ky, ox * L_S - L_PAD + kx);
  endfunction

  function automatic int hm(int n, int k);
    if (k >= L_D || n >= L_nf) return 0;
    return flt(n, k);
  endfunction

  // Direct convolution, independent of the lowering above.
  function automatic int yref(int n, int p);
    int s = 0, oy = p / L_Wo, ox = p % L_Wo;
    for (int c = 0; c < L_C; c++)
      for (int ky = 0; ky < L_K; ky++)
        for (int kx = 0; kx < L_K; kx++)
          s += flt(n, (c * L_K + ky) * L_K + kx) * ifm(c, oy * L_S - L_PAD + ky, ox * L_S - L_PAD + kx);
    return s;
  endfunction

  task automatic cmp(input string tag, input int n, input int p, input int got);
    int e = yref(n, p);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 20) $display("%s layer %0d: Y[%0d][%0d] = %0d, expected %0d", tag, L_id, n, p, got, e);
    end
  endtask

  task automatic wait_done(ref logic dn, output int cyc);
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    while (!dn) begin
      @(negedge clk);
      cyc++;
    end
    cyc++;
  endtask

  task automatic run_os(output int units, output int cycles);
    int cyc;
    units = 0; cycles = 0;
    for (int n0 = 0; n0 < L_nf; n0 += P)
      for (int p0 = L_pix0; p0 < L_pix0 + L_M; p0 += P) begin
        for (int k = 0; k < DB; k++)
          for (int i = 0; i < P; i++) begin
            @(negedge clk);
            os_wr_en = 1; os_wr_buf = BUF_IFMAP; os_wr_bank = 2'(i); os_wr_addr = 5'(k);
            os_wr_data = DW'(xm(k, p0 + i));
            @(negedge clk);
            os_wr_buf = BUF_FILTER; os_wr_data = DW'(hm(n0 + i, k));
          end
        @(negedge clk);
        os_wr_en = 0; os_start = 1;
        wait_done(os_done, cyc);
        os_start = 0;
        units++; cycles += cyc;
        for (int c = 0; c < P && n0 + c < L_nf; c++)
          for (int i = 0; i < P && p0 + i < L_pix0 + L_M; i++) begin
            @(negedge clk);
            os_rd_bank = 2'(c); os_rd_addr = 2'(i);
            @(negedge clk);
            cmp("OS", n0 + c, p0 + i, int'(signed'(os_rd_data)));
          end
      end
  endtask

  task automatic run_ws(output int units, output int cycles);
    int cyc;
    units = 0; cycles = 0;
    for (int n0 = 0; n0 < L_nf; n0 += P)
      for (int p0 = L_pix0; p0 < L_pix0 + L_M; p0 += MB) begin
        for (int kc = 0; kc < L_D; kc += DB) begin
          for (int k = 0; k < DB; k++)
            for (int c = 0; c < P; c++) begin
              @(negedge clk);
              ws_wr_en = 1; ws_wr_buf = BUF_FILTER; ws_wr_bank = 2'(c); ws_wr_addr = 5'(k);
              ws_wr_data = DW'(hm(n0 + c, kc + k));
            end
          for (int k0 = 0; k0 < DB && kc + k0 < L_D; k0 += P) begin
            for (int r = 0; r < P; r++)
              for (int m = 0; m < MB; m++) begin
                @(negedge clk);
                ws_wr_en = 1; ws_wr_buf = BUF_IFMAP; ws_wr_bank = 2'(r); ws_wr_addr = 5'(m);
                ws_wr_data = DW'(xm(kc + k0 + r, p0 + m));
              end
            @(negedge clk);
            ws_wr_en = 0; ws_start = 1; ws_k0 = 5'(k0); ws_acc = (kc + k0 != 0);
            wait_done(ws_done, cyc);
            ws_start = 0;
            units++; cycles += cyc;
          end
        end
        for (int c = 0; c < P && n0 + c < L_nf; c++)
          for (int m = 0; m < MB && p0 + m < L_pix0 + L_M; m++) begin
            @(negedge clk);
            ws_rd_bank = 2'(c); ws_rd_addr = 4'(m);
            @(negedge clk);
            cmp("WS", n0 + c, p0 + m, int'(signed'(ws_rd_data)));
          end
      end
  endtask

  task automatic run_is(output int units, output int cycles);
    int cyc;
    units = 0; cycles = 0;
    for (int p0 = L_pix0; p0 < L_pix0 + L_M; p0 += P)
      for (int n0 = 0; n0 < L_nf; n0 += NB) begin
        for (int kc = 0; kc < L_D; kc += DB) begin
          for (int k = 0; k < DB; k++)
            for (int c = 0; c < P; c++) begin
              @(negedge clk);
              is_wr_en = 1; is_wr_buf = BUF_IFMAP; is_wr_bank = 2'(c); is_wr_addr = 5'(k);
              is_wr_data = DW'(xm(kc + k, p0 + c));
            end
          for (int k0 = 0; k0 < DB && kc + k0 < L_D; k0 += P) begin
            for (int r = 0; r < P; r++)
              for (int n = 0; n < NB; n++) begin
                @(negedge clk);
                is_wr_en = 1; is_wr_buf = BUF_FILTER; is_wr_bank = 2'(r); is_wr_addr = 5'(n);
                is_wr_data = DW'(hm(n0 + n, kc + k0 + r));
              end
            @(negedge clk);
            is_wr_en = 0; is_start = 1; is_k0 = 5'(k0); is_acc = (kc + k0 != 0);
            wait_done(is_done, cyc);
            is_start = 0;
            units++; cycles += cyc;
          end
        end
        for (int c = 0; c < P && p0 + c < L_pix0 + L_M; c++)
          for (int n = 0; n < NB && n0 + n < L_nf; n++) begin
            @(negedge clk);
            is_rd_bank = 2'(c); is_rd_addr = 2'(n);
            @(negedge clk);
            cmp("IS", n0 + n, p0 + c, int'(signed'(is_rd_data)));
          end
      end
  endtask

  // name, C, K, stride, pad, ifmap width, filters; slice: first pixel, pixels, filters
  task automatic layer(input string name, input int id, input int c, input int k,
                       input int s, input int pad, input int w, input int n,
                       input int pix0, input int npix, input int nf);
    int u, cy, total_pix;
    real est;
    L_id = id; L_C = c; L_K = k; L_S = s; L_PAD = pad; L_W = w; L_N = n;
    L_Wo = (w + 2 * pad - k) / s + 1;
    L_D = c * k * k;
    total_pix = L_Wo * L_Wo;
    L_pix0 = pix0;
    L_M = (npix > total_pix - pix0) ? total_pix - pix0 : npix;
    L_nf = (nf > n) ? n : nf;
    $display("%s: C=%0d K=%0d stride=%0d pad=%0d %0dx%0d -> %0dx%0dx%0d, C*K*K=%0d; running pixels %0d..%0d of %0d, filters 0..%0d of %0d",
             name, c, k, s, pad, w, w, L_Wo, L_Wo, n, L_D, pix0, pix0 + L_M - 1, total_pix, L_nf - 1, n);
    if (L_D <= DB) begin
      run_os(u, cy);
      checks++;
      if (cy != u * (DB + 3 * P - 1)) begin failures++; $display("  OS cycle count off"); end
      est = real'(L_M) * L_nf * (L_D + 3 * P) / (P * P);
      $display("  OS: %0d units, %0d array cycles (analytic estimate %0.1f)", u, cy, est);
    end else
      $display("  OS: C*K*K = %0d exceeds the 27-deep buffers, not run", L_D);
    run_ws(u, cy);
    checks++;
    if (cy != u * (MB + 3 * P)) begin failures++; $display("  WS cycle count off"); end
    est = real'(L_D) * L_nf * (L_M + 3 * P) / (P * P);
    $display("  WS: %0d units, %0d array cycles (analytic estimate with Ho*Wo = %0d: %0.1f)", u, cy, L_M, est);
    run_is(u, cy);
    checks++;
    if (cy != u * (NB + 3 * P)) begin failures++; $display("  IS cycle count off"); end
    est = real'(L_M) * L_D * (L_nf + 3 * P) / (P * P);
    $display("  IS: %0d units, %0d array cycles (analytic estimate with N = %0d: %0.1f)", u, cy, L_nf, est);
    layers_run++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // LeNet-5: all three convolution layers in full.
    layer("LeNet-5 C1", 1, 1, 5, 1, 0, 32, 6, 0, 784, 6);
    layer("LeNet-5 C3", 2, 6, 5, 1, 0, 14, 16, 0, 100, 16);
    layer("LeNet-5 C5", 3, 16, 5, 1, 0, 5, 120, 0, 1, 120);
    // AlexNet conv1 (227x227x3, 96 filters 11x11, stride 4): first output row, all filters.
    layer("AlexNet conv1", 4, 3, 11, 4, 0, 227, 96, 0, 55, 96);
    // VGG16 / VGG19 share these block-1 layers: first output row, all 64 filters
    // for conv1_1; nine pixels, all filters for conv1_2.
    layer("VGG16/19 conv1_1", 5, 3, 3, 1, 1, 224, 64, 0, 224, 64);
    layer("VGG16/19 conv1_2", 6, 64, 3, 1, 1, 224, 64, 0, 9, 64);
    // Deepest VGG shape (14x14x512, 512 filters): nine pixels, eight filters.
    layer("VGG16/19 conv5_x", 7, 512, 3, 1, 1, 14, 512, 0, 9, 8);
    if (layers_run != 7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
