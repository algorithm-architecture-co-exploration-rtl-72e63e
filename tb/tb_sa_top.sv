// tb_sa_top: end-to-end test of the three engines at their default size.
//
// Workload: one convolution layer with a 5x5x3 ifmap (W = H = 5, C = 3),
// four 3x3x3 filters (N = 4, K = 3) and stride 1, giving a 3x3x4 ofmap.
// Lowered to a matrix product this is Y (4 x 9) = H (4 x 27) * X (27 x 9),
// with X[k][p] = ifmap[c][oy+ky][ox+kx] for k = (c*K + ky)*K + kx and
// p = oy*Wo + ox. The testbench lowers random data this way and runs the
// layer through each engine:
//   OS  three 4x4 output tiles (pixels 0-3, 4-7, 8 plus padding)
//   WS  seven reduction tiles over all nine pixels, accumulating in the
//       ofmap buffer after the first
//   IS  three pixel tiles of seven reduction tiles each
// Every result is compared with a direct convolution computed here, not with
// the lowered matrices. Unit cycle counts are checked (D+3P-1 for OS, M+3P
// for WS, N+3P for IS), and the OS drain, WS and IS preloads, accumulating
// and overwriting units, the partly filled last reduction tile and padded
// pixel lanes are each counted; one that never happens is a failure.
module tb_sa_top;
  import sa_pkg::*;
  localparam int P = 4, DW = 8, D = 27, M = 9, N = 4, ACC_W = 21;
  localparam int C = 3, K = 3, W = 5, Wo = W - K + 1;
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
  int ifm [C][W][W];
  int flt [N][C][K][K];
  int yref [N][M];
  int xm [D][M];      // lowered ifmap
  int hm [N][D];      // lowered filters
  // mechanism counters
  int n_os_drain = 0, n_ws_preload = 0, n_is_preload = 0;
  int n_acc = 0, n_overwrite = 0, n_tail_tile = 0, n_pad_lane = 0;
  int cyc_os = 0, cyc_ws = 0, cyc_is = 0;

  sa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait for a done pulse; return the cycle index of done after the start.
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

  task automatic make_layer();
    for (int c = 0; c < C; c++)
      for (int y = 0; y < W; y++)
        for (int x = 0; x < W; x++) ifm[c][y][x] = $urandom_range(0, 255) - 128;
    for (int n = 0; n < N; n++)
      for (int c = 0; c < C; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) flt[n][c][ky][kx] = $urandom_range(0, 255) - 128;
    // direct convolution
    for (int n = 0; n < N; n++)
      for (int oy = 0; oy < Wo; oy++)
        for (int ox = 0; ox < Wo; ox++) begin
          int s = 0;
          for (int c = 0; c < C; c++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                s += flt[n][c][ky][kx] * ifm[c][oy+ky][ox+kx];
          yref[n][oy*Wo+ox] = s;
        end
    // lowering to GEMM operands
    for (int c = 0; c < C; c++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) begin
          int k = (c * K + ky) * K + kx;
          for (int n = 0; n < N; n++) hm[n][k] = flt[n][c][ky][kx];
          for (int p = 0; p < M; p++) xm[k][p] = ifm[c][p/Wo + ky][p%Wo + kx];
        end
  endtask

  task automatic cmp(input string tag, input int n, input int p, input int got);
    checks++;
    if (got != yref[n][p]) begin
      failures++;
      $display("%s: Y[%0d][%0d] = %0d, expected %0d", tag, n, p, got, yref[n][p]);
    end
  endtask

  task automatic run_os();
    int cyc;
    for (int p0 = 0; p0 < M; p0 += P) begin
      for (int k = 0; k < D; k++)
        for (int i = 0; i < P; i++) begin
          @(negedge clk);
          os_wr_en = 1; os_wr_buf = BUF_IFMAP; os_wr_bank = 2'(i); os_wr_addr = 5'(k);
          os_wr_data = (p0 + i < M) ? DW'(xm[k][p0+i]) : '0;
          if (p0 + i >= M && k == 0) n_pad_lane++;
          @(negedge clk);
          os_wr_buf = BUF_FILTER; os_wr_data = DW'(hm[i][k]);
        end
      @(negedge clk);
      os_wr_en = 0; os_start = 1;
      wait_done(os_done, cyc);
      os_start = 0;
      cyc_os += cyc;
      n_os_drain++;
      checks++;
      if (cyc != D + 3 * P - 1) begin failures++; $display("OS unit %0d cycles", cyc); end
      for (int n = 0; n < N; n++)
        for (int i = 0; i < P && p0 + i < M; i++) begin
          @(negedge clk);
          os_rd_bank = 2'(n); os_rd_addr = 2'(i);
          @(negedge clk);
          cmp("OS", n, p0 + i, int'(signed'(os_rd_data)));
        end
    end
  endtask

  task automatic run_ws();
    int cyc;
    for (int k = 0; k < D; k++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        ws_wr_en = 1; ws_wr_buf = BUF_FILTER; ws_wr_bank = 2'(n); ws_wr_addr = 5'(k);
        ws_wr_data = DW'(hm[n][k]);
      end
    for (int kb = 0; kb < D; kb += P) begin
      for (int r = 0; r < P; r++)
        for (int p = 0; p < M; p++) begin
          @(negedge clk);
          ws_wr_en = 1; ws_wr_buf = BUF_IFMAP; ws_wr_bank = 2'(r); ws_wr_addr = 5'(p);
          ws_wr_data = (kb + r < D) ? DW'(xm[kb+r][p]) : '0;
        end
      @(negedge clk);
      ws_wr_en = 0; ws_start = 1; ws_k0 = 5'(kb); ws_acc = (kb != 0);
      if (kb != 0) n_acc++; else n_overwrite++;
      if (kb + P > D) n_tail_tile++;
      wait_done(ws_done, cyc);
      ws_start = 0;
      cyc_ws += cyc;
      n_ws_preload++;
      checks++;
      if (cyc != M + 3 * P) begin failures++; $display("WS unit %0d cycles", cyc); end
    end
    for (int n = 0; n < N; n++)
      for (int p = 0; p < M; p++) begin
        @(negedge clk);
        ws_rd_bank = 2'(n); ws_rd_addr = 4'(p);
        @(negedge clk);
        cmp("WS", n, p, int'(signed'(ws_rd_data)));
      end
  endtask

  task automatic run_is();
    int cyc;
    for (int p0 = 0; p0 < M; p0 += P) begin
      for (int k = 0; k < D; k++)
        for (int c = 0; c < P; c++) begin
          @(negedge clk);
          is_wr_en = 1; is_wr_buf = BUF_IFMAP; is_wr_bank = 2'(c); is_wr_addr = 5'(k);
          is_wr_data = (p0 + c < M) ? DW'(xm[k][p0+c]) : '0;
        end
      for (int kb = 0; kb < D; kb += P) begin
        for (int r = 0; r < P; r++)
          for (int n = 0; n < N; n++) begin
            @(negedge clk);
            is_wr_en = 1; is_wr_buf = BUF_FILTER; is_wr_bank = 2'(r); is_wr_addr = 5'(n);
            is_wr_data = (kb + r < D) ? DW'(hm[n][kb+r]) : '0;
          end
        @(negedge clk);
        is_wr_en = 0; is_start = 1; is_k0 = 5'(kb); is_acc = (kb != 0);
        if (kb != 0) n_acc++; else n_overwrite++;
        if (kb + P > D) n_tail_tile++;
        wait_done(is_done, cyc);
        is_start = 0;
        cyc_is += cyc;
        n_is_preload++;
        checks++;
        if (cyc != N + 3 * P) begin failures++; $display("IS unit %0d cycles", cyc); end
      end
      for (int n = 0; n < N; n++)
        for (int c = 0; c < P && p0 + c < M; c++) begin
          @(negedge clk);
          is_rd_bank = 2'(c); is_rd_addr = 2'(n);
          @(negedge clk);
          cmp("IS", n, p0 + c, int'(signed'(is_rd_data)));
        end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int layer = 0; layer < 2; layer++) begin
      make_layer();
      run_os();
      run_ws();
      run_is();
    end
    $display("compute cycles per layer: OS %0d, WS %0d, IS %0d",
             cyc_os / 2, cyc_ws / 2, cyc_is / 2);
    $display("events: os_drain=%0d ws_preload=%0d is_preload=%0d acc=%0d overwrite=%0d tail_tile=%0d pad_lane=%0d",
             n_os_drain, n_ws_preload, n_is_preload, n_acc, n_overwrite, n_tail_tile, n_pad_lane);
    if (n_os_drain == 0)   begin failures++; $display("OS drain never happened"); end
    if (n_ws_preload == 0) begin failures++; $display("WS preload never happened"); end
    if (n_is_preload == 0) begin failures++; $display("IS preload never happened"); end
    if (n_acc == 0)        begin failures++; $display("accumulate never happened"); end
    if (n_overwrite == 0)  begin failures++; $display("overwrite never happened"); end
    if (n_tail_tile == 0)  begin failures++; $display("tail tile never happened"); end
    if (n_pad_lane == 0)   begin failures++; $display("padded lane never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
