// tb_is_engine: self-checking test of the input-stationary GEMM unit.
//
// Computes Y (4 filters x 4 pixels) = H (4 x 27) * X (27 x 4) three times
// with fresh data (the last with -128 everywhere). The ifmap buffer holds all
// of X; for each reduction tile k0 = 0, 4, ..., 24 the filter buffer is
// reloaded with columns k0..k0+3 of H (zeros past 26) and a unit is started,
// overwriting the ofmap buffer on the first tile and accumulating on the
// others. Every unit must take N + 3P cycles from the accepted start to
// done. The partial result after the first tile is checked too.
module tb_is_engine;
  import sa_pkg::*;
  localparam int P = 4, DW = 8, D = 27, N = 4, ACC_W = 21;
  logic clk = 0, rst_n = 0, start = 0, acc = 0, busy, done, wr_en = 0;
  logic [4:0] k0 = 0;
  buf_sel_e wr_buf = BUF_IFMAP;
  logic [1:0] wr_bank = 0, rd_bank = 0, rd_addr = 0;
  logic [4:0] wr_addr = 0;
  logic [DW-1:0] wr_data = 0;
  logic [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int x [D][P];   // x[k][pixel]
  int h [N][D];   // h[filter][k]

  is_engine #(.P(P), .DW(DW), .D(D), .N(N), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input buf_sel_e b, input int bank, input int addr, input int val);
    @(negedge clk);
    wr_en = 1; wr_buf = b; wr_bank = 2'(bank); wr_addr = 5'(addr); wr_data = DW'(val);
  endtask

  task automatic run_unit(input int kb, input bit a);
    int cyc;
    @(negedge clk);
    wr_en = 0; start = 1; k0 = 5'(kb); acc = a;
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc + 1 != N + 3 * P) begin
      failures++;
      $display("unit took %0d cycles, expected %0d", cyc + 1, N + 3 * P);
    end
  endtask

  task automatic check_y(input int kmax);
    int exp_y, got;
    for (int c = 0; c < P; c++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        rd_bank = 2'(c); rd_addr = 2'(n);
        @(negedge clk);
        exp_y = 0;
        for (int k = 0; k < kmax && k < D; k++) exp_y += h[n][k] * x[k][c];
        got = int'(signed'(rd_data));
        checks++;
        if (got != exp_y) begin
          failures++;
          $display("Y[%0d][%0d] = %0d, expected %0d (k < %0d)", n, c, got, exp_y, kmax);
        end
      end
  endtask

  task automatic gemm(input bit extreme);
    for (int k = 0; k < D; k++) begin
      for (int n = 0; n < N; n++) h[n][k] = extreme ? -128 : $urandom_range(0, 255) - 128;
      for (int c = 0; c < P; c++) begin
        x[k][c] = extreme ? -128 : $urandom_range(0, 255) - 128;
        wr(BUF_IFMAP, c, k, x[k][c]);
      end
    end
    for (int kb = 0; kb < D; kb += P) begin
      for (int r = 0; r < P; r++)
        for (int n = 0; n < N; n++)
          wr(BUF_FILTER, r, n, (kb + r < D) ? h[n][kb+r] : 0);
      run_unit(kb, kb != 0);
      if (kb == 0) check_y(P);
    end
    check_y(D);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    gemm(0);
    gemm(0);
    gemm(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
