// tb_ws_engine: self-checking test of the weight-stationary GEMM unit.
//
// Computes Y (4 filters x 9 pixels) = H (4 x 27) * X (27 x 9) twice with
// fresh random data. The filter buffer holds all of H; for each reduction
// tile k0 = 0, 4, ..., 24 the ifmap buffer is reloaded with rows k0..k0+3 of
// X (zeros past row 26) and a unit is started, overwriting the ofmap buffer
// on the first tile and accumulating on the others. Every unit must take
// M + 3P cycles from the accepted start to done. After the first tile the
// partial result is checked too, so both the overwrite and the accumulate
// paths and the partly filled last tile are exercised.
module tb_ws_engine;
  import sa_pkg::*;
  localparam int P = 4, DW = 8, D = 27, M = 9, ACC_W = 21;
  logic clk = 0, rst_n = 0, start = 0, acc = 0, busy, done, wr_en = 0;
  logic [4:0] k0 = 0;
  buf_sel_e wr_buf = BUF_IFMAP;
  logic [1:0] wr_bank = 0, rd_bank = 0;
  logic [4:0] wr_addr = 0;
  logic [3:0] rd_addr = 0;
  logic [DW-1:0] wr_data = 0;
  logic [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int x [D][M];   // x[k][pixel]
  int h [P][D];   // h[filter][k]

  ws_engine #(.P(P), .DW(DW), .D(D), .M(M), .ACC_W(ACC_W)) dut (.*);

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
    if (cyc + 1 != M + 3 * P) begin
      failures++;
      $display("unit took %0d cycles, expected %0d", cyc + 1, M + 3 * P);
    end
  endtask

  task automatic check_y(input int kmax);
    int exp_y, got;
    for (int c = 0; c < P; c++)
      for (int m = 0; m < M; m++) begin
        @(negedge clk);
        rd_bank = 2'(c); rd_addr = 4'(m);
        @(negedge clk);
        exp_y = 0;
        for (int k = 0; k < kmax && k < D; k++) exp_y += h[c][k] * x[k][m];
        got = int'(signed'(rd_data));
        checks++;
        if (got != exp_y) begin
          failures++;
          $display("Y[%0d][%0d] = %0d, expected %0d (k < %0d)", c, m, got, exp_y, kmax);
        end
      end
  endtask

  task automatic gemm(input bit extreme);
    for (int k = 0; k < D; k++) begin
      for (int m = 0; m < M; m++) x[k][m] = extreme ? -128 : $urandom_range(0, 255) - 128;
      for (int c = 0; c < P; c++) begin
        h[c][k] = extreme ? -128 : $urandom_range(0, 255) - 128;
        wr(BUF_FILTER, c, k, h[c][k]);
      end
    end
    for (int kb = 0; kb < D; kb += P) begin
      for (int r = 0; r < P; r++)
        for (int m = 0; m < M; m++)
          wr(BUF_IFMAP, r, m, (kb + r < D) ? x[kb+r][m] : 0);
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
