// tb_os_array: self-checking test of the 4x4 output-stationary array.
//
// For each of three tiles the testbench clears the array, feeds a random
// 4 x 27 ifmap block and 4 x 27 weight block with the row/column skew the
// array expects, then shifts the results out of the bottom row and compares
// each of the 16 sums with a product computed here. The third tile uses
// -128 everywhere, the largest magnitude the 21-bit accumulator must hold.
// The drain must present array row P-1-j on shift step j.
module tb_os_array;
  localparam int P = 4, DW = 8, ACC_W = 21, D = 27;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [P-1:0][DW-1:0] row_data, col_weight;
  logic [P-1:0][ACC_W-1:0] col_psum;
  int checks = 0, failures = 0;
  int x [D][P];   // x[k][r]: ifmap value for array row r
  int h [P][D];   // h[c][k]: weight for array column c

  os_array #(.P(P), .DW(DW), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(input bit extreme);
    int exp_y, got;
    for (int k = 0; k < D; k++)
      for (int i = 0; i < P; i++) begin
        x[k][i] = extreme ? -128 : $urandom_range(0, 255) - 128;
        h[i][k] = extreme ? -128 : $urandom_range(0, 255) - 128;
      end
    @(negedge clk);
    clear = 1; shift = 0; row_data = '0; col_weight = '0;
    for (int t = 0; t <= D + 2 * P - 3; t++) begin
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < P; i++) begin
        row_data[i]   = (t - i >= 0 && t - i < D) ? DW'(x[t-i][i]) : '0;
        col_weight[i] = (t - i >= 0 && t - i < D) ? DW'(h[i][t-i]) : '0;
      end
    end
    for (int j = 0; j < P; j++) begin
      @(negedge clk);
      row_data = '0; col_weight = '0; shift = 1;
      for (int c = 0; c < P; c++) begin
        int r = P - 1 - j;
        exp_y = 0;
        for (int k = 0; k < D; k++) exp_y += x[k][r] * h[c][k];
        got = int'(signed'(col_psum[c]));
        checks++;
        if (got != exp_y) begin
          failures++;
          $display("Y[row %0d][col %0d] = %0d, expected %0d", r, c, got, exp_y);
        end
      end
    end
    @(negedge clk);
    shift = 0;
  endtask

  initial begin
    row_data = '0; col_weight = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_tile(0);
    run_tile(0);
    run_tile(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
