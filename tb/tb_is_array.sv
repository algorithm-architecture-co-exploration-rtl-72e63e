// tb_is_array: self-checking test of the 4x4 input-stationary array.
//
// Three passes: each preloads a 4x4 ifmap tile down the columns (bottom
// row's value first, P load cycles), then streams four filters through the
// rows with row r delayed by r cycles. Column c's sum for filter n must
// appear at col_psum[c] P + c cycles after the filter's row-0 element
// entered; it is compared with a dot product computed here. The last pass
// uses -128 everywhere, which needs the full 18 bits of the bottom row.
module tb_is_array;
  localparam int P = 4, DW = 8, N = 4;
  localparam int PW = 18;
  logic clk = 0, rst_n = 0, load = 0;
  logic [P-1:0][DW-1:0] row_weight, col_data;
  logic [P-1:0][PW-1:0] col_psum;
  int checks = 0, failures = 0;
  int xs [P][P];  // xs[r][c]: stationary ifmap
  int h  [N][P];  // h[n][r]: streamed weights

  is_array #(.P(P), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(input bit extreme);
    int exp_y, got, n;
    for (int r = 0; r < P; r++) begin
      for (int c = 0; c < P; c++) xs[r][c] = extreme ? -128 : $urandom_range(0, 255) - 128;
      for (int nn = 0; nn < N; nn++) h[nn][r] = extreme ? -128 : $urandom_range(0, 255) - 128;
    end
    for (int j = 0; j < P; j++) begin
      @(negedge clk);
      load = 1; row_weight = '0;
      for (int c = 0; c < P; c++) col_data[c] = DW'(xs[P-1-j][c]);
    end
    for (int t = 0; t < N + 2 * P; t++) begin
      @(negedge clk);
      load = 0; col_data = '0;
      for (int c = 0; c < P; c++) begin
        n = t - P - c;
        if (n >= 0 && n < N) begin
          exp_y = 0;
          for (int r = 0; r < P; r++) exp_y += h[n][r] * xs[r][c];
          got = int'(signed'(col_psum[c]));
          checks++;
          if (got != exp_y) begin
            failures++;
            $display("filter %0d col %0d: %0d, expected %0d", n, c, got, exp_y);
          end
        end
      end
      for (int r = 0; r < P; r++)
        row_weight[r] = (t - r >= 0 && t - r < N) ? DW'(h[t-r][r]) : '0;
    end
  endtask

  initial begin
    row_weight = '0; col_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass(0);
    run_pass(0);
    run_pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
