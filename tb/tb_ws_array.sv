// tb_ws_array: self-checking test of the 4x4 weight-stationary array.
//
// Three passes: each preloads a 4x4 weight tile down the columns (bottom
// row's weight first, P load cycles), then streams nine ifmap vectors through
// the rows with row r delayed by r cycles. Column c's sum for vector m must
// appear at col_psum[c] P + c cycles after the vector's row-0 element entered;
// it is compared with a dot product computed here. The last pass uses -128
// everywhere, which needs the full 18 bits of the bottom row.
module tb_ws_array;
  localparam int P = 4, DW = 8, M = 9;
  localparam int PW = 18;
  logic clk = 0, rst_n = 0, load = 0;
  logic [P-1:0][DW-1:0] row_data, col_weight;
  logic [P-1:0][PW-1:0] col_psum;
  int checks = 0, failures = 0;
  int w [P][P];   // w[r][c]
  int x [M][P];   // x[m][r]

  ws_array #(.P(P), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(input bit extreme);
    int exp_y, got, m;
    for (int r = 0; r < P; r++) begin
      for (int c = 0; c < P; c++) w[r][c] = extreme ? -128 : $urandom_range(0, 255) - 128;
      for (int mm = 0; mm < M; mm++) x[mm][r] = extreme ? -128 : $urandom_range(0, 255) - 128;
    end
    for (int j = 0; j < P; j++) begin
      @(negedge clk);
      load = 1; row_data = '0;
      for (int c = 0; c < P; c++) col_weight[c] = DW'(w[P-1-j][c]);
    end
    for (int t = 0; t < M + 2 * P; t++) begin
      @(negedge clk);
      load = 0; col_weight = '0;
      for (int c = 0; c < P; c++) begin
        m = t - P - c;
        if (m >= 0 && m < M) begin
          exp_y = 0;
          for (int r = 0; r < P; r++) exp_y += w[r][c] * x[m][r];
          got = int'(signed'(col_psum[c]));
          checks++;
          if (got != exp_y) begin
            failures++;
            $display("vector %0d col %0d: %0d, expected %0d", m, c, got, exp_y);
          end
        end
      end
      for (int r = 0; r < P; r++)
        row_data[r] = (t - r >= 0 && t - r < M) ? DW'(x[t-r][r]) : '0;
    end
  endtask

  initial begin
    row_data = '0; col_weight = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass(0);
    run_pass(0);
    run_pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
