// tb_os_engine: self-checking test of the output-stationary GEMM unit.
//
// Three units, each computing one 4x4 output tile over the full reduction
// length D = 27: the ifmap buffer is loaded with four pixel columns and the
// filter buffer with four filter rows, the unit is started, and the 16
// results are read back and compared with a product computed here. The
// cycle count from the accepted start to done must be D + 3P - 1; a start
// pulse while busy must be ignored, and busy must be high throughout.
module tb_os_engine;
  import sa_pkg::*;
  localparam int P = 4, DW = 8, D = 27, ACC_W = 21;
  logic clk = 0, rst_n = 0, start = 0, busy, done, wr_en = 0;
  buf_sel_e wr_buf = BUF_IFMAP;
  logic [1:0] wr_bank = 0, rd_bank = 0, rd_addr = 0;
  logic [4:0] wr_addr = 0;
  logic [DW-1:0] wr_data = 0;
  logic [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int x [D][P];   // x[k][pixel]
  int h [P][D];   // h[filter][k]

  os_engine #(.P(P), .DW(DW), .D(D), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input buf_sel_e b, input int bank, input int addr, input int val);
    @(negedge clk);
    wr_en = 1; wr_buf = b; wr_bank = 2'(bank); wr_addr = 5'(addr); wr_data = DW'(val);
  endtask

  task automatic run_unit(input bit extreme);
    int cyc, exp_y, got;
    for (int k = 0; k < D; k++)
      for (int i = 0; i < P; i++) begin
        x[k][i] = extreme ? -128 : $urandom_range(0, 255) - 128;
        h[i][k] = extreme ? -128 : $urandom_range(0, 255) - 128;
        wr(BUF_IFMAP, i, k, x[k][i]);
        wr(BUF_FILTER, i, k, h[i][k]);
      end
    @(negedge clk);
    wr_en = 0; start = 1;
    @(posedge clk);             // start accepted here
    cyc = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      if (!busy && !done) begin failures++; $display("busy dropped early"); end
      if (cyc == 5) start = 1;  // must be ignored while busy
      else start = 0;
      cyc++;
    end
    start = 0;
    // done was sampled high at edge number cyc+1 after the start edge
    checks++;
    if (cyc + 1 != D + 3 * P - 1) begin
      failures++;
      $display("unit took %0d cycles, expected %0d", cyc + 1, D + 3 * P - 1);
    end
    for (int c = 0; c < P; c++)
      for (int r = 0; r < P; r++) begin
        @(negedge clk);
        rd_bank = 2'(c); rd_addr = 2'(r);
        @(negedge clk);
        exp_y = 0;
        for (int k = 0; k < D; k++) exp_y += h[c][k] * x[k][r];
        got = int'(signed'(rd_data));
        checks++;
        if (got != exp_y) begin
          failures++;
          $display("Y[filter %0d][pixel %0d] = %0d, expected %0d", c, r, got, exp_y);
        end
      end
    checks++;
    if (busy) begin failures++; $display("extra start was not ignored"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_unit(0);
    run_unit(0);
    run_unit(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
