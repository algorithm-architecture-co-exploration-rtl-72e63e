// tb_is_pe: self-checking test of the input-stationary PE.
//
// Random weights, partial sums and ifmap values are applied with the load
// strobe raised at random. A reference model tracks the held ifmap value
// (changed only under load), the pass-through weight and the registered sum
// in_psum + in_weight * ifmap, and all outputs are compared every cycle. The
// row-1 widths (16-bit psum in, 17-bit out) are used.
module tb_is_pe;
  localparam int DW = 8, IN_W = 16, OUT_W = 17;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [DW-1:0] in_data = 0, in_weight = 0, out_data, out_weight;
  logic signed [IN_W-1:0] in_psum = 0;
  logic signed [OUT_W-1:0] out_psum;
  int checks = 0, failures = 0, loads = 0;
  int e_data, e_weight, e_psum;

  is_pe #(.DW(DW), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_data = 0; e_weight = 0; e_psum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (int'(out_data) != e_data || int'(out_weight) != e_weight ||
          int'(out_psum) != e_psum) begin
        failures++;
        $display("cycle %0d: got %0d %0d %0d exp %0d %0d %0d", i,
                 out_data, out_weight, out_psum, e_data, e_weight, e_psum);
      end
      in_data   = DW'($urandom);
      in_weight = DW'($urandom);
      in_psum   = IN_W'($urandom);
      load      = ($urandom_range(0, 7) == 0);
      if (load) loads++;
      e_psum   = int'(in_psum) + int'(in_weight) * e_data;
      e_weight = int'(in_weight);
      if (load) e_data = int'(in_data);
    end
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
