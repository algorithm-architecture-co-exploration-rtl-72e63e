// tb_os_pe: self-checking test of the output-stationary PE.
//
// Random operands, random partial sums from above and random clear/shift
// strobes are applied for several hundred cycles. A reference model of the
// three registers (pass-through ifmap and weight, accumulate / clear / load
// from above for the ofmap) is updated with the same inputs, and all three
// outputs are compared every cycle. Long runs without clear exercise the full
// 21-bit accumulation of 27 products.
module tb_os_pe;
  localparam int DW = 8, ACC_W = 21;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic signed [DW-1:0] in_data = 0, in_weight = 0, out_data, out_weight;
  logic signed [ACC_W-1:0] in_psum = 0, out_psum;
  int checks = 0, failures = 0;
  int e_data, e_weight;
  longint e_acc;

  os_pe #(.DW(DW), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_data = 0; e_weight = 0; e_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (int'(out_data) != e_data || int'(out_weight) != e_weight ||
          longint'(out_psum) != e_acc) begin
        failures++;
        $display("cycle %0d: got %0d %0d %0d exp %0d %0d %0d", i,
                 out_data, out_weight, out_psum, e_data, e_weight, e_acc);
      end
      in_data   = DW'($urandom);
      in_weight = DW'($urandom);
      in_psum   = ACC_W'($urandom);
      // clear rarely so that long accumulations happen
      clear = ($urandom_range(0, 29) == 0);
      shift = !clear && ($urandom_range(0, 9) == 0);
      e_data   = int'(in_data);
      e_weight = int'(in_weight);
      if (clear)      e_acc = 0;
      else if (shift) e_acc = longint'(in_psum);
      else begin
        e_acc = e_acc + longint'(in_data) * longint'(in_weight);
        // wrap to the accumulator width, sign-extended
        e_acc = longint'(signed'(ACC_W'(e_acc)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
