// tb_sa_bank: self-checking test of one buffer bank (8 bits x 27 words).
//
// Fills the bank, then runs random writes and reads together for a few
// hundred cycles against a shadow array. Each read must return the shadow's
// word one cycle later; a read of the address being written in the same
// cycle must return the old word.
module tb_sa_bank;
  localparam int W = 8, DEPTH = 27, AW = 5;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0, same_addr = 0;
  int shadow [DEPTH];
  int expect_q;

  sa_bank #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = int'(wdata);
    end
    @(negedge clk);
    we = 0; raddr = 0;
    expect_q = shadow[0];
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (int'(rdata) != expect_q) begin
        failures++;
        $display("read %0d: got %0d expected %0d", i, rdata, expect_q);
      end
      we    = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      if (we && raddr == waddr) same_addr++;
      expect_q = shadow[raddr];          // old data on a same-address write
      if (we) shadow[waddr] = int'(wdata);
    end
    if (same_addr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
