// sa_bank: one bank of an on-chip buffer.
//
// A plain memory of DEPTH words of W bits with one write port and one read
// port, both synchronous: a write takes effect at the clock edge, and rdata
// shows the word at raddr one cycle after raddr is presented (a write and a
// read of the same address in one cycle return the old word). The engines
// build every ifmap, filter and ofmap buffer from P of these banks, one per
// array row or column, so each edge of the array gets one word per cycle.
// The banked organisation and the one-cycle read are this design's choices.
module sa_bank #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 27,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    assert (!we || int'(waddr) < int'(DEPTH)) else $error("sa_bank: write address %0d out of range", waddr);
  end
endmodule
