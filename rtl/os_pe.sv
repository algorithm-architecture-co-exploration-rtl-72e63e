// os_pe: output-stationary processing element.
//
// The ifmap value travels left-to-right through ifmap_reg and the weight
// top-to-bottom through filter_reg, one PE per cycle. Each cycle the PE
// multiplies the two values arriving at its inputs (a 2*DW-bit product) and
// adds the product into its ofmap_reg accumulator, so the output stays in the
// PE while operands stream past. When `shift` is high the accumulator instead
// loads in_psum, the ofmap_reg of the PE above: the finished results of a
// column then move down one row per cycle and leave at the bottom.
// `clear` zeroes the accumulator (it wins over shift and accumulate).
//
// Register names, ports and widths (8-bit operands, 16-bit product, 21-bit
// accumulator) follow the published PE diagram. The clear/shift control pins,
// signed arithmetic and the reset are this design's choices. All outputs are
// registered; inputs are used in the cycle they arrive.
module os_pe #(
  parameter int unsigned DW    = 8,
  parameter int unsigned ACC_W = 21
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    shift,
  input  logic signed [DW-1:0]    in_data,
  input  logic signed [DW-1:0]    in_weight,
  input  logic signed [ACC_W-1:0] in_psum,
  output logic signed [DW-1:0]    out_data,
  output logic signed [DW-1:0]    out_weight,
  output logic signed [ACC_W-1:0] out_psum
);
  logic signed [DW-1:0]    ifmap_reg, filter_reg;
  logic signed [ACC_W-1:0] ofmap_reg;
  logic signed [2*DW-1:0]  prod;

  assign prod = in_data * in_weight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifmap_reg  <= '0;
      filter_reg <= '0;
      ofmap_reg  <= '0;
    end else begin
      ifmap_reg  <= in_data;
      filter_reg <= in_weight;
      if (clear)      ofmap_reg <= '0;
      else if (shift) ofmap_reg <= in_psum;
      else            ofmap_reg <= ofmap_reg + ACC_W'(prod);
    end
  end

  assign out_data   = ifmap_reg;
  assign out_weight = filter_reg;
  assign out_psum   = ofmap_reg;
endmodule
