// ws_pe: weight-stationary processing element.
//
// While `load` is high, filter_reg takes in_weight, the filter_reg of the PE
// above, so a column of weights is shifted in from the top in P cycles; when
// `load` is low the weight is held. Every cycle the ifmap value at in_data is
// passed right through ifmap_reg, multiplied by the held weight, and added to
// the partial sum from above; the sum is registered in ofmap_reg and passed
// down. IN_W/OUT_W let the partial-sum width grow row by row (16, 17, 18, 18
// bits in a 4x4 array).
//
// Ports, register names and widths follow the published PE diagram; the load
// pin, signed arithmetic and the reset are this design's choices. Latency
// from in_data/in_psum to out_data/out_psum is one cycle.
module ws_pe #(
  parameter int unsigned DW    = 8,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [DW-1:0]    in_data,
  input  logic signed [DW-1:0]    in_weight,
  input  logic signed [IN_W-1:0]  in_psum,
  output logic signed [DW-1:0]    out_data,
  output logic signed [DW-1:0]    out_weight,
  output logic signed [OUT_W-1:0] out_psum
);
  logic signed [DW-1:0]    ifmap_reg, filter_reg;
  logic signed [OUT_W-1:0] ofmap_reg;
  logic signed [2*DW-1:0]  prod;

  assign prod = in_data * filter_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifmap_reg  <= '0;
      filter_reg <= '0;
      ofmap_reg  <= '0;
    end else begin
      ifmap_reg <= in_data;
      if (load) filter_reg <= in_weight;
      ofmap_reg <= OUT_W'(in_psum) + OUT_W'(prod);
    end
  end

  assign out_data   = ifmap_reg;
  assign out_weight = filter_reg;
  assign out_psum   = ofmap_reg;
endmodule
