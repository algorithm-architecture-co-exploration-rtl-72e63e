// is_array: P x P input-stationary systolic array.
//
// Ifmap values are preloaded: while `load` is high, col_data[c] is shifted
// into column c from the top, so after P load cycles (bottom row's value
// first) PE(r,c) holds the value fed on load cycle P-1-r. Weights then stream
// in on the left edge, row r carrying reduction index r, and pass right; each
// PE adds its product to the partial sum from above. The caller skews row r
// by r cycles; col_psum[c] then carries sum_r w(r) * x(r,c) for one filter
// P+c cycles after its row-0 element entered.
//
// The partial-sum width grows down a column as in the published diagram:
// row r produces 2*DW + clog2(r+1) bits (16, 17, 18, 18 for 8-bit data and
// P = 4). The top row's in_psum is tied to zero.
module is_array
  import sa_pkg::*;
#(
  parameter int unsigned P      = 4,
  parameter int unsigned DW     = 8,
  parameter int unsigned PSUM_W = psum_w(DW, P - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [P-1:0][DW-1:0]     row_weight,
  input  logic [P-1:0][DW-1:0]     col_data,
  output logic [P-1:0][PSUM_W-1:0] col_psum
);
  logic [DW-1:0]     wgt [P][P+1];
  logic [DW-1:0]     dat [P+1][P];
  logic [PSUM_W-1:0] ps  [P+1][P];

  for (genvar i = 0; i < P; i++) begin : g_edge
    assign wgt[i][0] = row_weight[i];
    assign dat[0][i] = col_data[i];
    assign ps[0][i]  = '0;
    assign col_psum[i] = ps[P][i];
  end

  for (genvar r = 0; r < P; r++) begin : g_row
    localparam int unsigned IW = (r == 0) ? 2 * DW : psum_w(DW, r - 1);
    localparam int unsigned OW = psum_w(DW, r);
    for (genvar c = 0; c < P; c++) begin : g_col
      logic signed [OW-1:0] out_ps;
      is_pe #(.DW(DW), .IN_W(IW), .OUT_W(OW)) u_pe (
        .clk, .rst_n, .load,
        .in_weight (wgt[r][c]),
        .in_data   (dat[r][c]),
        .in_psum   (ps[r][c][IW-1:0]),
        .out_weight(wgt[r][c+1]),
        .out_data  (dat[r+1][c]),
        .out_psum  (out_ps)
      );
      assign ps[r+1][c] = PSUM_W'(out_ps);
    end
  end
endmodule
