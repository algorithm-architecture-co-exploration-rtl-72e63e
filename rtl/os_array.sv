// os_array: P x P output-stationary systolic array.
//
// PE(r,c) sits in row r, column c (PE0..PE15 numbered row by row). Row r
// receives its ifmap stream at row_data[r] on the left edge and passes it
// right; column c receives its weight stream at col_weight[c] on the top edge
// and passes it down. The caller skews the streams (row r and column c start
// r and c cycles late) so that PE(r,c) sees matching operands and accumulates
// Y[c][r] = sum_k H[c][k] * X[k][r]. `clear` zeroes all accumulators; with
// `shift` high the accumulators of each column move down one row per cycle,
// and col_psum[c] always shows the bottom PE's accumulator, so P shift cycles
// drain the tile bottom row first.
//
// The grid, the edges the streams enter by and the 21-bit links between rows
// follow the published array diagram; the top row's in_psum is tied to zero.
module os_array #(
  parameter int unsigned P     = 4,
  parameter int unsigned DW    = 8,
  parameter int unsigned ACC_W = 21
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      shift,
  input  logic [P-1:0][DW-1:0]      row_data,
  input  logic [P-1:0][DW-1:0]      col_weight,
  output logic [P-1:0][ACC_W-1:0]   col_psum
);
  // Horizontal ifmap links, vertical weight and psum links.
  logic [DW-1:0]    dat [P][P+1];
  logic [DW-1:0]    wgt [P+1][P];
  logic [ACC_W-1:0] ps  [P+1][P];

  for (genvar i = 0; i < P; i++) begin : g_edge
    assign dat[i][0] = row_data[i];
    assign wgt[0][i] = col_weight[i];
    assign ps[0][i]  = '0;
    assign col_psum[i] = ps[P][i];
  end

  for (genvar r = 0; r < P; r++) begin : g_row
    for (genvar c = 0; c < P; c++) begin : g_col
      os_pe #(.DW(DW), .ACC_W(ACC_W)) u_pe (
        .clk, .rst_n, .clear, .shift,
        .in_data   (dat[r][c]),
        .in_weight (wgt[r][c]),
        .in_psum   (ps[r][c]),
        .out_data  (dat[r][c+1]),
        .out_weight(wgt[r+1][c]),
        .out_psum  (ps[r+1][c])
      );
    end
  end
endmodule
