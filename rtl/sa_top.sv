// sa_top: the three systolic GEMM engines side by side.
//
// Convolution layers are lowered to a matrix product Y = H * X with H the
// N x D filter matrix and X the D x (Wo*Ho) ifmap matrix (D = C*K*K). The
// design offers the three classic ways of mapping that product onto a P x P
// array of multiply-accumulate PEs, each as an independent engine with its
// own buffers, controller and host port:
//   os_*  output stationary: each PE keeps one output and accumulates it
//         over the whole reduction (os_engine)
//   ws_*  weight stationary: a P x P weight tile stays in the array while
//         ifmap vectors stream through (ws_engine)
//   is_*  input stationary: a P x P ifmap tile stays in the array while the
//         filters stream through (is_engine)
// The engines share only clock and reset; their ports are those of the
// engines, prefixed. Defaults: 4 x 4 PEs, 8-bit operands, D = 27, nine
// output pixels and four filters.
module sa_top
  import sa_pkg::*;
#(
  parameter int unsigned P     = 4,    // PE array is P x P
  parameter int unsigned DW    = 8,    // ifmap / weight width
  parameter int unsigned D     = 27,   // reduction length C*K*K
  parameter int unsigned M     = 9,    // output pixels per WS unit (Wo*Ho)
  parameter int unsigned N     = 4,    // filters per IS unit
  parameter int unsigned ACC_W = 21,   // accumulator, 2*DW + clog2(D)
  localparam int unsigned KAW  = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned MAW  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NAW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned WSAW = (KAW > MAW) ? KAW : MAW,
  localparam int unsigned ISAW = (KAW > NAW) ? KAW : NAW
) (
  input  logic             clk,
  input  logic             rst_n,
  // output-stationary engine
  input  logic             os_start,
  output logic             os_busy,
  output logic             os_done,
  input  logic             os_wr_en,
  input  buf_sel_e         os_wr_buf,
  input  logic [BW-1:0]    os_wr_bank,
  input  logic [KAW-1:0]   os_wr_addr,
  input  logic [DW-1:0]    os_wr_data,
  input  logic [BW-1:0]    os_rd_bank,
  input  logic [BW-1:0]    os_rd_addr,
  output logic [ACC_W-1:0] os_rd_data,
  // weight-stationary engine
  input  logic             ws_start,
  input  logic [KAW-1:0]   ws_k0,
  input  logic             ws_acc,
  output logic             ws_busy,
  output logic             ws_done,
  input  logic             ws_wr_en,
  input  buf_sel_e         ws_wr_buf,
  input  logic [BW-1:0]    ws_wr_bank,
  input  logic [WSAW-1:0]  ws_wr_addr,
  input  logic [DW-1:0]    ws_wr_data,
  input  logic [BW-1:0]    ws_rd_bank,
  input  logic [MAW-1:0]   ws_rd_addr,
  output logic [ACC_W-1:0] ws_rd_data,
  // input-stationary engine
  input  logic             is_start,
  input  logic [KAW-1:0]   is_k0,
  input  logic             is_acc,
  output logic             is_busy,
  output logic             is_done,
  input  logic             is_wr_en,
  input  buf_sel_e         is_wr_buf,
  input  logic [BW-1:0]    is_wr_bank,
  input  logic [ISAW-1:0]  is_wr_addr,
  input  logic [DW-1:0]    is_wr_data,
  input  logic [BW-1:0]    is_rd_bank,
  input  logic [NAW-1:0]   is_rd_addr,
  output logic [ACC_W-1:0] is_rd_data
);
  os_engine #(.P(P), .DW(DW), .D(D), .ACC_W(ACC_W)) u_os (
    .clk, .rst_n,
    .start(os_start), .busy(os_busy), .done(os_done),
    .wr_en(os_wr_en), .wr_buf(os_wr_buf), .wr_bank(os_wr_bank),
    .wr_addr(os_wr_addr), .wr_data(os_wr_data),
    .rd_bank(os_rd_bank), .rd_addr(os_rd_addr), .rd_data(os_rd_data)
  );

  ws_engine #(.P(P), .DW(DW), .D(D), .M(M), .ACC_W(ACC_W)) u_ws (
    .clk, .rst_n,
    .start(ws_start), .k0(ws_k0), .acc(ws_acc), .busy(ws_busy), .done(ws_done),
    .wr_en(ws_wr_en), .wr_buf(ws_wr_buf), .wr_bank(ws_wr_bank),
    .wr_addr(ws_wr_addr), .wr_data(ws_wr_data),
    .rd_bank(ws_rd_bank), .rd_addr(ws_rd_addr), .rd_data(ws_rd_data)
  );

  is_engine #(.P(P), .DW(DW), .D(D), .N(N), .ACC_W(ACC_W)) u_is (
    .clk, .rst_n,
    .start(is_start), .k0(is_k0), .acc(is_acc), .busy(is_busy), .done(is_done),
    .wr_en(is_wr_en), .wr_buf(is_wr_buf), .wr_bank(is_wr_bank),
    .wr_addr(is_wr_addr), .wr_data(is_wr_data),
    .rd_bank(is_rd_bank), .rd_addr(is_rd_addr), .rd_data(is_rd_data)
  );
endmodule
