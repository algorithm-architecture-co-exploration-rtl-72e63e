// ws_engine: weight-stationary GEMM unit, Y(M x P) (+)= X(M x P) * H^T(P x P).
//
// Buffers, each built from P sa_bank banks:
//   filter buffer  bank c = filter c, D weights (the whole reduction length)
//   ifmap buffer   bank r = reduction row k0+r of the current tile, M pixels
//   ofmap buffer   bank c = filter c, M partial sums of ACC_W bits
// so the storage is P*D + 2*P*M words, the weight-stationary figure.
//
// One unit (start pulse, with k0 and acc sampled with it) preloads the
// weights H[c][k0 .. k0+P-1] into the ws_array, streams the M ifmap vectors
// through it, and writes each column sum to the ofmap buffer, or adds it to
// what is there when acc is set. Running units for k0 = 0, P, 2P, ... with
// acc set after the first, reloading the ifmap buffer between them, gives the
// full product over D; weights past D read as zero. A unit takes M + 3P
// cycles from the accepted start to the done pulse (see st_ctrl).
//
// Host port: wr_* writes one word of the ifmap or filter buffer; rd_bank /
// rd_addr read one ofmap word, returned on rd_data a cycle later. Both are
// for use while busy is low. The bank organisation, the host port and the
// accumulate-in-buffer scheme are this design's own choices.
module ws_engine
  import sa_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned DW    = 8,
  parameter int unsigned D     = 27,
  parameter int unsigned M     = 9,
  parameter int unsigned ACC_W = 21,
  localparam int unsigned KAW  = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned TAW  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned WAW  = (KAW > TAW) ? KAW : TAW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KAW-1:0]   k0,
  input  logic             acc,
  output logic             busy,
  output logic             done,
  input  logic             wr_en,
  input  buf_sel_e         wr_buf,
  input  logic [BW-1:0]    wr_bank,
  input  logic [WAW-1:0]   wr_addr,
  input  logic [DW-1:0]    wr_data,
  input  logic [BW-1:0]    rd_bank,
  input  logic [TAW-1:0]   rd_addr,
  output logic [ACC_W-1:0] rd_data
);
  localparam int unsigned PSUM_W = psum_w(DW, P - 1);

  logic [KAW-1:0]          stat_raddr;
  logic                    stat_feed_en, load, acc_mode;
  logic [P-1:0][TAW-1:0]   strm_raddr, ofm_raddr, ofm_waddr;
  logic [P-1:0]            strm_feed_en, ofm_we;
  logic [P-1:0][DW-1:0]    flt_q, ifm_q, row_data, col_weight;
  logic [P-1:0][PSUM_W-1:0] col_psum;
  logic [P-1:0][ACC_W-1:0] ofm_q, ofm_wdata;
  logic [BW-1:0]           rd_bank_q;

  st_ctrl #(.P(P), .D(D), .T(M)) u_ctrl (
    .clk, .rst_n, .start, .k0, .acc, .busy, .done,
    .stat_raddr, .stat_feed_en, .load,
    .strm_raddr, .strm_feed_en,
    .ofm_raddr, .ofm_waddr, .ofm_we, .acc_mode
  );

  for (genvar i = 0; i < P; i++) begin : g_bank
    sa_bank #(.W(DW), .DEPTH(D)) u_filter (
      .clk, .we(wr_en && wr_buf == BUF_FILTER && wr_bank == BW'(i)),
      .waddr(KAW'(wr_addr)), .wdata(wr_data),
      .raddr(stat_raddr), .rdata(flt_q[i])
    );
    sa_bank #(.W(DW), .DEPTH(M)) u_ifmap (
      .clk, .we(wr_en && wr_buf == BUF_IFMAP && wr_bank == BW'(i)),
      .waddr(TAW'(wr_addr)), .wdata(wr_data),
      .raddr(strm_raddr[i]), .rdata(ifm_q[i])
    );
    sa_bank #(.W(ACC_W), .DEPTH(M)) u_ofmap (
      .clk, .we(ofm_we[i]), .waddr(ofm_waddr[i]), .wdata(ofm_wdata[i]),
      .raddr(busy ? ofm_raddr[i] : rd_addr), .rdata(ofm_q[i])
    );
    assign col_weight[i] = stat_feed_en    ? flt_q[i] : '0;
    assign row_data[i]   = strm_feed_en[i] ? ifm_q[i] : '0;
    assign ofm_wdata[i]  = acc_mode ? ofm_q[i] + ACC_W'(signed'(col_psum[i]))
                                    : ACC_W'(signed'(col_psum[i]));
  end

  ws_array #(.P(P), .DW(DW)) u_array (
    .clk, .rst_n, .load, .row_data, .col_weight, .col_psum
  );

  always_ff @(posedge clk) rd_bank_q <= rd_bank;
  assign rd_data = ofm_q[rd_bank_q];

  always_ff @(posedge clk) begin
    assert (!(wr_en && busy)) else $error("ws_engine: buffer write while busy");
  end
endmodule
