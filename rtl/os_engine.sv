// os_engine: output-stationary GEMM unit, one P x P tile Y = H(P x D) * X(D x P).
//
// Buffers, each built from P sa_bank banks:
//   ifmap buffer   bank r = pixel r (array row r), D values
//   filter buffer  bank c = filter c (array column c), D weights
//   ofmap buffer   bank c = filter c, P results of ACC_W bits (addr = pixel)
// so the input storage is 2*P*D words, the output-stationary figure.
//
// A unit clears the accumulators of the os_array, streams both operands in
// over the whole reduction length (row r and column c delayed by r and c
// cycles, so each PE sees X[k][r] and H[c][k] together), then shifts the
// finished tile down and out of the bottom row into the ofmap buffer, one
// array row per cycle, bottom row first. Counting tt = 0 as the cycle in
// which start is accepted:
//   operand reads      bank r/c reads index k at tt = k + r (k + c)
//   accumulation       PE(r,c) adds index k at tt = k + r + c + 1
//   drain              tt = D+2P-1 .. D+3P-2, writing pixel P-1-j at step j
//   done               pulse at tt = D + 3P - 1
// A unit therefore takes D + 3P - 1 cycles, one under the D + 3P estimate
// for this dataflow because the first read is issued in the start cycle.
//
// Host port: wr_* writes one word of the ifmap or filter buffer; rd_bank
// (filter) / rd_addr (pixel) read one result, returned on rd_data a cycle
// later. Both are for use while busy is low. The bank organisation, the host
// port and the schedule are this design's own choices.
module os_engine
  import sa_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned DW    = 8,
  parameter int unsigned D     = 27,
  parameter int unsigned ACC_W = 21,
  localparam int unsigned KAW  = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned BW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             wr_en,
  input  buf_sel_e         wr_buf,
  input  logic [BW-1:0]    wr_bank,
  input  logic [KAW-1:0]   wr_addr,
  input  logic [DW-1:0]    wr_data,
  input  logic [BW-1:0]    rd_bank,
  input  logic [BW-1:0]    rd_addr,
  output logic [ACC_W-1:0] rd_data
);
  localparam int unsigned SHIFT0 = D + 2 * P - 1;   // first drain cycle
  localparam int unsigned LAST   = D + 3 * P - 2;   // last working cycle
  localparam int unsigned CW     = $clog2(LAST + 1);

  logic          run_q, done_q, go, shift, clear;
  logic [CW-1:0] tt_q;
  int            tt;
  logic [P-1:0][KAW-1:0]   ifm_raddr, flt_raddr;
  logic [P-1:0]            ifm_rd, flt_rd, ifm_en_q, flt_en_q;
  logic [P-1:0][DW-1:0]    ifm_q, flt_q, row_data, col_weight;
  logic [P-1:0][ACC_W-1:0] col_psum, ofm_q;
  logic [BW-1:0]           ofm_waddr, rd_bank_q;

  assign go    = start && !run_q;
  assign tt    = run_q ? int'(tt_q) : 0;
  assign busy  = run_q;
  assign done  = done_q;
  assign clear = go;
  assign shift = run_q && tt >= int'(SHIFT0);
  assign ofm_waddr = BW'(int'(P) - 1 - (tt - int'(SHIFT0)));

  always_comb begin
    int a;
    for (int i = 0; i < int'(P); i++) begin
      a            = tt - i;
      ifm_raddr[i] = KAW'(a);
      flt_raddr[i] = KAW'(a);
      ifm_rd[i]    = (run_q || go) && a >= 0 && a < int'(D);
      flt_rd[i]    = ifm_rd[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= 1'b0;
      done_q   <= 1'b0;
      tt_q     <= '0;
      ifm_en_q <= '0;
      flt_en_q <= '0;
    end else begin
      done_q   <= 1'b0;
      ifm_en_q <= ifm_rd;
      flt_en_q <= flt_rd;
      if (go) begin
        run_q <= 1'b1;
        tt_q  <= CW'(1);
      end else if (run_q) begin
        if (tt == int'(LAST)) begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
        tt_q <= tt_q + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_bank
    sa_bank #(.W(DW), .DEPTH(D)) u_ifmap (
      .clk, .we(wr_en && wr_buf == BUF_IFMAP && wr_bank == BW'(i)),
      .waddr(wr_addr), .wdata(wr_data),
      .raddr(ifm_raddr[i]), .rdata(ifm_q[i])
    );
    sa_bank #(.W(DW), .DEPTH(D)) u_filter (
      .clk, .we(wr_en && wr_buf == BUF_FILTER && wr_bank == BW'(i)),
      .waddr(wr_addr), .wdata(wr_data),
      .raddr(flt_raddr[i]), .rdata(flt_q[i])
    );
    sa_bank #(.W(ACC_W), .DEPTH(P)) u_ofmap (
      .clk, .we(shift), .waddr(ofm_waddr), .wdata(col_psum[i]),
      .raddr(rd_addr), .rdata(ofm_q[i])
    );
    assign row_data[i]   = ifm_en_q[i] ? ifm_q[i] : '0;
    assign col_weight[i] = flt_en_q[i] ? flt_q[i] : '0;
  end

  os_array #(.P(P), .DW(DW), .ACC_W(ACC_W)) u_array (
    .clk, .rst_n, .clear, .shift, .row_data, .col_weight, .col_psum
  );

  always_ff @(posedge clk) rd_bank_q <= rd_bank;
  assign rd_data = ofm_q[rd_bank_q];

  always_ff @(posedge clk) begin
    assert (!(wr_en && busy)) else $error("os_engine: buffer write while busy");
  end
endmodule
