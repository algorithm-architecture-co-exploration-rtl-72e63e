// st_ctrl: schedule generator shared by the weight-stationary and the
// input-stationary engines.
//
// Both engines run the same unit of work: preload a P x P tile of the
// stationary operand (reduction indices k0 .. k0+P-1) down the array columns,
// stream T vectors of the other operand through the array rows with row r
// delayed by r cycles, and write (or add) the T x P column sums into the
// ofmap banks. This block turns a start pulse into the read addresses, feed
// enables, load strobe and ofmap write strobes of that schedule.
//
// Timing, counting tt = 0 as the cycle in which start is accepted:
//   stationary reads   tt = 0 .. P-1, address k0+P-1-tt (bottom row first)
//   load strobe        tt = 1 .. P
//   stream row r       reads vector m at tt = P + m + r, feeds it at tt+1
//   ofmap column c     reads m at tt = 2P + m + c, writes m at tt+1
//   done               pulse at tt = T + 3P
// so a unit takes T + 3P cycles from start to done, the unit time of these
// dataflows. Reads beyond the reduction length D feed zero, which lets the
// last, partly filled tile run unchanged. The exact schedule is this
// design's own; start is ignored while busy.
module st_ctrl #(
  parameter int unsigned P   = 4,
  parameter int unsigned D   = 27,
  parameter int unsigned T   = 9,
  localparam int unsigned KAW = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned TAW = (T > 1) ? $clog2(T) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [KAW-1:0]          k0,
  input  logic                    acc,
  output logic                    busy,
  output logic                    done,
  // stationary operand: one address for all P banks
  output logic [KAW-1:0]          stat_raddr,
  output logic                    stat_feed_en,
  output logic                    load,
  // streamed operand: one address per array row
  output logic [P-1:0][TAW-1:0]   strm_raddr,
  output logic [P-1:0]            strm_feed_en,
  // ofmap buffer: per column read (for accumulation) and write
  output logic [P-1:0][TAW-1:0]   ofm_raddr,
  output logic [P-1:0][TAW-1:0]   ofm_waddr,
  output logic [P-1:0]            ofm_we,
  output logic                    acc_mode
);
  localparam int unsigned LAST = T + 3 * P - 1;   // last working cycle
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic          run_q, done_q, acc_q;
  logic [CW-1:0] tt_q;
  logic [KAW-1:0] k0_q;
  logic          go;        // start accepted this cycle
  int            tt;        // schedule cycle, 0 in the start cycle
  logic [KAW-1:0] kbase;
  logic          stat_rd;
  logic [P-1:0]  strm_rd;

  assign go    = start && !run_q;
  assign tt    = run_q ? int'(tt_q) : 0;
  assign kbase = run_q ? k0_q : k0;
  assign busy  = run_q;
  assign done  = done_q;
  assign acc_mode = acc_q;

  always_comb begin
    int a;
    a          = int'(kbase) + int'(P) - 1 - tt;
    stat_raddr = KAW'(a);
    stat_rd    = (run_q || go) && tt < int'(P) && a < int'(D);
    for (int r = 0; r < int'(P); r++) begin
      a             = tt - int'(P) - r;
      strm_raddr[r] = TAW'(a);
      strm_rd[r]    = run_q && a >= 0 && a < int'(T);
    end
    for (int c = 0; c < int'(P); c++) begin
      a            = tt - 2 * int'(P) - c;
      ofm_raddr[c] = TAW'(a);
      a            = tt - 2 * int'(P) - 1 - c;
      ofm_waddr[c] = TAW'(a);
      ofm_we[c]    = run_q && a >= 0 && a < int'(T);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q        <= 1'b0;
      done_q       <= 1'b0;
      acc_q        <= 1'b0;
      tt_q         <= '0;
      k0_q         <= '0;
      load         <= 1'b0;
      stat_feed_en <= 1'b0;
      strm_feed_en <= '0;
    end else begin
      done_q       <= 1'b0;
      load         <= (run_q || go) && tt < int'(P);
      stat_feed_en <= stat_rd;
      strm_feed_en <= strm_rd;
      if (go) begin
        run_q <= 1'b1;
        tt_q  <= CW'(1);
        k0_q  <= k0;
        acc_q <= acc;
      end else if (run_q) begin
        if (tt == int'(LAST)) begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
        tt_q <= tt_q + 1'b1;
      end
    end
  end
endmodule
