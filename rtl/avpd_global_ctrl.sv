// avpd_global_ctrl: the global half of Adaptive Value Prediction Decay.
//
// Holds the current decay interval (a power of two, kept as its log2 in
// di_log2) and the three global counters of the scheme:
//  * the global decay counter, which wraps every 2^(di_log2-2) cycles and
//    then pulses "tick"; the 2-bit local counters of the entries count these
//    ticks, so an entry decays after roughly one decay interval without use;
//  * the partially-disabled entries counter, reset by each tick and loaded
//    with the number of entries that decayed at that tick (pdis_in);
//  * the re-enabled entries counter, reset by each tick and incremented for
//    every partially disabled entry that is accessed again (reen_in).
// An average live time (LIVE_TIME cycles) after each tick, or at the next
// tick if that comes first, the controller evaluates the re-activation ratio
// reen/pdis (one-cycle "expire" pulse; the entries still partially disabled
// then become disabled). If the ratio is at or above INC_TH percent the
// interval doubles (entries were decaying while still live); otherwise, if it
// is at or below DEC_TH percent, it halves (entries decay too late). It stays
// between 2^DI_LOG2_MIN and 2^DI_LOG2_MAX. With no entry partially disabled
// there is nothing to judge and the interval is kept.
//
// Timing: tick and expire are registered-state decodes, valid in the cycle
// they are asserted; the interval changes on the edge after expire and the
// new period applies from the next counter wrap. pdis_in/reen_in are counted
// in the cycle they are presented. Reset is asynchronous, active low, to
// interval 2^DI_LOG2_INIT with all counters zero.
//
// Following the published scheme: the hierarchical counter, power-of-two
// intervals doubled/halved, the two event counters reset by the global
// overflow, the ratio taken after the average live time (about 400 cycles),
// the thresholds, and the 256-cycle lower limit. This design's choices: the
// comparisons are inclusive (so that the 0% and 100% settings can fire), an
// increase wins when both thresholds are met, the upper limit (2^18, the
// longest interval evaluated) and the 512-cycle starting interval.
module avpd_global_ctrl
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES    = 1024,
  parameter int unsigned LIVE_TIME    = 400,
  parameter int unsigned DI_LOG2_MIN  = 8,
  parameter int unsigned DI_LOG2_MAX  = 18,
  parameter int unsigned DI_LOG2_INIT = 9,
  parameter int unsigned DEC_TH       = 70,   // percent
  parameter int unsigned INC_TH       = 100,  // percent
  localparam int unsigned CNT_W       = $clog2(N_ENTRIES + 1),
  localparam int unsigned DL_W        = $clog2(DI_LOG2_MAX + 1),
  localparam int unsigned GC_W        = DI_LOG2_MAX - LC_SPAN_LOG2,
  localparam int unsigned LT_W        = $clog2(LIVE_TIME + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] pdis_in,
  input  logic [CNT_W-1:0] reen_in,
  output logic             tick,
  output logic             expire,
  output logic [DL_W-1:0]  di_log2,
  output logic [CNT_W-1:0] pdis_cnt,
  output logic [CNT_W-1:0] reen_cnt,
  output logic             di_up,
  output logic             di_down
);

  localparam int unsigned PROD_W = CNT_W + 7;

  logic [GC_W-1:0]  gcnt_q;
  logic [GC_W-1:0]  period_m1;
  logic [LT_W-1:0]  lt_q;
  logic             eval_done_q;
  logic [DL_W-1:0]  dl_q;
  logic [CNT_W-1:0] pdis_q, reen_q;
  logic [CNT_W-1:0] reen_now;
  logic [PROD_W-1:0] reen_pct, inc_lim, dec_lim;

  // Global period = decay interval / 4 (four steps of the local counter).
  assign period_m1 = GC_W'((64'd1 << (dl_q - DL_W'(LC_SPAN_LOG2))) - 64'd1);
  assign tick      = (gcnt_q >= period_m1);
  assign expire    = !eval_done_q && (tick || (lt_q == LT_W'(LIVE_TIME - 1)));

  // Re-activation ratio test, in integer form: reen*100 against TH*pdis.
  assign reen_now = reen_q + reen_in;
  assign reen_pct = PROD_W'(reen_now) * PROD_W'(100);
  assign inc_lim  = PROD_W'(pdis_q) * PROD_W'(INC_TH);
  assign dec_lim  = PROD_W'(pdis_q) * PROD_W'(DEC_TH);

  always_comb begin
    di_up   = 1'b0;
    di_down = 1'b0;
    if (expire && (pdis_q != '0)) begin
      if (reen_pct >= inc_lim) begin
        di_up = (dl_q < DL_W'(DI_LOG2_MAX));
      end else if (reen_pct <= dec_lim) begin
        di_down = (dl_q > DL_W'(DI_LOG2_MIN));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt_q      <= '0;
      lt_q        <= '0;
      eval_done_q <= 1'b0;
      dl_q        <= DL_W'(DI_LOG2_INIT);
      pdis_q      <= '0;
      reen_q      <= '0;
    end else begin
      if (di_up)   dl_q <= dl_q + 1'b1;
      if (di_down) dl_q <= dl_q - 1'b1;
      if (tick) begin
        gcnt_q      <= '0;
        lt_q        <= '0;
        eval_done_q <= 1'b0;
        pdis_q      <= pdis_in;
        reen_q      <= '0;
      end else begin
        gcnt_q <= gcnt_q + 1'b1;
        if (lt_q != LT_W'(LIVE_TIME - 1)) lt_q <= lt_q + 1'b1;
        if (expire) eval_done_q <= 1'b1;
        reen_q <= reen_now;
      end
    end
  end

  assign di_log2  = dl_q;
  assign pdis_cnt = pdis_q;
  assign reen_cnt = reen_q;

  a_interval_range: assert property (@(posedge clk) disable iff (!rst_n)
    (dl_q >= DL_W'(DI_LOG2_MIN)) && (dl_q <= DL_W'(DI_LOG2_MAX)));
  // Entries decay only at a tick.
  a_pdis_at_tick: assert property (@(posedge clk) disable iff (!rst_n)
    (pdis_in != '0) |-> tick);

endmodule
