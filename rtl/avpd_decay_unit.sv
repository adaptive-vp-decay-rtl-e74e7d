// avpd_decay_unit: the complete Adaptive Value Prediction Decay mechanism for
// one value-predictor table.
//
// Joins the global controller (adaptive global decay counter, partially
// disabled and re-enabled entries counters, live-time timer, threshold test)
// with the decay array (one three-state entry controller and 2-bit gray-code
// local counter per table entry). The predictor presents every lookup on the
// access port; the unit answers in the same cycle whether that entry still
// holds its data (acc_data_on) and drives the per-entry power enables of the
// data cells (data_on) and of the local counters (lc_on) from its registered
// state; these are the gate controls of the entries' sleep transistors. The transition counts of the array
// feed the controller, whose tick and expire pulses drive every entry.
//
// Status outputs: the current decay interval (di_log2), the number of
// entries whose data and whose local counter are powered (what the table
// leaks), and one-cycle pulses for the global tick, the live-time expiry and
// interval doubling/halving, plus this cycle's decay and re-enable counts.
//
// Parameters default to the published configuration that works best for the
// FCM and DFCM predictors (70% decreasing / 100% increasing threshold), a
// 400-cycle average live time and a 256-cycle minimum interval; the table size
// and the upper and starting intervals are this design's choices.
module avpd_decay_unit
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES    = 1024,
  parameter int unsigned LIVE_TIME    = 400,
  parameter int unsigned DI_LOG2_MIN  = 8,
  parameter int unsigned DI_LOG2_MAX  = 18,
  parameter int unsigned DI_LOG2_INIT = 9,
  parameter int unsigned DEC_TH       = 70,
  parameter int unsigned INC_TH       = 100,
  localparam int unsigned IDX_W       = $clog2(N_ENTRIES),
  localparam int unsigned CNT_W       = $clog2(N_ENTRIES + 1),
  localparam int unsigned DL_W        = $clog2(DI_LOG2_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 acc_valid,
  input  logic [IDX_W-1:0]     acc_idx,
  output logic                 acc_data_on,
  output logic [N_ENTRIES-1:0] data_on,
  output logic [N_ENTRIES-1:0] lc_on,
  output logic [CNT_W-1:0]     data_on_num,
  output logic [CNT_W-1:0]     lc_on_num,
  output logic [DL_W-1:0]      di_log2,
  output logic                 tick,
  output logic                 expire,
  output logic                 di_up,
  output logic                 di_down,
  output logic [CNT_W-1:0]     pdis_num,
  output logic [CNT_W-1:0]     reen_num
);

  logic [CNT_W-1:0]     pdis_cnt, reen_cnt;

  avpd_decay_array #(
    .N_ENTRIES(N_ENTRIES)
  ) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .tick       (tick),
    .expire     (expire),
    .acc_valid  (acc_valid),
    .acc_idx    (acc_idx),
    .acc_data_on(acc_data_on),
    .data_on    (data_on),
    .lc_on      (lc_on),
    .pdis_num   (pdis_num),
    .reen_num   (reen_num),
    .data_on_num(data_on_num),
    .lc_on_num  (lc_on_num)
  );

  avpd_global_ctrl #(
    .N_ENTRIES   (N_ENTRIES),
    .LIVE_TIME   (LIVE_TIME),
    .DI_LOG2_MIN (DI_LOG2_MIN),
    .DI_LOG2_MAX (DI_LOG2_MAX),
    .DI_LOG2_INIT(DI_LOG2_INIT),
    .DEC_TH      (DEC_TH),
    .INC_TH      (INC_TH)
  ) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .pdis_in (pdis_num),
    .reen_in (reen_num),
    .tick    (tick),
    .expire  (expire),
    .di_log2 (di_log2),
    .pdis_cnt(pdis_cnt),
    .reen_cnt(reen_cnt),
    .di_up   (di_up),
    .di_down (di_down)
  );

  // Re-enables are bounded by the entries that decayed at the last tick.
  a_reen_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (reen_cnt <= pdis_cnt));

endmodule
