// avpd_vp_top: three leakage-efficient value predictors, each a conventional
// untagged value predictor whose entries are switched off by its own Adaptive
// Value Prediction Decay (AVPD) unit once they stop being used.
//
// Slot VP_STP is a stride predictor, VP_FCM a finite context method predictor
// and VP_DFCM a differential FCM predictor. They are independent: each has its
// own lookup and update ports, its own decay unit and its own adaptive decay
// interval, and each decay unit runs the threshold pair that suits its
// predictor best: 40% decreasing / 60% increasing for the stride predictor,
// 70% / 100% for FCM and DFCM. A system would normally use one of them; the
// three sit side by side so that each can be used and compared.
//
// Per slot s: a lookup (lk_valid[s], lk_pc[s]) returns pred_valid[s] and
// pred_value[s] LATENCY cycles later; the lookup is also the access that keeps
// the entry alive in the decay unit. A committed result is written back with
// upd_valid[s], upd_pc[s], upd_value[s]. A lookup that finds its entry
// switched off gives no prediction and switches the entry back on, empty.
// data_on[s][i] and lc_on[s][i] are the power enables of the data cells and
// of the local counter of first-level entry i: they drive the gated-VDD sleep
// transistors of the table, which are outside this RTL.
// Status per slot: the decay interval as a log2 (di_log2), the number of
// first-level entries whose data and whose local counter are powered (the
// leakage the table still has), and event pulses (global tick, live-time
// expiry, interval up/down, entries decayed and re-enabled this cycle) for
// monitoring.
//
// Defaults: 1024 first-level entries per predictor, a 400-cycle average
// live time, decay intervals from 256 to 262144 cycles starting at 512, and a
// 5-cycle predictor latency. The thresholds, the 400-cycle live time, the
// 256-cycle floor and the 5-cycle latency follow the published evaluation;
// the table sizes and the remaining bounds are this design's choices.
module avpd_vp_top
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES    = 1024,
  parameter int unsigned HIST_W       = 10,
  parameter int unsigned LATENCY      = 5,
  parameter int unsigned LIVE_TIME    = 400,
  parameter int unsigned DI_LOG2_MIN  = 8,
  parameter int unsigned DI_LOG2_MAX  = 18,
  parameter int unsigned DI_LOG2_INIT = 9,
  parameter int unsigned STP_DEC_TH   = 40,
  parameter int unsigned STP_INC_TH   = 60,
  parameter int unsigned FCM_DEC_TH   = 70,
  parameter int unsigned FCM_INC_TH   = 100,
  parameter int unsigned DFCM_DEC_TH  = 70,
  parameter int unsigned DFCM_INC_TH  = 100,
  localparam int unsigned IDX_W       = $clog2(N_ENTRIES),
  localparam int unsigned CNT_W       = $clog2(N_ENTRIES + 1),
  localparam int unsigned DL_W        = $clog2(DI_LOG2_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_VP-1:0]    lk_valid,
  input  logic [PC_W-1:0]    lk_pc      [N_VP],
  output logic [N_VP-1:0]    pred_valid,
  output logic [VALUE_W-1:0] pred_value [N_VP],
  input  logic [N_VP-1:0]    upd_valid,
  input  logic [PC_W-1:0]    upd_pc     [N_VP],
  input  logic [VALUE_W-1:0] upd_value  [N_VP],
  output logic [DL_W-1:0]    di_log2    [N_VP],
  output logic [N_ENTRIES-1:0] data_on [N_VP],
  output logic [N_ENTRIES-1:0] lc_on   [N_VP],
  output logic [CNT_W-1:0]   data_on_num[N_VP],
  output logic [CNT_W-1:0]   lc_on_num  [N_VP],
  output logic [N_VP-1:0]    ev_tick,
  output logic [N_VP-1:0]    ev_expire,
  output logic [N_VP-1:0]    ev_di_up,
  output logic [N_VP-1:0]    ev_di_down,
  output logic [CNT_W-1:0]   ev_pdis_num[N_VP],
  output logic [CNT_W-1:0]   ev_reen_num[N_VP]
);

  logic [IDX_W-1:0]     lk_idx      [N_VP];
  logic [N_VP-1:0]      lk_data_on;

  // Decay units, one per predictor, each with its own thresholds.
  for (genvar s = 0; s < N_VP; s++) begin : g_decay
    localparam int unsigned DEC_TH = (s == VP_STP) ? STP_DEC_TH :
                                     (s == VP_FCM) ? FCM_DEC_TH : DFCM_DEC_TH;
    localparam int unsigned INC_TH = (s == VP_STP) ? STP_INC_TH :
                                     (s == VP_FCM) ? FCM_INC_TH : DFCM_INC_TH;
    avpd_decay_unit #(
      .N_ENTRIES   (N_ENTRIES),
      .LIVE_TIME   (LIVE_TIME),
      .DI_LOG2_MIN (DI_LOG2_MIN),
      .DI_LOG2_MAX (DI_LOG2_MAX),
      .DI_LOG2_INIT(DI_LOG2_INIT),
      .DEC_TH      (DEC_TH),
      .INC_TH      (INC_TH)
    ) u_decay (
      .clk        (clk),
      .rst_n      (rst_n),
      .acc_valid  (lk_valid[s]),
      .acc_idx    (lk_idx[s]),
      .acc_data_on(lk_data_on[s]),
      .data_on    (data_on[s]),
      .lc_on      (lc_on[s]),
      .data_on_num(data_on_num[s]),
      .lc_on_num  (lc_on_num[s]),
      .di_log2    (di_log2[s]),
      .tick       (ev_tick[s]),
      .expire     (ev_expire[s]),
      .di_up      (ev_di_up[s]),
      .di_down    (ev_di_down[s]),
      .pdis_num   (ev_pdis_num[s]),
      .reen_num   (ev_reen_num[s])
    );
  end

  stp_predictor #(
    .N_ENTRIES(N_ENTRIES),
    .LATENCY  (LATENCY)
  ) u_stp (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_valid  (lk_valid[VP_STP]),
    .lk_pc     (lk_pc[VP_STP]),
    .lk_idx    (lk_idx[VP_STP]),
    .lk_data_on(lk_data_on[VP_STP]),
    .pred_valid(pred_valid[VP_STP]),
    .pred_value(pred_value[VP_STP]),
    .upd_valid (upd_valid[VP_STP]),
    .upd_pc    (upd_pc[VP_STP]),
    .upd_value (upd_value[VP_STP]),
    .data_on   (data_on[VP_STP])
  );

  fcm_predictor #(
    .N_ENTRIES(N_ENTRIES),
    .HIST_W   (HIST_W),
    .LATENCY  (LATENCY)
  ) u_fcm (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_valid  (lk_valid[VP_FCM]),
    .lk_pc     (lk_pc[VP_FCM]),
    .lk_idx    (lk_idx[VP_FCM]),
    .lk_data_on(lk_data_on[VP_FCM]),
    .pred_valid(pred_valid[VP_FCM]),
    .pred_value(pred_value[VP_FCM]),
    .upd_valid (upd_valid[VP_FCM]),
    .upd_pc    (upd_pc[VP_FCM]),
    .upd_value (upd_value[VP_FCM]),
    .data_on   (data_on[VP_FCM])
  );

  dfcm_predictor #(
    .N_ENTRIES(N_ENTRIES),
    .HIST_W   (HIST_W),
    .LATENCY  (LATENCY)
  ) u_dfcm (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_valid  (lk_valid[VP_DFCM]),
    .lk_pc     (lk_pc[VP_DFCM]),
    .lk_idx    (lk_idx[VP_DFCM]),
    .lk_data_on(lk_data_on[VP_DFCM]),
    .pred_valid(pred_valid[VP_DFCM]),
    .pred_value(pred_value[VP_DFCM]),
    .upd_valid (upd_valid[VP_DFCM]),
    .upd_pc    (upd_pc[VP_DFCM]),
    .upd_value (upd_value[VP_DFCM]),
    .data_on   (data_on[VP_DFCM])
  );

endmodule
