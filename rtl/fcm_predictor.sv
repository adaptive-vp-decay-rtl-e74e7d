// fcm_predictor: finite context method (FCM) value predictor whose first-level
// entries are powered on and off by an AVPD decay unit.
//
// Two levels. The first, a direct-mapped untagged table of N_ENTRIES entries
// indexed by the instruction address (pc[IDX_W+1:2]), holds for each
// instruction a HIST_W-bit hash of its recent values (its context) and a
// valid bit. The second, 2^HIST_W entries indexed by that hash, holds the
// value that last followed the context. A lookup predicts L2[hash]. An
// update with the real result writes the result into L2[hash] and moves the
// context on: hash' = (hash << HSHIFT) ^ fold(result), where fold XORs the
// HIST_W-bit slices of the result. A fresh entry only starts its context.
//
// Decay: the PC-indexed first level is the table whose entries follow
// instruction generations, and it is what the decay unit gates: every entry
// whose data_on is low is held cleared, a lookup of it gives no prediction,
// and updates to it are lost. The shared second level is left powered.
//
// Timing: lookup in cycle t, prediction in cycle t+LATENCY, one lookup per
// cycle; updates write on the edge of their cycle. lk_data_on must be the
// decay unit's acc_data_on for lk_idx in the same cycle.
//
// The two-level context organisation follows the published description of
// FCM; the 5-cycle latency is the evaluated access latency. The hash, its
// width, the table sizes and the choice of decaying only the first level are
// this design's.
module fcm_predictor
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 1024,
  parameter int unsigned HIST_W    = 10,
  parameter int unsigned HSHIFT    = 2,
  parameter int unsigned LATENCY   = 5,
  localparam int unsigned IDX_W    = $clog2(N_ENTRIES),
  localparam int unsigned N_L2     = 1 << HIST_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lk_valid,
  input  logic [PC_W-1:0]      lk_pc,
  output logic [IDX_W-1:0]     lk_idx,
  input  logic                 lk_data_on,
  output logic                 pred_valid,
  output logic [VALUE_W-1:0]   pred_value,
  input  logic                 upd_valid,
  input  logic [PC_W-1:0]      upd_pc,
  input  logic [VALUE_W-1:0]   upd_value,
  input  logic [N_ENTRIES-1:0] data_on
);

  logic [HIST_W-1:0]  hist_q [N_ENTRIES];
  logic               vld_q  [N_ENTRIES];
  logic [VALUE_W-1:0] l2_q   [N_L2];

  logic [IDX_W-1:0]   upd_idx;
  logic [HIST_W-1:0]  upd_hist, next_hist;
  logic               p_valid [LATENCY];
  logic [VALUE_W-1:0] p_value [LATENCY];

  assign lk_idx   = lk_pc[IDX_W+1:2];
  assign upd_idx  = upd_pc[IDX_W+1:2];
  assign upd_hist = vld_q[upd_idx] ? hist_q[upd_idx] : '0;
  assign next_hist = HIST_W'(upd_hist << HSHIFT) ^ HIST_W'(fold_value(upd_value, HIST_W));

  logic upd_we;
  assign upd_we = upd_valid && data_on[upd_idx];

  // First level: each entry is cleared while unpowered, written by updates.
  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_l1
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hist_q[i] <= '0;
        vld_q[i]  <= 1'b0;
      end else if (!data_on[i]) begin
        hist_q[i] <= '0;
        vld_q[i]  <= 1'b0;
      end else if (upd_we && (upd_idx == IDX_W'(i))) begin
        hist_q[i] <= next_hist;
        vld_q[i]  <= 1'b1;
      end
    end
  end

  // Second level: written under the old context of a trained entry.
  for (genvar j = 0; j < N_L2; j++) begin : g_l2
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        l2_q[j] <= '0;
      end else if (upd_we && vld_q[upd_idx] && (hist_q[upd_idx] == HIST_W'(j))) begin
        l2_q[j] <= upd_value;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++) begin
        p_valid[s] <= 1'b0;
        p_value[s] <= '0;
      end
    end else begin
      p_valid[0] <= lk_valid && lk_data_on && vld_q[lk_idx];
      p_value[0] <= l2_q[hist_q[lk_idx]];
      for (int s = 1; s < LATENCY; s++) begin
        p_valid[s] <= p_valid[s-1];
        p_value[s] <= p_value[s-1];
      end
    end
  end

  assign pred_valid = p_valid[LATENCY-1];
  assign pred_value = p_value[LATENCY-1];

endmodule
