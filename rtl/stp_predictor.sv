// stp_predictor: stride value predictor (STP) whose entries are powered on and
// off by an AVPD decay unit.
//
// A direct-mapped, untagged table of N_ENTRIES entries indexed by the
// instruction address (word index pc[IDX_W+1:2]). Each entry holds the last
// value the instruction produced, the stride between its last two values and
// a valid bit. A lookup predicts last + stride; an update with the real
// result stores the new stride (result - last) and the result. A fresh entry
// (valid bit clear) is filled with the result and a zero stride.
//
// Decay: data_on[i] comes from the decay unit. While an entry's data is off
// its cells are unpowered, so every entry whose data_on is low is held
// cleared (valid bit, value, stride). A lookup of such an entry gives no
// prediction; the same lookup re-enables it in the decay unit (lk_idx drives
// the decay unit's access port) and the next update retrains it from
// scratch. Updates to an entry whose data is off are lost.
//
// Timing: lookup request in cycle t, prediction (pred_valid/pred_value) in
// cycle t+LATENCY, fully pipelined, one lookup per cycle. Updates write on
// the clock edge of their cycle. lk_data_on must be the decay unit's
// acc_data_on for lk_idx in the same cycle.
//
// The prediction rule and the untagged direct-mapped organisation follow the
// published description of the stride predictor; the 5-cycle latency is the
// access latency it was evaluated with. The entry format, index bits and the
// behaviour of fresh and decayed entries are this design's choices.
module stp_predictor
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 1024,
  parameter int unsigned LATENCY   = 5,
  localparam int unsigned IDX_W    = $clog2(N_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic                 lk_valid,
  input  logic [PC_W-1:0]      lk_pc,
  output logic [IDX_W-1:0]     lk_idx,
  input  logic                 lk_data_on,
  output logic                 pred_valid,
  output logic [VALUE_W-1:0]   pred_value,
  // update with the committed result
  input  logic                 upd_valid,
  input  logic [PC_W-1:0]      upd_pc,
  input  logic [VALUE_W-1:0]   upd_value,
  // entry power enables from the decay unit
  input  logic [N_ENTRIES-1:0] data_on
);

  logic [VALUE_W-1:0] last_q   [N_ENTRIES];
  logic [VALUE_W-1:0] stride_q [N_ENTRIES];
  logic               vld_q    [N_ENTRIES];

  logic [IDX_W-1:0]   upd_idx;
  logic               p_valid  [LATENCY];
  logic [VALUE_W-1:0] p_value  [LATENCY];

  assign lk_idx  = lk_pc[IDX_W+1:2];
  assign upd_idx = upd_pc[IDX_W+1:2];

  logic               upd_we;
  logic [VALUE_W-1:0] upd_stride;

  assign upd_we     = upd_valid && data_on[upd_idx];
  assign upd_stride = vld_q[upd_idx] ? (upd_value - last_q[upd_idx]) : '0;

  // Table: each entry is cleared while unpowered and written by updates.
  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_entry
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        last_q[i]   <= '0;
        stride_q[i] <= '0;
        vld_q[i]    <= 1'b0;
      end else if (!data_on[i]) begin
        last_q[i]   <= '0;
        stride_q[i] <= '0;
        vld_q[i]    <= 1'b0;
      end else if (upd_we && (upd_idx == IDX_W'(i))) begin
        last_q[i]   <= upd_value;
        stride_q[i] <= upd_stride;
        vld_q[i]    <= 1'b1;
      end
    end
  end

  // Lookup pipeline: read in the first stage, LATENCY stages in all.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++) begin
        p_valid[s] <= 1'b0;
        p_value[s] <= '0;
      end
    end else begin
      p_valid[0] <= lk_valid && lk_data_on && vld_q[lk_idx];
      p_value[0] <= last_q[lk_idx] + stride_q[lk_idx];
      for (int s = 1; s < LATENCY; s++) begin
        p_valid[s] <= p_valid[s-1];
        p_value[s] <= p_value[s-1];
      end
    end
  end

  assign pred_valid = p_valid[LATENCY-1];
  assign pred_value = p_value[LATENCY-1];

endmodule
