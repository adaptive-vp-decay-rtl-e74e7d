// avpd_decay_array: the per-entry AVPD decay state of one value-predictor
// table of N_ENTRIES entries.
//
// One avpd_entry per table entry. The table's lookup port (acc_valid,
// acc_idx) is decoded into the single entry it touches; the global tick and
// expire pulses go to every entry. Each cycle the array counts how many
// entries went from enabled to partially disabled (pdis_num, non-zero only in
// tick cycles, when many entries can decay at once) and how many went from
// partially disabled back to enabled (reen_num, at most one per cycle since
// there is one lookup port); these feed the two global event counters.
//
// Outputs for the predictor and for power accounting: data_on[i] is the power
// enable of entry i's data cells (the predictor clears the contents of every
// entry whose data is off); acc_data_on says whether the entry being looked up
// this cycle still has its data powered, i.e. whether the lookup can use it;
// data_on_num and lc_on_num count the powered data and local-counter cells,
// the quantities that set the table's leakage.
//
// Timing: all per-entry state is registered; acc_data_on, pdis_num and
// reen_num are combinational from this cycle's inputs and the registered
// state. The structure follows the published scheme; the single lookup port
// and the counting outputs are this design's choices.
module avpd_decay_array
  import avpd_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 1024,
  localparam int unsigned IDX_W    = $clog2(N_ENTRIES),
  localparam int unsigned CNT_W    = $clog2(N_ENTRIES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic                 expire,
  input  logic                 acc_valid,
  input  logic [IDX_W-1:0]     acc_idx,
  output logic                 acc_data_on,
  output logic [N_ENTRIES-1:0] data_on,
  output logic [N_ENTRIES-1:0] lc_on,
  output logic [CNT_W-1:0]     pdis_num,
  output logic [CNT_W-1:0]     reen_num,
  output logic [CNT_W-1:0]     data_on_num,
  output logic [CNT_W-1:0]     lc_on_num
);

  logic [N_ENTRIES-1:0] access;
  logic [N_ENTRIES-1:0] pdis_evt;
  logic [N_ENTRIES-1:0] reen_evt;

  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_entry
    entry_state_e st;
    assign access[i] = acc_valid && (acc_idx == IDX_W'(i));
    avpd_entry u_entry (
      .clk     (clk),
      .rst_n   (rst_n),
      .tick    (tick),
      .expire  (expire),
      .access  (access[i]),
      .state   (st),
      .data_on (data_on[i]),
      .lc_on   (lc_on[i]),
      .pdis_evt(pdis_evt[i]),
      .reen_evt(reen_evt[i])
    );
  end

  assign acc_data_on = acc_valid && data_on[acc_idx];
  // Only the accessed entry can be re-enabled.
  assign reen_num    = CNT_W'(reen_evt[acc_idx] && acc_valid);

  always_comb begin
    pdis_num    = '0;
    data_on_num = '0;
    lc_on_num   = '0;
    for (int unsigned i = 0; i < N_ENTRIES; i++) begin
      pdis_num    += CNT_W'(pdis_evt[i]);
      data_on_num += CNT_W'(data_on[i]);
      lc_on_num   += CNT_W'(lc_on[i]);
    end
  end

  // At most one entry is re-enabled per cycle (single lookup port).
  a_one_reen: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(reen_evt));

endmodule
