// avpd_entry: the AVPD power-state machine of one value-predictor entry.
//
// Each entry is enabled (VP data and local counter powered), partially
// disabled (data switched off, local counter still powered) or disabled (both
// off). Transitions, all taken on the clock edge:
//   enabled  -> partial  : a global tick finds the local counter saturated
//                          (the entry went a whole decay interval unused);
//                          pdis_evt is raised so the global
//                          partially-disabled entries counter counts it.
//   partial  -> enabled  : the entry is accessed; reen_evt is raised for the
//                          global re-enabled entries counter.
//   partial  -> disabled : "expire", the global live-time signal, arrives
//                          before any access.
//   disabled -> enabled  : the entry is accessed (not counted).
// Any access resets the local counter and leaves the entry enabled. Powered
// local counters (enabled and partial states) advance on every global tick.
//
// Interface: tick and expire are one-cycle pulses shared by all entries;
// access is this entry's decoded lookup. data_on and lc_on are the power
// enables of the entry's data cells and local counter (the gate inputs of its
// sleep transistors); state, data_on and lc_on are registered. pdis_evt and
// reen_evt are combinational one-cycle pulses in the cycle before the state
// changes.
//
// The states and transitions follow the published AVPD state diagram. This
// design's own choices: the entry leaves reset disabled (it holds nothing
// yet); the local counter restarts at 00 when the entry becomes partially
// disabled and is held at 00 while disabled; partial -> disabled is driven by
// a global live-time signal instead of a per-entry timer; an access wins over
// a tick or expire in the same cycle.
module avpd_entry
  import avpd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         expire,
  input  logic         access,
  output entry_state_e state,
  output logic         data_on,
  output logic         lc_on,
  output logic         pdis_evt,
  output logic         reen_evt
);

  entry_state_e state_q, state_d;
  logic         lc_clr, lc_inc, lc_ovf;
  logic [1:0]   lc_cnt;

  avpd_local_counter u_lc (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (lc_clr),
    .inc  (lc_inc),
    .cnt  (lc_cnt),
    .ovf  (lc_ovf)
  );

  always_comb begin
    state_d  = state_q;
    pdis_evt = 1'b0;
    reen_evt = 1'b0;
    lc_clr   = 1'b0;
    lc_inc   = tick && (state_q != ST_DISABLED);
    if (access) begin
      state_d  = ST_ENABLED;
      reen_evt = (state_q == ST_PARTIAL);
      lc_clr   = 1'b1;
    end else begin
      unique case (state_q)
        ST_ENABLED: begin
          if (lc_ovf) begin
            state_d  = ST_PARTIAL;
            pdis_evt = 1'b1;
            lc_clr   = 1'b1;
          end
        end
        ST_PARTIAL: begin
          if (expire) begin
            state_d = ST_DISABLED;
            lc_clr  = 1'b1;
          end
        end
        default: begin
          lc_clr = 1'b1;  // counter is unpowered
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_DISABLED;
    else        state_q <= state_d;
  end

  assign state   = state_q;
  assign data_on = (state_q == ST_ENABLED);
  assign lc_on   = (state_q != ST_DISABLED);

  // The local counter only matters while it is powered.
  property p_lc_zero_when_off;
    @(posedge clk) disable iff (!rst_n) (state_q == ST_DISABLED) |-> (lc_cnt == LC_G0);
  endproperty
  a_lc_zero_when_off: assert property (p_lc_zero_when_off);

endmodule
