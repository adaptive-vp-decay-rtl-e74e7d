// avpd_local_counter: the 2-bit saturating gray-code local decay counter that
// sits in every AVPD-managed value-predictor entry.
//
// Together with the global decay counter it forms a two-level (hierarchical)
// decay timer: the global counter overflows once per quarter decay interval
// and that overflow ("inc") advances every powered local counter by one gray
// step, 00 -> 01 -> 11 -> 10. The counter saturates at 10; a further inc while
// saturated raises "ovf" for that cycle, which tells the entry it has gone a
// whole decay interval without an access. Gray coding means only one bit
// toggles per step, which keeps the dynamic power of the many local counters
// low. "clr" (an access to the entry, or the entry being switched off)
// returns the count to 00 and has priority over inc (ovf does not look at
// clr; the owner of the counter decides what a simultaneous access means).
//
// Timing: cnt changes on the clock edge after inc/clr; ovf is combinational
// from inc and the current count. Reset is asynchronous, active low, to 00.
// The gray sequence, the saturation and the reset-on-access follow the
// published scheme; clr having priority over a simultaneous inc is this
// design's choice.
module avpd_local_counter
  import avpd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       inc,
  output logic [1:0] cnt,
  output logic       ovf
);

  logic [1:0] cnt_q;

  assign cnt = cnt_q;
  assign ovf = inc && (cnt_q == LC_G3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= LC_G0;
    end else if (clr) begin
      cnt_q <= LC_G0;
    end else if (inc) begin
      unique case (cnt_q)
        LC_G0:   cnt_q <= LC_G1;
        LC_G1:   cnt_q <= LC_G2;
        LC_G2:   cnt_q <= LC_G3;
        default: cnt_q <= LC_G3;  // saturate
      endcase
    end
  end

endmodule
