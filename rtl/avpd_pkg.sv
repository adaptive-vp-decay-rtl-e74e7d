// avpd_pkg: types and constants shared by the Adaptive Value Prediction Decay
// (AVPD) blocks and the value predictors they gate.
//
// An AVPD-managed predictor entry is in one of three power states: enabled
// (data and local counter powered), partially disabled (data off, local counter
// on) or disabled (both off). The three states and their meaning follow the
// published AVPD scheme; the 2-bit state encoding is this design's choice.
// The decay interval is always a power of two and is carried as its log2.
package avpd_pkg;

  // Power state of one predictor entry.
  typedef enum logic [1:0] {
    ST_DISABLED = 2'b00,  // data and local counter switched off
    ST_ENABLED  = 2'b01,  // data and local counter on
    ST_PARTIAL  = 2'b10   // data off, local counter on
  } entry_state_e;

  // Gray-code sequence of the 2-bit saturating local counter: 00,01,11,10.
  localparam logic [1:0] LC_G0 = 2'b00;
  localparam logic [1:0] LC_G1 = 2'b01;
  localparam logic [1:0] LC_G2 = 2'b11;
  localparam logic [1:0] LC_G3 = 2'b10;  // saturated value

  // The local counter spans four global-counter periods, so the global period
  // is the decay interval divided by 4 (log2 difference of 2).
  localparam int unsigned LC_SPAN_LOG2 = 2;

  // Value width of the predicted results (64-bit Alpha integer registers).
  localparam int unsigned VALUE_W = 64;
  // Instruction address width.
  localparam int unsigned PC_W = 64;

  // Slot of each predictor in the top level's per-predictor port arrays.
  localparam int unsigned VP_STP  = 0;
  localparam int unsigned VP_FCM  = 1;
  localparam int unsigned VP_DFCM = 2;
  localparam int unsigned N_VP    = 3;

  // Fold a VALUE_W-bit word into W bits by XOR of W-bit slices. Used by the
  // FCM and DFCM history hashes.
  function automatic logic [15:0] fold_value(input logic [VALUE_W-1:0] v, input int unsigned w);
    logic [15:0] acc;
    logic [15:0] mask;
    acc  = '0;
    mask = 16'((32'd1 << w) - 1);
    for (int unsigned sh = 0; sh < VALUE_W; sh += w) begin
      acc ^= 16'(v >> sh) & mask;
    end
    return acc;
  endfunction

endpackage
