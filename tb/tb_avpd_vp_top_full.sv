// tb_avpd_vp_top_full: end-to-end test of the three AVPD-managed value predictors with every parameter of the top at its default (1024-entry tables, 400-cycle live time, decay intervals 256 to 262144 cycles starting at 512).
//
// The testbench plays the part of the processor: every cycle it fetches one
// instruction of a synthetic program, looks up all three predictors with its
// address and, UPD_DELAY cycles later, writes back the instruction's real
// result. Instructions produce stride sequences, short repeating patterns or
// random values. The program runs in three phases: a small hot loop visited
// round-robin, with an occasional cold instruction that is never revisited
// (cold entries should be switched off and the decay interval should fall), a sweep over a working set whose
// entries are revisited shortly after they decay (premature decay, the
// interval should rise), and a random mix of the two.
//
// Checked every cycle, per predictor: a prediction appears exactly LATENCY
// cycles after a lookup and only if the looked-up entry had its data powered;
// a lookup of an unpowered entry powers it again on the next cycle; powered
// data implies a powered local counter; the powered-entry counts match the
// power-enable vectors; the decay interval stays within its bounds and moves
// only by one step on an up/down pulse. Predictions of stride instructions by
// the stride and DFCM predictors in the hot loop must mostly be correct. Each mechanism (global
// tick, live-time expiry, decay of an entry, re-enable of a partially disabled
// entry, re-power of a disabled entry, interval doubling and halving, correct
// prediction) is counted and must occur at least once.
module tb_avpd_vp_top_full;
  import avpd_pkg::*;

  localparam int unsigned N          = 1024;
  localparam int unsigned LAT        = 5;
  localparam int unsigned DMIN       = 8;
  localparam int unsigned DMAX       = 18;
  localparam int unsigned IW         = $clog2(N);
  localparam int unsigned CW         = $clog2(N + 1);
  localparam int unsigned DLW        = $clog2(DMAX + 1);
  localparam int unsigned UPD_DELAY  = 6;
  localparam int unsigned HOT        = 64;       // hot-loop instructions
  localparam int unsigned SWEEP      = 160;     // sweep working-set size
  localparam int unsigned SWEEP_GAP  = 2;       // cycles between sweep fetches
  localparam int unsigned PHASE      = 15000;     // cycles per phase

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [N_VP-1:0]    lk_valid = '0;
  logic [PC_W-1:0]    lk_pc      [N_VP];
  logic [N_VP-1:0]    pred_valid;
  logic [VALUE_W-1:0] pred_value [N_VP];
  logic [N_VP-1:0]    upd_valid = '0;
  logic [PC_W-1:0]    upd_pc     [N_VP];
  logic [VALUE_W-1:0] upd_value  [N_VP];
  logic [DLW-1:0]     di_log2    [N_VP];
  logic [N-1:0]       data_on    [N_VP];
  logic [N-1:0]       lc_on      [N_VP];
  logic [CW-1:0]      data_on_num[N_VP];
  logic [CW-1:0]      lc_on_num  [N_VP];
  logic [N_VP-1:0]    ev_tick, ev_expire, ev_di_up, ev_di_down;
  logic [CW-1:0]      ev_pdis_num[N_VP];
  logic [CW-1:0]      ev_reen_num[N_VP];

  int checks = 0, failures = 0;

  // in-flight instructions: lookups awaiting their prediction / write-back
  logic               f_v   [UPD_DELAY];
  int                 f_k   [UPD_DELAY];
  logic [VALUE_W-1:0] f_val [UPD_DELAY];
  logic [N_VP-1:0]    f_on  [UPD_DELAY];  // entry data powered at lookup
  int                 seq_n [N];

  int n_tick[N_VP], n_expire[N_VP], n_decay[N_VP], n_reen[N_VP], n_repower[N_VP];
  int n_up[N_VP], n_down[N_VP], n_pred[N_VP], n_good[N_VP], n_stride[N_VP], n_stride_good[N_VP];
  longint on_sum[N_VP];
  int sweep_ptr = 0;

  avpd_vp_top dut (
    .clk(clk), .rst_n(rst_n), .lk_valid(lk_valid), .lk_pc(lk_pc), .pred_valid(pred_valid),
    .pred_value(pred_value), .upd_valid(upd_valid), .upd_pc(upd_pc), .upd_value(upd_value),
    .di_log2(di_log2), .data_on(data_on), .lc_on(lc_on), .data_on_num(data_on_num),
    .lc_on_num(lc_on_num), .ev_tick(ev_tick), .ev_expire(ev_expire), .ev_di_up(ev_di_up),
    .ev_di_down(ev_di_down), .ev_pdis_num(ev_pdis_num), .ev_reen_num(ev_reen_num));

  always #5 clk = ~clk;

  initial begin
    repeat (3 * PHASE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  function automatic logic [VALUE_W-1:0] gen_value(input int k, input int n);
    case (k % 3)
      0: return 64'(5000 * k) + 64'(n) * 64'(2 * k + 1);
      1: return (n % 2 == 0) ? 64'(k) : 64'(3 * k + 11);
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    int prev_dl [N_VP];
    logic [N-1:0] prev_on [N_VP];
    logic [IW-1:0] prev_idx;
    logic prev_lk, prev_off [N_VP];
    for (int s = 0; s < N_VP; s++) begin
      lk_pc[s] = '0; upd_pc[s] = '0; upd_value[s] = '0;
      n_tick[s] = 0; n_expire[s] = 0; n_decay[s] = 0; n_reen[s] = 0; n_repower[s] = 0;
      n_up[s] = 0; n_down[s] = 0; n_pred[s] = 0; n_good[s] = 0; n_stride[s] = 0;
      n_stride_good[s] = 0; on_sum[s] = 0; prev_off[s] = 1'b0;
    end
    for (int d = 0; d < UPD_DELAY; d++) begin f_v[d] = 1'b0; f_k[d] = 0; f_val[d] = '0; f_on[d] = '0; end
    for (int k = 0; k < N; k++) seq_n[k] = 0;
    prev_lk = 1'b0; prev_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < N_VP; s++) prev_dl[s] = int'(di_log2[s]);
    for (int c = 0; c < 3 * PHASE; c++) begin
      int phase, k;
      bit fetch;
      if (c > 0) @(negedge clk);
      phase = c / PHASE;
      // ---- choose this cycle's instruction
      fetch = 1'b1;
      k = 0;
      if (phase == 0) begin
        k = (c % 64 == 63) ? $urandom_range(HOT, N - 1) : c % HOT;
      end else if (phase == 1) begin
        fetch = (c % SWEEP_GAP == 0);
        k = HOT + sweep_ptr;
        if (fetch) sweep_ptr = (sweep_ptr + 1) % SWEEP;
      end else begin
        if ($urandom_range(0, 3) != 0) k = $urandom_range(0, HOT - 1);
        else begin fetch = ($urandom_range(0, 3) == 0); k = $urandom_range(0, N - 1); end
      end
      // ---- write-back of the oldest in-flight instruction
      for (int s = 0; s < N_VP; s++) begin
        upd_valid[s] = f_v[UPD_DELAY-1];
        upd_pc[s]    = 64'h2_0000 + 64'(4 * f_k[UPD_DELAY-1]);
        upd_value[s] = f_val[UPD_DELAY-1];
        lk_valid[s]  = fetch;
        lk_pc[s]     = 64'h2_0000 + 64'(4 * k);
      end
      #1;
      // ---- checks on the outputs of this cycle
      for (int s = 0; s < N_VP; s++) begin
        int pop, lpop;
        // prediction timing and gating
        checks++;
        if (pred_valid[s] && !(f_v[LAT-1] && f_on[LAT-1][s])) begin
          failures++;
          if (failures < 20) $display("%0t slot %0d: prediction without a powered lookup %0d cycles before", $time, s, LAT);
        end
        if (pred_valid[s]) begin
          n_pred[s]++;
          if (pred_value[s] == f_val[LAT-1]) n_good[s]++;
          if (phase == 0 && f_k[LAT-1] % 3 == 0) begin
            n_stride[s]++;
            if (pred_value[s] == f_val[LAT-1]) n_stride_good[s]++;
          end
        end
        // a lookup that found the entry off has powered it again
        if (prev_lk && prev_off[s]) begin
          check("re-powered after lookup", data_on[s][prev_idx], 1);
          n_repower[s]++;
        end
        pop = 0; lpop = 0;
        for (int i = 0; i < N; i++) begin
          pop += int'(data_on[s][i]);
          lpop += int'(lc_on[s][i]);
          if (data_on[s][i] && !lc_on[s][i]) check("data on implies counter on", 0, 1);
        end
        check("data_on_num", data_on_num[s], pop);
        check("lc_on_num", lc_on_num[s], lpop);
        on_sum[s] += pop;
        // interval bounds and steps
        checks++;
        if (int'(di_log2[s]) < DMIN || int'(di_log2[s]) > DMAX) begin
          failures++;
          $display("slot %0d interval 2^%0d out of range", s, di_log2[s]);
        end
        check("interval step", int'(di_log2[s]), prev_dl[s]);
        prev_dl[s] = int'(di_log2[s]) + int'(ev_di_up[s]) - int'(ev_di_down[s]);
        n_tick[s]   += int'(ev_tick[s]);
        n_expire[s] += int'(ev_expire[s]);
        n_decay[s]  += int'(ev_pdis_num[s]);
        n_reen[s]   += int'(ev_reen_num[s]);
        n_up[s]     += int'(ev_di_up[s]);
        n_down[s]   += int'(ev_di_down[s]);
        prev_off[s] = fetch && !data_on[s][k];
      end
      prev_lk  = fetch;
      prev_idx = IW'(k);
      // ---- advance the in-flight window
      for (int d = UPD_DELAY - 1; d > 0; d--) begin
        f_v[d] = f_v[d-1]; f_k[d] = f_k[d-1]; f_val[d] = f_val[d-1]; f_on[d] = f_on[d-1];
      end
      f_v[0] = fetch;
      f_k[0] = k;
      f_val[0] = gen_value(k, seq_n[k]);
      for (int s = 0; s < N_VP; s++) f_on[0][s] = data_on[s][k];
      if (fetch) seq_n[k]++;
      if (c % PHASE == PHASE - 1)
        $display("end of phase %0d: intervals STP 2^%0d FCM 2^%0d DFCM 2^%0d, powered entries %0d %0d %0d",
                 phase, di_log2[VP_STP], di_log2[VP_FCM], di_log2[VP_DFCM],
                 data_on_num[VP_STP], data_on_num[VP_FCM], data_on_num[VP_DFCM]);
    end
    for (int s = 0; s < N_VP; s++) begin
      $display("slot %0d: ticks %0d expiries %0d decays %0d re-enables %0d re-powers %0d up %0d down %0d predictions %0d correct %0d stride %0d/%0d mean powered %0d%%",
               s, n_tick[s], n_expire[s], n_decay[s], n_reen[s], n_repower[s], n_up[s], n_down[s],
               n_pred[s], n_good[s], n_stride_good[s], n_stride[s], int'(on_sum[s] * 100 / (longint'(3 * PHASE) * N)));
      check("tick happened", n_tick[s] > 0, 1);
      check("live-time expiry happened", n_expire[s] > 0, 1);
      check("decay happened", n_decay[s] > 0, 1);
      check("re-enable happened", n_reen[s] > 0, 1);
      check("re-power happened", n_repower[s] > 0, 1);
      check("interval doubled", n_up[s] > 0, 1);
      check("interval halved", n_down[s] > 0, 1);
      check("correct prediction happened", n_good[s] > 0, 1);
    end
    checks++;
    if (n_stride_good[VP_STP] * 10 < n_stride[VP_STP] * 8 || n_stride_good[VP_DFCM] * 10 < n_stride[VP_DFCM] * 7) begin
      failures++;
      $display("stride accuracy too low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
