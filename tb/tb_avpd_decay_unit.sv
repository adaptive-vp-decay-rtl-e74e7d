// tb_avpd_decay_unit: self-checking test of the complete AVPD mechanism for
// one 16-entry table (live time 40 cycles, intervals 16..1024 cycles starting
// at 64, thresholds 70/100). A reference model of the whole mechanism (the
// three-state entries with their local counters, and the adaptive global
// controller) predicts every cycle the decay interval, tick and expire
// pulses, the data power enables and the answer to each lookup. It also
// checks the decay latency: an entry left alone at a steady interval must
// lose its data between three and four global periods (about one decay
// interval) after its last access. Phases of re-visiting just-decayed entries
// and of abandoning them drive the interval up and down.
module tb_avpd_decay_unit;
  import avpd_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned LT   = 40;
  localparam int unsigned DMIN = 4;
  localparam int unsigned DMAX = 10;
  localparam int unsigned DINI = 6;
  localparam int unsigned DEC  = 70;
  localparam int unsigned INC  = 100;
  localparam int unsigned IW   = $clog2(N);
  localparam int unsigned CW   = $clog2(N + 1);
  localparam int unsigned DLW  = $clog2(DMAX + 1);

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           acc_valid = 1'b0;
  logic [IW-1:0]  acc_idx = '0;
  logic           acc_data_on, tick, expire, di_up, di_down;
  logic [N-1:0]   data_on, lc_on;
  logic [CW-1:0]  data_on_num, lc_on_num, pdis_num, reen_num;
  logic [DLW-1:0] di_log2;
  int             checks = 0, failures = 0;

  int m_st [N];
  int m_cnt[N];
  int m_last[N];
  int m_dl_at[N];  // 1 while the interval has not changed since the last access
  int m_g, m_lt, m_dl, m_pd, m_re;
  bit m_done;
  int n_up = 0, n_down = 0, n_decay = 0, n_reen = 0, n_off = 0, n_lat = 0;

  avpd_decay_unit #(.N_ENTRIES(N), .LIVE_TIME(LT), .DI_LOG2_MIN(DMIN), .DI_LOG2_MAX(DMAX),
                    .DI_LOG2_INIT(DINI), .DEC_TH(DEC), .INC_TH(INC)) dut (
    .clk(clk), .rst_n(rst_n), .acc_valid(acc_valid), .acc_idx(acc_idx),
    .acc_data_on(acc_data_on), .data_on(data_on), .lc_on(lc_on), .data_on_num(data_on_num),
    .lc_on_num(lc_on_num), .di_log2(di_log2), .tick(tick), .expire(expire), .di_up(di_up),
    .di_down(di_down), .pdis_num(pdis_num), .reen_num(reen_num));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_cnt[i] = 0; m_last[i] = 0; m_dl_at[i] = 0; end
    m_g = 0; m_lt = 0; m_dl = DINI; m_pd = 0; m_re = 0; m_done = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 60000; c++) begin
      int per, e_tick, e_exp, e_up, e_down, e_pdis, e_reen, reen_now, e_don, phase;
      logic [N-1:0] e_data_on;
      if (c > 0) @(negedge clk);
      per    = 1 << (m_dl - 2);
      e_tick = (m_g >= per - 1);
      e_exp  = !m_done && (e_tick || m_lt == LT - 1);
      // Stimulus. Phase 0: revisit entries as soon as they decay (premature
      // decay, interval should grow). Phase 1: few, hot entries; the rest is
      // abandoned (interval should shrink). Phase 2: random.
      phase = (c / 20000);
      acc_valid = 1'b0;
      acc_idx   = '0;
      if (phase == 0) begin
        int cand;
        cand = -1;
        for (int i = 0; i < N; i++) if (m_st[i] == 2 && cand < 0) cand = i;
        if (cand >= 0 && $urandom_range(0, 1) == 0) begin
          acc_valid = 1'b1; acc_idx = IW'(cand);
        end else if ($urandom_range(0, 3) == 0) begin
          acc_valid = 1'b1; acc_idx = IW'($urandom_range(0, N - 1));
        end
      end else if (phase == 1) begin
        if ($urandom_range(0, 1) == 0) begin
          acc_valid = 1'b1; acc_idx = IW'($urandom_range(0, 1));
        end else if ($urandom_range(0, 200) == 0) begin
          acc_valid = 1'b1; acc_idx = IW'($urandom_range(0, N - 1));
        end
      end else begin
        acc_valid = ($urandom_range(0, 7) == 0);
        acc_idx   = IW'($urandom_range(0, N - 1));
      end
      #1;
      e_don = 0;
      for (int i = 0; i < N; i++) begin
        e_data_on[i] = (m_st[i] == 1);
        e_don += (m_st[i] == 1);
      end
      check("di_log2", di_log2, m_dl);
      check("tick", tick, e_tick);
      check("expire", expire, e_exp);
      check("data_on", int'(data_on == e_data_on), 1);
      check("data_on_num", data_on_num, e_don);
      check("acc_data_on", acc_data_on, acc_valid && m_st[acc_idx] == 1);
      if (acc_valid && m_st[acc_idx] != 1) n_off++;
      // entries
      e_pdis = 0; e_reen = 0;
      for (int i = 0; i < N; i++) begin
        if (acc_valid && acc_idx == IW'(i)) begin
          if (m_st[i] == 2) e_reen++;
          m_st[i] = 1; m_cnt[i] = 0; m_last[i] = c; m_dl_at[i] = 1;
        end else if (m_st[i] == 1) begin
          if (e_tick && m_cnt[i] == 3) begin
            m_st[i] = 2; m_cnt[i] = 0; e_pdis++;
            if (m_dl_at[i] == 1) begin
              // decays on the 4th tick after the access: (3*per, 4*per] cycles
              n_lat++;
              checks++;
              if (!((c - m_last[i]) > 3 * per && (c - m_last[i]) <= 4 * per)) begin
                failures++;
                $display("entry %0d decayed %0d cycles after its access, period %0d", i, c - m_last[i], per);
              end
            end
          end else if (e_tick) m_cnt[i]++;
        end else if (m_st[i] == 2) begin
          if (e_exp) begin m_st[i] = 0; m_cnt[i] = 0; end
          else if (e_tick && m_cnt[i] < 3) m_cnt[i]++;
        end
      end
      check("pdis_num", pdis_num, e_pdis);
      check("reen_num", reen_num, e_reen);
      n_decay += e_pdis; n_reen += e_reen;
      // controller
      reen_now = m_re + e_reen;
      e_up = 0; e_down = 0;
      if (e_exp && m_pd != 0) begin
        if (reen_now * 100 >= INC * m_pd) e_up = (m_dl < DMAX);
        else if (reen_now * 100 <= DEC * m_pd) e_down = (m_dl > DMIN);
      end
      check("di_up", di_up, e_up);
      check("di_down", di_down, e_down);
      n_up += e_up; n_down += e_down;
      if (e_up) m_dl++;
      if (e_down) m_dl--;
      if (e_up || e_down) for (int i = 0; i < N; i++) m_dl_at[i] = 0;
      if (e_tick) begin
        m_g = 0; m_lt = 0; m_done = 0; m_pd = e_pdis; m_re = 0;
      end else begin
        m_g++;
        if (m_lt != LT - 1) m_lt++;
        if (e_exp) m_done = 1;
        m_re = reen_now;
      end
      if (c == 19999 || c == 39999) $display("after phase %0d: interval 2^%0d", phase, m_dl);
    end
    $display("decays %0d re-enables %0d lookups of off entries %0d interval up %0d down %0d latency checks %0d",
             n_decay, n_reen, n_off, n_up, n_down, n_lat);
    check("interval raised", n_up > 0, 1);
    check("interval lowered", n_down > 0, 1);
    check("re-enable seen", n_reen > 0, 1);
    check("decay latency measured", n_lat > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
