// tb_avpd_global_ctrl: self-checking test of the AVPD global controller at a
// reduced size (live time 20 cycles, intervals 16..256 cycles, thresholds
// 40/60). The testbench presents entry-decay counts at every global tick and
// re-enable pulses in between; a cycle-level reference model of the adaptive
// decay interval predicts tick, expire, interval doubling and halving, and
// the two event counters. The tick period is also measured and compared with
// a quarter of the decay interval. Phases with many and with no re-enables
// force the interval up to its ceiling and down to its floor.
module tb_avpd_global_ctrl;
  import avpd_pkg::*;

  localparam int unsigned N    = 15;
  localparam int unsigned LT   = 20;
  localparam int unsigned DMIN = 4;
  localparam int unsigned DMAX = 8;
  localparam int unsigned DINI = 5;
  localparam int unsigned DEC  = 40;
  localparam int unsigned INC  = 60;
  localparam int unsigned CW   = $clog2(N + 1);
  localparam int unsigned DLW  = $clog2(DMAX + 1);

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic [CW-1:0]  pdis_in = '0, reen_in = '0;
  logic           tick, expire, di_up, di_down;
  logic [DLW-1:0] di_log2;
  logic [CW-1:0]  pdis_cnt, reen_cnt;
  int             checks = 0, failures = 0;

  // reference state
  int m_g, m_lt, m_dl, m_pd, m_re;
  bit m_done;
  int n_up = 0, n_down = 0, n_tick = 0, n_exp_lt = 0, n_exp_tick = 0, n_at_min = 0, n_at_max = 0;
  int last_tick_cycle = -1;

  avpd_global_ctrl #(.N_ENTRIES(N), .LIVE_TIME(LT), .DI_LOG2_MIN(DMIN), .DI_LOG2_MAX(DMAX),
                     .DI_LOG2_INIT(DINI), .DEC_TH(DEC), .INC_TH(INC)) dut (
    .clk(clk), .rst_n(rst_n), .pdis_in(pdis_in), .reen_in(reen_in), .tick(tick),
    .expire(expire), .di_log2(di_log2), .pdis_cnt(pdis_cnt), .reen_cnt(reen_cnt),
    .di_up(di_up), .di_down(di_down));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    m_g = 0; m_lt = 0; m_dl = DINI; m_pd = 0; m_re = 0; m_done = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 30000; c++) begin
      int  per, reen_now, e_tick, e_exp, e_up, e_down, reen_p;
      if (c > 0) @(negedge clk);
      // phase: 0..9999 many re-enables, 10000..19999 none, then mixed
      reen_p = (c < 10000) ? 90 : (c < 20000) ? 0 : 50;
      per    = 1 << (m_dl - 2);
      e_tick = (m_g >= per - 1);
      pdis_in = e_tick ? CW'($urandom_range(0, N)) : '0;
      reen_in = (!m_done && m_re < m_pd && $urandom_range(0, 99) < reen_p
                 && $urandom_range(0, 3) == 0) ? CW'(1) : '0;
      #1;
      reen_now = m_re + int'(reen_in);
      e_exp    = !m_done && (e_tick || m_lt == LT - 1);
      e_up = 0; e_down = 0;
      if (e_exp && m_pd != 0) begin
        if (reen_now * 100 >= INC * m_pd) e_up = (m_dl < DMAX);
        else if (reen_now * 100 <= DEC * m_pd) e_down = (m_dl > DMIN);
      end
      check("tick", tick, e_tick);
      check("expire", expire, e_exp);
      check("di_up", di_up, e_up);
      check("di_down", di_down, e_down);
      check("di_log2", di_log2, m_dl);
      check("pdis_cnt", pdis_cnt, m_pd);
      check("reen_cnt", reen_cnt, m_re);
      if (e_tick) begin
        n_tick++;
        if (last_tick_cycle >= 0 && !e_up && !e_down) begin
          // period between consecutive ticks at a steady interval
          if (c - last_tick_cycle != per && c - last_tick_cycle < per) begin
            check("tick spacing", c - last_tick_cycle, per);
          end
        end
        last_tick_cycle = c;
      end
      if (e_exp && e_tick) n_exp_tick++;
      if (e_exp && !e_tick) n_exp_lt++;
      n_up += e_up; n_down += e_down;
      if (m_dl == DMAX) n_at_max++;
      if (m_dl == DMIN) n_at_min++;
      // advance the reference
      if (e_up) m_dl++;
      if (e_down) m_dl--;
      if (e_tick) begin
        m_g = 0; m_lt = 0; m_done = 0; m_pd = int'(pdis_in); m_re = 0;
      end else begin
        m_g++;
        if (m_lt != LT - 1) m_lt++;
        if (e_exp) m_done = 1;
        m_re = reen_now;
      end
    end
    // Directed check of the period: at a fixed interval, ticks are 2^(dl-2) apart.
    $display("ticks %0d up %0d down %0d expire@lt %0d expire@tick %0d cycles@max %0d cycles@min %0d",
             n_tick, n_up, n_down, n_exp_lt, n_exp_tick, n_at_max, n_at_min);
    check("interval raised", n_up > 0, 1);
    check("interval lowered", n_down > 0, 1);
    check("ceiling reached", n_at_max > 0, 1);
    check("floor reached", n_at_min > 0, 1);
    check("expire after live time", n_exp_lt > 0, 1);
    check("expire at tick", n_exp_tick > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
