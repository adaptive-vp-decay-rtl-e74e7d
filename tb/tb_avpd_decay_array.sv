// tb_avpd_decay_array: self-checking test of the per-table decay array with
// 16 entries. Random global ticks, live-time expiries and lookups drive it; a
// reference model holding every entry's state and local count predicts, each
// cycle, the data and counter power enables of all entries, whether the
// looked-up entry still holds data, the number of entries decaying and being
// re-enabled, and the powered-entry counts.
module tb_avpd_decay_array;
  import avpd_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          tick = 1'b0, expire = 1'b0, acc_valid = 1'b0;
  logic [IW-1:0] acc_idx = '0;
  logic          acc_data_on;
  logic [N-1:0]  data_on, lc_on;
  logic [CW-1:0] pdis_num, reen_num, data_on_num, lc_on_num;
  int            checks = 0, failures = 0;

  int m_st [N];  // 0 disabled, 1 enabled, 2 partial
  int m_cnt[N];
  int n_multi_decay = 0, n_reen = 0;

  avpd_decay_array #(.N_ENTRIES(N)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .expire(expire), .acc_valid(acc_valid),
    .acc_idx(acc_idx), .acc_data_on(acc_data_on), .data_on(data_on), .lc_on(lc_on),
    .pdis_num(pdis_num), .reen_num(reen_num), .data_on_num(data_on_num), .lc_on_num(lc_on_num));

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
    for (int i = 0; i < N; i++) begin m_st[i] = 0; m_cnt[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      int e_pdis, e_reen, e_don, e_lon;
      logic [N-1:0] e_data_on, e_lc_on;
      @(negedge clk);
      tick      = ($urandom_range(0, 3) == 0);
      expire    = ($urandom_range(0, 9) == 0);
      acc_valid = ($urandom_range(0, 1) == 0);
      // skewed index: a few hot entries, the rest rarely used
      acc_idx   = ($urandom_range(0, 3) != 0) ? IW'($urandom_range(0, 3)) : IW'($urandom_range(0, N - 1));
      #1;
      e_don = 0; e_lon = 0;
      for (int i = 0; i < N; i++) begin
        e_data_on[i] = (m_st[i] == 1);
        e_lc_on[i]   = (m_st[i] != 0);
        e_don += (m_st[i] == 1);
        e_lon += (m_st[i] != 0);
      end
      check("data_on", int'(data_on == e_data_on), 1);
      check("lc_on", int'(lc_on == e_lc_on), 1);
      check("data_on_num", data_on_num, e_don);
      check("lc_on_num", lc_on_num, e_lon);
      check("acc_data_on", acc_data_on, acc_valid && m_st[acc_idx] == 1);
      e_pdis = 0; e_reen = 0;
      for (int i = 0; i < N; i++) begin
        if (acc_valid && acc_idx == IW'(i)) begin
          if (m_st[i] == 2) e_reen++;
          m_st[i] = 1; m_cnt[i] = 0;
        end else if (m_st[i] == 1) begin
          if (tick && m_cnt[i] == 3) begin m_st[i] = 2; m_cnt[i] = 0; e_pdis++; end
          else if (tick) m_cnt[i]++;
        end else if (m_st[i] == 2) begin
          if (expire) begin m_st[i] = 0; m_cnt[i] = 0; end
          else if (tick && m_cnt[i] < 3) m_cnt[i]++;
        end
      end
      check("pdis_num", pdis_num, e_pdis);
      check("reen_num", reen_num, e_reen);
      if (e_pdis > 1) n_multi_decay++;
      n_reen += e_reen;
    end
    $display("cycles with several entries decaying at once: %0d, re-enables: %0d", n_multi_decay, n_reen);
    check("parallel decay seen", n_multi_decay > 0, 1);
    check("re-enable seen", n_reen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
