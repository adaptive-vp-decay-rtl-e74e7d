// tb_avpd_entry: self-checking test of the three-state AVPD entry controller.
// Random tick/expire/access pulses drive the entry; a reference model kept in
// the testbench (state plus a 0..3 local count) predicts every cycle the
// state, the power enables and the decay / re-enable event pulses. Each of
// the four transitions must be seen at least once.
module tb_avpd_entry;
  import avpd_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         tick = 1'b0, expire = 1'b0, access = 1'b0;
  entry_state_e state;
  logic         data_on, lc_on, pdis_evt, reen_evt;
  int           checks = 0, failures = 0;
  entry_state_e m_st;
  int           m_cnt;
  int           n_en_pd = 0, n_pd_en = 0, n_pd_dis = 0, n_dis_en = 0;

  avpd_entry dut (.clk(clk), .rst_n(rst_n), .tick(tick), .expire(expire), .access(access),
                  .state(state), .data_on(data_on), .lc_on(lc_on),
                  .pdis_evt(pdis_evt), .reen_evt(reen_evt));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    m_st  = ST_DISABLED;
    m_cnt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 10000; c++) begin
      logic e_pdis, e_reen;
      entry_state_e nst;
      @(negedge clk);
      tick   = ($urandom_range(0, 3) == 0);
      expire = ($urandom_range(0, 7) == 0);
      access = ($urandom_range(0, 24) == 0);
      #1;
      checks++;
      if (state !== m_st) begin
        failures++;
        $display("cycle %0d: state %s expected %s", c, state.name(), m_st.name());
      end
      check("data_on", data_on, m_st == ST_ENABLED);
      check("lc_on", lc_on, m_st != ST_DISABLED);
      // reference next state
      e_pdis = 1'b0;
      e_reen = 1'b0;
      nst    = m_st;
      if (access) begin
        e_reen = (m_st == ST_PARTIAL);
        if (m_st == ST_PARTIAL) n_pd_en++;
        if (m_st == ST_DISABLED) n_dis_en++;
        nst   = ST_ENABLED;
        m_cnt = 0;
      end else if (m_st == ST_ENABLED) begin
        if (tick && m_cnt == 3) begin
          nst    = ST_PARTIAL;
          e_pdis = 1'b1;
          m_cnt  = 0;
          n_en_pd++;
        end else if (tick) begin
          m_cnt++;
        end
      end else if (m_st == ST_PARTIAL) begin
        if (expire) begin
          nst   = ST_DISABLED;
          m_cnt = 0;
          n_pd_dis++;
        end else if (tick && m_cnt < 3) begin
          m_cnt++;
        end
      end
      check("pdis_evt", pdis_evt, e_pdis);
      check("reen_evt", reen_evt, e_reen);
      m_st = nst;
    end
    $display("transitions: en->pd %0d pd->en %0d pd->dis %0d dis->en %0d", n_en_pd, n_pd_en, n_pd_dis, n_dis_en);
    check("en->pd seen", n_en_pd > 0, 1'b1);
    check("pd->en seen", n_pd_en > 0, 1'b1);
    check("pd->dis seen", n_pd_dis > 0, 1'b1);
    check("dis->en seen", n_dis_en > 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
