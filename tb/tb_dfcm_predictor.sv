// tb_dfcm_predictor: self-checking test of the DFCM value predictor at a reduced size
// (16 first-level entries, 256 second-level entries, 5-cycle latency). Thirty-two instructions,
// aliasing two by two onto the 16 entries, produce stride sequences, short
// repeating patterns and random values. Lookups and updates arrive at random;
// the testbench drives the entry power enables itself, occasionally switching
// entries off and on. A reference model of the tables predicts every lookup,
// and each prediction must appear exactly LATENCY cycles after its lookup.
// In a last phase without aliasing or power-off, every lookup comes with the
// update of the same instruction, and the predictions of the instructions
// whose pattern this predictor can learn (stride sequences and repeating patterns) must then mostly be correct.
module tb_dfcm_predictor;
  import avpd_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned HW   = 8;
  localparam int unsigned NL2  = 1 << HW;
  localparam int unsigned LAT  = 5;
  localparam int unsigned IW   = $clog2(N);
  localparam int unsigned NPC  = 32;
  localparam int unsigned HSH  = 2;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               lk_valid = 1'b0, upd_valid = 1'b0;
  logic [PC_W-1:0]    lk_pc = '0, upd_pc = '0;
  logic [VALUE_W-1:0] upd_value = '0;
  logic [IW-1:0]      lk_idx;
  logic               lk_data_on;
  logic               pred_valid;
  logic [VALUE_W-1:0] pred_value;
  logic [N-1:0]       data_on = '1;
  int                 checks = 0, failures = 0;

  // reference tables
  logic [VALUE_W-1:0] r_last [N];
  logic [VALUE_W-1:0] r_aux  [N];   // stride (STP) or context hash (FCM/DFCM)
  logic               r_vld  [N];
  logic [VALUE_W-1:0] r_l2   [NL2];
  // expected prediction pipeline
  logic               q_v [LAT];
  logic [VALUE_W-1:0] q_d [LAT];
  int                 q_pc [LAT];
  logic [VALUE_W-1:0] q_ans [LAT];
  // value generators
  int                 gen_n [NPC];
  logic [VALUE_W-1:0] gen_prev [NPC];
  int n_pred = 0, n_good = 0, n_pat = 0, n_pat_good = 0, n_off_lookup = 0;

  assign lk_data_on = lk_valid && data_on[lk_idx];

  dfcm_predictor #(.N_ENTRIES(N), .HIST_W(HW), .HSHIFT(HSH), .LATENCY(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .lk_valid(lk_valid), .lk_pc(lk_pc), .lk_idx(lk_idx),
    .lk_data_on(lk_data_on), .pred_valid(pred_valid), .pred_value(pred_value),
    .upd_valid(upd_valid), .upd_pc(upd_pc), .upd_value(upd_value), .data_on(data_on));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VALUE_W-1:0] fold(input logic [VALUE_W-1:0] v);
    logic [VALUE_W-1:0] a;
    a = '0;
    for (int sh = 0; sh < VALUE_W; sh += HW) a ^= (v >> sh) & ((64'd1 << HW) - 1);
    return a;
  endfunction

  function automatic logic [VALUE_W-1:0] hnext(input logic [VALUE_W-1:0] h, input logic [VALUE_W-1:0] v);
    return ((h << HSH) ^ fold(v)) & ((64'd1 << HW) - 1);
  endfunction

  // Next value of instruction k: k%3==0 stride, k%3==1 period-3 pattern, else random.
  function automatic logic [VALUE_W-1:0] gen_value(input int k, input int n);
    case (k % 3)
      0: return 64'(1000 * k) + 64'(n) * 64'(k + 3);
      1: return (n % 3 == 0) ? 64'(7 * k) : (n % 3 == 1) ? 64'(100 + k) : 64'hdead_0000 + 64'(k);
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin r_last[i] = '0; r_aux[i] = '0; r_vld[i] = 1'b0; end
    for (int j = 0; j < NL2; j++) r_l2[j] = '0;
    for (int s = 0; s < LAT; s++) begin q_v[s] = 1'b0; q_d[s] = '0; q_pc[s] = 0; q_ans[s] = '0; end
    for (int k = 0; k < NPC; k++) begin gen_n[k] = 0; gen_prev[k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 30000; c++) begin
      int lk_k, up_k, li, ui;
      logic e_v;
      logic [VALUE_W-1:0] e_d, uv;
      @(negedge clk);
      // stimulus
      lk_k = $urandom_range(0, NPC - 1);
      up_k = $urandom_range(0, NPC - 1);
      if (c >= 20000) begin
        lk_k = $urandom_range(0, N - 1);
        up_k = lk_k;
      end
      lk_valid  = (c >= 20000) || ($urandom_range(0, 3) != 0);
      lk_pc     = 64'h1000 + 64'(4 * lk_k);
      upd_valid = (c >= 20000) || ($urandom_range(0, 1) == 0);
      upd_pc    = 64'h1000 + 64'(4 * up_k);
      uv        = gen_value(up_k, gen_n[up_k]);
      upd_value = uv;
      if (c < 20000 && $urandom_range(0, 63) == 0) data_on[$urandom_range(0, N - 1)] = 1'b0;
      if (c >= 20000 || $urandom_range(0, 7) == 0) data_on[$urandom_range(0, N - 1)] = 1'b1;
      #1;
      // compare the output with the prediction made LAT cycles ago
      checks++;
      if (pred_valid !== q_v[LAT-1] || (q_v[LAT-1] && pred_value !== q_d[LAT-1])) begin
        failures++;
        $display("cycle %0d: pred %b/%h expected %b/%h", c, pred_valid, pred_value, q_v[LAT-1], q_d[LAT-1]);
      end
      if (q_v[LAT-1]) begin
        n_pred++;
        if (c >= 20000 + LAT && (q_pc[LAT-1] % 3 != 2)) begin
          n_pat++;
          if (q_d[LAT-1] == q_ans[LAT-1]) n_pat_good++;
        end
      end
      // reference lookup
      li  = lk_k % N;
      e_v = lk_valid && data_on[li] && r_vld[li];
      e_d = r_last[li] + r_l2[r_aux[li][HW-1:0]];
      if (lk_valid && !data_on[li]) n_off_lookup++;
      for (int s = LAT - 1; s > 0; s--) begin
        q_v[s] = q_v[s-1]; q_d[s] = q_d[s-1]; q_pc[s] = q_pc[s-1]; q_ans[s] = q_ans[s-1];
      end
      q_v[0] = e_v; q_d[0] = e_d; q_pc[0] = lk_k; q_ans[0] = uv;
      // reference update, then clearing of unpowered entries
      ui = up_k % N;
      if (upd_valid && data_on[ui]) begin
        if (r_vld[ui]) begin
          r_l2[r_aux[ui][HW-1:0]] = uv - r_last[ui];
          r_aux[ui] = hnext(r_aux[ui], uv - r_last[ui]);
        end else begin
          r_aux[ui] = '0;
        end
        r_last[ui] = uv;
        r_vld[ui]  = 1'b1;
      end
      if (upd_valid) gen_n[up_k]++;
      for (int i = 0; i < N; i++) if (!data_on[i]) begin r_last[i] = '0; r_aux[i] = '0; r_vld[i] = 1'b0; end
    end
    $display("predictions %0d, on pattern instructions %0d of which correct %0d, lookups of off entries %0d",
             n_pred, n_pat, n_pat_good, n_off_lookup);
    checks++;
    if (n_pat == 0 || n_pat_good * 100 < n_pat * 90) begin
      failures++;
      $display("accuracy on pattern instructions too low");
    end
    checks++;
    if (n_off_lookup == 0) begin failures++; $display("no lookup of an unpowered entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
