// tb_avpd_local_counter: self-checking test of the 2-bit gray-code local
// decay counter. Random clear/increment stimulus is compared every cycle with
// a reference that keeps the count as a plain integer 0..3 and maps it to the
// gray sequence 00,01,11,10; the overflow flag must rise exactly when an
// increment meets the saturated count.
module tb_avpd_local_counter;
  import avpd_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clr = 1'b0, inc = 1'b0;
  logic [1:0] cnt;
  logic       ovf;
  int         checks = 0, failures = 0;
  int         ref_n = 0;
  int         n_ovf = 0;

  function automatic logic [1:0] gray(input int n);
    case (n)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  avpd_local_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .inc(inc), .cnt(cnt), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 9) == 0);
      inc = ($urandom_range(0, 1) == 0);
      #1;
      checks++;
      if (cnt !== gray(ref_n) || ovf !== (inc && ref_n == 3)) begin
        failures++;
        $display("cycle %0d: cnt=%b ovf=%b expected cnt=%b ovf=%b", c, cnt, ovf, gray(ref_n), inc && ref_n == 3);
      end
      if (ovf) n_ovf++;
      if (clr) ref_n = 0;
      else if (inc && ref_n < 3) ref_n++;
    end
    // Directed: from 00, four increments reach saturation, the fifth overflows.
    @(negedge clk); clr = 1'b1; inc = 1'b0;
    @(negedge clk); clr = 1'b0; inc = 1'b1;
    for (int k = 1; k <= 5; k++) begin
      #1;
      checks++;
      if (ovf !== (k >= 4)) begin
        failures++;
        $display("directed step %0d: ovf=%b", k, ovf);
      end
      @(negedge clk);
    end
    checks++;
    if (n_ovf == 0) begin
      failures++;
      $display("overflow never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
