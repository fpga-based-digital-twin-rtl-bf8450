// tb_pwm_generator: for a series of pulse widths (including 0 and 255),
// measures the high time and the length of each PWM period, and checks that
// a width changed in mid-period only takes effect at the next period.
module tb_pwm_generator;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, pwm, period_start;
  mv_t mv;
  int checks = 0, failures = 0;

  pwm_generator dut (.clk, .rst_n, .mv, .pwm, .period_start);
  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    mv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      mv_t w, w2;
      int hi, len;
      w  = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : (n == 2) ? 8'd1 : mv_t'($urandom);
      w2 = mv_t'($urandom);
      // set the width shortly before a period begins
      @(negedge clk);
      while (!period_start) @(negedge clk);
      repeat (250) @(negedge clk);
      mv = w;
      while (!period_start) @(negedge clk);
      // now inside the period that uses w; change the input half way
      hi = 0; len = 0;
      do begin
        @(posedge clk); #1;
        hi += int'(pwm);
        len++;
        if (len == 128) mv = w2;
      end while (!period_start);
      chk(len, 256, "period length");
      chk(hi, int'(w), "high time equals pulse width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
