// tb_flyback_model: steps the converter model with a varying duty command and
// compares its output with the difference equation of
//   P(z) = (0.2781z^2 + 0.5561z + 0.2781) / (z^2 + 0.6723z + 0.9396)
// evaluated in floating point (tolerance: 1 unit of the rounded output). Also
// checks the one-clock y_valid delay and the DC gain 1.1123/2.6119 of a long
// constant input.
module tb_flyback_model;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, u_valid = 0, y_valid;
  mv_t mv;
  pv_t pv;
  int checks = 0, failures = 0;

  flyback_model dut (.clk, .rst_n, .u_valid, .mv, .y_valid, .pv);
  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real u1 = 0, u2 = 0, y1 = 0, y2 = 0;

  initial begin
    mv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      real u0, y0;
      if (n < 400)       mv = mv_t'((n / 50) * 30);
      else if (n < 800)  mv = mv_t'($urandom_range(3, 217));
      else               mv = 8'd100;
      u0 = real'(mv);
      y0 = 0.2781 * u0 + 0.5561 * u1 + 0.2781 * u2 - 0.6723 * y1 - 0.9396 * y2;
      u2 = u1; u1 = u0; y2 = y1; y1 = y0;
      @(negedge clk) u_valid = 1;
      @(negedge clk) u_valid = 0;
      checks++;
      if (!y_valid) begin failures++; $display("FAIL y_valid not one clock after u_valid"); end
      checks++;
      if ((real'(pv) - y0) > 1.0 || (y0 - real'(pv)) > 1.0) begin
        failures++;
        $display("FAIL step %0d: pv=%0d model=%f", n, pv, y0);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // DC gain: 100 * 1.1123 / 2.6119 = 42.59
    checks++;
    if (pv != 16'sd43) begin failures++; $display("FAIL dc value %0d", pv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
