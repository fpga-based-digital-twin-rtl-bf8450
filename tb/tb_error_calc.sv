// tb_error_calc: random and extreme setpoint/measurement pairs; checks
// SP - PV with int16 saturation, the one-clock err_valid delay and that the
// error holds between samples.
module tb_error_calc;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, err_valid;
  pv_t sp, pv, err;
  int checks = 0, failures = 0;

  error_calc dut (.clk, .rst_n, .in_valid, .sp, .pv, .err_valid, .err);
  always #5 clk = ~clk;

  initial begin
    #200000;
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
    sp = 0; pv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      longint d, e;
      case (n % 4)
        0: begin sp = pv_t'($urandom_range(0, 60)); pv = pv_t'($urandom_range(0, 60)); end
        1: begin sp = 16'sh7fff; pv = pv_t'(-$urandom_range(1, 40000)); end
        2: begin sp = 16'sh8000; pv = pv_t'($urandom_range(1, 32767)); end
        default: begin sp = pv_t'($urandom); pv = pv_t'($urandom); end
      endcase
      d = longint'(sp) - longint'(pv);
      e = (d > 32767) ? 32767 : (d < -32768) ? -32768 : d;
      @(negedge clk) in_valid = 1;
      @(negedge clk) in_valid = 0;
      chk(err_valid, 1, "err_valid one clock after in_valid");
      chk(err, e, "error value");
      sp = sp + 16'sd1;
      @(negedge clk);
      chk(err_valid, 0, "err_valid is a pulse");
      chk(err, e, "error held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
