// tb_setpoint_selector: walks the switch code through all values, in random
// order, and checks the setpoint (4 + 5*code) and its three-clock delay.
module tb_setpoint_selector;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] sw;
  pv_t sp;
  int checks = 0, failures = 0;

  setpoint_selector dut (.clk, .rst_n, .sw, .sp);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    sw = 3'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(sp, 4, "after reset");
    for (int n = 0; n < 40; n++) begin
      logic [2:0] v;
      int old;
      v = (n < 8) ? 3'(n) : 3'($urandom);
      old = sp;
      @(negedge clk) sw = v;
      repeat (2) @(posedge clk);
      #1 chk(sp, old, "setpoint held for two clocks");
      @(posedge clk); #1;
      chk(sp, 4 + 5 * int'(v), "setpoint");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
