// tb_adc_reader: a behavioural ADC answers each conversion request after a
// random delay with a random 12-bit code; checks the start pulse, the
// scaling code*60/4096 (floor), the pv_valid timing, and that pv holds while
// no conversion completes.
module tb_adc_reader;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, adc_start, adc_done = 0, pv_valid;
  logic [11:0] adc_data = 0;
  pv_t pv;
  int checks = 0, failures = 0;

  adc_reader dut (.clk, .rst_n, .tick, .adc_start, .adc_done, .adc_data, .pv_valid, .pv);
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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [11:0] code;
      int old;
      code = (n == 0) ? 12'hfff : (n == 1) ? 12'h000 : 12'($urandom);
      old = pv;
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      chk(adc_start, 1, "start follows tick");
      @(negedge clk);
      chk(adc_start, 0, "start is a pulse");
      repeat ($urandom_range(0, 60)) begin
        @(negedge clk);
        chk(pv_valid, 0, "no pv_valid before done");
      end
      chk(pv, old, "pv held during conversion");
      adc_data = code; adc_done = 1;
      @(negedge clk) adc_done = 0; adc_data = 12'($urandom);
      chk(pv_valid, 1, "pv_valid one clock after done");
      chk(pv, (int'(code) * 60) / 4096, "scaled voltage");
      @(negedge clk);
      chk(pv_valid, 0, "pv_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
