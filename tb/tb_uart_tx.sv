// tb_uart_tx: sends random bytes back to back and with gaps; a behavioural
// receiver decodes the line. Checks every byte, the idle-high line, and the
// frame time of 10 bits of 104 clocks (115200 baud at 12 MHz).
module tb_uart_tx;
  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data, rx_data;
  logic rx_valid, rx_err;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  int nrx = 0;

  uart_tx dut (.clk, .rst_n, .data, .valid, .ready, .txd);
  uart_rx_model #(.BIT_CLKS(104)) rx (.clk, .rxd(txd | !rst_n), .data(rx_data), .byte_valid(rx_valid), .frame_err(rx_err));
  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rx_err) begin checks++; failures++; $display("FAIL framing error"); end
    if (rx_valid) begin
      checks++;
      nrx++;
      if (sent.size() == 0 || rx_data != sent[0]) begin
        failures++;
        $display("FAIL byte got %h", rx_data);
      end
      if (sent.size() != 0) void'(sent.pop_front());
    end
  end

  initial begin
    data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (txd !== 1'b1 || ready !== 1'b1) begin failures++; $display("FAIL idle state"); end
    for (int n = 0; n < 100; n++) begin
      int t;
      @(negedge clk);
      while (!ready) @(negedge clk);
      data = 8'($urandom);
      if (n == 0) data = 8'h00;
      if (n == 1) data = 8'hff;
      sent.push_back(data);
      valid = 1;
      @(negedge clk) valid = 0;
      t = 0;  // clocks after the accepting edge
      while (!ready) begin @(negedge clk); t++; end
      checks++;
      if (t != 1040) begin failures++; $display("FAIL frame time %0d", t); end
      if (n % 3 == 0) repeat ($urandom_range(1, 300)) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    checks++;
    if (nrx != 100) begin failures++; $display("FAIL received %0d bytes", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
