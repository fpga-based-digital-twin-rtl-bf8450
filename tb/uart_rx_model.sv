// uart_rx_model: testbench receiver for an 8N1 serial line. It waits for a
// start bit, samples each data bit in the middle of its BIT_CLKS-clock slot,
// checks the stop bit, and pulses byte_valid with the received byte.
// frame_err pulses instead when the stop bit is low or the start bit does
// not last half a bit.
module uart_rx_model #(
  parameter int unsigned BIT_CLKS = 104
) (
  input  logic       clk,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       byte_valid,
  output logic       frame_err
);
  initial begin
    byte_valid = 0;
    frame_err  = 0;
    data       = 0;
    forever begin
      logic bad;
      @(posedge clk);
      byte_valid = 0;
      frame_err  = 0;
      if (rxd == 1'b0) begin
        bad = 0;
        repeat (BIT_CLKS / 2) @(posedge clk);
        if (rxd != 1'b0) bad = 1;
        for (int b = 0; b < 8; b++) begin
          repeat (BIT_CLKS) @(posedge clk);
          data[b] = rxd;
        end
        repeat (BIT_CLKS) @(posedge clk);
        if (rxd != 1'b1) bad = 1;
        if (bad) frame_err = 1; else byte_valid = 1;
      end
    end
  end
endmodule
