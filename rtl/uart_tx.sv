// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, one stop
// bit, least significant bit first, line idle high.
//
// A byte is accepted when valid and ready are both high; ready drops for the
// ten bit times of the frame (start, 8 data, stop). Each bit lasts
// round(CLK_HZ / BAUD) clocks (104 clocks, 0.16 % fast, for 115200 baud at
// 12 MHz). The baud rate is this design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned BIT_CLKS = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned BCW      = $clog2(BIT_CLKS);

  logic [BCW-1:0] bcnt;
  logic [3:0]     nbit;    // bits left to send, 0 = idle
  logic [8:0]     shreg;   // {stop, data}, shifted out LSB first

  assign ready = (nbit == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bcnt  <= '0;
      nbit  <= 4'd0;
      shreg <= '1;
      txd   <= 1'b1;
    end else if (nbit == 4'd0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg <= {1'b1, data};
        nbit  <= 4'd10;
        bcnt  <= '0;
        txd   <= 1'b0;          // start bit goes out at once
      end
    end else begin
      if (bcnt == BCW'(BIT_CLKS - 1)) begin
        bcnt  <= '0;
        shreg <= {1'b1, shreg[8:1]};
        nbit  <= nbit - 4'd1;
        txd   <= shreg[0];          // data bits, then stop, then idle high
      end else begin
        bcnt <= bcnt + 1'b1;
      end
    end
  end

  // The line is high whenever the transmitter is idle.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) ready |-> txd);
endmodule
