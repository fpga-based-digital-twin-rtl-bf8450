// setpoint_selector: maps the board setpoint switches to a voltage setpoint.
//
// The switch code passes a two-flop synchroniser and is then mapped linearly:
// sp = SP_BASE + code * SP_STEP, which with the defaults gives 4, 9, ... 39 V
// for a 3-bit code. The mapping and the switch count are this design's
// choice; the source design only names a switch-driven setpoint selector.
// Timing: sp follows a switch change three clocks later.
module setpoint_selector
  import dt_pkg::*;
#(
  parameter int unsigned SW_W    = 3,
  parameter int          SP_BASE = 4,
  parameter int          SP_STEP = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW_W-1:0] sw,
  output pv_t             sp
);
  logic [SW_W-1:0] sync1, sync2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      sp    <= pv_t'(SP_BASE);
    end else begin
      sync1 <= sw;
      sync2 <= sync1;
      sp    <= sat16(64'(SP_BASE) + 64'(sync2) * 64'(SP_STEP));
    end
  end
endmodule
