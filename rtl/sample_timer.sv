// sample_timer: sampling-period strobe.
//
// Counts PERIOD clocks and raises tick for one clock at the end of each
// period; with the 12 MHz board clock and PERIOD = 120 this is the 10 us
// sampling time of the discrete controller and plant model. The first tick
// comes PERIOD clocks after reset is released.
module sample_timer #(
  parameter int unsigned PERIOD = dt_pkg::TS_CLKS_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  logic [$clog2(PERIOD)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == ($bits(cnt))'(PERIOD - 1));
      cnt  <= (cnt == ($bits(cnt))'(PERIOD - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
