// adc_reader: digital side of the output-voltage measurement.
//
// On every sampling tick a one-clock adc_start request goes to the ADC. When
// the ADC answers with adc_done, the ADC_W-bit code is scaled to volts,
// pv = code * SCALE_Q / 2^SCALE_FRAC (default: 60 V full scale), and
// pv_valid pulses one clock later. Until a conversion finishes, pv holds
// the previous value; a tick while waiting simply issues a new request.
// The start/done handshake, resolution and scale are this design's choices.
module adc_reader
  import dt_pkg::*;
#(
  parameter int unsigned ADC_W      = 12,
  parameter int          SCALE_Q    = 960,   // 60 V / 4096 codes, Q16
  parameter int unsigned SCALE_FRAC = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  output logic             adc_start,
  input  logic             adc_done,
  input  logic [ADC_W-1:0] adc_data,
  output logic             pv_valid,
  output pv_t              pv
);
  logic waiting;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      adc_start <= 1'b0;
      waiting   <= 1'b0;
      pv_valid  <= 1'b0;
      pv        <= '0;
    end else begin
      adc_start <= tick;
      pv_valid  <= 1'b0;
      if (tick) begin
        waiting <= 1'b1;
      end else if (waiting && adc_done) begin
        waiting  <= 1'b0;
        pv_valid <= 1'b1;
        pv       <= sat16((64'(adc_data) * 64'(SCALE_Q)) >>> SCALE_FRAC);
      end
    end
  end
endmodule
