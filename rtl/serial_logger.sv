// serial_logger: sends the asset, twin and error data to the host as text.
//
// A record (dt_pkg::log_rec_t: setpoint, asset PV, twin PV, asset error,
// asset MV, twin MV, P action, I action) is captured when rec_valid is high
// and no line is in progress; otherwise the record is dropped. Each field is
// written as 5 ASCII characters: a value >= 0 as five zero-padded decimal
// digits, a negative value as '-' and four digits of its magnitude
// (magnitudes above 9999 show as 9999). Fields are separated by a space and
// the line ends with CR LF, 49 bytes in all.
// Decimal digits come from repeated subtraction of powers of ten, at most
// ten clocks per digit, while the UART is idle; the serial time of the line
// (49 bytes, 4.25 ms at 115200 baud) dominates. line_done pulses after the
// last byte has been handed to the UART. Text format, field separators and
// the single shared UART are this design's choices.
module serial_logger
  import dt_pkg::*;
#(
  parameter int unsigned CLK_HZ = 12_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic     clk,
  input  logic     rst_n,
  input  log_rec_t rec,
  input  logic     rec_valid,
  output logic     txd,
  output logic     busy,
  output logic     line_done
);
  typedef enum logic [2:0] {IDLE, LOAD, DIGIT, SEND} state_t;
  state_t state;

  log_rec_t        rec_q;
  logic [2:0]      field;    // field being formatted
  logic [2:0]      pos;      // character position 0..4 being computed
  logic [16:0]     rem;      // magnitude still to print
  logic [3:0]      dig;      // digit being counted
  logic [7:0]      chars [5];
  logic [2:0]      idx;      // byte of the field being sent, 0..6

  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n,
    .data (tx_data),
    .valid(tx_valid),
    .ready(tx_ready),
    .txd
  );

  function automatic logic [16:0] pow10(input logic [2:0] k);
    case (k)
      3'd0:    return 17'd1;
      3'd1:    return 17'd10;
      3'd2:    return 17'd100;
      3'd3:    return 17'd1000;
      default: return 17'd10000;
    endcase
  endfunction

  // Field `f` of the captured record (field 0 is the first member).
  pv_t fval;
  assign fval = rec_q[(LOG_FIELDS - 1 - 32'(field)) * 16 +: 16];

  logic last_field;
  assign last_field = (field == 3'(LOG_FIELDS - 1));

  always_comb begin
    tx_data = 8'h20;
    if (idx < 3'd5)      tx_data = chars[idx];
    else if (idx == 3'd5) tx_data = last_field ? 8'h0d : 8'h20;
    else                  tx_data = 8'h0a;
  end
  assign tx_valid = (state == SEND);
  assign busy     = (state != IDLE);

  logic [16:0] p;
  assign p = pow10(3'd4 - pos);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      rec_q     <= '0;
      field     <= '0;
      pos       <= '0;
      rem       <= '0;
      dig       <= '0;
      idx       <= '0;
      line_done <= 1'b0;
      for (int i = 0; i < 5; i++) chars[i] <= 8'h30;
    end else begin
      line_done <= 1'b0;
      unique case (state)
        IDLE: if (rec_valid) begin
          rec_q <= rec;
          field <= '0;
          state <= LOAD;
        end
        LOAD: begin
          dig <= '0;
          if (fval < 0) begin
            chars[0] <= 8'h2d;                       // '-'
            rem      <= (-32'(fval) > 9999) ? 17'd9999 : 17'(-32'(fval));
            pos      <= 3'd1;
          end else begin
            rem      <= 17'(fval);
            pos      <= 3'd0;
          end
          state <= DIGIT;
        end
        DIGIT: begin
          if (rem >= p) begin
            rem <= rem - p;
            dig <= dig + 4'd1;
          end else begin
            chars[pos] <= 8'h30 + 8'(dig);
            dig        <= '0;
            if (pos == 3'd4) begin
              idx   <= '0;
              state <= SEND;
            end else begin
              pos <= pos + 3'd1;
            end
          end
        end
        SEND: if (tx_ready) begin
          if ((idx == 3'd6) || (idx == 3'd5 && !last_field)) begin
            if (last_field) begin
              line_done <= 1'b1;
              state     <= IDLE;
            end else begin
              field <= field + 3'd1;
              state <= LOAD;
            end
          end else begin
            idx <= idx + 3'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
