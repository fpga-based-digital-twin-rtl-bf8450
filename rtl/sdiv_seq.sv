// sdiv_seq: signed sequential divider, one quotient bit per clock.
//
// start latches a signed NW-bit dividend and a signed DW-bit divisor. The
// magnitudes are divided by restoring long division, MSB first, over NW
// clocks; the quotient is then given the sign of the operands, so it is
// truncated toward zero like the C and SystemVerilog '/' operator. A zero
// divisor yields a zero quotient. done pulses for one clock NW+1 clocks after
// start; quot is valid from that clock until the next start.
module sdiv_seq #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quot
);
  logic [NW-1:0]        n_mag;   // dividend magnitude, shifted out MSB first
  logic [DW:0]          d_mag;   // divisor magnitude (DW+1 bits holds -2^(DW-1))
  logic [DW:0]          rem;     // partial remainder, always < d_mag
  logic [NW-1:0]        q;
  logic                 neg, zero_den;
  logic [$clog2(NW+1)-1:0] cnt;

  logic [DW+1:0] rem_sh;
  assign rem_sh = {rem, n_mag[NW-1]};

  assign quot = zero_den ? '0 : (neg ? -$signed(q) : $signed(q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      n_mag    <= '0;
      d_mag    <= '0;
      rem      <= '0;
      q        <= '0;
      neg      <= 1'b0;
      zero_den <= 1'b0;
      cnt      <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        n_mag    <= num[NW-1] ? NW'(-num) : NW'(num);
        d_mag    <= den[DW-1] ? (DW+1)'(-{den[DW-1], den}) : {1'b0, den};
        neg      <= num[NW-1] ^ den[DW-1];
        zero_den <= (den == '0);
        rem      <= '0;
        q        <= '0;
        cnt      <= '0;
      end else if (busy) begin
        if (rem_sh >= {1'b0, d_mag}) begin
          rem <= (DW+1)'(rem_sh - {1'b0, d_mag});
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= (DW+1)'(rem_sh);
          q   <= {q[NW-2:0], 1'b0};
        end
        n_mag <= {n_mag[NW-2:0], 1'b0};
        cnt   <= cnt + 1'b1;
        if (cnt == ($bits(cnt))'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A new division may only start when the previous one has finished.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
