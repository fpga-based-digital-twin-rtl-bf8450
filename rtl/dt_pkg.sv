// dt_pkg: types and helpers shared by the flyback digital-twin design.
//
// Process values (setpoint, voltages, errors, P and I actions) are signed
// 16-bit integers, as in the fixed-point controller and twin model; the
// manipulated variable (MV) is an unsigned 8-bit pulse width. log_rec_t is
// the record that the serial logger turns into one line of text, with its
// fields in the order in which they are sent.
package dt_pkg;

  typedef logic signed [15:0] pv_t;
  typedef logic        [7:0]  mv_t;

  localparam int unsigned CLK_HZ_DEFAULT  = 12_000_000;
  localparam int unsigned TS_CLKS_DEFAULT = 120;  // t_s = 10 us at 12 MHz

  // One serial log record; the first member is sent first.
  typedef struct packed {
    pv_t sp;        // setpoint
    pv_t pv_asset;  // measured output voltage
    pv_t pv_dt;     // digital-twin output voltage
    pv_t error;     // twin-versus-asset error PV_asset - PV_DT
    pv_t mv_asset;  // asset pulse width
    pv_t mv_dt;     // twin pulse width
    pv_t p_action;  // asset proportional action
    pv_t i_action;  // asset integral action
  } log_rec_t;

  localparam int unsigned LOG_FIELDS = 8;

  // Saturate a wide signed value to the int16 range.
  function automatic pv_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return pv_t'(v);
  endfunction

endpackage
