// tb_serial_logger: offers random log records (small, negative and extreme
// values), decodes the UART line with a behavioural receiver and compares
// each received text line with the expected one: eight 5-character fields
// separated by spaces, CR LF at the end. Also checks that a record offered
// while a line is being sent is dropped, and the line time (49 bytes).
module tb_serial_logger;
  import dt_pkg::*;
  logic clk = 0, rst_n = 0, rec_valid = 0, txd, busy, line_done;
  log_rec_t rec;
  logic [7:0] rx_data;
  logic rx_valid, rx_err;
  int checks = 0, failures = 0;
  string expq[$];
  string cur = "";
  int nlines = 0;

  serial_logger dut (.clk, .rst_n, .rec, .rec_valid, .txd, .busy, .line_done);
  uart_rx_model #(.BIT_CLKS(104)) rx (.clk, .rxd(txd | !rst_n), .data(rx_data), .byte_valid(rx_valid), .frame_err(rx_err));
  always #5 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string fmt(input pv_t v);
    int m;
    if (v >= 0) return $sformatf("%05d", v);
    m = -int'(v);
    if (m > 9999) m = 9999;
    return {"-", $sformatf("%04d", m)};
  endfunction

  function automatic string line_of(input log_rec_t r);
    pv_t f[8];
    string s;
    f = '{r.sp, r.pv_asset, r.pv_dt, r.error, r.mv_asset, r.mv_dt, r.p_action, r.i_action};
    s = fmt(f[0]);
    for (int k = 1; k < 8; k++) s = {s, " ", fmt(f[k])};
    return {s, "\r\n"};
  endfunction

  always @(posedge clk) begin
    if (rx_err) begin checks++; failures++; $display("FAIL framing error"); end
    if (rx_valid) begin
      cur = {cur, string'(rx_data)};
      if (rx_data == 8'h0a) begin
        checks++;
        nlines++;
        if (expq.size() == 0 || cur != expq[0]) begin
          failures++;
          $display("FAIL line got '%s'", cur);
          if (expq.size() != 0) $display("     expected '%s'", expq[0]);
        end
        if (expq.size() != 0) void'(expq.pop_front());
        cur = "";
      end
    end
  end

  function automatic pv_t rnd_val(input int kind);
    case (kind % 4)
      0: return pv_t'($urandom_range(0, 60));
      1: return -pv_t'($urandom_range(0, 60));
      2: return pv_t'($urandom);
      default: return (kind % 8 == 3) ? 16'sh8000 : 16'sh7fff;
    endcase
  endfunction

  initial begin
    rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int t;
      rec.sp       = rnd_val(n);
      rec.pv_asset = rnd_val(n + 1);
      rec.pv_dt    = rnd_val(n + 2);
      rec.error    = rnd_val(n + 3);
      rec.mv_asset = rnd_val(n);
      rec.mv_dt    = rnd_val(n + 5);
      rec.p_action = rnd_val(n + 6);
      rec.i_action = rnd_val(n + 7);
      expq.push_back(line_of(rec));
      @(negedge clk) rec_valid = 1;
      @(negedge clk) rec_valid = 0;
      // a second record while busy must be dropped
      rec.sp = 16'sd12345;
      repeat (500) @(negedge clk);
      rec_valid = 1;
      @(negedge clk) rec_valid = 0;
      t = 502;
      while (!line_done) begin @(negedge clk); t++; end
      checks++;
      // 48 bytes sent in full plus the start of the last, 1040 clocks each
      if (t < 48 * 1040 || t > 49 * 1040 + 200) begin failures++; $display("FAIL line time %0d", t); end
      repeat (1100 + $urandom_range(0, 500)) @(negedge clk);
    end
    checks++;
    if (nlines != 30) begin failures++; $display("FAIL %0d lines", nlines); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
