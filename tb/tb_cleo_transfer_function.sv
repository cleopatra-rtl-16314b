// tb_cleo_transfer_function: transfer-function sweep of one channel, as in
// a linearity measurement of the converter.
//
// Part 1 (low range): C_INT = 140 fF, injection codes 1..7 (20..140 fF,
// 600 mV step), input currents 0..100 nA in 10 nA steps, a 60 us window
// (30000 cycles at 500 MHz). Part 2 (full range): currents 0..3.5 uA in
// 250 nA steps, an 8000-cycle window. For every point the count is
// compared with I * window / (C_INJ * 600 mV), limited to window / 4
// (saturation at f_clk/4 = 125 MHz), within +/-2 counts. The test also
// counts how many points saturated and requires at least one, and prints
// the largest deviation in counts.
module tb_cleo_transfer_function;
  localparam int T_PS = 2000;
  logic clk = 0, rst_n = 0, polarity = 0;
  logic signed [39:0] iin_fa = 0;
  logic [2:0] cint_code = 3'd7, cinj_code = 3'd1;
  logic cnt_up, cnt_dn;
  logic signed [31:0] va_uv;
  int checks = 0, failures = 0, n_sat = 0;
  real max_dev = 0.0;

  cleo_itof #(.CLK_PERIOD_PS(T_PS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic point(real i_na, int inj, int win);
    int n;
    real e, dev;
    @(negedge clk);
    rst_n = 0; cinj_code = 3'(inj);
    iin_fa = 40'(longint'(i_na * 1.0e6));
    @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    n = 0;
    repeat (win) begin
      @(negedge clk);
      if (cnt_up) n++;
    end
    e = i_na * 1e-9 * win * T_PS * 1e-12 / (20.0 * inj * 0.6 * 1e-15);
    if (e >= win / 4.0) begin e = win / 4.0; n_sat++; end
    dev = (n > e) ? n - e : e - n;
    if (dev > max_dev) max_dev = dev;
    checks++;
    if (dev > 2.0) begin
      failures++;
      $display("I=%0.0f nA C_INJ=%0d fF: %0d counts, expected %0.1f", i_na, 20 * inj, n, e);
    end
  endtask

  initial begin
    for (int inj = 1; inj <= 7; inj++)
      for (int i = 0; i <= 100; i += 10) point(real'(i), inj, 30000);
    for (int inj = 1; inj <= 7; inj++)
      for (int i = 0; i <= 3500; i += 250) point(real'(i), inj, 8000);
    checks++;
    if (n_sat == 0) failures++;
    $display("points %0d, saturated %0d, largest deviation %0.2f counts", checks - 1, n_sat, max_dev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
