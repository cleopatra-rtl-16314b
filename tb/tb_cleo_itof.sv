// tb_cleo_itof: self-checking testbench of one current-to-frequency channel.
//
// For a set of input currents and C_INJ codes it counts the strobes in a
// fixed window after a settling time and compares the count with
// I * window / (C_INJ * 600 mV), allowing +/-2 counts of quantisation.
// Currents above f_clk/4 * Q_INJ must give exactly one count per 4 cycles
// (saturation). A negative current on a polarity-1 channel must give down
// strobes only, and the wrong strobe must never appear.
module tb_cleo_itof;
  localparam int T_PS = 2000;
  localparam int WIN  = 4000;
  logic clk = 0, rst_n = 0, polarity = 0;
  logic signed [39:0] iin_fa = 0;
  logic [2:0] cint_code = 3'd7, cinj_code = 3'd1;
  logic cnt_up, cnt_dn;
  logic signed [31:0] va_uv;
  int checks = 0, failures = 0;

  cleo_itof #(.CLK_PERIOD_PS(T_PS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(real i_na, int inj, logic pol);
    int n_good, n_bad;
    real q_fc, expct;
    @(negedge clk);
    rst_n = 0; polarity = pol; cinj_code = 3'(inj);
    iin_fa = 40'(longint'(i_na * 1.0e6));
    @(negedge clk); rst_n = 1;
    repeat (200) @(negedge clk);
    n_good = 0; n_bad = 0;
    repeat (WIN) begin
      @(negedge clk);
      if (pol ? cnt_dn : cnt_up) n_good++;
      if (pol ? cnt_up : cnt_dn) n_bad++;
    end
    q_fc  = 20.0 * inj * 0.6;
    expct = (i_na < 0 ? -i_na : i_na) * 1e-9 * WIN * T_PS * 1e-12 / (q_fc * 1e-15);
    if (expct > WIN / 4) expct = WIN / 4;
    checks += 2;
    if (n_bad != 0) begin failures++; $display("wrong strobe %0d times", n_bad); end
    if (n_good > expct + 2.0 || n_good < expct - 2.0) begin
      failures++;
      $display("I=%0.1f nA inj=%0d pol=%0b: %0d counts, expected %0.1f", i_na, inj, pol, n_good, expct);
    end
  endtask

  initial begin
    run_case(0.0, 1, 0);
    run_case(10.0, 1, 0);
    run_case(100.0, 1, 0);
    run_case(100.0, 4, 0);
    run_case(777.0, 7, 0);
    run_case(1000.0, 1, 0);
    run_case(1400.0, 1, 0);     // near saturation: 1500 nA saturates
    run_case(3500.0, 1, 0);     // saturated: 125 MHz
    run_case(2000.0, 3, 0);
    run_case(-250.0, 2, 1);
    run_case(-3000.0, 7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
