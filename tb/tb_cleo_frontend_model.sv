// tb_cleo_frontend_model: self-checking testbench of the analog front-end
// model.
//
// Checks, against values computed here from I * t / C and Q = C * dV:
// the integrator ramp for several currents and C_INT codes, the comparator
// decision for both polarities, the charge removed or added by a gated
// V_PULSE edge, that an ungated edge changes nothing, the output clipping
// and the reset switch.
module tb_cleo_frontend_model;
  localparam int T_PS = 2000;
  logic clk = 0, reset = 1, polarity = 0, v_pulse = 0, v_gate = 0;
  logic signed [39:0] iin_fa = 0;
  logic [2:0] cint_code = 3'd7, cinj_code = 3'd1;
  logic v_b;
  logic signed [31:0] va_uv;
  int checks = 0, failures = 0;

  cleo_frontend_model #(.CLK_PERIOD_PS(T_PS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // uV on C_INT after a charge q in fC
  function automatic real uv_of(real q_fc, int code);
    return q_fc / (20.0 * code) * 1.0e6;
  endfunction

  task automatic expect_uv(real exp_uv, string what);
    checks++;
    if (va_uv > exp_uv + 2.0 || va_uv < exp_uv - 2.0) begin
      failures++;
      $display("%s: va %0d uV, expected %0.1f uV", what, va_uv, exp_uv);
    end
  endtask

  task automatic expect_vb(logic e, string what);
    checks++;
    if (v_b !== e) begin failures++; $display("%s: v_b %0b expected %0b", what, v_b, e); end
  endtask

  real q_fc;
  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    expect_uv(0.0, "after reset");
    // ramps: 10 nA for 10 cycles on each C_INT code, threshold not reached
    for (int c = 1; c <= 7; c++) begin
      reset = 1; cint_code = 3'(c); @(negedge clk); reset = 0;
      iin_fa = 40'sd10_000_000;          // 10 nA
      repeat (10) @(negedge clk);
      iin_fa = 0; @(negedge clk);
      q_fc = 10.0e-9 * 10 * T_PS * 1e-12 / 1e-15;   // 0.2 fC
      expect_uv(uv_of(q_fc, c), "ramp");
      expect_vb(1'b0, "below threshold");
    end
    // comparator, polarity 0: 100 mV on 140 fF is 14 fC; 1 uA adds 2 fC/cycle
    reset = 1; cint_code = 3'd7; polarity = 0; @(negedge clk); reset = 0;
    iin_fa = 40'sd1_000_000_000;
    repeat (7) @(negedge clk);            // 14 fC: exactly at threshold
    expect_vb(1'b0, "at threshold");
    @(negedge clk);                       // 16 fC
    expect_vb(1'b1, "above threshold");
    iin_fa = 0; @(negedge clk);
    expect_uv(uv_of(16.0, 7), "16 fC");
    // gated rising edge removes 12 fC (20 fF x 600 mV)
    v_gate = 1; v_pulse = 1; @(negedge clk);
    expect_uv(uv_of(4.0, 7), "after rising edge");
    expect_vb(1'b0, "comparator released");
    // ungated falling edge: nothing
    v_gate = 0; v_pulse = 0; @(negedge clk);
    expect_uv(uv_of(4.0, 7), "ungated edge");
    // gated falling edge adds 12 fC, with C_INJ code 3 -> 36 fC
    cinj_code = 3'd3;
    v_pulse = 1; @(negedge clk);            // ungated rise
    v_gate = 1; v_pulse = 0; @(negedge clk);
    expect_uv(uv_of(40.0, 7), "after falling edge, C_INJ=60 fF");
    // polarity 1 comparator on a negative ramp
    reset = 1; v_gate = 0; polarity = 1; @(negedge clk); reset = 0;
    iin_fa = -40'sd1_000_000_000;
    repeat (7) @(negedge clk);
    expect_vb(1'b0, "neg at threshold");
    @(negedge clk);
    expect_vb(1'b1, "neg above threshold");
    // clipping at 750 mV: 105 fC on 140 fF
    repeat (80) @(negedge clk);
    expect_uv(-750000.0, "clipped");
    iin_fa = 0;
    reset = 1; @(negedge clk);
    expect_uv(0.0, "reset switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
