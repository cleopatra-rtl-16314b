// cleo_frontend_model: BEHAVIOURAL MODEL (not synthesizable) of the analog
// front end of one Cleopatra channel: integrating amplifier with C_INT and
// reset switch, clocked comparator, and charge-injection capacitor C_INJ
// switched between V_QP and V_QN and gated to the input or to V_REF.
//
// How it works. The model is discrete in time: at each rising clock edge it
// adds the input current times the clock period to the charge q held on
// C_INT, then applies the charge of any V_PULSE edge seen since the last
// edge. A V_PULSE edge moves C_INJ * (V_QP - V_QN) through the capacitor;
// if v_gate = 1 that charge lands on the integrator (a rising edge lowers
// q, a falling edge raises it), otherwise it goes to V_REF and is lost. The
// amplifier output is V_A - V_REF = q / C_INT, clipped to +/- VSAT_MV (the
// amplifier is treated as ideal otherwise). The clocked comparator then
// samples: for polarity 0 it fires when V_A - V_REF > VTH_MV, for polarity
// 1 when V_A - V_REF < -VTH_MV. The reset switch empties C_INT.
//
// Units: current in fA, time in ps, so q is kept in units of 1e-27 C;
// capacitances in fF, voltages in mV. Positive current is the direction
// that makes V_A rise. In steady state the channel fires at
// f = I / (C_INJ * (V_QP - V_QN)), saturating at f_clk / 4 through the
// pulse generator.
//
// From the chip description: the structure (integrator, threshold, charge
// subtraction by C_INJ and the V_QP - V_QN step, gate to input or V_REF,
// reset switch, clock into the comparator), capacitor codes of 20 fF steps
// from 20 to 140 fF, the 600 mV injection step and the 500 MHz test clock.
// This model's own choices: the threshold, the clipping level (+/-750 mV,
// wide enough that a full 600 mV quantum at C_INJ = C_INT plus the
// threshold fits, since all seven injection settings are linear), the ideal
// amplifier, the way the single drawn comparator serves both polarities,
// code 0 treated as code 1, and the sign convention.
//
// Ports: clk, reset (integrator reset switch, active high), iin_fa (signed
// input current, fA), polarity, cint_code / cinj_code (3-bit capacitor
// codes, n x 20 fF), v_pulse, v_gate (from the pulse generator); v_b
// (comparator output, registered on clk), va_uv (V_A - V_REF in uV, for
// observation).
module cleo_frontend_model #(
  parameter int unsigned CLK_PERIOD_PS = 2000,  // 500 MHz test clock
  parameter int unsigned CAP_STEP_FF   = 20,    // capacitor bank step
  parameter int unsigned DVQ_MV        = 600,   // V_QP - V_QN
  parameter int unsigned VTH_MV        = 100,   // comparator threshold above V_REF
  parameter int unsigned VSAT_MV       = 750    // amplifier output swing around V_REF
) (
  input  logic               clk,
  input  logic               reset,
  input  logic signed [39:0] iin_fa,
  input  logic               polarity,
  input  logic [2:0]         cint_code,
  input  logic [2:0]         cinj_code,
  input  logic               v_pulse,
  input  logic               v_gate,
  output logic               v_b,
  output logic signed [31:0] va_uv
);

  // 1 fF * 1 mV = 1e-18 C = 1e9 units of 1e-27 C
  localparam longint UNIT_PER_FF_MV = 64'sd1_000_000_000;

  longint q;          // charge on C_INT, 1e-27 C
  logic   pulse_prev;

  function automatic longint cap_ff(input logic [2:0] code);
    return ((code == 3'd0) ? 64'sd1 : longint'(code)) * longint'(CAP_STEP_FF);
  endfunction

  longint cint_ff, qinj, qth, qsat;
  always_comb begin
    cint_ff = cap_ff(cint_code);
    qinj    = cap_ff(cinj_code) * longint'(DVQ_MV) * UNIT_PER_FF_MV;
    qth     = cint_ff * longint'(VTH_MV) * UNIT_PER_FF_MV;
    qsat    = cint_ff * longint'(VSAT_MV) * UNIT_PER_FF_MV;
  end

  always @(posedge clk) begin : integrate
    longint qn;
    if (reset) begin
      qn = 0;
    end else begin
      qn = q + longint'(iin_fa) * longint'(CLK_PERIOD_PS);
      if (v_gate && v_pulse && !pulse_prev) qn = qn - qinj;
      if (v_gate && !v_pulse && pulse_prev) qn = qn + qinj;
      if (qn >  qsat) qn =  qsat;
      if (qn < -qsat) qn = -qsat;
    end
    q          <= qn;
    pulse_prev <= v_pulse;
    v_b        <= polarity ? (qn < -qth) : (qn > qth);
  end

  // V_A - V_REF in uV: q[1e-27 C] / C[fF] * 1e-6
  assign va_uv = 32'(q / (cint_ff * 64'sd1_000_000));

endmodule
