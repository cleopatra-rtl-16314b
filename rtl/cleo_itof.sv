// cleo_itof: one current-to-frequency converter ("I -> f") of Cleopatra.
//
// Joins the analog front-end model (integrator, clocked comparator,
// charge injection) with the synthesizable pulse generator. The result is a
// recycling integrator: every time the integrated input charge crosses the
// comparator threshold one charge quantum Q_INJ = C_INJ * (V_QP - V_QN) is
// taken back and one count strobe is emitted, so the count rate is
// I / Q_INJ, up to one count every 4 clock cycles. Because the front end is
// a behavioural model, so is this module.
//
// From the chip description: the channel structure and its two outputs
// towards the up/down counter. This design's choice: those two outputs are
// separate up and down count strobes selected by the channel polarity, and
// the integrator reset switch is driven by the chip reset.
//
// Ports: clk, rst_n, iin_fa (input current, fA), polarity, cint_code,
// cinj_code; cnt_up / cnt_dn (one-cycle strobes), va_uv (integrator output
// for observation).
module cleo_itof #(
  parameter int unsigned CLK_PERIOD_PS = 2000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [39:0] iin_fa,
  input  logic               polarity,
  input  logic [2:0]         cint_code,
  input  logic [2:0]         cinj_code,
  output logic               cnt_up,
  output logic               cnt_dn,
  output logic signed [31:0] va_uv
);

  logic v_b, v_pulse, v_gate;

  cleo_frontend_model #(.CLK_PERIOD_PS(CLK_PERIOD_PS)) u_fe (
    .clk       (clk),
    .reset     (!rst_n),
    .iin_fa    (iin_fa),
    .polarity  (polarity),
    .cint_code (cint_code),
    .cinj_code (cinj_code),
    .v_pulse   (v_pulse),
    .v_gate    (v_gate),
    .v_b       (v_b),
    .va_uv     (va_uv)
  );

  cleo_pulse_gen u_pg (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmp      (v_b),
    .polarity (polarity),
    .v_pulse  (v_pulse),
    .v_gate   (v_gate),
    .cnt_up   (cnt_up),
    .cnt_dn   (cnt_dn)
  );

endmodule
