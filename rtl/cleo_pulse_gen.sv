// cleo_pulse_gen: charge-recycling pulse generator of one Cleopatra channel.
//
// Synthesizable FSM. When the clocked comparator reports
// that the integrator ramp has crossed its threshold (cmp = 1 while idle),
// the FSM plays one charge-subtraction sequence on the injection capacitor:
//
//   IDLE -> RISE -> SWAP -> FALL -> IDLE
//   RISE : V_PULSE goes high; the gate routes this edge to the input for a
//          channel of polarity 0 and to V_REF for polarity 1.
//   SWAP : V_PULSE stays high; the gate flips (no edge while switching).
//   FALL : V_PULSE goes low; the other edge goes the other way.
//
// Each sequence emits one count, on cnt_up for polarity 0 or cnt_dn for
// polarity 1, in the RISE cycle. A sequence lasts four clock cycles, so the
// channel saturates at f_clk/4, as the chip description states; with cmp
// held high the FSM fires back to back, one count every 4 cycles. The
// polarity is sampled when a sequence starts and held until it ends.
//
// From the chip description: a clocked FSM, one pulse at most every 4 clock
// cycles, one of the two opposite current pulses sent to the input and the
// other to V_REF depending on polarity, V_PULSE/V_GATE/count signals. This
// design's own choices: the four states, the order of gate and pulse
// transitions, and splitting the count into up and down strobes.
//
// Ports: clk, rst_n (asynchronous, active low), cmp (comparator output,
// synchronous to clk), polarity; v_pulse and v_gate (to the analog
// injection switches; Moore outputs decoded from the state register),
// cnt_up and cnt_dn (one-cycle strobes).
module cleo_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp,
  input  logic polarity,
  output logic v_pulse,
  output logic v_gate,
  output logic cnt_up,
  output logic cnt_dn
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_RISE = 2'd1,
    S_SWAP = 2'd2,
    S_FALL = 2'd3
  } state_e;

  state_e state_q, state_d;
  logic   pol_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE: if (cmp) state_d = S_RISE;
      S_RISE: state_d = S_SWAP;
      S_SWAP: state_d = S_FALL;
      S_FALL: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pol_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE) pol_q <= polarity;
    end
  end

  // Gate = 1 connects C_INJ to the input node. During IDLE and RISE the
  // gate is set for the rising edge, during SWAP and FALL for the falling
  // one; in IDLE it follows the live polarity so it is settled before RISE.
  logic pol_eff;
  assign pol_eff = (state_q == S_IDLE) ? polarity : pol_q;

  always_comb begin
    v_pulse = (state_q == S_RISE) || (state_q == S_SWAP);
    v_gate  = ((state_q == S_IDLE) || (state_q == S_RISE)) ? ~pol_eff : pol_eff;
    cnt_up  = (state_q == S_RISE) && !pol_q;
    cnt_dn  = (state_q == S_RISE) &&  pol_q;
  end

  // A count is only ever emitted on one of the two strobes.
  a_onehot_count: assert property (@(posedge clk) disable iff (!rst_n) !(cnt_up && cnt_dn));

endmodule
