// cleo_ro_register: readout (snapshot) register of one Cleopatra channel.
//
// Captures its counter's value on the clock edge where the common latch
// (load) signal is high, and holds it for readout while the counter keeps
// running. All channels share the latch, so one latch gives a snapshot of
// the charge of every channel at the same instant.
//
// From the chip description: a 24-bit register per counter loaded by an
// external signal common to all registers. This design's own choices: the
// latch is a synchronous enable (the host keeps it high for one cycle per
// snapshot; held high, the register follows the counter), reset to zero.
//
// Ports: clk, rst_n, latch, d (counter value); q (snapshot), valid one
// cycle after the latch cycle.
module cleo_ro_register #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         latch,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (latch) q <= d;
  end

endmodule
