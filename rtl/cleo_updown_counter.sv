// cleo_updown_counter: per-channel up/down counter of Cleopatra.
//
// Counts the charge quanta of one current-to-frequency converter: +1 on an
// up strobe, -1 on a down strobe, unchanged when both or neither arrive.
// It runs freely and wraps modulo 2^W; the charge in a time window is the
// difference of two snapshots taken by the readout register. Cleared only
// by the chip reset.
//
// From the chip description: a 24-bit up/down counter per converter fed by
// two lines from it. This design's own choices: the meaning of the two
// lines as up and down strobes, wrap-around, reset to zero.
//
// Ports: clk, rst_n (asynchronous, active low), up, dn; count (W bits),
// updated on the clock edge that samples the strobe.
module cleo_updown_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up,
  input  logic         dn,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (up && !dn) count <= count + 1'b1;
    else if (dn && !up) count <= count - 1'b1;
  end

endmodule
