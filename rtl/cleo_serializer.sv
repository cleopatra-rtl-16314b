// cleo_serializer: output serializer of Cleopatra.
//
// On a load strobe while idle it frames the 24-bit payload as a 32-bit word
// {header, data, trailer} (cleo_pkg::out_word) and shifts it out MSB first
// at half the clock rate: each bit is held on dout for two clock cycles,
// the first bit from the cycle after the load, so a word takes 64 cycles.
// Between words dout is 0. A load that arrives while a word is being sent
// is ignored; the host spaces its read commands (one read per two command
// words is always accepted).
//
// From the chip description: a serializer on the output link, half the
// clock rate, 32-bit words of 4-bit header, 24-bit data and 4-bit trailer.
// This design's own choices: header and trailer values, bit order, idle
// level and the behaviour on a load while busy.
//
// Ports: clk, rst_n, load, data; dout, busy.
module cleo_serializer
  import cleo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [23:0] data,
  output logic        dout,
  output logic        busy
);

  logic [OUT_W-1:0] sr_q;
  logic [5:0]       left_q;   // bits still to send, counting the one on dout
  logic             phase_q;  // 1 in the second cycle of a bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q    <= '0;
      left_q  <= '0;
      phase_q <= 1'b0;
    end else if (left_q == '0) begin
      phase_q <= 1'b0;
      if (load) begin
        sr_q   <= out_word(data);
        left_q <= 6'(OUT_W);
      end
    end else begin
      phase_q <= !phase_q;
      if (phase_q) begin
        sr_q   <= {sr_q[OUT_W-2:0], 1'b0};
        left_q <= left_q - 1'b1;
      end
    end
  end

  assign busy = (left_q != '0);
  assign dout = busy && sr_q[OUT_W-1];

endmodule
