// cleo_control_unit: serial command receiver and decoder of Cleopatra.
//
// The command link runs at half the clock rate: an internal phase bit
// toggles every cycle after reset and din is sampled on the cycles where it
// is 1 (the 2nd, 4th, ... rising edge after reset is released), so the host
// must hold each bit for two clock cycles. Commands are 16-bit words sent
// MSB first: a 4-bit opcode and a 12-bit field.
//
// While deselected the receiver compares the last 16 bits received with
// the chip-select word after every bit; a match selects the chip and fixes
// the word boundary. While selected it cuts the stream into 16-bit words
// and executes each one the cycle after its last bit:
//   NOP        nothing (also any unknown opcode, and a repeated select)
//   REG_SEL    field[2:0] becomes the register address for writes
//   REG_WR     field is written to the selected configuration register
//   REG_RD     requests one output word (the register named by register 6)
//   DESEL      deselects; the receiver goes back to hunting
// A word takes 32 clock cycles, so a command stream keeps the link busy.
//
// From the chip description: two half-clock-rate serial links, 16-bit words
// of 4-bit opcode and 12-bit field, a continuous command stream opened by a
// chip-select word and closed by a chip-deselect word, and the select,
// write, read and no-operation commands. This design's own choices: the
// opcode values and select key (cleo_pkg), bit order, hunting for the
// select word to find the word boundary, and the sampling phase.
//
// Ports: clk, rst_n, din; cfg_we/cfg_addr/cfg_wdata (one-cycle write to the
// configuration registers), rd_req (one-cycle read request), selected.
module cleo_control_unit
  import cleo_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,
  output logic               cfg_we,
  output logic [2:0]         cfg_addr,
  output logic [FIELD_W-1:0] cfg_wdata,
  output logic               rd_req,
  output logic               selected
);

  logic              phase_q;
  logic [CMD_W-1:0]  sr_q;
  logic [3:0]        bitcnt_q;
  logic              word_v_q;   // a complete word sits in sr_q
  logic [CMD_W-1:0]  word;

  assign word = {sr_q[CMD_W-2:0], din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= 1'b0;
      sr_q     <= '0;
      bitcnt_q <= '0;
      selected <= 1'b0;
      word_v_q <= 1'b0;
    end else begin
      phase_q  <= !phase_q;
      word_v_q <= 1'b0;
      if (phase_q) begin
        sr_q <= word;
        if (!selected) begin
          if (word == SEL_WORD) begin
            selected <= 1'b1;
            bitcnt_q <= '0;
          end
        end else begin
          bitcnt_q <= bitcnt_q + 1'b1;
          if (bitcnt_q == 4'(CMD_W - 1)) begin
            word_v_q <= 1'b1;
            if (opcode_e'(word[CMD_W-1 -: OPC_W]) == OP_DESEL) selected <= 1'b0;
          end
        end
      end
    end
  end

  // Command execution, one cycle after the word's last bit.
  opcode_e          opc;
  logic [FIELD_W-1:0] field;
  assign opc   = opcode_e'(sr_q[CMD_W-1 -: OPC_W]);
  assign field = sr_q[FIELD_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_addr <= '0;
    end else if (word_v_q && opc == OP_REG_SEL) begin
      cfg_addr <= field[2:0];
    end
  end

  always_comb begin
    cfg_we    = word_v_q && (opc == OP_REG_WR);
    cfg_wdata = field;
    rd_req    = word_v_q && (opc == OP_REG_RD);
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(cfg_we && rd_req));

endmodule
