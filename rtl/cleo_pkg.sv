// cleo_pkg: constants and types shared by the Cleopatra readout ASIC RTL.
//
// The channel count (12), the counter and readout register width (24 bit),
// the command word format (16 bit = 4-bit opcode + 12-bit field), the
// output word format (32 bit = 4-bit header + 24-bit data + 4-bit trailer)
// and the number of configuration registers (7, register 6 being the
// readout pointer) follow the chip description. The opcode values, the
// chip-select key, the header/trailer patterns, the assignment of
// configuration registers 0..5 and the readout address map are choices of
// this implementation; the chip description gives none of them.
package cleo_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_CH_DEF   = 12;  // channels
  localparam int unsigned CNT_W_DEF  = 24;  // counter / readout register width
  localparam int unsigned CMD_W      = 16;  // command word
  localparam int unsigned OPC_W      = 4;   // opcode
  localparam int unsigned FIELD_W    = 12;  // command field = config register width
  localparam int unsigned OUT_W      = 32;  // output word
  localparam int unsigned N_CFG      = 7;   // configuration registers
  localparam int unsigned CAP_W      = 3;   // capacitor code: n x 20 fF, n = 1..7

  // ------------------------------------------------------------- opcodes
  typedef enum logic [OPC_W-1:0] {
    OP_NOP     = 4'h0,
    OP_REG_SEL = 4'h1,
    OP_REG_WR  = 4'h2,
    OP_REG_RD  = 4'h3,
    OP_DESEL   = 4'h5,
    OP_SEL     = 4'hA
  } opcode_e;

  // A chip-select word is OP_SEL followed by this key. While deselected the
  // receiver hunts for the full 16-bit pattern to find the word boundary.
  localparam logic [FIELD_W-1:0] SEL_KEY  = 12'h5C3;
  localparam logic [CMD_W-1:0]   SEL_WORD = {OP_SEL, SEL_KEY};

  // ------------------------------------------------------ output framing
  localparam logic [3:0] OUT_HEADER  = 4'hA;
  localparam logic [3:0] OUT_TRAILER = 4'h5;

  // ---------------------------------------------- configuration registers
  typedef enum logic [2:0] {
    CFG_POLARITY = 3'd0,  // bit i: 1 = channel i reads a negative current
    CFG_CAP      = 3'd1,  // [2:0] C_INT code, [5:3] C_INJ code
    CFG_BIAS0    = 3'd2,  // analog bias tuning words
    CFG_BIAS1    = 3'd3,
    CFG_BIAS2    = 3'd4,
    CFG_BIAS3    = 3'd5,
    CFG_RD_PTR   = 3'd6   // register fetched by a read command
  } cfg_addr_e;

  localparam int unsigned N_BIAS = 4;

  // Read pointer (register 6) map: bit 4 set -> readout register [3:0],
  // bit 4 clear -> configuration register [2:0].
  localparam int unsigned RD_DATA_BIT = 4;

  // Output word for a 24-bit payload.
  function automatic logic [OUT_W-1:0] out_word(input logic [23:0] data);
    return {OUT_HEADER, data, OUT_TRAILER};
  endfunction

endpackage
