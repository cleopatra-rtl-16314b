// cleo_config_regs: the seven 12-bit configuration registers of Cleopatra.
//
// Written one at a time by the control unit (we, addr, wdata); a write to
// an address above 6 is ignored. The fields are decoded for the rest of
// the chip:
//   register 0      channel polarity, bit i for channel i (1 = negative)
//   register 1      [2:0] C_INT code, [5:3] C_INJ code (n x 20 fF, common
//                   to all channels)
//   registers 2..5  analog bias tuning words, passed to the bias circuits
//   register 6      readout pointer: the register a read command sends out
// All seven are also readable through the readout multiplexer.
//
// From the chip description: seven registers that set polarities, C_INT
// and C_INJ, bias tuning, with register 6 choosing what a read command
// returns; the 12-bit width follows from the 12-bit command field. This
// design's own choices: which register holds which field, capacitor codes
// shared by all channels, and the reset values (polarity positive, C_INT
// at 140 fF, C_INJ at 20 fF, bias words at mid-scale, pointer at 0).
//
// Ports: clk, rst_n, we, addr, wdata; regs (all seven, for readback) and
// the decoded fields. Writes take effect on the next clock edge.
module cleo_config_regs
  import cleo_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [2:0]          addr,
  input  logic [FIELD_W-1:0]  wdata,
  output logic [FIELD_W-1:0]  regs      [N_CFG],
  output logic [N_CH-1:0]     polarity,
  output logic [CAP_W-1:0]    cint_code,
  output logic [CAP_W-1:0]    cinj_code,
  output logic [FIELD_W-1:0]  bias      [N_BIAS],
  output logic [FIELD_W-1:0]  rd_ptr
);

  function automatic logic [FIELD_W-1:0] reset_value(input logic [2:0] a);
    case (a)
      CFG_CAP:                               return 12'h00F;
      CFG_BIAS0, CFG_BIAS1, CFG_BIAS2, CFG_BIAS3: return 12'h800;
      default:                               return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < N_CFG; a++) regs[a] <= reset_value(3'(a));
    end else if (we && (addr < 3'(N_CFG))) begin
      regs[addr] <= wdata;
    end
  end

  always_comb begin
    polarity  = regs[CFG_POLARITY][N_CH-1:0];
    cint_code = regs[CFG_CAP][2:0];
    cinj_code = regs[CFG_CAP][5:3];
    for (int unsigned b = 0; b < N_BIAS; b++) bias[b] = regs[32'(CFG_BIAS0) + b];
    rd_ptr    = regs[CFG_RD_PTR];
  end

endmodule
