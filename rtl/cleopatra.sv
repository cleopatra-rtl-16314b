// cleopatra: 12-channel recycling-integrator readout ASIC for amorphous
// silicon dosimetry detectors.
//
// Each channel converts its input current into a stream of charge quanta
// (cleo_itof: integrator, comparator, charge injection, pulse generator)
// and counts them in a 24-bit up/down counter. A common latch input copies
// every counter into its readout register in the same clock cycle. The
// chip is driven over a half-clock-rate serial command link (din): the
// control unit writes the seven configuration registers (polarities,
// capacitor codes, bias tuning, readout pointer) and, on a read command,
// has the serializer send the register named by the readout pointer as a
// 32-bit word on dout.
//
// The analog front ends are behavioural models, so this top simulates the
// whole chip but is synthesizable only with them removed. The bias tuning
// words go out on bias_tune to the (not modelled) bias circuits. The
// single-ended din, dout, latch and clk stand for the SLVS pads.
//
// From the chip description: 12 channels, 24-bit counters and registers,
// one common latch, control unit, multiplexer and serializer, and the link
// format. This design's own choices are listed in the headers of the
// blocks it instantiates.
//
// Ports: clk, rst_n (asynchronous, active low), din, latch, iin_fa (input
// current of each channel, fA, positive raises the integrator output);
// dout, bias_tune (registers 2..5), selected (chip selected on the link).
// Timing: a snapshot taken by latch in cycle t is read from the readout
// registers from cycle t+1; a read command's word starts on dout one cycle
// after its 16th bit has been sampled.
module cleopatra
  import cleo_pkg::*;
#(
  parameter int unsigned N_CH          = N_CH_DEF,
  parameter int unsigned CNT_W         = CNT_W_DEF,
  parameter int unsigned CLK_PERIOD_PS = 2000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,
  input  logic               latch,
  input  logic signed [39:0] iin_fa    [N_CH],
  output logic               dout,
  output logic [FIELD_W-1:0] bias_tune [N_BIAS],
  output logic               selected
);

  // ------------------------------------------------------------ control
  logic               cfg_we, rd_req, ser_busy;
  logic [2:0]         cfg_addr;
  logic [FIELD_W-1:0] cfg_wdata, rd_ptr;
  logic [FIELD_W-1:0] cfg_regs [N_CFG];
  logic [N_CH-1:0]    polarity;
  logic [CAP_W-1:0]   cint_code, cinj_code;

  cleo_control_unit u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (din),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (cfg_wdata),
    .rd_req    (rd_req),
    .selected  (selected)
  );

  cleo_config_regs #(.N_CH(N_CH)) u_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (cfg_we),
    .addr      (cfg_addr),
    .wdata     (cfg_wdata),
    .regs      (cfg_regs),
    .polarity  (polarity),
    .cint_code (cint_code),
    .cinj_code (cinj_code),
    .bias      (bias_tune),
    .rd_ptr    (rd_ptr)
  );

  // ----------------------------------------------------------- channels
  logic [CNT_W-1:0] count [N_CH];
  logic [CNT_W-1:0] snap  [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic               up, dn;
    logic signed [31:0] va_uv;

    cleo_itof #(.CLK_PERIOD_PS(CLK_PERIOD_PS)) u_itof (
      .clk       (clk),
      .rst_n     (rst_n),
      .iin_fa    (iin_fa[c]),
      .polarity  (polarity[c]),
      .cint_code (cint_code),
      .cinj_code (cinj_code),
      .cnt_up    (up),
      .cnt_dn    (dn),
      .va_uv     (va_uv)
    );

    cleo_updown_counter #(.W(CNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .up    (up),
      .dn    (dn),
      .count (count[c])
    );

    cleo_ro_register #(.W(CNT_W)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .latch (latch),
      .d     (count[c]),
      .q     (snap[c])
    );
  end

  // ------------------------------------------------------------ readout
  logic [23:0] payload;

  cleo_readout_mux #(.N_CH(N_CH), .CNT_W(CNT_W)) u_mux (
    .data    (snap),
    .cfg     (cfg_regs),
    .rd_ptr  (rd_ptr),
    .payload (payload)
  );

  cleo_serializer u_ser (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (rd_req),
    .data  (payload),
    .dout  (dout),
    .busy  (ser_busy)
  );

  // Host rule: a read command must not arrive while a word is being sent
  // (the serializer would drop it).
  a_read_spacing: assert property (@(posedge clk) disable iff (!rst_n) !(rd_req && ser_busy));

endmodule
