// cleo_readout_mux: readout multiplexer of Cleopatra.
//
// Chooses the 24-bit payload of the next output word from the address held
// in configuration register 6: with bit 4 set, readout register [3:0]
// (channel 0..N_CH-1); with bit 4 clear, configuration register [2:0]
// (0..6), zero-extended to 24 bits. An address that names no register
// returns zero. Purely combinational.
//
// From the chip description: a multiplexer between the readout registers
// and the serializer, and register 6 selecting a control or data register.
// This design's own choice: the address map above.
//
// Ports: data (readout registers), cfg (configuration registers), rd_ptr;
// payload.
module cleo_readout_mux
  import cleo_pkg::*;
#(
  parameter int unsigned N_CH  = N_CH_DEF,
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic [CNT_W-1:0]   data   [N_CH],
  input  logic [FIELD_W-1:0] cfg    [N_CFG],
  input  logic [FIELD_W-1:0] rd_ptr,
  output logic [23:0]        payload
);

  logic [3:0] idx;
  assign idx = rd_ptr[3:0];

  always_comb begin
    payload = '0;
    if (rd_ptr[FIELD_W-1:RD_DATA_BIT+1] == '0) begin
      if (rd_ptr[RD_DATA_BIT]) begin
        if (32'(idx) < N_CH) payload = 24'(data[idx]);
      end else if (idx < 4'(N_CFG)) begin
        payload = 24'(cfg[idx[2:0]]);
      end
    end
  end

endmodule
