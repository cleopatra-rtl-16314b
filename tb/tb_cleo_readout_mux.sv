// tb_cleo_readout_mux: self-checking testbench of the readout multiplexer.
//
// Random register contents and every read-pointer value from 0 to 0x3F
// plus random pointers; the expected payload follows the address map:
// 0x10 + n -> readout register n, 0..6 -> configuration register, anything
// else -> 0.
module tb_cleo_readout_mux;
  import cleo_pkg::*;
  logic [23:0] data [12];
  logic [11:0] cfg  [7];
  logic [11:0] rd_ptr;
  logic [23:0] payload;
  int checks = 0, failures = 0;

  cleo_readout_mux dut (.*);

  function automatic logic [23:0] expected(logic [11:0] p);
    if (p >= 12'h010 && p < 12'h01C) return data[p - 12'h010];
    if (p < 12'h007) return {12'h000, cfg[p]};
    return 24'h0;
  endfunction

  initial begin
    for (int r = 0; r < 20; r++) begin
      foreach (data[i]) data[i] = 24'($urandom);
      foreach (cfg[i])  cfg[i]  = 12'($urandom);
      for (int p = 0; p < 64 + 20; p++) begin
        rd_ptr = (p < 64) ? 12'(p) : 12'($urandom);
        #1;
        checks++;
        if (payload !== expected(rd_ptr)) begin
          failures++;
          if (failures < 10) $display("ptr %h: %h expected %h", rd_ptr, payload, expected(rd_ptr));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
