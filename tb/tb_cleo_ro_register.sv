// tb_cleo_ro_register: self-checking testbench of the readout register.
//
// Random data with sparse latch strobes; the register must show the value
// present in the latch cycle and hold it until the next latch.
module tb_cleo_ro_register;
  logic clk = 0, rst_n = 0, latch = 0;
  logic [23:0] d = 0, q;
  logic [23:0] ref_q = 0;
  int checks = 0, failures = 0, latches = 0;

  cleo_ro_register dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    repeat (5000) begin
      d = 24'($urandom);
      latch = ($urandom_range(0, 9) == 0);
      @(negedge clk);
      if (latch) begin ref_q = d; latches++; end
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("q %h expected %h", q, ref_q);
      end
    end
    checks++; if (latches < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
