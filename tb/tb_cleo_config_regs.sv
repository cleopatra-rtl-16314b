// tb_cleo_config_regs: self-checking testbench of the configuration
// registers.
//
// Checks the reset values, then random writes (addresses 0..7, 7 must be
// ignored) against a reference array, and the decoded fields.
module tb_cleo_config_regs;
  import cleo_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] addr = 0;
  logic [11:0] wdata = 0;
  logic [11:0] regs [7];
  logic [11:0] polarity;
  logic [2:0] cint_code, cinj_code;
  logic [11:0] bias [4];
  logic [11:0] rd_ptr;
  logic [11:0] ref_r [7] = '{12'h000, 12'h00F, 12'h800, 12'h800, 12'h800, 12'h800, 12'h000};
  int checks = 0, failures = 0;

  cleo_config_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int a = 0; a < 7; a++) begin
      checks++;
      if (regs[a] !== ref_r[a]) begin
        failures++;
        if (failures < 10) $display("reg %0d = %h expected %h", a, regs[a], ref_r[a]);
      end
    end
    checks++;
    if (polarity !== ref_r[0] || cint_code !== ref_r[1][2:0] || cinj_code !== ref_r[1][5:3] ||
        bias[0] !== ref_r[2] || bias[3] !== ref_r[5] || rd_ptr !== ref_r[6]) begin
      failures++;
      $display("decoded fields wrong");
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    compare();
    repeat (3000) begin
      we = ($urandom_range(0, 2) == 0);
      addr = 3'($urandom);
      wdata = 12'($urandom);
      @(negedge clk);
      if (we && addr < 7) ref_r[addr] = wdata;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
