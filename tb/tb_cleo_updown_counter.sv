// tb_cleo_updown_counter: self-checking testbench of the up/down counter.
//
// Random up/down strobes (including both at once) against an integer
// reference kept modulo 2^24; checks wrap-around below zero and the reset.
module tb_cleo_updown_counter;
  logic clk = 0, rst_n = 0, up = 0, dn = 0;
  logic [23:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;

  cleo_updown_counter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic u, logic d);
    up = u; dn = d;
    @(negedge clk);
    if (u && !d) ref_cnt = (ref_cnt + 1) & 32'hFF_FFFF;
    if (d && !u) ref_cnt = (ref_cnt - 1) & 32'hFF_FFFF;
    checks++;
    if (count !== ref_cnt[23:0]) begin
      failures++;
      if (failures < 10) $display("count %h expected %h", count, ref_cnt[23:0]);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    checks++; if (count !== 0) failures++;
    step(0, 1);                            // wrap below zero
    checks++; if (count !== 24'hFF_FFFF) failures++;
    step(1, 0);
    repeat (20000) step($urandom_range(0, 1), $urandom_range(0, 2) == 0);
    repeat (100) step(0, 1);
    rst_n = 0; @(negedge clk); ref_cnt = 0;
    checks++; if (count !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
