// tb_cleo_serializer: self-checking testbench of the output serializer.
//
// Loads random payloads and samples dout every second cycle from the
// cycle after the load, checking the 32-bit word {0xA, data, 0x5}, that
// the link is busy for exactly 64 cycles, that dout is 0 when idle, and
// that a load during a word is ignored.
module tb_cleo_serializer;
  logic clk = 0, rst_n = 0, load = 0;
  logic [23:0] data = 0;
  logic dout, busy;
  int checks = 0, failures = 0;

  cleo_serializer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(logic [23:0] d, bit poke);
    logic [31:0] got, exp_w;
    int busy_cycles;
    exp_w = {4'hA, d, 4'h5};
    @(negedge clk) data = d; load = 1;
    @(negedge clk) load = 0; data = ~d;
    busy_cycles = 0;
    for (int i = 31; i >= 0; i--) begin
      got[i] = dout;
      if (busy) busy_cycles++;
      @(negedge clk);
      checks++;
      if (dout !== got[i]) failures++;         // bit held two cycles
      if (busy) busy_cycles++;
      if (poke && i == 20) load = 1;            // load while busy: ignored
      @(negedge clk);
      load = 0;
    end
    checks += 3;
    if (got !== exp_w) begin failures++; $display("word %h expected %h", got, exp_w); end
    if (busy_cycles != 64) begin failures++; $display("busy %0d cycles", busy_cycles); end
    if (busy || dout) begin failures++; $display("not idle after word"); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    checks++; if (dout !== 0) failures++;
    send_and_check(24'h000000, 0);
    send_and_check(24'hFFFFFF, 0);
    send_and_check(24'h123456, 1);
    repeat (30) send_and_check(24'($urandom), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
