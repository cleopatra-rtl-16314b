// tb_cleo_pulse_gen: self-checking testbench of the channel pulse generator.
//
// Drives the comparator input with random values and with long high runs,
// and the polarity with random values. A reference written as a cycle
// counter (0 = idle, 1..3 = cycles since the start of a sequence) predicts
// V_PULSE, V_GATE and the count strobes every cycle. It also checks the
// rate limit: with the comparator held high the strobes come exactly every
// 4 cycles.
module tb_cleo_pulse_gen;
  logic clk = 0, rst_n = 0, cmp = 0, polarity = 0;
  logic v_pulse, v_gate, cnt_up, cnt_dn;
  int checks = 0, failures = 0;

  cleo_pulse_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference
  int k = 0;          // position in a sequence
  logic pol_ref = 0;
  always @(posedge clk) begin
    if (!rst_n) begin k <= 0; pol_ref <= 0; end
    else if (k == 0) begin
      pol_ref <= polarity;
      if (cmp) k <= 1;
    end else k <= (k + 1) % 4;
  end

  task automatic check_outputs();
    logic pol_e, pulse_e, gate_e;
    pol_e   = (k == 0) ? polarity : pol_ref;
    pulse_e = (k == 1) || (k == 2);
    gate_e  = (k <= 1) ? !pol_e : pol_e;
    checks++;
    if (v_pulse !== pulse_e || v_gate !== gate_e ||
        cnt_up !== (k == 1 && !pol_ref) || cnt_dn !== (k == 1 && pol_ref)) begin
      failures++;
      if (failures < 10)
        $display("mismatch k=%0d pol=%0b: pulse %0b/%0b gate %0b/%0b up %0b dn %0b",
                 k, pol_e, v_pulse, pulse_e, v_gate, gate_e, cnt_up, cnt_dn);
    end
  endtask

  int last_strobe, gaps_bad, strobes;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // random stimulus
    repeat (3000) begin
      @(negedge clk);
      check_outputs();
      cmp = ($urandom_range(0, 3) == 0);
      polarity = ($urandom_range(0, 15) == 0) ? !polarity : polarity;
    end
    // saturation: comparator held high, strobe period must be 4
    for (int p = 0; p < 2; p++) begin
      @(negedge clk); cmp = 0; polarity = p[0];
      repeat (6) @(negedge clk);
      cmp = 1; last_strobe = -1; gaps_bad = 0; strobes = 0;
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        check_outputs();
        if (cnt_up || cnt_dn) begin
          if (last_strobe >= 0 && t - last_strobe != 4) gaps_bad++;
          last_strobe = t; strobes++;
          checks++;
          if ((p == 0) != cnt_up) failures++;
        end
      end
      checks++;
      if (gaps_bad != 0 || strobes != 100) begin
        failures++;
        $display("saturation p=%0d: %0d strobes, %0d bad gaps", p, strobes, gaps_bad);
      end
    end
    // latency: first strobe one cycle after the comparator goes high
    @(negedge clk) cmp = 0;
    repeat (8) @(negedge clk);
    cmp = 1;
    @(negedge clk) cmp = 0;
    checks++;
    if (!(cnt_up || cnt_dn)) begin failures++; $display("latency wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
