// tb_cleopatra: end-to-end, full-size testbench of the Cleopatra top.
//
// Runs the 12-channel chip at its default parameters (500 MHz clock
// period in the channel models). The input currents span the dynamic
// range: zero, 10 nA .. 1.4 uA (linear region), 2 and 3.5 uA (saturated
// at f_clk/4), and two negative currents on channels configured for
// negative polarity (one of them saturated). Over the serial command link
// the test selects the chip, writes the polarity and capacitor registers,
// takes snapshots with the latch input, and reads every readout register
// through register 6 and the serializer, decoding the 32-bit output words.
//
// Checks: frame header and trailer; the count difference between two
// snapshots against I * window / Q_INJ (+/-2 counts, f_clk/4 at most);
// that a snapshot holds while the counters run; configuration readback;
// that a change of the C_INJ code changes the rates accordingly; that no
// word is produced after deselect. Each mechanism (saturation, down
// counting, capacitor change, configuration readback, snapshot hold,
// select/deselect) is counted and must occur at least once.
module tb_cleopatra;
  import cleo_pkg::*;
  localparam int N = 12;
  localparam real T_PS = 2000.0;

  logic clk = 0, rst_n = 0, din = 0, latch = 0;
  logic signed [39:0] iin_fa [N];
  logic dout, selected;
  logic [11:0] bias_tune [4];
  int checks = 0, failures = 0;

  cleopatra dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  real i_na [N] = '{0.0, 10.0, 50.0, 100.0, 250.0, 500.0, 1000.0, 1400.0,
                    2000.0, 3500.0, -300.0, -3000.0};
  localparam logic [11:0] POL = 12'hC00;   // channels 10, 11 negative

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic send_bit(logic b);
    @(negedge clk) din = b;
    @(posedge clk);
    @(posedge clk);
  endtask
  task automatic send_word(logic [15:0] w);
    for (int i = 15; i >= 0; i--) send_bit(w[i]);
  endtask
  task automatic nops(int n);
    repeat (n) send_word({OP_NOP, 12'h000});
  endtask
  task automatic write_reg(logic [2:0] a, logic [11:0] v);
    send_word({OP_REG_SEL, 9'h0, a});
    send_word({OP_REG_WR, v});
  endtask

  // one-cycle latch pulse, given while a NOP word keeps the link running
  int latch_cyc;
  task automatic snapshot();
    fork
      nops(1);
      begin
        @(negedge clk) latch = 1;
        latch_cyc = cyc;
        @(negedge clk) latch = 0;
      end
    join
  endtask

  // --------------------------------------------------- output word capture
  logic [31:0] words [$];
  logic [31:0] cur;
  int k = -1;
  always @(posedge clk) begin
    if (k < 0) begin
      if (dout) begin cur = 32'h8000_0000; k = 1; end
    end else begin
      if (k % 2 == 0) cur[31 - k / 2] = dout;
      if (k == 63) begin words.push_back(cur); k = -1; end
      else k++;
    end
  end

  // read one register through register 6 and the serializer
  task automatic read_reg(logic [11:0] ptr, output logic [23:0] val);
    int n0;
    logic [31:0] w;
    n0 = words.size();
    write_reg(CFG_RD_PTR, ptr);
    send_word({OP_REG_RD, 12'h000});
    nops(3);   // 64 cycles for the word
    checks++;
    if (words.size() != n0 + 1) begin
      failures++; $display("read %h: %0d words", ptr, words.size() - n0);
      val = '0;
      return;
    end
    w = words[n0];
    checks++;
    if (w[31:28] != OUT_HEADER || w[3:0] != OUT_TRAILER) begin
      failures++; $display("bad frame %h", w);
    end
    val = w[27:4];
  endtask

  // -------------------------------------------------------- mechanisms
  int n_sat = 0, n_down = 0, n_capchg = 0, n_cfgrd = 0, n_hold = 0, n_desel = 0;

  logic [23:0] snap_a [N], snap_b [N], snap_c [N];
  int rate_inj1 [N];

  task automatic read_all(output logic [23:0] s [N]);
    for (int c = 0; c < N; c++) read_reg(12'h010 + 12'(c), s[c]);
  endtask

  // compare count differences of a window with the current model
  task automatic check_window(logic [23:0] a [N], logic [23:0] b [N], int win,
                              int inj, output int diff [N]);
    real q_fc, e;
    for (int c = 0; c < N; c++) begin
      logic [23:0] d;
      d = (POL[c]) ? (a[c] - b[c]) : (b[c] - a[c]);   // down counters run backwards
      diff[c] = int'(d);
      q_fc = 20.0 * inj * 0.6;
      e = (i_na[c] < 0 ? -i_na[c] : i_na[c]) * 1e-9 * win * T_PS * 1e-12 / (q_fc * 1e-15);
      if (e >= win / 4.0) begin e = win / 4.0; n_sat++; end
      if (POL[c] && d != 0) n_down++;
      checks++;
      if (diff[c] > e + 2.0 || diff[c] < e - 2.0) begin
        failures++;
        $display("ch%0d inj=%0d: %0d counts in %0d cycles, expected %0.1f", c, inj, diff[c], win, e);
      end
    end
  endtask

  int lc1, lc2, win, win1;
  int d1 [N], d2 [N];
  logic [23:0] v, v2;
  initial begin
    foreach (iin_fa[c]) iin_fa[c] = 40'(longint'(i_na[c] * 1.0e6));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ------------------------------------------------ select and configure
    repeat (7) send_bit(0);
    send_word(SEL_WORD);
    checks++; if (!selected) begin failures++; $display("not selected"); end
    write_reg(CFG_POLARITY, POL);
    write_reg(CFG_CAP, {6'd0, 3'd1, 3'd7});    // C_INJ 20 fF, C_INT 140 fF
    write_reg(CFG_BIAS2, 12'h3A5);
    nops(10);
    checks++;
    if (bias_tune[2] != 12'h3A5 || bias_tune[0] != 12'h800) begin
      failures++; $display("bias words wrong");
    end
    // configuration readback
    read_reg(12'h000, v);
    checks++; if (v != {12'h0, POL}) begin failures++; $display("reg0 %h", v); end else n_cfgrd++;
    read_reg(12'h001, v);
    checks++; if (v != 24'h00000F) begin failures++; $display("reg1 %h", v); end else n_cfgrd++;
    // ------------------------------------------- window 1, C_INJ = 20 fF
    snapshot(); lc1 = latch_cyc;
    read_all(snap_a);
    // snapshot holds while the counters run
    read_reg(12'h019, v2);
    checks++; if (v2 != snap_a[9]) begin failures++; $display("snapshot moved"); end else n_hold++;
    nops(4);
    snapshot(); lc2 = latch_cyc;
    read_all(snap_b);
    win = lc2 - lc1;
    check_window(snap_a, snap_b, win, 1, d1);
    win1 = win;
    // --------------------------------------- window 2, C_INJ = 40 fF
    write_reg(CFG_CAP, {6'd0, 3'd2, 3'd7});
    nops(8);
    snapshot(); lc1 = latch_cyc;
    read_all(snap_a);
    snapshot(); lc2 = latch_cyc;
    read_all(snap_c);
    win = lc2 - lc1;
    check_window(snap_a, snap_c, win, 2, d2);
    // the rate of a channel in the linear region halves
    checks++;
    begin
      real r1, r2;
      r1 = real'(d1[5]) / real'(win1);
      r2 = real'(d2[5]) / real'(win);
      if (r2 > 0.45 * r1 && r2 < 0.55 * r1) n_capchg++;
      else begin failures++; $display("C_INJ change: rate %f -> %f", r1, r2); end
    end
    // ----------------------------------------------------------- deselect
    send_word({OP_DESEL, 12'h000});
    checks++; if (selected) begin failures++; $display("still selected"); end else n_desel++;
    begin
      int n0;
      n0 = words.size();
      send_word({OP_REG_RD, 12'h000});
      repeat (10) send_word(16'h0000);
      checks++; if (words.size() != n0) begin failures++; $display("word after deselect: %h (%0d)", words[n0], words.size() - n0); end
    end
    // ---------------------------------------------------------- coverage
    $display("mechanisms: saturation=%0d down=%0d cap_change=%0d cfg_read=%0d hold=%0d deselect=%0d",
             n_sat, n_down, n_capchg, n_cfgrd, n_hold, n_desel);
    checks += 6;
    if (n_sat == 0)    failures++;
    if (n_down == 0)   failures++;
    if (n_capchg == 0) failures++;
    if (n_cfgrd == 0)  failures++;
    if (n_hold == 0)   failures++;
    if (n_desel == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
