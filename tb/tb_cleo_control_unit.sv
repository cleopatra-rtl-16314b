// tb_cleo_control_unit: self-checking testbench of the serial command
// receiver and decoder.
//
// Sends a bit stream at half the clock rate (each bit held two cycles,
// sampled on every second edge after reset). Checks that: commands before
// chip select are ignored, a select word found after an odd number of
// idle bits frames the following words, REG_SEL/REG_WR produce a write of
// the right field to the right address exactly one cycle after the word's
// last bit is sampled, REG_RD produces one read request, NOP produces
// nothing, random select/write pairs reach the right register, and after
// DESEL further words are ignored.
module tb_cleo_control_unit;
  import cleo_pkg::*;
  logic clk = 0, rst_n = 0, din = 0;
  logic cfg_we, rd_req, selected;
  logic [2:0] cfg_addr;
  logic [11:0] cfg_wdata;
  int checks = 0, failures = 0;

  cleo_control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event log: every write / read strobe with the cycle it happened in
  int cyc = 0;
  int n_we = 0, n_rd = 0;
  int last_we_cyc, last_rd_cyc;
  logic [2:0] last_addr;
  logic [11:0] last_data;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cfg_we) begin n_we <= n_we + 1; last_we_cyc <= cyc; last_addr <= cfg_addr; last_data <= cfg_wdata; end
    if (rd_req) begin n_rd <= n_rd + 1; last_rd_cyc <= cyc; end
  end

  int last_bit_cyc;   // cycle count at the edge that sampled the last bit
  task automatic send_bit(logic b);
    @(negedge clk) din = b;
    @(posedge clk);
    @(posedge clk);
    #1 last_bit_cyc = cyc;
  endtask

  task automatic send_word(logic [15:0] w);
    for (int i = 15; i >= 0; i--) send_bit(w[i]);
  endtask

  // The link is continuous: waiting would add bits, so checks are made
  // while the next word (a NOP) is being sent.
  task automatic expect_counts(int we_e, int rd_e, string what);
    send_word({OP_NOP, 12'h000});
    checks++;
    if (n_we != we_e || n_rd != rd_e) begin
      failures++;
      $display("%s: %0d writes %0d reads, expected %0d %0d", what, n_we, n_rd, we_e, rd_e);
    end
  endtask

  int t_wr, t_rd;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // not selected: these do nothing
    send_word({OP_REG_WR, 12'h123});
    send_word({OP_REG_RD, 12'h000});
    expect_counts(0, 0, "before select");
    checks++; if (selected) failures++;
    // odd number of idle bits, then select
    repeat (5) send_bit(0);
    send_word(SEL_WORD);
    checks++; if (!selected) begin failures++; $display("not selected"); end
    // select register 5, write 0xABC
    send_word({OP_REG_SEL, 12'h005});
    send_word({OP_REG_WR, 12'hABC});
    t_wr = last_bit_cyc;
    expect_counts(1, 0, "write");
    checks += 2;
    if (last_addr != 3'd5 || last_data != 12'hABC) begin
      failures++; $display("write %0d/%h", last_addr, last_data);
    end
    // each bit is sampled on the first edge of its two-cycle hold and the
    // strobe is high in the cycle after that edge, i.e. it is seen at the
    // second edge of the last bit's hold
    if (last_we_cyc != t_wr - 1) begin
      failures++; $display("write latency: strobe at %0d, last bit at %0d", last_we_cyc, t_wr);
    end
    send_word({OP_NOP, 12'hFFF});
    expect_counts(1, 0, "nop");
    send_word({OP_REG_RD, 12'h000});
    t_rd = last_bit_cyc;
    expect_counts(1, 1, "read");
    checks++; if (last_rd_cyc != t_rd - 1) begin failures++; $display("read latency"); end
    send_word({OP_REG_SEL, 12'h000});
    send_word({OP_REG_WR, 12'h7E5});
    expect_counts(2, 1, "second write");
    checks++; if (last_addr != 3'd0 || last_data != 12'h7E5) failures++;
    // random register selects and writes
    for (int r = 0; r < 40; r++) begin
      logic [11:0] a, d;
      int nw;
      a = 12'($urandom_range(0, 7));
      d = 12'($urandom);
      nw = n_we;
      send_word({OP_REG_SEL, a});
      send_word({OP_REG_WR, d});
      send_word({OP_NOP, 12'($urandom)});
      checks++;
      if (n_we != nw + 1 || last_addr != a[2:0] || last_data != d) begin
        failures++;
        if (failures < 10) $display("random write %h/%h: got %0d/%h", a, d, last_addr, last_data);
      end
    end
    send_word({OP_DESEL, 12'h000});
    checks++; if (selected) begin failures++; $display("still selected"); end
    send_word({OP_REG_WR, 12'h111});
    send_word({OP_REG_RD, 12'h111});
    expect_counts(42, 1, "after deselect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
