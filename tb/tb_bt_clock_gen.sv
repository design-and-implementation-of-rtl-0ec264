// tb_bt_clock_gen: checks the 3.2 kHz native clock (one CLKN step every
// 3750 cycles of the 12 MHz clock), CLKE = CLKN + offset after a direct
// offset write and after loading a master clock value, and phase control:
// after a packet detection, CLK must step 3750 - 816 cycles after the
// detection (the slot started 68 us before the end of the sync word) and
// lag CLKE by at most one.
module tb_bt_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        offset_wr, master_load, phase_lock_en, pkt_detect, clkn_tick, clk_tick;
  logic [27:0] offset_in, master_clk, clkn, clke, clk_bt, offset;
  logic [11:0] phase;
  bt_clock_gen dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int t0, t1;
    logic [27:0] n0;
    offset_wr = 0; master_load = 0; phase_lock_en = 0; pkt_detect = 0; offset_in = 0; master_clk = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // CLKN rate
    @(posedge clkn_tick); t0 = cyc; n0 = clkn;
    for (int i = 0; i < 5; i++) begin
      @(posedge clkn_tick); t1 = cyc;
      check(t1 - t0 == 3750, $sformatf("CLKN period %0d", t1 - t0));
      t0 = t1;
    end
    @(negedge clk);
    check(clkn == n0 + 5, "CLKN count");
    // offset
    @(negedge clk) begin offset_wr = 1; offset_in = 28'h0ABCDEF; end
    @(negedge clk) offset_wr = 0;
    repeat (2) @(negedge clk);
    check(clke == clkn + 28'h0ABCDEF, "CLKE = CLKN + offset");
    // master clock value
    @(negedge clk) begin master_load = 1; master_clk = 28'hFFFFFF0; end
    @(negedge clk) master_load = 0;
    repeat (2) @(negedge clk);
    check(clke == 28'hFFFFFF0, $sformatf("CLKE %h after master load", clke));
    // rollover of the 28-bit clock
    repeat (20) @(posedge clkn_tick);
    repeat (3) @(negedge clk);
    check(clke == 28'h0000004, $sformatf("CLKE rollover %h", clke));
    // phase control
    repeat (1234) @(negedge clk);
    phase_lock_en = 1;
    pkt_detect = 1; t0 = cyc;
    @(negedge clk) pkt_detect = 0;
    @(posedge clk_tick); t1 = cyc;
    check(t1 - t0 == 3750 - 816 + 1, $sformatf("CLK step %0d cycles after detection", t1 - t0));
    begin
      logic [27:0] prev_bt;
      prev_bt = clk_bt;
      for (int i = 0; i < 8000; i++) begin
        @(negedge clk);
        check(clk_bt == clke || clk_bt == clke - 1, "CLK lags CLKE by at most one");
        if (i > 0) check((clk_bt != prev_bt) == clk_tick, $sformatf("CLK advances exactly with clk_tick (cycle %0d)", i));
        prev_bt = clk_bt;
      end
    end
    @(posedge clk_tick); t0 = cyc;
    @(posedge clk_tick); t1 = cyc;
    check(t1 - t0 == 3750, "CLK period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
