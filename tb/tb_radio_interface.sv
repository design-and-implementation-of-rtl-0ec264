// tb_radio_interface: an IEEE 1149.1 TAP model (16-state controller, 8-bit
// IR, 16-bit DR) plays the RF module's serial control port; each scan must
// load IR and DR with the requested values, return the DR's previous content
// and leave the TAP in Run-Test/Idle. Also checks the bit timing: one
// tx_tick per rising edge of the RF module's 1 MHz clock, the tx bit on
// rf_txd, RX sampling on the recovered clock, and the RF control pins.
module tb_radio_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rf_clk1m, rf_rxclk, rf_rxd, rf_txd, tx_tick, tx_bit, tx_bit_valid, rx_bit, rx_bit_valid;
  logic [7:0]  ctrl_reg, rf_ctrl, ir;
  logic        go, busy, rf_tck, rf_tms, rf_tdi, rf_tdo;
  logic [15:0] dr, dr_capture;
  radio_interface dut (.*);

  // ---------------- TAP model ----------------
  typedef enum int {RESET, IDLE, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
                    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR} tap_e;
  tap_e        ts = IDLE;
  bit   [7:0]  ir_sh, ir_reg;
  bit   [15:0] dr_sh, dr_reg = 16'hC3A5;
  int          n_upd_ir = 0, n_upd_dr = 0;
  assign rf_tdo = (ts == SH_DR) ? dr_sh[0] : (ts == SH_IR) ? ir_sh[0] : 1'b0;
  always @(posedge rf_tck) begin
    case (ts)
      CAP_DR: dr_sh <= dr_reg;
      SH_DR:  dr_sh <= {rf_tdi, dr_sh[15:1]};
      CAP_IR: ir_sh <= 8'h01;
      SH_IR:  ir_sh <= {rf_tdi, ir_sh[7:1]};
      UPD_DR: begin dr_reg <= dr_sh; n_upd_dr++; end
      UPD_IR: begin ir_reg <= ir_sh; n_upd_ir++; end
      default: ;
    endcase
    case (ts)
      RESET:  ts <= rf_tms ? RESET  : IDLE;
      IDLE:   ts <= rf_tms ? SEL_DR : IDLE;
      SEL_DR: ts <= rf_tms ? SEL_IR : CAP_DR;
      CAP_DR: ts <= rf_tms ? EX1_DR : SH_DR;
      SH_DR:  ts <= rf_tms ? EX1_DR : SH_DR;
      EX1_DR: ts <= rf_tms ? UPD_DR : PAU_DR;
      PAU_DR: ts <= rf_tms ? EX2_DR : PAU_DR;
      EX2_DR: ts <= rf_tms ? UPD_DR : SH_DR;
      UPD_DR: ts <= rf_tms ? SEL_DR : IDLE;
      SEL_IR: ts <= rf_tms ? RESET  : CAP_IR;
      CAP_IR: ts <= rf_tms ? EX1_IR : SH_IR;
      SH_IR:  ts <= rf_tms ? EX1_IR : SH_IR;
      EX1_IR: ts <= rf_tms ? UPD_IR : PAU_IR;
      PAU_IR: ts <= rf_tms ? EX2_IR : PAU_IR;
      EX2_IR: ts <= rf_tms ? UPD_IR : SH_IR;
      UPD_IR: ts <= rf_tms ? SEL_DR : IDLE;
      default: ts <= RESET;
    endcase
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // 1 MHz clock from the RF module
  int n_ticks = 0;
  initial begin
    rf_clk1m = 0;
    forever begin repeat (6) @(posedge clk); rf_clk1m = ~rf_clk1m; end
  end
  always @(posedge clk) if (tx_tick) n_ticks++;

  initial begin
    bit [15:0] old;
    go = 0; ir = 0; dr = 0; ctrl_reg = 0; tx_bit = 0; tx_bit_valid = 0; rf_rxclk = 0; rf_rxd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // serial control scans
    for (int k = 0; k < 4; k++) begin
      old = dr_reg;
      @(negedge clk) begin go = 1; ir = 8'($urandom); dr = 16'($urandom); end
      @(negedge clk) go = 0;
      check(busy, "busy during scan");
      wait (!busy);
      repeat (3) @(negedge clk);
      check(ir_reg == ir, $sformatf("IR %h expected %h", ir_reg, ir));
      check(dr_reg == dr, $sformatf("DR %h expected %h", dr_reg, dr));
      check(dr_capture == old, $sformatf("captured %h expected %h", dr_capture, old));
      check(ts == IDLE, "TAP back in Run-Test/Idle");
      check(n_upd_ir == k + 1 && n_upd_dr == k + 1, "one IR and one DR update per scan");
    end
    // TX bit timing: 50 ticks in 50 us of the 1 MHz clock
    n_ticks = 0;
    repeat (600) @(posedge clk);
    check(n_ticks == 50, $sformatf("%0d tx ticks in 600 cycles", n_ticks));
    for (int i = 0; i < 20; i++) begin
      bit b;
      b = 1'($urandom);
      @(posedge clk iff tx_tick);
      @(negedge clk) begin tx_bit = b; tx_bit_valid = 1; end
      @(negedge clk) tx_bit_valid = 0;
      check(rf_txd == b, "tx bit on rf_txd");
    end
    // RX sampling on the recovered clock
    for (int i = 0; i < 20; i++) begin
      bit b;
      int got;
      b = 1'($urandom);
      rf_rxd = b;
      repeat (3) @(negedge clk);
      rf_rxclk = 1;
      got = -1;
      for (int j = 0; j < 6; j++) begin
        @(negedge clk);
        if (rx_bit_valid) got = int'(rx_bit);
      end
      rf_rxclk = 0; rf_rxd = ~b;
      repeat (4) @(negedge clk);
      check(got == int'(b), $sformatf("rx bit %0d got %0d", b, got));
    end
    ctrl_reg = 8'hA6;
    repeat (2) @(negedge clk);
    check(rf_ctrl == 8'hA6, "RF control pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
