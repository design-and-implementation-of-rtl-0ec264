// tb_link_controller: two link controllers talking to each other over the
// RF pins.
//
// Device A's rf_txd drives device B's rf_rxd and the other way round. Both
// get the same 1 MHz RF clock, and the receive clock is its inverse, so each
// bit is sampled in the middle. A single-bit error can be forced on the
// A-to-B link. Firmware actions go through each device's register bus.
// Checks:
//  - payloads arrive intact with whitening and encryption on, for DM1
//    (FEC 2/3), DH1 (no FEC) and HV1 (FEC 1/3)
//  - header fields and length registers
//  - interrupt flags and the irq pin
//  - a corrupted payload is flagged
//  - a packet for another LT_ADDR is dropped
//  - RX buffer overflow is flagged
//  - TX underrun is flagged
//  - hardware ARQN/SEQN handling and the slot-aligned TX start
//  - phase lock on the received sync word
//  - a JTAG scan through a TDI-to-TDO loopback
//  - RF control pins
//  - CLK = CLKN + offset through the registers
module tb_link_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] addr [2], wdata [2], rdata [2];
  logic       wr [2], rd [2], irq [2];
  logic       rf_clk1m = 0, flip = 0;
  logic       txd [2], tck [2], tms [2], tdi [2];
  logic [7:0] rf_ctrl [2];
  logic [27:0] clkn [2];
  logic [6:0]  chan [2];
  logic [7:0]  sco_rx_data [2];
  logic        sco_tx_ready [2], sco_rx_valid [2];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : dev
    link_controller u_lc (
      .clk, .rst_n, .cs(1'b1), .addr(addr[g]), .wdata(wdata[g]), .wr(wr[g]), .rd(rd[g]),
      .rdata(rdata[g]), .irq(irq[g]),
      .rf_clk1m, .rf_rxclk(~rf_clk1m), .rf_rxd(g == 1 ? (txd[0] ^ flip) : txd[1]),
      .rf_txd(txd[g]), .rf_ctrl(rf_ctrl[g]), .rf_tck(tck[g]), .rf_tms(tms[g]),
      .rf_tdi(tdi[g]), .rf_tdo(tdi[g]),
      .sco_tx_data(8'h00), .sco_tx_valid(1'b0), .sco_tx_ready(sco_tx_ready[g]),
      .sco_rx_data(sco_rx_data[g]), .sco_rx_valid(sco_rx_valid[g]), .sco_rx_rd(1'b0),
      .clkn_out(clkn[g]), .channel_out(chan[g]));
  end

  initial forever begin repeat (6) @(posedge clk); rf_clk1m = ~rf_clk1m; end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bw(input int d, input logic [7:0] a, input logic [7:0] v);
    @(negedge clk) begin addr[d] = a; wdata[d] = v; wr[d] = 1; end
    @(negedge clk) wr[d] = 0;
  endtask

  task automatic br(input int d, input logic [7:0] a, output logic [7:0] v);
    @(negedge clk) begin addr[d] = a; rd[d] = 1; end
    #1 v = rdata[d];
    @(negedge clk) rd[d] = 0;
  endtask

  // wait for an IRQ flag, then clear it
  task automatic wait_irq(input int d, input int bitn, input string what);
    logic [7:0] v;
    int n = 0;
    do begin br(d, 8'h03, v); n++; end while (!v[bitn] && n < 20000);
    check(v[bitn] == 1'b1, $sformatf("device %0d: %s", d, what));
    bw(d, 8'h03, 8'(1 << bitn));
  endtask

  logic [127:0] e0_state;

  task automatic load_e0();
    for (int d = 0; d < 2; d++) begin
      for (int i = 0; i < 16; i++) bw(d, 8'(8'h30 + i), e0_state[8*i +: 8]);
      bw(d, 8'h01, 8'h08);
    end
  endtask

  // send one packet from A to B; returns B's STAT and the received bytes
  task automatic send(input int ptype, input int lt, input int len, input logic [7:0] arqn_seqn,
                      input bit rx_on, input int nbytes, output logic [7:0] stat);
    logic [7:0] v;
    load_e0();
    bw(1, 8'h03, 8'hFF);
    bw(0, 8'h03, 8'hFF);
    if (rx_on) bw(1, 8'h01, 8'h02);
    bw(0, 8'h01, 8'h10);
    for (int i = 0; i < nbytes; i++) bw(0, 8'h12, 8'(i * 7 + ptype));
    bw(0, 8'h09, 8'((ptype << 3) | lt));
    bw(0, 8'h0A, 8'h18 | arqn_seqn);
    bw(0, 8'h0B, 8'(len));
    // start right after a clock tick, so both ends latch the same whitening seed
    @(posedge clk iff dev[0].u_lc.clkn_tick);
    bw(0, 8'h01, 8'h01);
    wait_irq(0, 0, "tx_done");
    if (rx_on) begin
      wait_irq(1, 3, "rx_done");
    end
    br(1, 8'h02, stat);
  endtask

  initial begin
    logic [7:0] v, stat, lo, hi;
    int n;
    for (int d = 0; d < 2; d++) begin addr[d] = 0; wdata[d] = 0; wr[d] = 0; rd[d] = 0; end
    e0_state = {$urandom, $urandom, $urandom, $urandom};
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      bw(d, 8'h05, 8'h33); bw(d, 8'h06, 8'h8B); bw(d, 8'h07, 8'h9E); bw(d, 8'h08, 8'h47);
      bw(d, 8'h00, 8'h03);          // whitening and encryption on
      bw(d, 8'h04, 8'hBF);          // all IRQs except the slot tick
    end

    // 1) DM1, 17 bytes, FEC 2/3, whitened and encrypted
    send(3, 1, 17, 0, 1, 17, stat);
    check(stat[2] && stat[3] && stat[4], $sformatf("DM1 HEC/addr/CRC ok, STAT %h", stat));
    br(1, 8'h0D, v); check(v == 8'((3 << 3) | 1), $sformatf("RX_HDR0 %h", v));
    br(1, 8'h0F, v); check(v == 17, $sformatf("RX_LEN %0d", v));
    br(1, 8'h15, v); check(v == 17, $sformatf("RX level %0d", v));
    for (int i = 0; i < 17; i++) begin
      br(1, 8'h13, v); check(v == 8'(i * 7 + 3), $sformatf("DM1 byte %0d = %h", i, v));
    end
    check(irq[1] == 1'b1, "irq pin high with flags pending");
    bw(1, 8'h03, 8'hFF);
    check(irq[1] == 1'b0, "irq pin low after clearing");

    // 2) HV1, 10 bytes, FEC 1/3, no payload header or CRC
    send(5, 1, 10, 0, 1, 10, stat);
    check(stat[2] && stat[3], $sformatf("HV1 header ok, STAT %h", stat));
    for (int i = 0; i < 10; i++) begin
      br(1, 8'h13, v); check(v == 8'(i * 7 + 5), $sformatf("HV1 byte %0d = %h", i, v));
    end

    // 3) DH1 with one payload bit inverted on the link: CRC error
    fork
      send(4, 1, 20, 0, 1, 20, stat);
      begin
        @(posedge dev[0].u_lc.tx_start);
        repeat (190) @(posedge rf_clk1m);
        flip = 1;
        @(posedge rf_clk1m) flip = 0;
      end
    join
    check(stat[2] && !stat[4], $sformatf("corrupted DH1: HEC ok, CRC bad, STAT %h", stat));
    br(1, 8'h03, v); check(v[4], "rx_error IRQ");
    bw(1, 8'h01, 8'h20);

    // 4) DH1 for another LT_ADDR: dropped
    send(4, 2, 5, 0, 1, 5, stat);
    check(stat[2] && !stat[3], $sformatf("foreign LT_ADDR: STAT %h", stat));
    br(1, 8'h15, v); check(v == 0, "nothing stored for foreign LT_ADDR");

    // 5) three 27-byte DH1 without reading: RX buffer overflow
    for (int k = 0; k < 3; k++) send(4, 1, 27, 0, 1, 27, stat);
    br(1, 8'h03, v); check(v[7], "RX buffer overflow IRQ");
    br(1, 8'h15, v); check(v == 64, $sformatf("RX buffer full %0d", v));
    bw(1, 8'h01, 8'h20);

    // 6) TX underrun: 10 bytes announced, 4 in the buffer
    send(4, 1, 10, 0, 0, 4, stat);
    br(0, 8'h02, v); check(v[5], "TX underrun flag");

    // 7) hardware mode: ARQ bits, slot-aligned start, phase lock
    bw(0, 8'h00, 8'h07);
    bw(1, 8'h00, 8'h0F);
    bw(1, 8'h0A, 8'h18);            // B: arqn 0, seqn 0
    load_e0();
    bw(1, 8'h01, 8'h02);
    for (int i = 0; i < 5; i++) bw(0, 8'h12, 8'(i));
    bw(0, 8'h09, 8'((3 << 3) | 1)); bw(0, 8'h0A, 8'h1A); bw(0, 8'h0B, 8'd5);  // arqn 1
    bw(0, 8'h01, 8'h01);
    @(posedge dev[0].u_lc.tx_start);
    check(dev[0].u_lc.clk_bt[1:0] == 2'b11, "hw mode starts TX at an even slot boundary");
    wait_irq(1, 3, "rx_done in hw mode");
    br(1, 8'h0A, v);
    check(v[1:0] == 2'b11, $sformatf("hw ARQ: ARQN set and SEQN toggled, TX_HDR1 %h", v));
    br(1, 8'h40, lo); br(1, 8'h41, hi);
    n = {hi[3:0], lo};
    check(n > 0 && n < 120, $sformatf("phase lag %0d cycles after the sync word", n));
    bw(1, 8'h01, 8'h20);

    // 8) JTAG scan through a TDI->TDO loopback, RF control pins
    bw(0, 8'h28, 8'hC5); bw(0, 8'h29, 8'h5A); bw(0, 8'h2A, 8'h34); bw(0, 8'h2B, 8'h12);
    bw(0, 8'h01, 8'h40);
    wait_irq(0, 5, "rf_done");
    br(0, 8'h2C, lo); br(0, 8'h2D, hi);
    check({hi, lo} == 16'h1234, $sformatf("DR loopback %h", {hi, lo}));
    check(rf_ctrl[0] == 8'hC5, "RF control pins");

    // 9) clock registers: CLK = CLKN + offset
    bw(0, 8'h00, 8'h00);
    bw(0, 8'h20, 8'h00); bw(0, 8'h21, 8'h01); bw(0, 8'h22, 8'h00); bw(0, 8'h23, 8'h00);
    begin
      logic [7:0] c [8];
      logic [19:0] kn, kb;
      @(posedge clk iff dev[0].u_lc.clkn_tick);
      for (int i = 0; i < 4; i++) br(0, 8'(8'h18 + i), c[i]);
      for (int i = 0; i < 4; i++) br(0, 8'(8'h1C + i), c[4 + i]);
      kn = {c[3][3:0], c[2], c[1]};
      kb = {c[7][3:0], c[6], c[5]};
      check(kb == 20'(kn + 1), $sformatf("CLK[27:8] %h = CLKN[27:8] %h + 1", kb, kn));
      check(c[4] == c[0], "CLK[7:0] = CLKN[7:0] with offset 0x100");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
