// tb_bt_baseband_top: two complete baseband modules ("boards" A and B)
// linked over their RF pins, at the default parameters.
//
// Scenario:
//  - A host PC sends a 132-byte file to board A over the UART as six HCI
//    ACL data packets of 17 and 27 bytes.
//  - The firmware (this testbench, acting as each board's microcontroller)
//    moves the payload into A's link controller. A sends it to B, alternating
//    DM1 packets (encrypted) and DH1 packets (whitening only).
//  - B hands each payload back to its host as an HCI ACL packet over B's
//    UART. B's host checks the bytes.
//  - A DH1 packet is hit by a bit error on the air. B's CRC check catches
//    it, and the firmware retransmits.
//  - Both boards switch to hardware baseband control and to direct SCO
//    mode. Voice samples from A's PCM chip are A-law coded, sent in HV1
//    packets at slot boundaries, decoded by B and played on B's PCM chip
//    without the processor.
//  - Further checks:
//    - mu-law and CVSD coding
//    - RX buffer overflow
//    - a JTAG scan of the RF module
//    - phase lock to the received sync word
//    - hop channel changes
//    - USB bus reset
//    - the interrupt lines
// Each mechanism is counted. One that never happened counts as a failure.
module tb_bt_baseband_top;
  logic clk = 0, usb_clk = 0, rst_n = 0;
  always #20 clk = ~clk;         // 12 MHz system clock (period scaled)
  initial begin #2; forever #5 usb_clk = ~usb_clk; end   // 48 MHz USB clock

  int checks = 0, failures = 0;

  logic [9:0]  bus_addr [2];
  logic [7:0]  bus_wdata [2], bus_rdata [2];
  logic        bus_wr [2], bus_rd [2];
  logic [3:0]  irq [2];
  logic        rf_clk1m = 0, flip = 0;
  logic        rf_txd [2], rf_tck [2], rf_tms [2], rf_tdi [2];
  logic [7:0]  rf_ctrl [2];
  logic        uart_txd [2], uart_rxd [2], uart_rts_n [2], uart_dtr_n [2];
  logic        usb_dp_o [2], usb_dm_o [2], usb_oe [2], usb_pullup [2];
  logic        host_dp = 1, host_dm = 0;
  logic        pcm_clk [2], pcm_sync [2], pcm_dout [2], pcm_din [2];
  logic [27:0] clkn [2];
  logic [6:0]  channel [2];

  for (genvar g = 0; g < 2; g++) begin : board
    bt_baseband_top u_top (
      .clk, .rst_n,
      .bus_addr(bus_addr[g]), .bus_wdata(bus_wdata[g]), .bus_wr(bus_wr[g]), .bus_rd(bus_rd[g]),
      .bus_rdata(bus_rdata[g]), .irq(irq[g]),
      .rf_clk1m, .rf_rxclk(~rf_clk1m), .rf_rxd(g == 1 ? (rf_txd[0] ^ flip) : rf_txd[1]),
      .rf_txd(rf_txd[g]), .rf_ctrl(rf_ctrl[g]), .rf_tck(rf_tck[g]), .rf_tms(rf_tms[g]),
      .rf_tdi(rf_tdi[g]), .rf_tdo(rf_tdi[g]),
      .uart_txd(uart_txd[g]), .uart_rxd(uart_rxd[g]), .uart_rts_n(uart_rts_n[g]),
      .uart_dtr_n(uart_dtr_n[g]), .uart_cts_n(1'b0), .uart_dsr_n(1'b0),
      .usb_clk, .usb_dp_i(host_dp), .usb_dm_i(host_dm), .usb_dp_o(usb_dp_o[g]),
      .usb_dm_o(usb_dm_o[g]), .usb_oe(usb_oe[g]), .usb_pullup(usb_pullup[g]),
      .pcm_clk(pcm_clk[g]), .pcm_sync(pcm_sync[g]), .pcm_dout(pcm_dout[g]), .pcm_din(pcm_din[g]),
      .clkn(clkn[g]), .channel(channel[g]));
  end

  // 1 MHz RF clock
  initial forever begin repeat (6) @(posedge clk); rf_clk1m = ~rf_clk1m; end

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_HCI_DECODE, M_WHITEN, M_ENCRYPT, M_FEC23, M_FEC13, M_NOFEC, M_CRC_FAIL, M_RETRANSMIT,
    M_SW_MODE, M_HW_MODE, M_HW_ARQ, M_SCO_DIRECT, M_ALAW, M_ULAW, M_CVSD, M_RXBUF_OVF,
    M_JTAG, M_PHASE_LOCK, M_HOP, M_USB, M_IRQ_LC, M_IRQ_UART, M_IRQ_CODEC, M_N
  } mech_e;
  int mech [M_N];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- microcontroller bus of each board ----------------
  localparam logic [9:0] LC = 10'h000, UART = 10'h100, USB = 10'h200, CODEC = 10'h300;

  task automatic bw(input int d, input logic [9:0] a, input logic [7:0] v);
    @(negedge clk) begin bus_addr[d] = a; bus_wdata[d] = v; bus_wr[d] = 1; end
    @(negedge clk) bus_wr[d] = 0;
  endtask
  task automatic br(input int d, input logic [9:0] a, output logic [7:0] v);
    @(negedge clk) begin bus_addr[d] = a; bus_rd[d] = 1; end
    #1 v = bus_rdata[d];
    @(negedge clk) bus_rd[d] = 0;
  endtask
  task automatic wait_lc_irq(input int d, input int bitn, input string what);
    logic [7:0] v;
    int n = 0;
    do begin br(d, LC + 3, v); n++; end while (!v[bitn] && n < 30000);
    check(v[bitn], $sformatf("board %0d: %s", d, what));
    bw(d, LC + 3, 8'(1 << bitn));
  endtask

  // ---------------- UART hosts (115.2 kbit/s, 8N1) ----------------
  localparam int BITC = 104;
  bit [7:0] hostb_rx[$];
  task automatic host_send(input bit [7:0] b);
    uart_rxd[0] = 0; repeat (BITC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd[0] = b[i]; repeat (BITC) @(posedge clk); end
    uart_rxd[0] = 1; repeat (BITC + 20) @(posedge clk);
  endtask
  initial begin
    bit [7:0] b;
    forever begin
      @(negedge uart_txd[1]);
      repeat (BITC / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BITC) @(posedge clk); b[i] = uart_txd[1]; end
      repeat (BITC) @(posedge clk);
      check(uart_txd[1] == 1'b1, "host B: stop bit");
      hostb_rx.push_back(b);
    end
  end

  // ---------------- PCM chips: A's supplies samples, B's records ----------------
  int  a_samples[$], b_played[$];
  bit [15:0] a_cur, b_cur;
  int  a_idx, b_idx, b_frames = 0;
  always @(posedge pcm_clk[0]) begin
    if (pcm_sync[0]) begin a_cur = a_samples.size() ? 16'(a_samples.pop_front()) : 16'd0; a_idx = 0; end
    pcm_din[0] = a_cur[15 - a_idx];
  end
  always @(negedge pcm_clk[0]) a_idx++;
  always @(posedge pcm_clk[1]) if (pcm_sync[1]) begin
    if (b_frames > 0) b_played.push_back(int'($signed(b_cur)));
    b_frames++; b_idx = 0;
  end
  always @(negedge pcm_clk[1]) begin b_cur[15 - b_idx] = pcm_dout[1]; b_idx++; end
  assign pcm_din[1] = 1'b0;

  function automatic int dec_a(bit [7:0] c);
    bit [7:0] v;
    int seg, q, mid;
    v = c ^ 8'h55; seg = v[6:4]; q = v[3:0];
    if (seg == 0)      mid = 2 * q + 1;
    else if (seg == 1) mid = 33 + 2 * q;
    else               mid = ((16 + q) << seg) + (1 << (seg - 1));
    return v[7] ? 8 * mid : -8 * mid;
  endfunction
  function automatic int step_a(int x);
    int m;
    m = (x < 0 ? -x : x) / 8;
    for (int k = 7; k >= 1; k--) if (m >= (16 << k)) return 8 << k;
    return 16;
  endfunction
  function automatic int dec_u(bit [7:0] c);
    bit [7:0] v;
    int seg, q, mid;
    v = ~c; seg = v[6:4]; q = v[3:0];
    mid = ((33 + 2 * q) << seg) - 33;
    return v[7] ? -4 * mid : 4 * mid;
  endfunction

  // ---------------- background monitors ----------------
  logic [6:0] last_ch = 0;
  logic [3:0] last_irq [2];
  always @(posedge clk) if (rst_n) begin
    if (channel[0] != last_ch) mech[M_HOP]++;
    last_ch <= channel[0];
    for (int d = 0; d < 2; d++) begin
      if (irq[d][0] && !last_irq[d][0]) mech[M_IRQ_LC]++;
      if (irq[d][1] && !last_irq[d][1]) mech[M_IRQ_UART]++;
      if (irq[d][3] && !last_irq[d][3]) mech[M_IRQ_CODEC]++;
      last_irq[d] <= irq[d];
    end
  end

  // ---------------- packet helpers ----------------
  logic [127:0] e0_state;
  task automatic load_e0();
    for (int d = 0; d < 2; d++) begin
      for (int i = 0; i < 16; i++) bw(d, LC + 10'(8'h30 + i), e0_state[8*i +: 8]);
      bw(d, LC + 1, 8'h08);
    end
  endtask

  // A sends `data` as one packet of type ptype; B receives it. In software
  // mode the start follows a CLKN tick so both ends see the same CLK when
  // they seed the whitening.
  task automatic air_send(input int ptype, input bit [7:0] data[$], input bit bad,
                          output logic [7:0] stat);
    load_e0();
    bw(0, LC + 3, 8'hFF); bw(1, LC + 3, 8'hFF);
    bw(1, LC + 1, 8'h02);
    bw(0, LC + 1, 8'h10);
    foreach (data[i]) bw(0, LC + 8'h12, data[i]);
    bw(0, LC + 9, 8'((ptype << 3) | 1));
    bw(0, LC + 8'h0B, 8'(data.size()));
    @(clkn[0]);
    fork
      bw(0, LC + 1, 8'h01);
      if (bad) begin
        repeat (200) @(posedge rf_clk1m);
        flip = 1;
        @(posedge rf_clk1m) flip = 0;
      end
    join
    wait_lc_irq(0, 0, "tx_done");
    wait_lc_irq(1, 3, "rx_done");
    br(1, LC + 2, stat);
  endtask

  // B's firmware: payload from the RX buffer back to its host as HCI ACL
  task automatic b_to_host(input int n);
    logic [7:0] v;
    bw(1, UART + 0, 8'h02); bw(1, UART + 0, 8'h01); bw(1, UART + 0, 8'h20);
    bw(1, UART + 0, 8'(n)); bw(1, UART + 0, 8'h00);
    for (int i = 0; i < n; i++) begin br(1, LC + 8'h13, v); bw(1, UART + 0, v); end
  endtask

  initial begin
    logic [7:0] v, stat, lo, hi;
    bit [7:0] file[$], chunk[$], expect_host[$];
    int n, pos;
    for (int d = 0; d < 2; d++) begin
      bus_addr[d] = 0; bus_wdata[d] = 0; bus_wr[d] = 0; bus_rd[d] = 0; uart_rxd[d] = 1;
      last_irq[d] = 0;
    end
    foreach (mech[i]) mech[i] = 0;
    e0_state = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 132; i++) file.push_back(8'($urandom));
    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---- configuration of both boards ----
    for (int d = 0; d < 2; d++) begin
      bw(d, LC + 5, 8'h21); bw(d, LC + 6, 8'h43); bw(d, LC + 7, 8'hA5); bw(d, LC + 8, 8'h6C);
      bw(d, LC + 0, 8'h03);                   // whitening, encryption, software mode
      bw(d, LC + 4, 8'hBF);
      bw(d, UART + 3, 8'h03);                 // 8N1, NCO reset value = 115.2 kbit/s
      bw(d, UART + 1, 8'h08);                 // HCI packet-complete interrupt
    end
    mech[M_SW_MODE]++;

    // ---- USB: attach, then a bus reset from the host (SE0 for 3 us) ----
    bw(0, USB + 1, 8'h01); bw(0, USB + 3, 8'h10); bw(0, USB + 0, 8'h2A);
    br(0, USB + 0, v);
    check(v == 8'h2A && usb_pullup[0], "USB address register and pull-up");
    host_dp = 0;
    repeat (144) @(posedge usb_clk);
    host_dp = 1;
    repeat (20) @(posedge clk);
    br(0, USB + 2, v);
    check(v[4] && irq[0][2], "USB bus reset interrupt");
    br(0, USB + 0, v);
    check(v == 8'h00, "USB address cleared by bus reset");
    if (v == 8'h00 && irq[0][2]) mech[M_USB]++;
    bw(0, USB + 2, 8'h10);

    // ---- file transfer: host A -> UART A -> air -> UART B -> host B ----
    pos = 0;
    for (int pkt = 0; pkt < 6; pkt++) begin
      int len;
      len = pkt[0] ? 27 : 17;
      // host sends an HCI ACL data packet
      host_send(8'h02); host_send(8'h01); host_send(8'h20); host_send(8'(len)); host_send(8'h00);
      for (int i = 0; i < len; i++) host_send(file[pos + i]);
      n = 0;
      do begin br(0, UART + 14, v); n++; end while (!v[0] && n < 1000);
      check(v[0], "HCI packet complete");
      br(0, UART + 9, v);  check(v == 8'h02, "HCI type ACL");
      br(0, UART + 10, lo); br(0, UART + 11, hi);
      check({hi, lo} == 16'(len), $sformatf("HCI length %0d", {hi, lo}));
      if (v == 8'h02 && {hi, lo} == 16'(len)) mech[M_HCI_DECODE]++;
      for (int i = 0; i < 5; i++) br(0, UART + 0, v);
      chunk = {};
      for (int i = 0; i < len; i++) begin br(0, UART + 0, v); chunk.push_back(v); end
      // even packets: DM1, encrypted; odd packets: DH1, whitening only
      bw(0, LC + 0, pkt[0] ? 8'h01 : 8'h03); bw(1, LC + 0, pkt[0] ? 8'h01 : 8'h03);
      air_send(pkt[0] ? 4 : 3, chunk, 0, stat);
      check(stat[2] && stat[3] && stat[4], $sformatf("packet %0d received, STAT %h", pkt, stat));
      if (stat[4]) begin
        mech[M_WHITEN]++;
        if (!pkt[0]) begin mech[M_ENCRYPT]++; mech[M_FEC23]++; end
        else mech[M_NOFEC]++;
      end
      b_to_host(len);
      expect_host.push_back(8'h02); expect_host.push_back(8'h01); expect_host.push_back(8'h20);
      expect_host.push_back(8'(len)); expect_host.push_back(8'h00);
      foreach (chunk[i]) expect_host.push_back(chunk[i]);
      pos += len;
    end
    n = 0;
    while (hostb_rx.size() < expect_host.size() && n < 100000) begin @(posedge clk); n++; end
    check(hostb_rx.size() == expect_host.size(), $sformatf("host B got %0d bytes", hostb_rx.size()));
    foreach (expect_host[i])
      if (i < hostb_rx.size()) check(hostb_rx[i] == expect_host[i], $sformatf("host B byte %0d", i));

    // ---- bit error on the air: CRC failure, firmware retransmission ----
    chunk = {};
    for (int i = 0; i < 20; i++) chunk.push_back(8'($urandom));
    air_send(4, chunk, 1, stat);
    check(stat[2] && !stat[4], $sformatf("corrupted packet caught, STAT %h", stat));
    br(1, LC + 3, v);
    if (stat[2] && !stat[4] && v[4]) mech[M_CRC_FAIL]++;
    bw(1, LC + 1, 8'h20);
    air_send(4, chunk, 0, stat);
    check(stat[4], "retransmitted packet good");
    for (int i = 0; i < 20; i++) begin
      br(1, LC + 8'h13, v); check(v == chunk[i], $sformatf("retransmitted byte %0d", i));
    end
    if (stat[4]) mech[M_RETRANSMIT]++;

    // ---- HV1 (FEC 1/3) ----
    chunk = {};
    for (int i = 0; i < 10; i++) chunk.push_back(8'($urandom));
    air_send(5, chunk, 0, stat);
    n = 0;
    for (int i = 0; i < 10; i++) begin br(1, LC + 8'h13, v); n += (v == chunk[i]); end
    check(stat[2] && n == 10, "HV1 payload");
    if (n == 10) mech[M_FEC13]++;

    // ---- RX buffer overflow ----
    for (int k = 0; k < 3; k++) begin
      chunk = {};
      for (int i = 0; i < 27; i++) chunk.push_back(8'(i));
      air_send(4, chunk, 0, stat);
    end
    br(1, LC + 3, v);
    check(v[7], "RX buffer overflow flagged");
    if (v[7]) mech[M_RXBUF_OVF]++;
    bw(1, LC + 1, 8'h20);

    // ---- JTAG scan of the RF module (TDO looped back) ----
    bw(0, LC + 8'h29, 8'h3C); bw(0, LC + 8'h2A, 8'hEF); bw(0, LC + 8'h2B, 8'hBE);
    bw(0, LC + 1, 8'h40);
    wait_lc_irq(0, 5, "RF scan done");
    br(0, LC + 8'h2C, lo); br(0, LC + 8'h2D, hi);
    check({hi, lo} == 16'hBEEF, "JTAG DR capture");
    if ({hi, lo} == 16'hBEEF) mech[M_JTAG]++;

    // ---- mu-law and CVSD on board A, through the processor ----
    bw(0, CODEC + 0, 8'h20);
    for (int i = 0; i < 8; i++) a_samples.push_back(-3000);
    bw(0, CODEC + 0, 8'h05);
    repeat (5 * 1500) @(negedge clk);
    bw(0, CODEC + 0, 8'h01);
    br(0, CODEC + 4, v); n = v;
    check(n >= 3, "mu-law bytes produced");
    for (int i = 0; i < 2; i++) br(0, CODEC + 2, v);
    check(dec_u(v) > -3200 && dec_u(v) < -2800, $sformatf("mu-law code %h", v));
    if (dec_u(v) > -3200 && dec_u(v) < -2800) mech[M_ULAW]++;
    a_samples = {};
    bw(0, CODEC + 0, 8'h20);
    for (int i = 0; i < 16; i++) a_samples.push_back(i < 8 ? 6000 : -6000);
    bw(0, CODEC + 6, 8'h01);
    bw(0, CODEC + 0, 8'h06);
    repeat (18 * 1500) @(negedge clk);
    bw(0, CODEC + 0, 8'h02);
    br(0, CODEC + 4, v); n = v;
    begin
      int ones;
      ones = 0;
      for (int i = 0; i < n; i++) begin br(0, CODEC + 2, v); ones += $countones(v); end
      check(n >= 16 && ones > 8 * 3 && ones < 8 * n - 24, $sformatf("CVSD bits: %0d ones in %0d bytes", ones, n));
      if (n >= 16) mech[M_CVSD]++;
    end
    bw(0, CODEC + 6, 8'h00);

    // ---- hardware mode, direct SCO voice link A -> B ----
    bw(0, LC + 0, 8'h15);                     // A: whitening, hw mode, sco_direct
    bw(1, LC + 0, 8'h1D);                     // B: also phase lock
    bw(1, LC + 8'h0A, 8'h18);                 // B: ARQN 0, SEQN 0
    bw(0, LC + 8'h0A, 8'h1A);                 // A: ARQN 1
    bw(0, LC + 1, 8'h30); bw(1, LC + 1, 8'h30);
    bw(0, LC + 9, 8'((5 << 3) | 1));          // HV1
    bw(0, LC + 8'h0B, 8'd10);
    mech[M_HW_MODE]++;
    bw(0, CODEC + 0, 8'h20); bw(1, CODEC + 0, 8'h20);
    a_samples = {};
    for (int i = 0; i < 40; i++) a_samples.push_back(1000 + 150 * i);
    b_played = {};
    bw(0, CODEC + 0, 8'h14); bw(1, CODEC + 0, 8'h14);   // A-law, direct
    for (int p = 0; p < 4; p++) begin
      n = 0;
      do begin br(0, LC + 8'h14, v); n++; end while (v < 10 && n < 20000);
      bw(1, LC + 3, 8'hFF);
      bw(1, LC + 1, 8'h02);
      bw(0, LC + 1, 8'h01);
      wait_lc_irq(1, 3, "SCO packet received");
      br(1, LC + 2, stat);
      check(stat[2] && stat[3], $sformatf("SCO packet %0d header, STAT %h", p, stat));
      if (stat[2]) mech[M_SCO_DIRECT]++;
      if (p == 0) begin
        br(1, LC + 8'h0A, v);
        check(v[1:0] == 2'b11, $sformatf("hardware ARQ: TX_HDR1 %h", v));
        if (v[1:0] == 2'b11) mech[M_HW_ARQ]++;
        br(1, LC + 8'h40, lo); br(1, LC + 8'h41, hi);
        check({hi[3:0], lo} > 0 && {hi[3:0], lo} < 150, $sformatf("phase %0d", {hi[3:0], lo}));
        if ({hi[3:0], lo} > 0) mech[M_PHASE_LOCK]++;
      end
    end
    repeat (45 * 1500) @(negedge clk);
    begin
      int best = 0;
      for (int off = 0; off + 30 <= b_played.size(); off++) begin
        int ok;
        ok = 0;
        for (int i = 0; i < 30; i++) begin
          int x;
          x = 1000 + 150 * i;
          ok += (b_played[off + i] - x <= step_a(x) && x - b_played[off + i] <= step_a(x));
        end
        if (ok > best) best = ok;
      end
      check(best == 30, $sformatf("voice played on B: %0d of 30 samples match", best));
      if (best == 30) mech[M_ALAW]++;
    end

    // ---- every mechanism must have happened ----
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-14s %0d", mech_e'(m), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
