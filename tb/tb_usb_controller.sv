// tb_usb_controller: a USB host model talks to the device controller over
// D+/D-. The microcontroller side is driven from a 12 MHz bus clock.
//
// The host model builds its packets independently of the controller:
//  - SYNC and NRZI;
//  - bit stuffing;
//  - the reflected software forms of CRC5 (0x14) and CRC16 (0xA001).
// It also decodes and checks the device's replies.
// Covered:
//  - bus reset;
//  - SOF frame number;
//  - SETUP with its data stage stored for the firmware;
//  - the status stage as a zero-length IN;
//  - NAK while nothing is armed;
//  - OUT data with toggle handling: a duplicate is acknowledged and dropped;
//  - NAK while the OUT buffer is full;
//  - silence on a CRC error or another device address;
//  - IN data with CRC16;
//  - a retry after a lost ACK;
//  - a 64-byte packet;
//  - interrupts.
// The bit rate is checked too: one bit per four 48 MHz clocks.
module tb_usb_controller;
  logic clk48 = 0, clk12 = 0, rst_n = 0;
  initial begin #2; forever #5 clk48 = ~clk48; end
  always #20 clk12 = ~clk12;
  int checks = 0, failures = 0;

  logic       cs, wr, rd, irq, dp_o, dm_o, oe, pu;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic       h_dp = 1, h_dm = 0;
  logic       dp, dm;
  assign dp = oe ? dp_o : h_dp;
  assign dm = oe ? dm_o : h_dm;

  usb_controller dut (
    .clk(clk48), .rst_n, .cs, .addr, .wdata, .wr, .rd, .rdata, .irq,
    .usb_dp_i(dp), .usb_dm_i(dm), .usb_dp_o(dp_o), .usb_dm_o(dm_o), .usb_oe(oe),
    .usb_pullup(pu));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- microcontroller bus ----------------
  task automatic bw(input logic [3:0] a, input logic [7:0] v);
    @(negedge clk12) begin cs = 1; addr = a; wdata = v; wr = 1; end
    @(negedge clk12) begin wr = 0; cs = 0; end
  endtask
  task automatic br(input logic [3:0] a, output logic [7:0] v);
    @(negedge clk12) begin cs = 1; addr = a; rd = 1; end
    #1 v = rdata;
    @(negedge clk12) begin rd = 0; cs = 0; end
  endtask

  // ---------------- host model ----------------
  typedef bit [7:0] bytes_t[$];

  function automatic bit [4:0] crc5(input bit [10:0] v);
    bit [4:0] c;
    c = 5'h1F;
    for (int i = 0; i < 11; i++) c = ((c[0] ^ v[i]) != 0) ? ((c >> 1) ^ 5'h14) : (c >> 1);
    return ~c;
  endfunction
  function automatic bit [15:0] crc16(input bytes_t d);
    bit [15:0] c;
    c = 16'hFFFF;
    foreach (d[k]) for (int i = 0; i < 8; i++)
      c = ((c[0] ^ d[k][i]) != 0) ? ((c >> 1) ^ 16'hA001) : (c >> 1);
    return ~c;
  endfunction
  function automatic bytes_t token(input bit [3:0] pid, input bit [6:0] a, input bit [3:0] ep);
    bit [10:0] v;
    bit [15:0] t;
    v = {ep, a};
    t = {crc5(v), v};
    return '{{~pid, pid}, t[7:0], t[15:8]};
  endfunction
  function automatic bytes_t datapkt(input bit [3:0] pid, input bytes_t d, input bit bad_crc = 0);
    bytes_t p;
    bit [15:0] c;
    c = crc16(d) ^ (bad_crc ? 16'h0100 : 16'h0000);
    p = '{{~pid, pid}};
    foreach (d[i]) p.push_back(d[i]);
    p.push_back(c[7:0]); p.push_back(c[15:8]);
    return p;
  endfunction

  task automatic drive_bit(input bit dpv, input bit dmv);
    h_dp = dpv; h_dm = dmv;
    repeat (4) @(posedge clk48);
  endtask
  task automatic host_tx(input bytes_t p);
    bit lvl;
    int ones;
    lvl = 1; ones = 0;
    @(posedge clk48);
    for (int i = 0; i < 8; i++) begin               // SYNC
      bit b;
      b = (i == 7);
      if (!b) lvl = ~lvl;
      drive_bit(lvl, ~lvl);
    end
    ones = 1;
    foreach (p[k]) for (int i = 0; i < 8; i++) begin
      bit b;
      b = p[k][i];
      if (!b) lvl = ~lvl;
      drive_bit(lvl, ~lvl);
      ones = b ? ones + 1 : 0;
      if (ones == 6) begin lvl = ~lvl; drive_bit(lvl, ~lvl); ones = 0; end
    end
    drive_bit(0, 0); drive_bit(0, 0); drive_bit(1, 0);
  endtask

  // receive one packet from the device; got = 0 if nothing came within `wait_bits`
  int rx_bit_cycles;
  task automatic host_rx(output bytes_t p, output bit got, input int wait_bits = 40);
    bit bits[$];
    bit lvl, prev;
    int n, t0;
    p = {}; got = 0;
    n = 0;
    while (!(oe && dm == 1 && dp == 0) && n < wait_bits * 4) begin @(posedge clk48); n++; end
    if (n >= wait_bits * 4) return;
    got = 1;
    t0 = $time;
    repeat (2) @(posedge clk48);
    prev = 1;
    forever begin
      if (dp == 0 && dm == 0) break;
      lvl = dp;
      bits.push_back(lvl == prev);
      prev = lvl;
      repeat (4) @(posedge clk48);
    end
    rx_bit_cycles = ($time - t0) / 10 / bits.size();
    // SYNC, then unstuff
    begin
      bit d[$];
      int ones;
      for (int i = 0; i < 8; i++) if (bits[i] != (i == 7)) got = 0;
      ones = 1;
      for (int i = 8; i < bits.size(); i++) begin
        if (ones == 6) begin ones = 0; continue; end
        d.push_back(bits[i]);
        ones = bits[i] ? ones + 1 : 0;
      end
      for (int k = 0; k + 8 <= d.size(); k += 8) begin
        bit [7:0] b;
        for (int i = 0; i < 8; i++) b[i] = d[k + i];
        p.push_back(b);
      end
    end
    wait (!oe);
  endtask

  task automatic expect_hs(input bit [3:0] pid, input string what);
    bytes_t p;
    bit got;
    host_rx(p, got);
    check(got && p.size() == 1 && p[0] == {~pid, pid},
          $sformatf("%s: handshake %p", what, p));
  endtask
  task automatic expect_silence(input string what);
    bytes_t p;
    bit got;
    host_rx(p, got);
    check(!got, $sformatf("%s: no reply", what));
  endtask

  // ---------------- firmware helpers ----------------
  task automatic read_out(input int n, input bytes_t exp, input string what);
    logic [7:0] v;
    br(4'd5, v); check(v == 8'(n), $sformatf("%s: OUT length %0d", what, v));
    for (int i = 0; i < n; i++) begin
      br(4'd6, v); check(v == exp[i], $sformatf("%s: OUT byte %0d = %h", what, i, v));
    end
    br(4'd4, v); check(!v[7], $sformatf("%s: OUT buffer free after reading", what));
  endtask

  localparam bit [3:0] OUT = 4'b0001, IN = 4'b1001, SOF = 4'b0101, SETUP = 4'b1101,
                       DATA0 = 4'b0011, DATA1 = 4'b1011, ACK = 4'b0010, NAK = 4'b1010;

  initial begin
    logic [7:0] v;
    bytes_t d, p;
    bit got;
    cs = 0; wr = 0; rd = 0; addr = 0; wdata = 0;
    check(crc5(11'd0) == 5'h02, "host model: CRC5 of address 0 endpoint 0");
    repeat (3) @(negedge clk12);
    rst_n = 1;
    bw(4'd1, 8'h01);
    bw(4'd3, 8'h1F);
    check(pu, "attached: pull-up on");

    // bus reset
    h_dp = 0; h_dm = 0;
    repeat (40 * 4) @(posedge clk48);
    h_dp = 1;
    repeat (20) @(posedge clk48);
    br(4'd2, v); check(v[4] && irq, "bus reset interrupt");
    bw(4'd2, 8'h10);

    // SOF
    host_tx(token(SOF, 7'h23, 4'hB));              // frame 0x5A3
    repeat (10) @(posedge clk48);
    br(4'd10, v); check(v == 8'hA3, $sformatf("frame low %h", v));
    br(4'd11, v); check(v == 8'h05, $sformatf("frame high %h", v));
    br(4'd2, v); check(v[3], "SOF interrupt");
    bw(4'd2, 8'h08);

    // SETUP (SET_ADDRESS 5) to address 0
    d = '{8'h00, 8'h05, 8'h05, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    host_tx(token(SETUP, 0, 0));
    host_tx(datapkt(DATA0, d));
    expect_hs(ACK, "SETUP");
    br(4'd2, v); check(v[1], "SETUP interrupt");
    br(4'd4, v); check(v == 8'hC0, $sformatf("OUT info %h: SETUP on endpoint 0", v));
    read_out(8, d, "SETUP");
    bw(4'd2, 8'h02);

    // status stage: nothing armed -> NAK, then a zero-length DATA1
    host_tx(token(IN, 0, 0));
    expect_hs(NAK, "IN with nothing armed");
    bw(4'd8, 8'h80);
    host_tx(token(IN, 0, 0));
    host_rx(p, got);
    check(got && p.size() == 3 && p[0] == {~DATA1, DATA1} && p[1] == 8'h00 && p[2] == 8'h00,
          $sformatf("zero-length DATA1 %p", p));
    check(rx_bit_cycles == 4, $sformatf("bit time %0d clocks", rx_bit_cycles));
    host_tx('{{~ACK, ACK}});
    repeat (10) @(posedge clk48);
    br(4'd2, v); check(v[2], "IN done interrupt");
    br(4'd8, v); check(!v[7], "IN disarmed after ACK");
    bw(4'd2, 8'h04);
    bw(4'd0, 8'h05);

    // OUT on endpoint 2, address 5
    d = {};
    for (int i = 0; i < 20; i++) d.push_back(8'($urandom));
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA0, d));
    expect_hs(ACK, "OUT DATA0");
    br(4'd4, v); check(v == 8'h82, $sformatf("OUT info %h: data on endpoint 2", v));
    read_out(20, d, "OUT DATA0");
    // the same packet again (ACK lost on the host side): acknowledged, dropped
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA0, d));
    expect_hs(ACK, "duplicate OUT");
    br(4'd4, v); check(!v[7], "duplicate not stored");
    // next packet stored, the one after that refused while the buffer is full
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA1, d));
    expect_hs(ACK, "OUT DATA1");
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA0, d));
    expect_hs(NAK, "OUT while buffer full");
    read_out(20, d, "OUT DATA1");
    // CRC error and a token for another device: no reply
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA0, d, 1));
    expect_silence("data with CRC error");
    host_tx(token(IN, 6, 1));
    expect_silence("token for address 6");
    // 64-byte packet
    d = {};
    for (int i = 0; i < 64; i++) d.push_back(8'($urandom));
    host_tx(token(OUT, 5, 2));
    host_tx(datapkt(DATA0, d));
    expect_hs(ACK, "64-byte OUT");
    read_out(64, d, "64-byte OUT");

    // IN on endpoint 1 (HCI event), first ACK lost
    d = {};
    for (int i = 0; i < 16; i++) d.push_back(8'($urandom));
    foreach (d[i]) bw(4'd7, d[i]);
    br(4'd9, v); check(v == 16, "IN length");
    bw(4'd8, 8'h81);
    for (int k = 0; k < 2; k++) begin
      host_tx(token(IN, 5, 1));
      host_rx(p, got);
      check(got && p.size() == 19 && p[0] == {~DATA0, DATA0}, $sformatf("IN DATA0 try %0d", k));
      if (p.size() == 19) begin
        bytes_t q;
        bit [15:0] c;
        q = {};
        for (int i = 0; i < 16; i++) q.push_back(p[1 + i]);
        c = crc16(q);
        check(q == d, "IN payload");
        check(p[17] == c[7:0] && p[18] == c[15:8], "IN CRC16");
      end
      if (k == 0) begin
        repeat (300) @(posedge clk48);
        br(4'd8, v); check(v[7], "still armed without ACK");
      end else host_tx('{{~ACK, ACK}});
    end
    repeat (10) @(posedge clk48);
    br(4'd2, v); check(v[2], "IN done");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk48);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
