// tb_uart: a serial host model exchanges frames with the UART at
// 1.5 Mbit/s and 115.2 kbit/s in 8N1, 8E1 and 7O2 formats. Checks transmitted
// and received bytes, the bit time set by the NCO, parity and framing
// errors, overrun of the 64-byte RX FIFO, interrupt identification, and the
// HCI packet decoder on command, ACL, event and unknown packets.
module tb_uart;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cs, wr, rd, irq, txd, rxd, rts_n, dtr_n, cts_n, dsr_n;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  uart dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk) begin cs = 1; wr = 1; addr = a; wdata = d; end
    @(negedge clk) begin cs = 0; wr = 0; end
  endtask
  task automatic bus_rd(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk) begin cs = 1; rd = 1; addr = a; end
    #1 d = rdata;
    @(negedge clk) begin cs = 0; rd = 0; end
  endtask

  // frame format of the host model
  int  nb = 8, bitc = 8;
  bit  pen = 0, even = 0, stop2 = 0;

  function automatic bit par(bit [7:0] d);
    bit p;
    p = 0;
    for (int i = 0; i < nb; i++) p ^= d[i];
    return even ? p : ~p;
  endfunction

  task automatic host_send(input bit [7:0] d, input bit bad_par = 0, input bit bad_stop = 0);
    rxd = 0; repeat (bitc) @(posedge clk);
    for (int i = 0; i < nb; i++) begin rxd = d[i]; repeat (bitc) @(posedge clk); end
    if (pen) begin rxd = par(d) ^ bad_par; repeat (bitc) @(posedge clk); end
    rxd = ~bad_stop; repeat (bitc) @(posedge clk);
    rxd = 1; repeat (stop2 ? 2 * bitc : bitc) @(posedge clk);
  endtask

  task automatic host_recv(output bit [7:0] d, output bit pok, output int start_cyc);
    d = 0;
    @(negedge txd); start_cyc = cyc;
    repeat (bitc / 2) @(posedge clk);
    check(txd == 0, "start bit");
    for (int i = 0; i < nb; i++) begin repeat (bitc) @(posedge clk); d[i] = txd; end
    pok = 1;
    if (pen) begin repeat (bitc) @(posedge clk); pok = (txd == par(d)); end
    repeat (bitc) @(posedge clk);
    check(txd == 1, "stop bit");
  endtask

  task automatic set_format(input int inc, input int n, input bit p, input bit e, input bit s2);
    nb = n; pen = p; even = e; stop2 = s2;
    bus_wr(3, 8'h80);
    bus_wr(0, 8'(inc)); bus_wr(1, 8'(inc >> 8)); bus_wr(8, 8'(inc >> 16));
    bus_wr(3, {3'b000, e, p, s2, 2'(n - 5)});
  endtask

  task automatic loop_tx(input int n);
    bit [7:0] sent[$], d;
    bit pok;
    int t0, t1;
    for (int i = 0; i < n; i++) begin sent.push_back(8'($urandom) & 8'((1 << nb) - 1)); end
    fork
      foreach (sent[i]) bus_wr(0, sent[i]);
      for (int i = 0; i < n; i++) begin
        host_recv(d, pok, t1);
        check(d == sent[i], $sformatf("tx byte %h expected %h", d, sent[i]));
        check(pok, "tx parity");
        if (i == 1) check(t1 - t0 >= (nb + 1 + pen + stop2) * bitc - 2, "frame length");
        t0 = t1;
      end
    join
  endtask

  task automatic loop_rx(input int n);
    bit [7:0] sent[$];
    logic [7:0] d;
    for (int i = 0; i < n; i++) sent.push_back(8'($urandom) & 8'((1 << nb) - 1));
    foreach (sent[i]) host_send(sent[i]);
    repeat (3 * bitc) @(posedge clk);
    foreach (sent[i]) begin
      bus_rd(5, d); check(d[0], "LSR data ready");
      bus_rd(0, d); check(d == sent[i], $sformatf("rx byte %h expected %h", d, sent[i]));
    end
    bus_rd(5, d);
    check(!d[0] && d[4:1] == 4'd0, $sformatf("LSR %h after reading", d));
  endtask

  initial begin
    logic [7:0] d;
    cs = 0; wr = 0; rd = 0; addr = 0; wdata = 0; rxd = 1; cts_n = 0; dsr_n = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1.5 Mbit/s 8N1: 8 cycles per bit
    bitc = 8;
    set_format(1 << 20, 8, 0, 0, 0);
    loop_tx(6);
    loop_rx(6);
    // 8E1 with a parity error and a framing error
    set_format(1 << 20, 8, 1, 1, 0);
    loop_tx(4);
    loop_rx(4);
    host_send(8'h5A, 1, 0);
    repeat (20) @(posedge clk);
    bus_rd(5, d); check(d[2], "parity error flagged");
    bus_rd(0, d);
    host_send(8'h00, 0, 1);
    repeat (20) @(posedge clk);
    bus_rd(5, d); check(d[3] && d[4], "framing error and break flagged");
    bus_rd(0, d);
    // 7O2
    set_format(1 << 20, 7, 1, 0, 1);
    loop_tx(4);
    loop_rx(4);
    // 115.2 kbit/s: increment 80531 gives 104.17 cycles per bit
    bitc = 104;
    set_format(80531, 8, 0, 0, 0);
    loop_tx(3);
    loop_rx(3);
    // interrupt identification
    bitc = 8;
    set_format(1 << 20, 8, 0, 0, 0);
    bus_wr(1, 8'h01);
    bus_rd(2, d); check(d[0] && !irq, "no interrupt pending");
    host_send(8'h33);
    repeat (10) @(posedge clk);
    bus_rd(2, d); check(d[3:0] == 4'b0100 && irq, $sformatf("IIR %h: received data", d));
    bus_rd(0, d);
    bus_wr(1, 8'h00);
    // overrun
    for (int i = 0; i < 65; i++) host_send(8'(i));
    repeat (20) @(posedge clk);
    bus_rd(12, d); check(d == 8'd64, $sformatf("RX FIFO level %0d", d));
    bus_rd(5, d); check(d[1], "overrun flagged");
    for (int i = 0; i < 64; i++) bus_rd(0, d);
    check(d == 8'd63, "last byte kept before overrun");
    // HCI packet decoder
    bus_rd(14, d);
    begin
      bit [7:0] cmd[$] = '{8'h01, 8'h03, 8'h0C, 8'h03, 8'hAA, 8'hBB, 8'hCC};
      bit [7:0] acl[$] = '{8'h02, 8'h01, 8'h20, 8'h05, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55};
      bit [7:0] evt[$] = '{8'h04, 8'h0E, 8'h00};
      foreach (cmd[i]) begin
        host_send(cmd[i]);
        repeat (5) @(posedge clk);
        bus_rd(14, d);
        check(d[0] == (i == cmd.size() - 1), $sformatf("command packet complete flag at byte %0d", i));
      end
      bus_rd(9, d); check(d == 8'h01, "HCI type command");
      bus_rd(10, d); check(d == 8'h03, "HCI command length");
      foreach (acl[i]) host_send(acl[i]);
      repeat (5) @(posedge clk);
      bus_rd(14, d); check(d[0], "ACL packet complete");
      bus_rd(9, d); check(d == 8'h02, "HCI type ACL");
      bus_rd(10, d); check(d == 8'h05, "ACL length");
      foreach (evt[i]) host_send(evt[i]);
      repeat (5) @(posedge clk);
      bus_rd(14, d); check(d[0], "empty event complete");
      bus_rd(9, d); check(d == 8'h04, "HCI type event");
      host_send(8'h07);
      repeat (5) @(posedge clk);
      bus_rd(14, d); check(d[1], "unknown packet indicator flagged");
    end
    check(rts_n == 1 && dtr_n == 1, "modem outputs");
    bus_wr(4, 8'h03);
    bus_rd(6, d);
    check(rts_n == 0 && dtr_n == 0 && d[4] == 1 && d[5] == 0, "modem control and status");
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
