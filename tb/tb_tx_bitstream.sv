// tb_tx_bitstream: checks the packet transmission chain against the
// reference packet builder for every payload layout (no payload, FEC 1/3,
// FEC 2/3 with padding, no FEC, 1- and 2-byte payload headers, fixed-length
// voice packets), with and without whitening and encryption. Each packet
// must take exactly as many 1 Mbit/s ticks as it has bits on air, and an
// empty TX buffer must raise underrun.
module tb_tx_bitstream;
  import bb_pkg::*;
  import bt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bit_tick, start, whiten_en, crypt_en, ks_bit, ks_adv, pflow;
  logic [63:0] sync_word;
  pkt_hdr_t    hdr;
  logic [7:0]  uap, pl_data;
  logic [5:0]  whiten_init;
  logic [1:0]  llid;
  logic [9:0]  plen;
  logic        pl_empty, pl_rd, tx_bit, tx_bit_valid, busy, done, underrun;

  tx_bitstream dut (.*);

  bit [7:0] buf_q[$];
  bitq_t    ksq;
  int       kidx;
  assign pl_data  = buf_q.size() ? buf_q[0] : 8'h00;
  assign pl_empty = (buf_q.size() == 0);
  assign ks_bit   = (kidx < ksq.size()) ? ksq[kidx] : 1'b0;
  always @(posedge clk) begin
    if (pl_rd && buf_q.size()) void'(buf_q.pop_front());
    if (ks_adv) kidx <= kidx + 1;
  end

  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 11) ? 0 : tcnt + 1;
  end
  assign bit_tick = (tcnt == 0);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_case(input int t, input int len, input bit wen, input bit cen, input int have);
    bitq_t exp, got, ksr;
    bit [7:0] pl[$];
    int ticks, to;
    bit has_pl, crcf;
    int fec, phb, flen;
    type_info(t, has_pl, fec, crcf, phb, flen);
    if (phb == 0) len = flen;
    for (int i = 0; i < len; i++) pl.push_back(8'($urandom));
    buf_q = {};
    for (int i = 0; i < have && i < len; i++) buf_q.push_back(pl[i]);
    sync_word   = {$urandom, $urandom};
    uap         = 8'($urandom);
    hdr         = pkt_hdr_t'(10'({1'b1, 1'b0, 1'b1, 4'(t), 3'd5}));
    whiten_en   = wen;
    whiten_init = 6'($urandom);
    crypt_en    = cen;
    llid        = 2'd2;
    pflow       = 1'b1;
    plen        = 10'(len);
    ksq  = key_seq($urandom, 4000);
    kidx = 0;
    ksr  = ksq;
    // underrun sends zero bytes
    for (int i = have; i < len; i++) pl[i] = 8'h00;
    exp = build_packet(sync_word, hdr, uap, wen, whiten_init, cen, ksr, llid, pflow, pl);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    ticks = 0; to = 0;
    while (!done && to < 200000) begin
      @(posedge clk);
      if (bit_tick) ticks++;
      if (tx_bit_valid) got.push_back(tx_bit);
      to++;
    end
    @(posedge clk);
    if (tx_bit_valid) got.push_back(tx_bit);
    check(got.size() == exp.size(), $sformatf("type %0d len %0d: %0d bits, expected %0d", t, len, got.size(), exp.size()));
    begin
      int first;
      first = -1;
      foreach (exp[i]) if (first < 0 && (i >= got.size() || got[i] != exp[i])) first = i;
      check(got == exp, $sformatf("type %0d len %0d wen %0d cen %0d: bit stream differs from bit %0d", t, len, wen, cen, first));
    end
    check(ticks == exp.size(), $sformatf("type %0d: %0d ticks for %0d bits", t, ticks, exp.size()));
    check(underrun == (have < len), $sformatf("type %0d: underrun %0d", t, underrun));
    check(!busy, "busy after done");
    repeat (30) @(posedge clk);
  endtask

  initial begin
    start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    run_case(0, 0, 1, 0, 0);        // NULL
    run_case(1, 0, 0, 0, 0);        // POLL, no whitening
    run_case(3, 17, 1, 1, 99);      // DM1, FEC 2/3, encrypted
    run_case(3, 5, 1, 0, 99);       // DM1 short, padding
    run_case(4, 27, 1, 1, 99);      // DH1
    run_case(5, 10, 1, 0, 99);      // HV1 FEC 1/3
    run_case(6, 20, 0, 1, 99);      // HV2
    run_case(7, 30, 1, 0, 99);      // HV3
    run_case(9, 29, 1, 1, 99);      // AUX1, no CRC
    run_case(2, 18, 1, 0, 99);      // FHS
    run_case(10, 121, 1, 1, 99);    // DM3, 2-byte payload header
    run_case(15, 339, 1, 0, 999);   // DH5 maximum length
    run_case(4, 9, 1, 0, 4);        // DH1 with too few bytes: underrun
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
