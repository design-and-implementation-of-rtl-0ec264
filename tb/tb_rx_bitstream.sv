// tb_rx_bitstream: feeds packets built by the reference model, with bit
// errors the FEC can correct (one per header triple, one per FEC 1/3 triple,
// one per FEC 2/3 block), into the reception chain at 1 Mbit/s and checks
// the decoded header, payload header, payload bytes, CRC verdict and the
// count of corrected FEC 2/3 blocks. Also checks that packets for another
// LT_ADDR and packets with a broken header are dropped, that broadcast is
// accepted and that a corrupted payload fails the CRC.
module tb_rx_bitstream;
  import bb_pkg::*;
  import bt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start, stop, rx_bit, rx_bit_valid, sync_found, whiten_en, crypt_en, ks_bit, ks_adv;
  logic [2:0] own_lt_addr;
  logic [7:0] uap;
  logic [5:0] whiten_init;
  pkt_hdr_t   hdr_out;
  logic       hdr_valid, hec_ok, addr_ok, pflow_out, pl_wr, crc_ok, busy, done;
  logic [1:0] llid_out;
  logic [9:0] plen_out;
  logic [7:0] pl_wdata, fec_corrections;

  rx_bitstream dut (.*);

  bitq_t ksq;
  int    kidx;
  assign ks_bit = (kidx < ksq.size()) ? ksq[kidx] : 1'b0;
  bit [7:0] rxq[$];
  always @(posedge clk) begin
    if (ks_adv) kidx <= kidx + 1;
    if (pl_wr) rxq.push_back(pl_wdata);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mode: 0 normal, 1 other LT_ADDR, 2 broken header, 3 corrupted payload, 4 broadcast
  task automatic run_case(input int t, input int len, input bit wen, input bit cen, input int mode);
    bitq_t pk, ksr;
    bit [7:0] pl[$];
    bit [63:0] sw;
    bit [9:0] h;
    bit has_pl, crcf;
    int fec, phb, flen, nblk, exp_corr, lt;
    type_info(t, has_pl, fec, crcf, phb, flen);
    if (phb == 0) len = flen;
    for (int i = 0; i < len; i++) pl.push_back(8'($urandom));
    sw  = {$urandom, $urandom};
    uap = 8'($urandom);
    own_lt_addr = 3'd5;
    lt  = (mode == 1) ? 6 : (mode == 4) ? 0 : 5;
    h   = 10'({1'b0, 1'b1, 1'b0, 4'(t), 3'(lt)});
    whiten_en = wen; whiten_init = 6'($urandom); crypt_en = cen;
    ksq = key_seq($urandom, 4000); kidx = 0; ksr = ksq;
    pk  = build_packet(sw, h, uap, wen, whiten_init, cen, ksr, 2'd1, 1'b1, pl);
    // correctable errors
    for (int j = 0; j < 18; j++) pk[72 + 3*j + $urandom_range(0, 2)] ^= 1'b1;
    if (mode == 2) begin pk[72 + 3] ^= 1'b1; pk[72 + 4] ^= 1'b1; end  // two errors in one triple
    exp_corr = 0;
    if (has_pl) begin
      int pstart, plen_bits;
      pstart = 72 + 54;
      plen_bits = pk.size() - pstart;
      if (fec == 1) for (int j = 0; j < plen_bits / 3; j++) pk[pstart + 3*j + $urandom_range(0, 2)] ^= 1'b1;
      if (fec == 2) begin
        nblk = plen_bits / 15;
        for (int j = 0; j < nblk; j++) pk[pstart + 15*j + $urandom_range(0, 14)] ^= 1'b1;
        exp_corr = nblk;
      end
      if (mode == 3) pk[pstart + 8*phb + 3] ^= 1'b1;
    end
    rxq = {};
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    foreach (pk[i]) begin
      repeat (11) @(negedge clk);
      rx_bit = pk[i]; rx_bit_valid = 1'b1;
      @(negedge clk) rx_bit_valid = 1'b0;
      if (i == 67) sync_found = 1'b1;
      @(negedge clk) sync_found = 1'b0;
      if (i > 72 + 54 && !busy) break;
    end
    repeat (40) @(negedge clk);
    check(!busy, $sformatf("type %0d mode %0d: still busy", t, mode));
    if (mode == 3) pl[0] ^= 8'h08;
    if (mode != 2) check(hdr_out == pkt_hdr_t'(h), $sformatf("type %0d: header %h expected %h", t, hdr_out, h));
    check(hec_ok == (mode != 2), $sformatf("type %0d mode %0d: hec_ok %0d", t, mode, hec_ok));
    if (mode != 2) check(addr_ok == (mode != 1), $sformatf("type %0d mode %0d: addr_ok %0d", t, mode, addr_ok));
    if (mode == 1 || mode == 2 || !has_pl) begin
      check(rxq.size() == 0, $sformatf("type %0d mode %0d: %0d bytes kept", t, mode, rxq.size()));
    end else begin
      check(rxq == pl, $sformatf("type %0d len %0d: payload differs (%0d bytes)", t, len, rxq.size()));
      check(plen_out == 10'(len), $sformatf("type %0d: length %0d", t, plen_out));
      if (phb != 0) check(llid_out == 2'd1 && pflow_out, "payload header fields");
      check(crc_ok == (crcf && mode != 3), $sformatf("type %0d mode %0d: crc_ok %0d", t, mode, crc_ok));
      check(int'(fec_corrections) == exp_corr, $sformatf("type %0d: %0d corrections, expected %0d", t, fec_corrections, exp_corr));
    end
  endtask

  initial begin
    start = 0; stop = 0; rx_bit = 0; rx_bit_valid = 0; sync_found = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    run_case(3, 17, 1, 1, 0);    // DM1, encrypted
    run_case(3, 4, 1, 0, 0);     // DM1 short
    run_case(4, 27, 1, 1, 0);    // DH1
    run_case(5, 10, 1, 0, 0);    // HV1
    run_case(6, 20, 1, 1, 0);    // HV2
    run_case(9, 12, 0, 0, 0);    // AUX1
    run_case(10, 121, 1, 1, 0);  // DM3
    run_case(15, 200, 1, 0, 0);  // DH5
    run_case(0, 0, 1, 0, 0);     // NULL
    run_case(4, 10, 1, 0, 1);    // other LT_ADDR
    run_case(4, 10, 1, 0, 2);    // broken header
    run_case(4, 10, 1, 0, 3);    // corrupted payload
    run_case(3, 8, 1, 0, 4);     // broadcast
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
