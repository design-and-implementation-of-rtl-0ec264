// link_controller: the baseband unit of the Bluetooth baseband module.
//
// It does the bit-intensive, time-critical work in hardware: native clock
// and offsets (bt_clock_gen), hop calculation (hop_selection), sync word
// generation and correlation (sync_word_gen, rx_correlator), E0 encryption
// (e0_engine), the TX and RX bit-stream chains (tx_bitstream, rx_bitstream)
// and the RF module interface (radio_interface), with a 64-byte TX and a
// 64-byte RX buffer (bb_fifo). The microcontroller controls everything
// through 8-bit memory-mapped registers and is told about events through an
// interrupt status register. This block list and the buffer sizes follow
// the module; the register map below is this design's.
//
// Baseband control has two modes (CTRL.hw_mode):
//  * software: a TX command starts the packet at once; firmware sets ARQN
//    and SEQN of the next header itself.
//  * hardware: a TX command waits for the next even slot boundary of CLK,
//    and after each received packet addressed to this device the hardware
//    sets ARQN (1 when the CRC, or for packets without CRC the HEC, passed)
//    and toggles SEQN when the received ARQN acknowledges the last packet.
// CTRL.sco_direct connects the TX buffer input and the RX buffer output to
// the audio CODEC stream instead of the MCU data registers.
//
// Register map (addr, R/W):
//  00 CTRL rw  [0]whiten_en [1]crypt_en [2]hw_mode [3]phase_lock_en [4]sco_direct
//  01 CMD  w   [0]tx_go [1]rx_go [2]rx_stop [3]e0_load [4]txbuf_clr [5]rxbuf_clr
//              [6]rf_go [7]master_load (pulses)
//  02 STAT r   [0]tx_busy [1]rx_busy [2]hec_ok [3]addr_ok [4]crc_ok [5]tx_underrun
//              [6]txbuf_full [7]rxbuf_empty
//  03 IRQ  r/w1c [0]tx_done [1]sync_found [2]hdr_rx [3]rx_done [4]rx_error
//              [5]rf_done [6]slot_tick [7]rxbuf_overflow;  04 IRQ_MASK rw
//  05-07 LAP, 08 UAP, 09 TX_HDR0 {-,type,lt_addr}, 0A TX_HDR1 {-,-,llid,pflow,flow,arqn,seqn}
//  0B TX_LEN[7:0], 0C {-,own_lt_addr,-,-,TX_LEN[9:8]}
//  0D RX_HDR0, 0E RX_HDR1 (same layout), 0F RX_LEN[7:0], 10 RX_LEN[9:8], 11 FEC corrections
//  12 TX buffer write, 13 RX buffer read (pops), 14 TX level, 15 RX level
//  16 correlator threshold, 17 hop channel
//  18-1B CLKN (reading 18 freezes 19-1B), 1C-1F CLK (reading 1C freezes 1D-1F)
//  20-23 offset (applied on writing 23), 24-27 master clock value
//  28 RF control pins, 29 RF IR, 2A-2B RF DR, 2C-2D RF DR captured
//  30-3F E0 initial state (128 bits, byte 30 = bits 7:0), 40-41 CLK phase, 44-47 CLKE
// Reads have no wait states: rdata is combinational from addr while cs is set.
module link_controller
  import bb_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned CLK_DIV   = 3750
) (
  input  logic       clk,
  input  logic       rst_n,
  // MCU interface
  input  logic       cs,
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] rdata,
  output logic       irq,
  // RF module
  input  logic       rf_clk1m,
  input  logic       rf_rxclk,
  input  logic       rf_rxd,
  output logic       rf_txd,
  output logic [7:0] rf_ctrl,
  output logic       rf_tck,
  output logic       rf_tms,
  output logic       rf_tdi,
  input  logic       rf_tdo,
  // SCO stream to and from the audio CODEC
  input  logic [7:0] sco_tx_data,
  input  logic       sco_tx_valid,
  output logic       sco_tx_ready,
  output logic [7:0] sco_rx_data,
  output logic       sco_rx_valid,
  input  logic       sco_rx_rd,
  // observation
  output logic [27:0] clkn_out,
  output logic [6:0]  channel_out
);
  localparam int unsigned LW = $clog2(BUF_DEPTH) + 1;

  // ---------------- registers ----------------
  logic        whiten_en, crypt_en, hw_mode, phase_lock_en, sco_direct;
  logic [7:0]  irq_stat, irq_mask, corr_thr, rf_ctrl_r, rf_ir;
  logic [15:0] rf_dr;
  logic [23:0] lap;
  logic [7:0]  uap;
  pkt_hdr_t    tx_hdr;
  logic [1:0]  tx_llid;
  logic        tx_pflow;
  logic [9:0]  tx_len;
  logic [2:0]  own_lt;
  logic [31:0] off_r, mclk_r;
  logic [127:0] e0_init;
  logic [19:0] clkn_snap, clk_snap;
  logic        tx_pending;

  logic wr_en, rd_en;
  assign wr_en = cs && wr;
  assign rd_en = cs && rd;

  // command pulses
  logic cmd_tx, cmd_rx, cmd_rx_stop, cmd_e0, cmd_txclr, cmd_rxclr, cmd_rf, cmd_mload;
  assign {cmd_mload, cmd_rf, cmd_rxclr, cmd_txclr, cmd_e0, cmd_rx_stop, cmd_rx, cmd_tx} =
         (wr_en && addr == 8'h01) ? wdata : 8'h00;

  // ---------------- sub-blocks ----------------
  logic [27:0] clkn, clke, clk_bt, offset;
  logic [11:0] phase;
  logic        clkn_tick, clk_tick;
  logic [63:0] sync_word;
  logic        sync_found;
  logic [6:0]  corr_err;
  logic        ks, ks_adv_tx, ks_adv_rx;
  logic        tx_tick, tx_bit, tx_bit_valid, tx_busy, tx_done, tx_underrun, tx_pl_rd;
  logic        rx_bit, rx_bit_valid;
  pkt_hdr_t    rx_hdr;
  logic        rx_hdr_valid, hec_ok, addr_ok, crc_ok, rx_busy, rx_done, rx_pflow, rx_pl_wr;
  logic [1:0]  rx_llid;
  logic [9:0]  rx_len;
  logic [7:0]  rx_pl_data, fec_corr;
  logic [6:0]  channel;
  logic [15:0] rf_cap;
  logic        rf_busy, rf_busy_q;
  logic [7:0]  txb_data, rxb_data;
  logic        txb_empty, txb_full, rxb_empty, rxb_full, txb_ov, rxb_ov, txb_un, rxb_un;
  logic [LW-1:0] txb_level, rxb_level;
  logic        txb_wr, rxb_rd, tx_start;
  logic [7:0]  txb_wdata;

  bt_clock_gen #(.DIV(CLK_DIV)) u_clk (
    .clk, .rst_n,
    .offset_wr(wr_en && addr == 8'h23), .offset_in({wdata[3:0], off_r[23:0]}),
    .master_load(cmd_mload), .master_clk(mclk_r[27:0]),
    .phase_lock_en, .pkt_detect(sync_found),
    .clkn, .clke, .clk_bt, .offset, .phase, .clkn_tick, .clk_tick);

  hop_selection u_hop (.clk, .rst_n, .addr({uap[3:0], lap}), .clk_bt, .channel);

  sync_word_gen u_sw (.clk, .rst_n, .lap, .sync_word);

  rx_correlator u_corr (
    .clk, .rst_n, .enable(rx_busy), .rx_bit, .rx_bit_valid, .sync_word,
    .threshold(corr_thr[5:0]), .found(sync_found), .errors(corr_err));

  e0_engine u_e0 (.clk, .rst_n, .load(cmd_e0), .init_state(e0_init),
                  .adv(ks_adv_tx || ks_adv_rx), .ks);

  assign tx_start = tx_pending && !tx_busy && (!hw_mode || (clk_tick && clk_bt[1:0] == 2'b11));

  tx_bitstream u_tx (
    .clk, .rst_n, .bit_tick(tx_tick), .start(tx_start), .sync_word, .hdr(tx_hdr), .uap,
    .whiten_en, .whiten_init(clk_bt[6:1]), .crypt_en, .ks_bit(ks), .ks_adv(ks_adv_tx),
    .llid(tx_llid), .pflow(tx_pflow), .plen(tx_len),
    .pl_data(txb_data), .pl_empty(txb_empty), .pl_rd(tx_pl_rd),
    .tx_bit, .tx_bit_valid, .busy(tx_busy), .done(tx_done), .underrun(tx_underrun));

  rx_bitstream u_rx (
    .clk, .rst_n, .start(cmd_rx), .stop(cmd_rx_stop), .rx_bit, .rx_bit_valid, .sync_found,
    .own_lt_addr(own_lt), .uap, .whiten_en, .whiten_init(clk_bt[6:1]), .crypt_en,
    .ks_bit(ks), .ks_adv(ks_adv_rx), .hdr_out(rx_hdr), .hdr_valid(rx_hdr_valid),
    .hec_ok, .addr_ok, .llid_out(rx_llid), .pflow_out(rx_pflow), .plen_out(rx_len),
    .pl_wdata(rx_pl_data), .pl_wr(rx_pl_wr), .crc_ok, .fec_corrections(fec_corr),
    .busy(rx_busy), .done(rx_done));

  radio_interface u_rf (
    .clk, .rst_n, .rf_clk1m, .rf_rxclk, .rf_rxd, .rf_txd, .tx_tick, .tx_bit, .tx_bit_valid,
    .rx_bit, .rx_bit_valid, .ctrl_reg(rf_ctrl_r), .rf_ctrl, .go(cmd_rf), .ir(rf_ir),
    .dr(rf_dr), .dr_capture(rf_cap), .busy(rf_busy), .rf_tck, .rf_tms, .rf_tdi, .rf_tdo);

  // TX and RX buffers
  assign txb_wr    = sco_direct ? (sco_tx_valid && !txb_full) : (wr_en && addr == 8'h12);
  assign txb_wdata = sco_direct ? sco_tx_data : wdata;
  assign rxb_rd    = sco_direct ? sco_rx_rd : (rd_en && addr == 8'h13);
  assign sco_tx_ready = sco_direct && !txb_full;
  assign sco_rx_data  = rxb_data;
  assign sco_rx_valid = sco_direct && !rxb_empty;

  bb_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n, .clr(cmd_txclr), .wr_en(txb_wr), .wr_data(txb_wdata), .rd_en(tx_pl_rd),
    .rd_data(txb_data), .empty(txb_empty), .full(txb_full), .level(txb_level),
    .overflow(txb_ov), .underflow(txb_un));

  bb_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n, .clr(cmd_rxclr), .wr_en(rx_pl_wr), .wr_data(rx_pl_data), .rd_en(rxb_rd),
    .rd_data(rxb_data), .empty(rxb_empty), .full(rxb_full), .level(rxb_level),
    .overflow(rxb_ov), .underflow(rxb_un));

  assign clkn_out    = clkn;
  assign channel_out = channel;
  assign irq         = |(irq_stat & irq_mask);

  // A header was checked in the packet that is ending.
  logic rx_hdr_valid_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rx_hdr_valid_seen <= 1'b0;
    else if (cmd_rx)       rx_hdr_valid_seen <= 1'b0;
    else if (rx_hdr_valid) rx_hdr_valid_seen <= 1'b1;
  end

  // ---------------- register writes, IRQ control, baseband control ----------------
  logic rx_has_payload;
  assign rx_has_payload = ptype_cfg(rx_hdr.ptype).has_payload;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {whiten_en, crypt_en, hw_mode, phase_lock_en, sco_direct} <= '0;
      irq_stat <= '0; irq_mask <= '0; corr_thr <= 8'd7; rf_ctrl_r <= '0; rf_ir <= '0;
      rf_dr <= '0; lap <= '0; uap <= '0; tx_hdr <= '0; tx_llid <= 2'd2; tx_pflow <= 1'b1;
      tx_len <= '0; own_lt <= 3'd1; off_r <= '0; mclk_r <= '0; e0_init <= '0;
      clkn_snap <= '0; clk_snap <= '0; tx_pending <= 1'b0; rf_busy_q <= 1'b0;
    end else begin
      rf_busy_q <= rf_busy;
      if (wr_en) begin
        unique case (addr)
          8'h00: {sco_direct, phase_lock_en, hw_mode, crypt_en, whiten_en} <= wdata[4:0];
          8'h03: irq_stat <= irq_stat & ~wdata;
          8'h04: irq_mask <= wdata;
          8'h05: lap[7:0]   <= wdata;
          8'h06: lap[15:8]  <= wdata;
          8'h07: lap[23:16] <= wdata;
          8'h08: uap <= wdata;
          8'h09: {tx_hdr.ptype, tx_hdr.lt_addr} <= {pkt_type_e'(wdata[6:3]), wdata[2:0]};
          8'h0A: {tx_llid, tx_pflow, tx_hdr.flow, tx_hdr.arqn, tx_hdr.seqn} <= wdata[5:0];
          8'h0B: tx_len[7:0] <= wdata;
          8'h0C: {own_lt, tx_len[9:8]} <= {wdata[6:4], wdata[1:0]};
          8'h16: corr_thr <= wdata;
          8'h20, 8'h21, 8'h22, 8'h23: off_r[8*addr[1:0] +: 8] <= wdata;
          8'h24, 8'h25, 8'h26, 8'h27: mclk_r[8*addr[1:0] +: 8] <= wdata;
          8'h28: rf_ctrl_r <= wdata;
          8'h29: rf_ir <= wdata;
          8'h2A: rf_dr[7:0] <= wdata;
          8'h2B: rf_dr[15:8] <= wdata;
          default: if (addr[7:4] == 4'h3) e0_init[8*addr[3:0] +: 8] <= wdata;
        endcase
      end
      if (rd_en && addr == 8'h18) clkn_snap <= clkn[27:8];
      if (rd_en && addr == 8'h1C) clk_snap  <= clk_bt[27:8];

      // baseband control
      if (cmd_tx) tx_pending <= 1'b1;
      if (tx_start) tx_pending <= 1'b0;
      if (hw_mode && rx_done && rx_hdr_valid_seen && hec_ok && addr_ok) begin
        tx_hdr.arqn <= (rx_has_payload && ptype_cfg(rx_hdr.ptype).has_crc) ? crc_ok : 1'b1;
        if (rx_hdr.arqn) tx_hdr.seqn <= ~tx_hdr.seqn;
      end

      // interrupt sources
      if (tx_done)      irq_stat[0] <= 1'b1;
      if (sync_found)   irq_stat[1] <= 1'b1;
      if (rx_hdr_valid) irq_stat[2] <= 1'b1;
      if (rx_done)      irq_stat[3] <= 1'b1;
      if (rx_done && (!hec_ok || (rx_has_payload && ptype_cfg(rx_hdr.ptype).has_crc && addr_ok && !crc_ok)))
        irq_stat[4] <= 1'b1;
      if (rf_busy_q && !rf_busy) irq_stat[5] <= 1'b1;
      if (clk_tick)     irq_stat[6] <= 1'b1;
      if (rxb_ov)       irq_stat[7] <= 1'b1;
    end
  end

  // ---------------- register reads ----------------
  logic [31:0] offset_rd;
  assign offset_rd = {4'd0, offset};
  logic [31:0] clke_rd;
  assign clke_rd = {4'd0, clke};
  always_comb begin
    rdata = 8'h00;
    unique case (addr)
      8'h00: rdata = {3'd0, sco_direct, phase_lock_en, hw_mode, crypt_en, whiten_en};
      8'h02: rdata = {rxb_empty, txb_full, tx_underrun, crc_ok, addr_ok, hec_ok, rx_busy, tx_busy};
      8'h03: rdata = irq_stat;
      8'h04: rdata = irq_mask;
      8'h05: rdata = lap[7:0];
      8'h06: rdata = lap[15:8];
      8'h07: rdata = lap[23:16];
      8'h08: rdata = uap;
      8'h09: rdata = {1'b0, tx_hdr.ptype, tx_hdr.lt_addr};
      8'h0A: rdata = {2'd0, tx_llid, tx_pflow, tx_hdr.flow, tx_hdr.arqn, tx_hdr.seqn};
      8'h0B: rdata = tx_len[7:0];
      8'h0C: rdata = {1'b0, own_lt, 2'd0, tx_len[9:8]};
      8'h0D: rdata = {1'b0, rx_hdr.ptype, rx_hdr.lt_addr};
      8'h0E: rdata = {2'd0, rx_llid, rx_pflow, rx_hdr.flow, rx_hdr.arqn, rx_hdr.seqn};
      8'h0F: rdata = rx_len[7:0];
      8'h10: rdata = {6'd0, rx_len[9:8]};
      8'h11: rdata = fec_corr;
      8'h13: rdata = rxb_data;
      8'h14: rdata = 8'(txb_level);
      8'h15: rdata = 8'(rxb_level);
      8'h16: rdata = corr_thr;
      8'h17: rdata = {1'b0, channel};
      8'h18: rdata = clkn[7:0];
      8'h19: rdata = clkn_snap[7:0];
      8'h1A: rdata = clkn_snap[15:8];
      8'h1B: rdata = {4'd0, clkn_snap[19:16]};
      8'h1C: rdata = clk_bt[7:0];
      8'h1D: rdata = clk_snap[7:0];
      8'h1E: rdata = clk_snap[15:8];
      8'h1F: rdata = {4'd0, clk_snap[19:16]};
      8'h20, 8'h21, 8'h22, 8'h23: rdata = offset_rd[8*addr[1:0] +: 8];
      8'h28: rdata = rf_ctrl_r;
      8'h29: rdata = rf_ir;
      8'h2A: rdata = rf_dr[7:0];
      8'h2B: rdata = rf_dr[15:8];
      8'h2C: rdata = rf_cap[7:0];
      8'h2D: rdata = rf_cap[15:8];
      8'h40: rdata = phase[7:0];
      8'h41: rdata = {4'd0, phase[11:8]};
      8'h44, 8'h45, 8'h46, 8'h47: rdata = clke_rd[8*addr[1:0] +: 8];
      default: rdata = 8'h00;
    endcase
  end
endmodule
