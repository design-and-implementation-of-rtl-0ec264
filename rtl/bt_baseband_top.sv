// bt_baseband_top: the Bluetooth baseband module IP.
//
// Four units share one 8-bit microcontroller bus, each with its own FIFO:
// the link controller (baseband unit) towards the RF module, the UART and
// the USB controller as host controller interfaces, and the audio CODEC
// towards a linear PCM chip. The microcontroller reaches every unit through
// memory-mapped registers; the audio CODEC can also exchange voice bytes
// with the link controller directly (SCO stream) without the processor.
//
// Bus: 10-bit address, the two high bits select the unit:
//   0x000-0x0FF link controller, 0x100-0x1FF UART (16 registers),
//   0x200-0x2FF USB controller, 0x300-0x3FF audio CODEC (16 registers).
// Writes take effect at the clock edge with bus_wr; bus_rdata is
// combinational from bus_addr; bus_rd marks a read that may pop a FIFO.
// The USB controller runs on its own 48 MHz clock (usb_clk, four times
// clk, for its 4x oversampling clock recovery). It takes the bus strobes
// through synchronisers, so a USB access needs an idle bus cycle after it.
// The USB transceiver and the UART level shifter are external chips.
// The unit partition and external chips follow the module; the address map
// is this design's.
module bt_baseband_top (
  input  logic       clk,          // 12 MHz system clock
  input  logic       rst_n,
  // microcontroller bus
  input  logic [9:0] bus_addr,
  input  logic [7:0] bus_wdata,
  input  logic       bus_wr,
  input  logic       bus_rd,
  output logic [7:0] bus_rdata,
  output logic [3:0] irq,          // {codec, usb, uart, link controller}
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
  // UART transceiver
  output logic       uart_txd,
  input  logic       uart_rxd,
  output logic       uart_rts_n,
  output logic       uart_dtr_n,
  input  logic       uart_cts_n,
  input  logic       uart_dsr_n,
  // USB transceiver
  input  logic       usb_clk,      // 48 MHz, four times clk
  input  logic       usb_dp_i,
  input  logic       usb_dm_i,
  output logic       usb_dp_o,
  output logic       usb_dm_o,
  output logic       usb_oe,
  output logic       usb_pullup,
  // PCM chip
  output logic       pcm_clk,
  output logic       pcm_sync,
  output logic       pcm_dout,
  input  logic       pcm_din,
  // observation
  output logic [27:0] clkn,
  output logic [6:0]  channel
);
  logic       cs_lc, cs_uart, cs_usb, cs_codec;
  logic [7:0] rd_lc, rd_uart, rd_usb, rd_codec;
  logic [7:0] sco_tx_data, sco_rx_data;
  logic       sco_tx_valid, sco_tx_ready, sco_rx_valid, sco_rx_rd;

  assign cs_lc    = (bus_addr[9:8] == 2'd0);
  assign cs_uart  = (bus_addr[9:8] == 2'd1);
  assign cs_usb   = (bus_addr[9:8] == 2'd2);
  assign cs_codec = (bus_addr[9:8] == 2'd3);

  link_controller u_lc (
    .clk, .rst_n, .cs(cs_lc), .addr(bus_addr[7:0]), .wdata(bus_wdata), .wr(bus_wr),
    .rd(bus_rd), .rdata(rd_lc), .irq(irq[0]),
    .rf_clk1m, .rf_rxclk, .rf_rxd, .rf_txd, .rf_ctrl, .rf_tck, .rf_tms, .rf_tdi, .rf_tdo,
    .sco_tx_data, .sco_tx_valid, .sco_tx_ready, .sco_rx_data, .sco_rx_valid, .sco_rx_rd,
    .clkn_out(clkn), .channel_out(channel));

  uart u_uart (
    .clk, .rst_n, .cs(cs_uart), .addr(bus_addr[3:0]), .wdata(bus_wdata), .wr(bus_wr),
    .rd(bus_rd), .rdata(rd_uart), .irq(irq[1]),
    .txd(uart_txd), .rxd(uart_rxd), .rts_n(uart_rts_n), .dtr_n(uart_dtr_n),
    .cts_n(uart_cts_n), .dsr_n(uart_dsr_n));

  usb_controller u_usb (
    .clk(usb_clk), .rst_n, .cs(cs_usb), .addr(bus_addr[3:0]), .wdata(bus_wdata), .wr(bus_wr),
    .rd(bus_rd), .rdata(rd_usb), .irq(irq[2]),
    .usb_dp_i, .usb_dm_i, .usb_dp_o, .usb_dm_o, .usb_oe, .usb_pullup);

  audio_codec u_codec (
    .clk, .rst_n, .cs(cs_codec), .addr(bus_addr[3:0]), .wdata(bus_wdata), .wr(bus_wr),
    .rd(bus_rd), .rdata(rd_codec), .irq(irq[3]),
    .pcm_clk, .pcm_sync, .pcm_dout, .pcm_din,
    .sco_tx_data, .sco_tx_valid, .sco_tx_ready, .sco_rx_data, .sco_rx_valid, .sco_rx_rd);

  always_comb begin
    unique case (bus_addr[9:8])
      2'd0:    bus_rdata = rd_lc;
      2'd1:    bus_rdata = rd_uart;
      2'd2:    bus_rdata = rd_usb;
      default: bus_rdata = rd_codec;
    endcase
  end
endmodule
