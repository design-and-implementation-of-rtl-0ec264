// uart: HCI UART unit of the baseband module.
//
// A 16C450-style UART: eight byte-wide registers with the usual layout
// (RBR/THR, IER, IIR, LCR, MCR, LSR, MSR, SCR), 5 to 8 data bits, optional
// even/odd parity and one or two stop bits. In place of the 16C450 divisor
// latch, the baud rate comes from a numerically controlled oscillator: a
// 20-bit phase accumulator advanced by a 24-bit increment (DLL, DLM and the
// extra register 8) overflows at 8 times the baud rate,
//   baud = f_clk * inc / 2^23,
// which spans 300 bit/s (inc = 210) to 1.5 Mbit/s (inc = 2^20) at 12 MHz.
// Both directions have a 64-byte FIFO. An HCI packet decoder follows the
// received bytes: it reads the packet indicator (1 command, 2 ACL data,
// 3 SCO data, 4 event), takes the length from the packet header
// (command: 1 byte after a 2-byte opcode; ACL: 2 bytes after the 2-byte
// handle; SCO: 1 byte after the handle; event: 1 byte after the event code)
// and flags the end of each packet, so the firmware need not parse the
// stream. The 16C450 base, the NCO range and the packet decoder follow the
// module; FIFO per direction, NCO form and the register extensions are this
// design's choices.
//
// Extra registers: 8 NCO[23:16], 9 HCI packet type, 10/11 HCI payload
// length, 12 RX FIFO level, 13 TX FIFO level, 14 HCI status ([0] packet
// complete, [1] unknown indicator; cleared by reading). IER[3] enables the
// HCI packet-complete interrupt, reported in IIR with id 0 (the modem
// status slot). Reads are combinational; a read of RBR pops the RX FIFO.
module uart #(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] rdata,
  output logic       irq,
  // RS232 side (to the UART transceiver)
  output logic       txd,
  input  logic       rxd,
  output logic       rts_n,
  output logic       dtr_n,
  input  logic       cts_n,
  input  logic       dsr_n
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  logic [7:0]  ier, lcr, mcr, scr;
  logic [23:0] inc;
  logic [19:0] acc;
  logic        tick;
  logic        oe, pe, fe, bi;
  logic        dlab;
  logic        wr_en, rd_en;
  assign wr_en = cs && wr;
  assign rd_en = cs && rd;
  assign dlab  = lcr[7];

  // ---------------- NCO ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin acc <= '0; tick <= 1'b0; end
    else begin
      logic [23:0] sum;
      sum  = {4'd0, acc} + inc;
      acc  <= sum[19:0];
      tick <= (sum[23:20] != 4'd0);
    end
  end

  // ---------------- FIFOs ----------------
  logic [7:0]    txf_data, rxf_data, rx_byte;
  logic          txf_empty, txf_full, rxf_empty, rxf_full, txf_rd, rx_push;
  logic [LW-1:0] txf_level, rxf_level;
  logic          txf_ov, txf_un, rxf_ov, rxf_un;

  bb_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .clr(1'b0), .wr_en(wr_en && addr == 4'd0 && !dlab), .wr_data(wdata),
    .rd_en(txf_rd), .rd_data(txf_data), .empty(txf_empty), .full(txf_full),
    .level(txf_level), .overflow(txf_ov), .underflow(txf_un));

  bb_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .clr(1'b0), .wr_en(rx_push), .wr_data(rx_byte),
    .rd_en(rd_en && addr == 4'd0 && !dlab), .rd_data(rxf_data), .empty(rxf_empty),
    .full(rxf_full), .level(rxf_level), .overflow(rxf_ov), .underflow(rxf_un));

  // Number of data bits and frame parity.
  logic [3:0] nbits;
  assign nbits = 4'd5 + {2'd0, lcr[1:0]};
  function automatic logic par_of(input logic [7:0] d, input logic [3:0] n, input logic even);
    logic p;
    p = 1'b0;
    for (int i = 0; i < 8; i++) if (i < int'(n)) p ^= d[i];
    return even ? p : ~p;
  endfunction

  // ---------------- transmitter ----------------
  typedef enum logic [2:0] {T_IDLE, T_START, T_DATA, T_PAR, T_STOP} tst_e;
  tst_e       tst;
  logic [2:0] tsub;
  logic [3:0] tbit;
  logic [7:0] tsr;
  logic       txd_i, tstop2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; tsub <= '0; tbit <= '0; tsr <= '0; txd_i <= 1'b1; txf_rd <= 1'b0; tstop2 <= 1'b0;
    end else begin
      txf_rd <= 1'b0;
      if (tst == T_IDLE) begin
        txd_i <= 1'b1;
        if (!txf_empty && !txf_rd && tick) begin
          tsr <= txf_data; txf_rd <= 1'b1; tst <= T_START; tsub <= '0; txd_i <= 1'b0;
        end
      end else if (tick) begin
        tsub <= tsub + 1'b1;
        if (tsub == 3'd7) begin
          unique case (tst)
            T_START: begin tst <= T_DATA; tbit <= '0; txd_i <= tsr[0]; end
            T_DATA: begin
              if (tbit == nbits - 1'b1) begin
                if (lcr[3]) begin tst <= T_PAR; txd_i <= par_of(tsr, nbits, lcr[4]); end
                else        begin tst <= T_STOP; txd_i <= 1'b1; tstop2 <= lcr[2]; end
              end else begin
                tbit <= tbit + 1'b1; txd_i <= tsr[tbit[2:0] + 3'd1];
              end
            end
            T_PAR:  begin tst <= T_STOP; txd_i <= 1'b1; tstop2 <= lcr[2]; end
            T_STOP: begin
              if (tstop2) tstop2 <= 1'b0;
              else        tst <= T_IDLE;
            end
            default: tst <= T_IDLE;
          endcase
        end
      end
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_PAR, R_STOP} rst_e;
  rst_e       rstt;
  logic [1:0] rxd_s;
  logic       rxd_i;
  logic [2:0] rsub;
  logic [3:0] rbit;
  logic [7:0] rsr;
  logic       rpar_bad;
  assign rxd_i = mcr[4] ? txd_i : rxd_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_s <= 2'b11; rstt <= R_IDLE; rsub <= '0; rbit <= '0; rsr <= '0; rpar_bad <= 1'b0;
      rx_push <= 1'b0; rx_byte <= '0; oe <= 1'b0; pe <= 1'b0; fe <= 1'b0; bi <= 1'b0;
    end else begin
      rxd_s   <= {rxd_s[0], rxd};
      rx_push <= 1'b0;
      if (rd_en && addr == 4'd5) begin oe <= 1'b0; pe <= 1'b0; fe <= 1'b0; bi <= 1'b0; end
      if (tick) begin
        unique case (rstt)
          R_IDLE: if (!rxd_i) begin rstt <= R_START; rsub <= '0; end
          R_START: begin
            rsub <= rsub + 1'b1;
            if (rsub == 3'd3) begin
              if (rxd_i) rstt <= R_IDLE;          // glitch, not a start bit
              else begin rstt <= R_DATA; rsub <= '0; rbit <= '0; rsr <= '0; end
            end
          end
          R_DATA: begin
            rsub <= rsub + 1'b1;
            if (rsub == 3'd7) begin
              rsr[rbit[2:0]] <= rxd_i;
              rbit <= rbit + 1'b1;
              if (rbit == nbits - 1'b1) rstt <= lcr[3] ? R_PAR : R_STOP;
            end
          end
          R_PAR: begin
            rsub <= rsub + 1'b1;
            if (rsub == 3'd7) begin
              rpar_bad <= (rxd_i != par_of(rsr, nbits, lcr[4]));
              rstt <= R_STOP;
            end
          end
          R_STOP: begin
            rsub <= rsub + 1'b1;
            if (rsub == 3'd7) begin
              rstt    <= R_IDLE;
              rx_byte <= rsr;
              rx_push <= 1'b1;
              if (!rxd_i) fe <= 1'b1;
              if (!rxd_i && rsr == 8'd0) bi <= 1'b1;
              if (lcr[3] && rpar_bad) pe <= 1'b1;
              if (rxf_full) oe <= 1'b1;
              rpar_bad <= 1'b0;
            end
          end
          default: rstt <= R_IDLE;
        endcase
      end
    end
  end
  assign txd = txd_i;

  // ---------------- HCI packet decoder ----------------
  typedef enum logic [1:0] {H_TYPE, H_HDR, H_PAYLOAD} hst_e;
  hst_e        hst;
  logic [7:0]  hci_type;
  logic [1:0]  hidx;
  logic [15:0] hci_len, hcnt;
  logic        hci_done, hci_err;

  function automatic logic [1:0] hdr_len(input logic [7:0] t);
    unique case (t)
      8'h01, 8'h03: return 2'd3;   // opcode/handle (2) + length (1)
      8'h02:        return 2'd0;   // handle (2) + length (2): 4 bytes, coded as 0
      default:      return 2'd2;   // event code (1) + length (1)
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst <= H_TYPE; hci_type <= '0; hidx <= '0; hci_len <= '0; hcnt <= '0;
      hci_done <= 1'b0; hci_err <= 1'b0;
    end else begin
      if (rd_en && addr == 4'd14) begin hci_done <= 1'b0; hci_err <= 1'b0; end
      if (rx_push) begin
        unique case (hst)
          H_TYPE: begin
            if (rx_byte >= 8'h01 && rx_byte <= 8'h04) begin
              hci_type <= rx_byte; hst <= H_HDR; hidx <= '0; hci_len <= '0;
            end else hci_err <= 1'b1;
          end
          H_HDR: begin
            logic last;
            hidx <= hidx + 1'b1;
            last = (hidx == hdr_len(hci_type) - 2'd1);
            // length bytes: the last byte (1-byte length) or the last two (ACL)
            if (hci_type == 8'h02) begin
              if (hidx == 2'd2) hci_len[7:0]  <= rx_byte;
              if (hidx == 2'd3) hci_len[15:8] <= rx_byte;
            end else if (last) hci_len <= {8'd0, rx_byte};
            if (last) begin
              logic [15:0] l;
              l = (hci_type == 8'h02) ? {rx_byte, hci_len[7:0]} : {8'd0, rx_byte};
              hcnt <= l;
              if (l == 16'd0) begin hst <= H_TYPE; hci_done <= 1'b1; end
              else hst <= H_PAYLOAD;
            end
          end
          H_PAYLOAD: begin
            hcnt <= hcnt - 1'b1;
            if (hcnt == 16'd1) begin hst <= H_TYPE; hci_done <= 1'b1; end
          end
          default: hst <= H_TYPE;
        endcase
      end
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ier <= '0; lcr <= 8'h03; mcr <= '0; scr <= '0; inc <= 24'd80531;  // 115.2 kbit/s at 12 MHz
    end else if (wr_en) begin
      unique case (addr)
        4'd0: if (dlab) inc[7:0]  <= wdata;
        4'd1: if (dlab) inc[15:8] <= wdata; else ier <= wdata;
        4'd3: lcr <= wdata;
        4'd4: mcr <= wdata;
        4'd7: scr <= wdata;
        4'd8: inc[23:16] <= wdata;
        default: ;
      endcase
    end
  end
  assign rts_n = ~mcr[1];
  assign dtr_n = ~mcr[0];

  // interrupt identification
  logic       int_ls, int_rx, int_tx, int_hci;
  logic [3:0] iir;
  assign int_ls  = ier[2] && (oe || pe || fe || bi);
  assign int_rx  = ier[0] && !rxf_empty;
  assign int_tx  = ier[1] && txf_empty;
  assign int_hci = ier[3] && hci_done;
  always_comb begin
    if      (int_ls)  iir = 4'b0110;
    else if (int_rx)  iir = 4'b0100;
    else if (int_tx)  iir = 4'b0010;
    else if (int_hci) iir = 4'b0000;
    else              iir = 4'b0001;
  end
  assign irq = !iir[0];

  always_comb begin
    unique case (addr)
      4'd0:  rdata = dlab ? inc[7:0] : rxf_data;
      4'd1:  rdata = dlab ? inc[15:8] : ier;
      4'd2:  rdata = {4'd0, iir};
      4'd3:  rdata = lcr;
      4'd4:  rdata = mcr;
      4'd5:  rdata = {1'b0, txf_empty && tst == T_IDLE, txf_empty, bi, fe, pe, oe, !rxf_empty};
      4'd6:  rdata = {2'b00, ~dsr_n, ~cts_n, 4'd0};
      4'd7:  rdata = scr;
      4'd8:  rdata = inc[23:16];
      4'd9:  rdata = hci_type;
      4'd10: rdata = hci_len[7:0];
      4'd11: rdata = hci_len[15:8];
      4'd12: rdata = 8'(rxf_level);
      4'd13: rdata = 8'(txf_level);
      4'd14: rdata = {6'd0, hci_err, hci_done};
      default: rdata = 8'h00;
    endcase
  end
endmodule
