// rx_bitstream: packet reception chain of the baseband unit.
//
// Mirrors the transmission chain: FEC decoding, de-whitening, decryption,
// HEC and CRC checking. The packet type and length are not known in advance,
// so a header analysis stage (own LT_ADDR or broadcast, packet type) and a
// payload header analysis stage (LLID, FLOW, LENGTH) extract them while the
// packet arrives and steer the RX sequencer. This division into blocks and
// the absence of buffers between them follow the module's design; packet
// format and codes are Bluetooth 1.1.
//
// Timing: arm with start; the chain then waits for sync_found from the
// correlator (asserted with or after the last sync word bit), skips the
// 4-bit trailer and decodes the header. FEC 1/3 is decoded by a majority of
// three. FEC 2/3 gathers each 15-bit block, corrects one error and then
// feeds its 10 data bits to the back end in 10 consecutive clock cycles, so
// rx_bit_valid strobes must be at least 11 clock cycles apart (12 at 1 Mbit/s
// and 12 MHz). Payload bytes leave on pl_wdata/pl_wr towards the RX buffer.
// hdr_valid pulses once the header is checked; done pulses at the end of the
// packet or when the packet is dropped (bad HEC or other LT_ADDR, see
// hec_ok and addr_ok). ks_adv is combinational: it is high in the cycle a
// payload bit uses ks_bit, so the cipher steps once per decrypted bit even
// when the FEC 2/3 decoder delivers bits in consecutive cycles.
module rx_bitstream
  import bb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       stop,
  input  logic       rx_bit,
  input  logic       rx_bit_valid,
  input  logic       sync_found,
  input  logic [2:0] own_lt_addr,
  input  logic [7:0] uap,
  input  logic       whiten_en,
  input  logic [5:0] whiten_init,
  input  logic       crypt_en,
  input  logic       ks_bit,
  output logic       ks_adv,
  output pkt_hdr_t   hdr_out,
  output logic       hdr_valid,
  output logic       hec_ok,
  output logic       addr_ok,
  output logic [1:0] llid_out,
  output logic       pflow_out,
  output logic [9:0] plen_out,
  output logic [7:0] pl_wdata,
  output logic       pl_wr,
  output logic       crc_ok,
  output logic [7:0] fec_corrections,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_TRL, S_HDR, S_PLD} state_e;

  state_e      st;
  ptype_cfg_t  cfg;
  fec_e        fmode;
  logic [2:0]  tcnt;
  logic [1:0]  rep;
  logic [1:0]  ones;
  logic [14:0] cbuf;
  logic [3:0]  ccnt;
  logic [9:0]  obuf;
  logic [3:0]  ocnt;
  logic        fe_v, fe_b;

  logic [13:0] src, phb, dend, nbits;
  logic [9:0]  len_r;
  logic [9:0]  hsr;
  logic [15:0] phsr;
  logic [7:0]  byte_sr;
  logic [7:0]  hec;
  logic [15:0] crc;
  logic        hec_bad, crc_bad;
  logic [6:0]  wh;
  logic        wen_r, cen_r;

  assign busy  = (st != S_IDLE);
  assign dend  = phb + {1'b0, len_r, 3'd0};
  assign nbits = dend + (cfg.has_crc ? 14'd16 : 14'd0);

  assign ks_adv = cen_r && (st == S_PLD) && fe_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cfg <= '0; fmode <= FEC_NONE; tcnt <= '0; rep <= '0; ones <= '0;
      cbuf <= '0; ccnt <= '0; obuf <= '0; ocnt <= '0; fe_v <= 1'b0; fe_b <= 1'b0;
      src <= '0; phb <= '0; len_r <= '0; hsr <= '0; phsr <= '0; byte_sr <= '0;
      hec <= '0; crc <= '0; hec_bad <= 1'b0; crc_bad <= 1'b0; wh <= '0;
      wen_r <= 1'b0; cen_r <= 1'b0;
      hdr_out <= '0; hdr_valid <= 1'b0; hec_ok <= 1'b0; addr_ok <= 1'b0;
      llid_out <= '0; pflow_out <= 1'b0; plen_out <= '0; pl_wdata <= '0; pl_wr <= 1'b0;
      crc_ok <= 1'b0; fec_corrections <= '0; done <= 1'b0;
    end else begin
      fe_v      <= 1'b0;
      hdr_valid <= 1'b0;
      pl_wr     <= 1'b0;
      done      <= 1'b0;

      // ---------------- front end: FEC decoding ----------------
      if (st == S_HDR || st == S_PLD) begin
        if (ocnt != 4'd0) begin
          fe_v <= 1'b1; fe_b <= obuf[0];
          obuf <= {1'b0, obuf[9:1]};
          ocnt <= ocnt - 1'b1;
        end
        if (rx_bit_valid) begin
          unique case (fmode)
            FEC_13: begin
              if (rep == 2'd2) begin
                fe_v <= 1'b1;
                fe_b <= ((ones + 2'(rx_bit)) >= 2'd2);
                rep  <= '0; ones <= '0;
              end else begin
                rep  <= rep + 1'b1;
                ones <= ones + 2'(rx_bit);
              end
            end
            FEC_23: begin
              if (ccnt == 4'd14) begin
                logic e;
                logic [9:0] d;
                d = fec23_correct({rx_bit, cbuf[13:0]}, e);
                obuf <= d; ocnt <= 4'd10; ccnt <= '0;
                if (e && fec_corrections != 8'hFF) fec_corrections <= fec_corrections + 1'b1;
              end else begin
                cbuf[ccnt] <= rx_bit;
                ccnt <= ccnt + 1'b1;
              end
            end
            default: begin fe_v <= 1'b1; fe_b <= rx_bit; end
          endcase
        end
      end

      // ---------------- RX sequencer and back end ----------------
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_SEARCH;
          wen_r <= whiten_en; cen_r <= crypt_en;
          hec_ok <= 1'b0; addr_ok <= 1'b0; crc_ok <= 1'b0; fec_corrections <= '0;
        end
        S_SEARCH: if (sync_found) begin st <= S_TRL; tcnt <= '0; end
        S_TRL: if (rx_bit_valid) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 3'd3) begin
            st <= S_HDR; fmode <= FEC_13; rep <= '0; ones <= '0; ocnt <= '0;
            src <= '0; hec <= uap; hec_bad <= 1'b0; wh <= {1'b1, whiten_init};
          end
        end
        S_HDR: if (fe_v) begin
          logic b;
          b = fe_b ^ (wen_r & wh[6]);
          wh  <= whiten_step(wh);
          src <= src + 1'b1;
          if (src < 14'd10) begin
            hsr[src[3:0]] <= b;
            hec <= hec_step(hec, b);
          end else begin
            hec <= {hec[6:0], 1'b0};
            if (b != hec[7]) hec_bad <= 1'b1;
          end
          if (src == 14'd17) begin
            pkt_hdr_t   h;
            ptype_cfg_t c;
            logic       hok, aok;
            h   = pkt_hdr_t'(hsr);
            c   = ptype_cfg(h.ptype);
            hok = !hec_bad && (b == hec[7]);
            aok = (h.lt_addr == own_lt_addr) || (h.lt_addr == 3'd0);
            hdr_out <= h; hec_ok <= hok; addr_ok <= aok; hdr_valid <= 1'b1;
            cfg <= c;
            phb <= {9'd0, c.phdr_bytes, 3'd0};
            len_r <= (c.phdr_bytes == 2'd0) ? c.fixed_len : 10'd0;
            crc <= {8'h00, uap}; crc_bad <= 1'b0;
            src <= '0;
            if (hok && aok && c.has_payload) begin
              st <= S_PLD; fmode <= c.fec; rep <= '0; ones <= '0; ccnt <= '0; ocnt <= '0;
            end else begin
              st <= S_IDLE; done <= 1'b1;
            end
          end
        end
        S_PLD: if (fe_v) begin
          logic b;
          b = fe_b ^ (wen_r & wh[6]) ^ (cen_r & ks_bit);
          wh  <= whiten_step(wh);
          src <= src + 1'b1;
          if (src < dend) crc <= crc_step(crc, b);
          else begin
            crc <= {crc[14:0], 1'b0};
            if (b != crc[15]) crc_bad <= 1'b1;
          end
          if (src < phb) begin
            logic [15:0] ph;
            ph = phsr;
            ph[src[3:0]] = b;
            phsr <= ph;
            if (src == phb - 1'b1) begin
              llid_out  <= ph[1:0];
              pflow_out <= ph[2];
              len_r     <= (cfg.phdr_bytes == 2'd1) ? {5'd0, ph[7:3]} : {1'b0, ph[11:3]};
            end
          end else if (src < dend) begin
            logic [7:0] by;
            by = {b, byte_sr[7:1]};
            byte_sr <= by;
            if (src[2:0] == 3'd7) begin pl_wdata <= by; pl_wr <= 1'b1; end
          end
          if (src + 1'b1 == nbits && !(src == phb - 1'b1)) begin
            st <= S_IDLE; done <= 1'b1; plen_out <= len_r;
            crc_ok <= cfg.has_crc && !crc_bad && (src < dend || b == crc[15]);
          end
          if (src == phb - 1'b1 && cfg.phdr_bytes != 2'd0) begin
            // A zero-length payload with no CRC ends right after its header.
            if ((cfg.phdr_bytes == 2'd1 ? ph_len1(phsr, b) : ph_len2(phsr, b)) == 10'd0 && !cfg.has_crc) begin
              st <= S_IDLE; done <= 1'b1; plen_out <= '0;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
      if (stop) st <= S_IDLE;
    end
  end

  function automatic logic [9:0] ph_len1(input logic [15:0] p, input logic b);
    return {5'd0, b, p[6:3]};
  endfunction
  function automatic logic [9:0] ph_len2(input logic [15:0] p, input logic b);
    return {1'b0, b, p[10:3]};
  endfunction
endmodule
