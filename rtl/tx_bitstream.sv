// tx_bitstream: packet transmission chain of the baseband unit.
//
// The payload bytes stream from the TX buffer through CRC generation,
// encryption, whitening and FEC encoding to the radio one bit per bit_tick
// (1 Mbit/s), with no buffer between the coding blocks: a TX sequencer
// decides, for every output bit, which block is active according to the
// packet type. This chain structure (CRC -> encrypt -> whiten -> FEC for the
// payload, HEC -> whiten -> FEC 1/3 for the header, sequencer controlling all
// of them) is the module's. The packet format itself is the Bluetooth 1.1 one:
//   access code  4-bit preamble, 64-bit sync word, 4-bit trailer (72 bits)
//   header       10 bits + 8-bit HEC, whitened, each bit sent three times
//   payload      payload header (0/1/2 bytes), data, CRC-16, encrypted and
//                whitened, FEC 2/3 / FEC 1/3 / none depending on the type.
// FEC 2/3 pads the last block with zeros. Bits go LSB first.
//
// Interface: start (one clk cycle, ignored while busy) latches the header,
// payload header fields and options. Every bit_tick produces one tx_bit with
// tx_bit_valid in the next cycle. Payload bytes are read from a
// first-word-fall-through buffer (pl_data/pl_empty/pl_rd); an empty buffer
// when a byte is needed sets underrun and sends zeros. ks_bit is the
// encryption key stream; ks_adv asks for the next key stream bit. done pulses
// after the last bit.
module tx_bitstream
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_tick,
  input  logic        start,
  input  logic [63:0] sync_word,
  input  pkt_hdr_t    hdr,
  input  logic [7:0]  uap,
  input  logic        whiten_en,
  input  logic [5:0]  whiten_init,
  input  logic        crypt_en,
  input  logic        ks_bit,
  output logic        ks_adv,
  input  logic [1:0]  llid,
  input  logic        pflow,
  input  logic [9:0]  plen,
  input  logic [7:0]  pl_data,
  input  logic        pl_empty,
  output logic        pl_rd,
  output logic        tx_bit,
  output logic        tx_bit_valid,
  output logic        busy,
  output logic        done,
  output logic        underrun
);
  typedef enum logic [1:0] {S_IDLE, S_ACC, S_HDR, S_PLD} state_e;

  state_e      st;
  logic [6:0]  acnt;
  logic [13:0] src;
  logic [1:0]  rep;
  logic [3:0]  blk;
  logic        held;
  logic [7:0]  hec;
  logic [15:0] crc;
  logic [6:0]  wh;
  logic [4:0]  par;
  logic [63:0] sw_r;
  pkt_hdr_t    hdr_r;
  ptype_cfg_t  cfg;
  logic [15:0] phdr_r;
  logic [13:0] phb, dend, nbits;
  logic        wen_r, cen_r;

  assign busy = (st != S_IDLE);

  // Raw payload bit and its region, before encryption and whitening.
  logic [13:0] didx;
  logic        in_phdr, in_data, raw_pl;
  always_comb begin
    didx    = src - phb;
    in_phdr = (src < phb);
    in_data = !in_phdr && (src < dend);
    if (in_phdr)      raw_pl = phdr_r[src[3:0]];
    else if (in_data) raw_pl = pl_empty ? 1'b0 : pl_data[didx[2:0]];
    else              raw_pl = crc[15];
  end

  function automatic logic acc_bit(input logic [6:0] i, input logic [63:0] s);
    if (i < 7'd4)       return s[0] ^ i[0];
    else if (i < 7'd68) return s[6'(i - 7'd4)];
    else                return s[63] ^ ~i[0];
  endfunction

  // Does the FEC stage of the payload take a new bit at this tick?
  logic need_new;
  always_comb begin
    unique case (cfg.fec)
      FEC_13:  need_new = (rep == 2'd0);
      FEC_23:  need_new = (blk < 4'd10);
      default: need_new = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; acnt <= '0; src <= '0; rep <= '0; blk <= '0; held <= 1'b0;
      hec <= '0; crc <= '0; wh <= '0; par <= '0; sw_r <= '0; hdr_r <= '0;
      cfg <= '0; phdr_r <= '0; phb <= '0; dend <= '0; nbits <= '0;
      wen_r <= 1'b0; cen_r <= 1'b0;
      tx_bit <= 1'b0; tx_bit_valid <= 1'b0; done <= 1'b0; underrun <= 1'b0;
      pl_rd <= 1'b0; ks_adv <= 1'b0;
    end else begin
      tx_bit_valid <= 1'b0;
      done         <= 1'b0;
      pl_rd        <= 1'b0;
      ks_adv       <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          logic [9:0] len;
          ptype_cfg_t c;
          c      = ptype_cfg(hdr.ptype);
          cfg    <= c;
          hdr_r  <= hdr;
          sw_r   <= sync_word;
          wen_r  <= whiten_en;
          cen_r  <= crypt_en;
          hec    <= uap;
          crc    <= {8'h00, uap};
          wh     <= {1'b1, whiten_init};
          acnt   <= '0;
          underrun <= 1'b0;
          unique case (c.phdr_bytes)
            2'd1:    begin len = {5'd0, plen[4:0]}; phdr_r <= {8'd0, plen[4:0], pflow, llid}; end
            2'd2:    begin len = {1'b0, plen[8:0]}; phdr_r <= {4'd0, plen[8:0], pflow, llid}; end
            default: begin len = c.fixed_len;       phdr_r <= '0; end
          endcase
          phb   <= {9'd0, c.phdr_bytes, 3'd0};
          dend  <= {9'd0, c.phdr_bytes, 3'd0} + {1'b0, len, 3'd0};
          nbits <= {9'd0, c.phdr_bytes, 3'd0} + {1'b0, len, 3'd0} + (c.has_crc ? 14'd16 : 14'd0);
          st    <= S_ACC;
        end

        S_ACC: if (bit_tick) begin
          tx_bit       <= acc_bit(acnt, sw_r);
          tx_bit_valid <= 1'b1;
          acnt         <= acnt + 1'b1;
          if (acnt == 7'd71) begin
            st <= S_HDR; src <= '0; rep <= '0;
          end
        end

        S_HDR: if (bit_tick) begin
          tx_bit_valid <= 1'b1;
          if (rep == 2'd0) begin
            logic raw, o;
            raw = (src < 14'd10) ? hdr_r[src[3:0]] : hec[7];
            o   = raw ^ (wen_r & wh[6]);
            hec <= (src < 14'd10) ? hec_step(hec, raw) : {hec[6:0], 1'b0};
            wh  <= whiten_step(wh);
            held   <= o;
            tx_bit <= o;
            src    <= src + 1'b1;
            rep    <= 2'd1;
          end else begin
            tx_bit <= held;
            rep    <= (rep == 2'd2) ? 2'd0 : rep + 1'b1;
            if (rep == 2'd2 && src == 14'd18) begin
              src <= '0; blk <= '0;
              if (cfg.has_payload) st <= S_PLD;
              else begin st <= S_IDLE; done <= 1'b1; end
            end
          end
        end

        S_PLD: if (bit_tick) begin
          logic o, fin;
          logic [13:0] src_n;
          o     = 1'b0;
          src_n = src;
          tx_bit_valid <= 1'b1;
          if (need_new) begin
            if (src < nbits) begin
              o = raw_pl ^ (cen_r & ks_bit) ^ (wen_r & wh[6]);
              if (cen_r) ks_adv <= 1'b1;
              wh <= whiten_step(wh);
              if (src < dend) crc <= crc_step(crc, raw_pl);
              else            crc <= {crc[14:0], 1'b0};
              if (in_data && didx[2:0] == 3'd7) begin
                if (pl_empty) underrun <= 1'b1;
                else          pl_rd <= 1'b1;
              end
              src_n = src + 1'b1;
            end
            if (in_data && pl_empty) underrun <= 1'b1;
            unique case (cfg.fec)
              FEC_13: begin held <= o; rep <= 2'd1; end
              FEC_23: begin par <= fec23_step(par, o); blk <= blk + 1'b1; end
              default: ;
            endcase
            tx_bit <= o;
          end else if (cfg.fec == FEC_13) begin
            tx_bit <= held;
            rep    <= (rep == 2'd2) ? 2'd0 : rep + 1'b1;
          end else begin
            tx_bit <= par[4];
            par    <= {par[3:0], 1'b0};
            blk    <= (blk == 4'd14) ? 4'd0 : blk + 1'b1;
          end
          src <= src_n;
          unique case (cfg.fec)
            FEC_13:  fin = (rep == 2'd2) && (src_n == nbits);
            FEC_23:  fin = (blk == 4'd14) && (src_n == nbits);
            default: fin = (src_n == nbits);
          endcase
          if (fin) begin st <= S_IDLE; done <= 1'b1; end
        end

        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
