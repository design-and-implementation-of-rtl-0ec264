// usb_controller: full-speed (12 Mbit/s) USB 1.1 device controller, the
// second host controller interface of the baseband module.
//
// Its five parts follow the module's description:
//  * Transceiver interface. It drives usb_dp_o/usb_dm_o with usb_oe high
//    while sending. Its RX clock recovery oversamples the synchronised line
//    four times per bit (clk = 48 MHz) and restarts its bit phase on every
//    line transition. Each bit is sampled in the middle.
//  * Serial interface engine. It works at the recovered bit clock. It does:
//    - NRZI decoding and encoding;
//    - removal and insertion of stuffed bits (a 0 after six 1s);
//    - SYNC and end-of-packet (SE0) detection;
//    - the PID check (upper nibble = inverted lower nibble);
//    - CRC5 on tokens and CRC16 on data, both checked by their residues
//      01100 and 0x800D.
//  * Protocol layer handler. A transaction sequencer answers tokens for the
//    device address:
//    - OUT and SETUP: accepts the following DATA0/1 packet, checks its data
//      toggle and answers ACK (or NAK while the OUT buffer is still full).
//    - IN: sends the armed IN buffer with the endpoint's data toggle and
//      waits for the host's ACK, or answers NAK when nothing is armed.
//    Unexpected or damaged packets are ignored. A packet that is error-free
//    and expected is stored in the endpoint buffer, and its endpoint and
//    length are written to registers.
//  * Registers and endpoint manager. They hold:
//    - the device address;
//    - the data toggles of endpoints 0 to 3;
//    - the frame number from SOF;
//    - interrupt flags;
//    - a 64-byte OUT buffer and a 64-byte IN buffer, shared by all
//      endpoints.
//  * Parallel interface to the microcontroller bus with an interrupt.
// The packet formats are USB 1.1. This design chooses:
//  - the register map;
//  - one OUT and one IN buffer shared by all endpoints;
//  - the 4x oversampling;
//  - the response timeout.
//
// Clocking: everything runs on clk, which must be 4 x 12 MHz. The bus
// strobes come from the 12 MHz system clock. They pass through two-flop
// synchronisers. A write acts on the rising edge of wr, and a read of
// OUT_DATA pops on the falling edge of rd. Strobes must therefore last one
// system clock and be followed by at least one idle system clock. rdata is
// combinational from addr.
// Registers (addr[3:0]):
//  0 ADDR rw [6:0] device address (cleared by a bus reset)
//  1 CTRL rw [0] attach (usb_pullup)
//  2 IRQ r/w1c [0] OUT data [1] SETUP data [2] IN done [3] SOF [4] bus reset
//  3 IRQ mask rw
//  4 OUT info r {full, setup, 2'b0, ep[3:0]}; 5 OUT length r
//  6 OUT data r (pops; the buffer is free again when it is empty)
//  7 IN data w (appends); 8 IN control w {arm, 3'b0, ep[3:0]}, r {armed, 3'b0, ep}
//  9 IN length r; 10/11 frame number [7:0]/[10:8]
module usb_controller #(
  parameter int unsigned BUF_BYTES = 64,   // each endpoint buffer
  parameter int unsigned OVS       = 4     // clk cycles per USB bit
) (
  input  logic       clk,                  // 48 MHz
  input  logic       rst_n,
  // microcontroller bus (strobes from the 12 MHz system clock)
  input  logic       cs,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] rdata,
  output logic       irq,
  // USB transceiver
  input  logic       usb_dp_i,
  input  logic       usb_dm_i,
  output logic       usb_dp_o,
  output logic       usb_dm_o,
  output logic       usb_oe,
  output logic       usb_pullup
);
  localparam int unsigned BW = $clog2(BUF_BYTES);
  localparam logic [3:0] PID_OUT = 4'b0001, PID_IN = 4'b1001, PID_SOF = 4'b0101,
                         PID_SETUP = 4'b1101, PID_DATA0 = 4'b0011, PID_DATA1 = 4'b1011,
                         PID_ACK = 4'b0010, PID_NAK = 4'b1010;

  // ---------------- bus strobes ----------------
  logic [2:0] wr_s, rd_s;
  logic       wr_p, rd_fall, rd_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin wr_s <= '0; rd_s <= '0; rd_data <= 1'b0; end
    else begin
      wr_s <= {wr_s[1:0], cs && wr};
      rd_s <= {rd_s[1:0], cs && rd};
      if (rd_s[1] && !rd_s[2]) rd_data <= (addr == 4'd6);
    end
  end
  assign wr_p    = wr_s[1] && !wr_s[2];
  assign rd_fall = !rd_s[1] && rd_s[2];

  // ---------------- transceiver interface: sync and clock recovery ----------------
  logic [1:0] dp_s, dm_s;
  logic [1:0] line, line_q;            // {dp, dm}: J = 10, K = 01, SE0 = 00
  logic [1:0] ph;
  logic       smp;                     // one strobe per recovered bit
  logic       tx_active;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_s <= 2'b11; dm_s <= '0; line_q <= 2'b10; ph <= '0;
    end else begin
      dp_s   <= {dp_s[0], usb_dp_i};
      dm_s   <= {dm_s[0], usb_dm_i};
      line_q <= line;
      ph     <= (line != line_q) ? 2'd1 : ph + 1'b1;
    end
  end
  assign line = {dp_s[1], dm_s[1]};
  assign smp  = (ph == 2'(OVS / 2)) && !tx_active;

  // ---------------- SIE receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_PKT, R_SE0} rst_e;
  rst_e        rs;
  logic [1:0]  prev_ls;
  logic [2:0]  ones;
  logic [7:0]  sr, rbyte;
  logic [2:0]  rbit;
  logic [6:0]  rcnt;                    // bytes received after the PID
  logic [15:0] crc16;
  logic [4:0]  crc5;
  logic [7:0]  pid;
  logic [15:0] tok;                     // token body
  logic        rx_byte_v, rx_eop, rx_err;
  logic [5:0]  se0_cnt;
  logic        bus_reset;
  logic        pid_done, pid_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; prev_ls <= 2'b10; ones <= '0; sr <= '1; rbyte <= '0; rbit <= '0;
      rcnt <= '0; crc16 <= '1; crc5 <= '1; pid <= '0; tok <= '0; rx_byte_v <= 1'b0;
      rx_eop <= 1'b0; rx_err <= 1'b0; se0_cnt <= '0; bus_reset <= 1'b0;
    end else begin
      rx_byte_v <= 1'b0;
      rx_eop    <= 1'b0;
      bus_reset <= 1'b0;
      if (smp) begin
        // bus reset: SE0 for 32 bit times or longer
        if (line == 2'b00) begin
          if (se0_cnt != 6'd63) se0_cnt <= se0_cnt + 1'b1;
          if (se0_cnt == 6'd31) bus_reset <= 1'b1;
        end else se0_cnt <= '0;
        prev_ls <= line;
        unique case (rs)
          R_IDLE: begin
            logic d;
            d = (line == prev_ls);
            sr <= {d, sr[7:1]};
            // end of SYNC: ... K J K K, decoded 0 0 1 after at least four zeros
            if (line == 2'b01 && {d, sr[7:4]} == 5'b10000) begin
              rs <= R_PKT; ones <= 3'd1; rbit <= '0; rcnt <= '0; rx_err <= 1'b0;
              crc16 <= '1; crc5 <= '1;
            end
          end
          R_PKT: begin
            if (line == 2'b00) begin
              rs <= R_SE0;
              if (rbit != 3'd0) rx_err <= 1'b1;
            end else begin
              logic d;
              d = (line == prev_ls);
              if (ones == 3'd6) begin
                ones <= '0;                         // stuffed bit
                if (d) rx_err <= 1'b1;
              end else begin
                logic [7:0] b;
                ones <= d ? ones + 1'b1 : 3'd0;
                b = {d, rbyte[7:1]};
                rbyte <= b;
                rbit  <= rbit + 1'b1;
                if (pid_done) begin
                  crc16 <= {crc16[14:0], 1'b0} ^ ((crc16[15] ^ d) ? 16'h8005 : 16'h0);
                  crc5  <= {crc5[3:0], 1'b0} ^ ((crc5[4] ^ d) ? 5'b00101 : 5'b0);
                end
                if (rbit == 3'd7) begin
                  if (!pid_done) pid <= b;
                  else begin
                    if (rcnt == 7'd0) tok[7:0]  <= b;
                    if (rcnt == 7'd1) tok[15:8] <= b;
                    if (rcnt != 7'h7F) rcnt <= rcnt + 1'b1;
                    rx_byte_v <= 1'b1;
                  end
                end
              end
            end
          end
          default: begin                             // R_SE0: wait for J
            if (line != 2'b00) begin rs <= R_IDLE; rx_eop <= 1'b1; sr <= '1; end
          end
        endcase
      end
    end
  end

  // the PID byte has been taken once the first 8 bits are in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pid_seen <= 1'b0;
    else if (smp && rs == R_IDLE) pid_seen <= 1'b0;
    else if (smp && rs == R_PKT && line != 2'b00 && ones != 3'd6 && rbit == 3'd7) pid_seen <= 1'b1;
  end
  assign pid_done = pid_seen;

  logic pid_ok, crc5_ok, crc16_ok;
  assign pid_ok   = (pid[7:4] == ~pid[3:0]);
  assign crc5_ok  = (crc5 == 5'b01100);
  assign crc16_ok = (crc16 == 16'h800D);

  // ---------------- registers and endpoint buffers ----------------
  logic [6:0] dev_addr;
  logic       attach;
  logic [4:0] irq_stat, irq_mask;
  logic [7:0] obuf [BUF_BYTES];
  logic [7:0] ibuf [BUF_BYTES];
  logic [BW:0] o_wp, o_len, o_rp, i_len;
  logic        o_full, o_setup, i_armed;
  logic [3:0]  o_ep, i_ep, cur_ep;
  logic [3:0]  tog_out, tog_in;
  logic [10:0] frame;

  // ---------------- SIE transmitter ----------------
  logic        tx_go, tx_busy_done;
  logic [7:0]  tx_pid;
  logic        tx_data;                 // send the IN buffer and CRC16 after the PID
  logic [BW:0] tx_idx;
  logic [1:0]  tph;
  logic [2:0]  tbit, tones;
  logic [7:0]  tbyte;
  logic [15:0] tcrc;
  logic [1:0]  tcrc_n;                  // CRC bytes still to send
  logic        tlevel;                  // NRZI level: 1 = J
  logic        tstuff;
  typedef enum logic [2:0] {T_IDLE, T_SYNC, T_PID, T_DATA, T_CRC, T_EOP} tst_e;
  tst_e        ts;
  logic [1:0]  eop_cnt;

  // next data bit of the transmitter (before stuffing)
  logic tx_bit_now;
  always_comb begin
    unique case (ts)
      T_SYNC:  tx_bit_now = (tbit == 3'd7);
      T_PID:   tx_bit_now = tx_pid[tbit];
      T_DATA:  tx_bit_now = tbyte[tbit];
      T_CRC:   tx_bit_now = ~tcrc[15];
      default: tx_bit_now = 1'b1;
    endcase
  end

  assign tx_active = (ts != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; tph <= '0; tbit <= '0; tones <= '0; tbyte <= '0; tcrc <= '1;
      tcrc_n <= '0; tlevel <= 1'b1; tstuff <= 1'b0; tx_idx <= '0; eop_cnt <= '0;
      usb_dp_o <= 1'b1; usb_dm_o <= 1'b0; usb_oe <= 1'b0; tx_busy_done <= 1'b0;
    end else begin
      tx_busy_done <= 1'b0;
      if (ts == T_IDLE) begin
        usb_oe <= 1'b0;
        if (tx_go) begin
          ts <= T_SYNC; tph <= '0; tbit <= '0; tones <= '0; tlevel <= 1'b1; tcrc <= '1;
          tx_idx <= '0; tstuff <= 1'b0;
        end
      end else begin
        tph <= tph + 1'b1;
        if (tph == 2'd0) begin
          usb_oe <= 1'b1;
          if (ts == T_EOP) begin
            // two bit times of SE0, then one of J
            if (eop_cnt == 2'd2) begin
              usb_dp_o <= 1'b1; usb_dm_o <= 1'b0;
            end else begin
              usb_dp_o <= 1'b0; usb_dm_o <= 1'b0;
            end
            eop_cnt <= eop_cnt + 1'b1;
            if (eop_cnt == 2'd3) begin ts <= T_IDLE; usb_oe <= 1'b0; tx_busy_done <= 1'b1; end
          end else if (tstuff) begin
            // stuffed 0: one transition
            tlevel <= ~tlevel; usb_dp_o <= ~tlevel; usb_dm_o <= tlevel;
            tstuff <= 1'b0; tones <= '0;
          end else begin
            logic b, nl;
            b  = tx_bit_now;
            nl = b ? tlevel : ~tlevel;
            tlevel <= nl; usb_dp_o <= nl; usb_dm_o <= ~nl;
            tones  <= b ? tones + 1'b1 : 3'd0;
            tstuff <= b && (tones == 3'd5);
            if (ts == T_DATA) tcrc <= {tcrc[14:0], 1'b0} ^ ((tcrc[15] ^ b) ? 16'h8005 : 16'h0);
            if (ts == T_CRC)  tcrc <= {tcrc[14:0], 1'b0};
            tbit <= tbit + 1'b1;
            if (tbit == 3'd7) begin
              unique case (ts)
                T_SYNC: ts <= T_PID;
                T_PID: begin
                  if (tx_data && i_len != '0) begin
                    ts <= T_DATA; tbyte <= ibuf[0]; tx_idx <= (BW+1)'(1);
                  end else if (tx_data) begin
                    ts <= T_CRC; tcrc_n <= 2'd2;
                  end else begin
                    ts <= T_EOP; eop_cnt <= '0;
                  end
                end
                T_DATA: begin
                  if (tx_idx == i_len) begin ts <= T_CRC; tcrc_n <= 2'd2; end
                  else begin tbyte <= ibuf[tx_idx[BW-1:0]]; tx_idx <= tx_idx + 1'b1; end
                end
                default: begin                     // T_CRC
                  tcrc_n <= tcrc_n - 1'b1;
                  if (tcrc_n == 2'd1) begin ts <= T_EOP; eop_cnt <= '0; end
                end
              endcase
            end
          end
        end
      end
    end
  end

  // ---------------- protocol layer handler ----------------
  typedef enum logic [2:0] {P_IDLE, P_DATA, P_TURN, P_TX, P_ACKWAIT} pst_e;
  pst_e       ps;
  logic [3:0] tok_pid;                  // token of the current transaction
  logic [9:0] tmo;
  logic [1:0] resp;                     // 0 none, 1 ACK, 2 NAK, 3 DATA

  logic       tok_for_me;
  logic [3:0] tok_ep;
  assign tok_ep     = tok[10:7];
  assign tok_for_me = (tok[6:0] == dev_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_IDLE; tok_pid <= '0; tmo <= '0; resp <= '0; tx_go <= 1'b0; tx_pid <= '0;
      tx_data <= 1'b0; cur_ep <= '0; dev_addr <= '0; attach <= 1'b0; irq_stat <= '0;
      irq_mask <= '0; o_wp <= '0; o_len <= '0; o_rp <= '0; i_len <= '0; o_full <= 1'b0;
      o_setup <= 1'b0; i_armed <= 1'b0; o_ep <= '0; i_ep <= '0; tog_out <= '0; tog_in <= '0;
      frame <= '0;
    end else begin
      tx_go <= 1'b0;
      // ---- microcontroller side ----
      if (wr_p) begin
        unique case (addr)
          4'd0: dev_addr <= wdata[6:0];
          4'd1: attach <= wdata[0];
          4'd2: irq_stat <= irq_stat & ~wdata[4:0];
          4'd3: irq_mask <= wdata[4:0];
          4'd7: if (!i_armed && i_len != (BW+1)'(BUF_BYTES)) begin
                  ibuf[i_len[BW-1:0]] <= wdata; i_len <= i_len + 1'b1;
                end
          4'd8: begin i_ep <= wdata[3:0]; i_armed <= wdata[7]; end
          default: ;
        endcase
      end
      if (rd_fall && rd_data && o_full) begin
        o_rp <= o_rp + 1'b1;
        if (o_rp + 1'b1 >= o_len) o_full <= 1'b0;
      end

      // ---- bus reset ----
      if (bus_reset) begin
        dev_addr <= '0; tog_out <= '0; tog_in <= '0; irq_stat[4] <= 1'b1; ps <= P_IDLE;
      end

      // ---- transactions ----
      unique case (ps)
        P_IDLE: if (rx_eop && !rx_err && pid_ok) begin
          unique case (pid[3:0])
            PID_SOF: if (rcnt == 7'd2 && crc5_ok) begin
              frame <= tok[10:0]; irq_stat[3] <= 1'b1;
            end
            PID_OUT, PID_SETUP, PID_IN: if (rcnt == 7'd2 && crc5_ok && tok_for_me && attach) begin
              tok_pid <= pid[3:0]; cur_ep <= tok_ep; tmo <= '0;
              if (pid[3:0] == PID_IN) begin
                ps <= P_TURN;
                if (i_armed && i_ep == tok_ep) begin
                  resp <= 2'd3; tx_pid <= tog_in[tok_ep[1:0]] ? {~PID_DATA1, PID_DATA1} : {~PID_DATA0, PID_DATA0};
                end else begin
                  resp <= 2'd2; tx_pid <= {~PID_NAK, PID_NAK};
                end
              end else begin
                ps <= P_DATA; o_wp <= '0;
              end
            end
            default: ;                           // unexpected: ignored
          endcase
        end
        P_DATA: begin
          tmo <= (rs != R_IDLE) ? '0 : tmo + 1'b1;   // timeout only between packets
          if (rx_byte_v && (!o_full || tok_pid == PID_SETUP) && o_wp != (BW+1)'(BUF_BYTES + 2)) begin
            if (o_wp < (BW+1)'(BUF_BYTES)) obuf[o_wp[BW-1:0]] <= rbyte;
            o_wp <= o_wp + 1'b1;
          end
          if (rx_eop) begin
            if (!rx_err && pid_ok && crc16_ok &&
                (pid[3:0] == PID_DATA0 || pid[3:0] == PID_DATA1) && rcnt >= 7'd2 &&
                rcnt <= 7'(BUF_BYTES + 2)) begin
              logic tg;
              tg = (pid[3:0] == PID_DATA1);
              if (tok_pid == PID_SETUP) begin
                // SETUP is always accepted and restarts both toggles of the endpoint
                o_full <= 1'b1; o_setup <= 1'b1; o_ep <= cur_ep; o_len <= (BW+1)'(rcnt - 7'd2);
                o_rp <= '0; irq_stat[1] <= 1'b1;
                tog_out[cur_ep[1:0]] <= 1'b1; tog_in[cur_ep[1:0]] <= 1'b1;
                resp <= 2'd1; tx_pid <= {~PID_ACK, PID_ACK};
              end else if (o_full) begin
                resp <= 2'd2; tx_pid <= {~PID_NAK, PID_NAK};
              end else begin
                resp <= 2'd1; tx_pid <= {~PID_ACK, PID_ACK};
                if (tg == tog_out[cur_ep[1:0]]) begin
                  o_full <= (rcnt != 7'd2); o_setup <= 1'b0; o_ep <= cur_ep;
                  o_len <= (BW+1)'(rcnt - 7'd2); o_rp <= '0; irq_stat[0] <= 1'b1;
                  tog_out[cur_ep[1:0]] <= ~tg;
                end
              end
              ps <= P_TURN; tmo <= '0;
            end else ps <= P_IDLE;               // damaged: no handshake
          end else if (tmo == 10'd1023) ps <= P_IDLE;
        end
        P_TURN: begin                            // two bit times of turnaround
          tmo <= tmo + 1'b1;
          if (tmo == 10'(2 * OVS)) begin tx_go <= 1'b1; tx_data <= (resp == 2'd3); ps <= P_TX; end
        end
        P_TX: if (tx_busy_done) begin
          tmo <= '0;
          ps <= (resp == 2'd3) ? P_ACKWAIT : P_IDLE;
        end
        P_ACKWAIT: begin
          tmo <= tmo + 1'b1;
          if (rx_eop) begin
            if (!rx_err && pid_ok && pid[3:0] == PID_ACK) begin
              tog_in[cur_ep[1:0]] <= ~tog_in[cur_ep[1:0]];
              i_armed <= 1'b0; i_len <= '0; irq_stat[2] <= 1'b1;
            end
            ps <= P_IDLE;
          end else if (tmo == 10'(64 * OVS)) ps <= P_IDLE;   // no ACK: stays armed
        end
        default: ps <= P_IDLE;
      endcase
    end
  end

  assign usb_pullup = attach;
  assign irq = |(irq_stat & irq_mask);

  always_comb begin
    unique case (addr)
      4'd0:  rdata = {1'b0, dev_addr};
      4'd1:  rdata = {7'd0, attach};
      4'd2:  rdata = {3'd0, irq_stat};
      4'd3:  rdata = {3'd0, irq_mask};
      4'd4:  rdata = {o_full, o_setup, 2'd0, o_ep};
      4'd5:  rdata = 8'(o_len);
      4'd6:  rdata = obuf[o_rp[BW-1:0]];
      4'd8:  rdata = {i_armed, 3'd0, i_ep};
      4'd9:  rdata = 8'(i_len);
      4'd10: rdata = frame[7:0];
      4'd11: rdata = {5'd0, frame[10:8]};
      default: rdata = 8'h00;
    endcase
  end
endmodule
