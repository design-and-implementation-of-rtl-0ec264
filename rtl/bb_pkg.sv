// bb_pkg: types, constants and bit-level coding steps shared by the
// Bluetooth baseband module.
//
// The system runs from one 12 MHz clock; the radio bit rate is 1 Mbit/s and
// the Bluetooth native clock ticks at 3.2 kHz (these three rates follow the
// module description). Packet formats, the HEC, CRC, whitening and FEC 2/3
// polynomials and the packet type codes follow the Bluetooth 1.1 baseband
// specification that the module implements; they are not specific to this
// design. Each *_step function advances one register by one bit, so that the
// transmit and receive chains can process a continuous bit stream without
// buffers between the coding blocks.
package bb_pkg;

  localparam int unsigned SYS_CLK_HZ   = 12_000_000;
  localparam int unsigned BIT_RATE_HZ  = 1_000_000;
  localparam int unsigned CLKN_RATE_HZ = 3_200;
  localparam int unsigned CLKN_W       = 28;
  localparam int unsigned BUF_BYTES    = 64;

  // Packet type codes of the 4-bit TYPE field (ACL/SCO link).
  typedef enum logic [3:0] {
    PT_NULL = 4'd0,  PT_POLL = 4'd1,  PT_FHS = 4'd2,  PT_DM1 = 4'd3,
    PT_DH1  = 4'd4,  PT_HV1  = 4'd5,  PT_HV2 = 4'd6,  PT_HV3 = 4'd7,
    PT_DV   = 4'd8,  PT_AUX1 = 4'd9,  PT_DM3 = 4'd10, PT_DH3 = 4'd11,
    PT_R12  = 4'd12, PT_R13  = 4'd13, PT_DM5 = 4'd14, PT_DH5 = 4'd15
  } pkt_type_e;

  typedef enum logic [1:0] {FEC_NONE = 2'd0, FEC_13 = 2'd1, FEC_23 = 2'd2} fec_e;

  // 10-bit packet header; bit 0 (lt_addr[0]) is transmitted first.
  typedef struct packed {
    logic      seqn;
    logic      arqn;
    logic      flow;
    pkt_type_e ptype;
    logic [2:0] lt_addr;
  } pkt_hdr_t;

  // Payload layout of each packet type.
  typedef struct packed {
    logic       has_payload;
    fec_e       fec;
    logic       has_crc;
    logic [1:0] phdr_bytes;   // payload header length: 0, 1 or 2 bytes
    logic [9:0] fixed_len;    // payload bytes when phdr_bytes == 0
  } ptype_cfg_t;

  function automatic ptype_cfg_t ptype_cfg(input pkt_type_e t);
    ptype_cfg_t c;
    c = '{has_payload: 1'b1, fec: FEC_NONE, has_crc: 1'b1, phdr_bytes: 2'd1, fixed_len: 10'd0};
    unique case (t)
      PT_NULL, PT_POLL, PT_DV, PT_R12, PT_R13: c.has_payload = 1'b0;
      PT_FHS:  begin c.fec = FEC_23; c.phdr_bytes = 2'd0; c.fixed_len = 10'd18; end
      PT_DM1:  c.fec = FEC_23;
      PT_DH1:  ;
      PT_AUX1: c.has_crc = 1'b0;
      PT_HV1:  begin c.fec = FEC_13;   c.has_crc = 1'b0; c.phdr_bytes = 2'd0; c.fixed_len = 10'd10; end
      PT_HV2:  begin c.fec = FEC_23;   c.has_crc = 1'b0; c.phdr_bytes = 2'd0; c.fixed_len = 10'd20; end
      PT_HV3:  begin c.fec = FEC_NONE; c.has_crc = 1'b0; c.phdr_bytes = 2'd0; c.fixed_len = 10'd30; end
      PT_DM3, PT_DM5: begin c.fec = FEC_23; c.phdr_bytes = 2'd2; end
      PT_DH3, PT_DH5: c.phdr_bytes = 2'd2;
      default: c.has_payload = 1'b0;
    endcase
    return c;
  endfunction

  // HEC: g(D) = D^8 + D^7 + D^5 + D^2 + D + 1, register preset with the UAP.
  function automatic logic [7:0] hec_step(input logic [7:0] r, input logic b);
    logic fb;
    fb = b ^ r[7];
    return {r[6:0], 1'b0} ^ (fb ? 8'hA7 : 8'h00);
  endfunction

  // CRC-CCITT: g(D) = D^16 + D^12 + D^5 + 1, register preset with {8'h00, UAP}.
  function automatic logic [15:0] crc_step(input logic [15:0] r, input logic b);
    logic fb;
    fb = b ^ r[15];
    return {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  // Whitening: g(D) = D^7 + D^4 + 1. The output bit is w[6].
  function automatic logic [6:0] whiten_step(input logic [6:0] w);
    logic o;
    o = w[6];
    return {w[5:4], w[3] ^ o, w[2:0], o};
  endfunction

  // (15,10) shortened Hamming code: g(D) = D^5 + D^4 + D^2 + 1.
  function automatic logic [4:0] fec23_step(input logic [4:0] p, input logic b);
    logic fb;
    fb = b ^ p[4];
    return {p[3:0], 1'b0} ^ (fb ? 5'h15 : 5'h00);
  endfunction

  // Parity of a 10-bit block, d[0] entering the encoder first.
  function automatic logic [4:0] fec23_parity(input logic [9:0] d);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < 10; i++) p = fec23_step(p, d[i]);
    return p;
  endfunction

  // Corrects up to one bit error in a received 15-bit block
  // (c[9:0] data in arrival order, c[14:10] parity with c[10] = p[4]).
  function automatic logic [9:0] fec23_correct(input logic [14:0] c, output logic err);
    logic [4:0] rx_par, syn;
    logic [9:0] d;
    for (int j = 0; j < 5; j++) rx_par[4-j] = c[10+j];
    d   = c[9:0];
    syn = fec23_parity(d) ^ rx_par;
    err = (syn != 5'd0);
    for (int i = 0; i < 10; i++)
      if (syn != 5'd0 && fec23_parity(10'd1 << i) == syn) d[i] = ~d[i];
    return d;
  endfunction

endpackage
