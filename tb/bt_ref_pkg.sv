// bt_ref_pkg: reference models for the bit-stream testbenches.
//
// Builds the on-air bit sequence of a packet from first principles: HEC,
// CRC and FEC 2/3 parity by polynomial long division of the whole
// (preset-augmented) message, whitening by an explicit 7-cell register, and
// FEC by repetition and block assembly. It shares no code with the RTL.
package bt_ref_pkg;
  typedef bit bitq_t[$];

  // Remainder of v(D) mod g(D); v[0] is the highest degree term.
  function automatic bitq_t poly_mod(bitq_t v, bit [16:0] g, int deg);
    bitq_t w;
    bitq_t r;
    w = v;
    while (w.size() < deg) w.push_front(1'b0);
    for (int i = 0; i + deg < w.size(); i++)
      if (w[i]) for (int j = 0; j <= deg; j++) w[i+j] ^= g[deg-j];
    for (int i = w.size() - deg; i < w.size(); i++) r.push_back(w[i]);
    return r;   // highest degree first = transmission order
  endfunction

  // Remainder of v(D) * D^deg mod g(D).
  function automatic bitq_t poly_rem(bitq_t v, bit [16:0] g, int deg);
    bitq_t w;
    w = v;
    for (int i = 0; i < deg; i++) w.push_back(1'b0);
    return poly_mod(w, g, deg);
  endfunction

  // Check bits of message m for a register preset with p (pw bits):
  // (p(D) * D^|m| + m(D) * D^pw) mod g(D).
  function automatic bitq_t preset_check(bit [15:0] p, int pw, bitq_t m, bit [16:0] g);
    bitq_t a, b, r;
    for (int i = pw - 1; i >= 0; i--) a.push_back(p[i]);
    foreach (m[i]) a.push_back(1'b0);
    a = poly_mod(a, g, pw);
    b = poly_rem(m, g, pw);
    foreach (a[i]) r.push_back(a[i] ^ b[i]);
    return r;
  endfunction

  function automatic bitq_t whiten_seq(bit [5:0] init, int n);
    bit w[7];
    bitq_t s;
    for (int i = 0; i < 6; i++) w[i] = init[i];
    w[6] = 1'b1;
    for (int k = 0; k < n; k++) begin
      bit o;
      o = w[6];
      s.push_back(o);
      w[6] = w[5]; w[5] = w[4]; w[4] = w[3] ^ o; w[3] = w[2]; w[2] = w[1]; w[1] = w[0]; w[0] = o;
    end
    return s;
  endfunction

  // Test key stream: bits of a 31-bit maximal-length sequence.
  function automatic bitq_t key_seq(int unsigned seed, int n);
    bitq_t s;
    bit [30:0] r;
    r = 31'(seed) | 31'd1;
    for (int i = 0; i < n; i++) begin
      s.push_back(r[0]);
      r = {r[0] ^ r[3], r[30:1]};
    end
    return s;
  endfunction

  // Payload layout by type: returns fec (0 none, 1 1/3, 2 2/3), crc, header bytes, fixed length.
  function automatic void type_info(int t, output bit has_pl, output int fec, output bit crc,
                                    output int phb, output int flen);
    has_pl = 1; fec = 0; crc = 1; phb = 1; flen = 0;
    case (t)
      0, 1, 8, 12, 13: has_pl = 0;
      2:  begin fec = 2; phb = 0; flen = 18; end
      3:  fec = 2;
      4:  ;
      9:  crc = 0;
      5:  begin fec = 1; crc = 0; phb = 0; flen = 10; end
      6:  begin fec = 2; crc = 0; phb = 0; flen = 20; end
      7:  begin fec = 0; crc = 0; phb = 0; flen = 30; end
      10, 14: begin fec = 2; phb = 2; end
      11, 15: phb = 2;
      default: has_pl = 0;
    endcase
  endfunction

  function automatic bitq_t fec_encode(bitq_t d, int fec);
    bitq_t o;
    if (fec == 0) return d;
    if (fec == 1) begin
      foreach (d[i]) repeat (3) o.push_back(d[i]);
      return o;
    end
    while (d.size() % 10 != 0) d.push_back(1'b0);
    for (int b = 0; b < d.size(); b += 10) begin
      bitq_t blk, par;
      for (int i = 0; i < 10; i++) blk.push_back(d[b+i]);
      par = poly_rem(blk, 17'h35, 5);   // D^5+D^4+D^2+1
      foreach (blk[i]) o.push_back(blk[i]);
      foreach (par[i]) o.push_back(par[i]);
    end
    return o;
  endfunction

  // Complete packet on air. ks supplies key stream bits (consumed from the front).
  function automatic bitq_t build_packet(bit [63:0] sw, bit [9:0] hdr, bit [7:0] uap,
      bit wen, bit [5:0] winit, bit cen, ref bitq_t ks, input bit [1:0] llid, input bit pflow,
      input bit [7:0] pl[$]);
    bitq_t o, h, hec, p, crc, wh, coded;
    bit has_pl, crcf;
    int fec, phb, flen, len, wi;
    for (int i = 0; i < 4; i++) o.push_back(sw[0] ^ bit'(i % 2));
    for (int i = 0; i < 64; i++) o.push_back(sw[i]);
    for (int i = 0; i < 4; i++) o.push_back(sw[63] ^ bit'((i + 1) % 2));
    for (int i = 0; i < 10; i++) h.push_back(hdr[i]);
    hec = preset_check({8'h00, uap}, 8, h, 17'h1A7);
    foreach (hec[i]) h.push_back(hec[i]);
    type_info(int'(hdr[6:3]), has_pl, fec, crcf, phb, flen);
    len = (phb == 0) ? flen : pl.size();
    if (has_pl) begin
      bit [15:0] ph;
      ph = (phb == 1) ? 16'({len[4:0], pflow, llid}) : 16'({len[8:0], pflow, llid});
      for (int i = 0; i < 8 * phb; i++) p.push_back(ph[i]);
      for (int k = 0; k < len; k++) for (int i = 0; i < 8; i++) p.push_back(pl[k][i]);
      if (crcf) begin
        crc = preset_check({8'h00, uap}, 16, p, 17'h11021);
        foreach (crc[i]) p.push_back(crc[i]);
      end
      if (cen) foreach (p[i]) p[i] ^= ks.pop_front();
    end
    wh = whiten_seq(winit, h.size() + p.size());
    wi = 0;
    if (wen) begin
      foreach (h[i]) h[i] ^= wh[wi++];
      foreach (p[i]) p[i] ^= wh[wi++];
    end
    coded = fec_encode(h, 1);
    foreach (coded[i]) o.push_back(coded[i]);
    if (has_pl) begin
      coded = fec_encode(p, fec);
      foreach (coded[i]) o.push_back(coded[i]);
    end
    return o;
  endfunction
endpackage
