// e0_engine: encryption engine of the baseband unit (E0 key stream).
//
// Four linear feedback shift registers of 25, 31, 33 and 39 bits (128 bits
// together) feed a summation combiner with a 4-bit memory, as in the
// Bluetooth E0 stream cipher:
//   LFSR1 t^25+t^20+t^12+t^8+1   LFSR2 t^31+t^24+t^16+t^12+1
//   LFSR3 t^33+t^28+t^24+t^4+1   LFSR4 t^39+t^36+t^28+t^4+1
//   y   = x1+x2+x3+x4,  s' = (y + c) >> 1,  c' = s' ^ c ^ T2(c_prev),
//   T2(a1,a0) = (a0, a1^a0),  z = x1^x2^x3^x4^c[0].
// The LFSRs are Fibonacci registers shifting towards the high index; the
// feedback enters at bit 0 and x_i is taken from cell 24, 24, 32 and 32.
// The module only names its encryption engine, so these details come from
// the Bluetooth specification. The key-dependent initialisation (the
// encryption key generation block) is not part of this engine: load copies
// a 128-bit initial register state {L4, L3, L2, L1} and clears the combiner.
//
// Timing: ks is the current key stream bit, valid whenever load is not
// active; adv moves to the next bit at the clock edge. The same engine
// serves encryption and decryption (XOR with the data).
module e0_engine (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] init_state,
  input  logic         adv,
  output logic         ks
);
  logic [24:0] l1;
  logic [30:0] l2;
  logic [32:0] l3;
  logic [38:0] l4;
  logic [1:0]  c, c_prev;
  logic        x1, x2, x3, x4;
  logic [2:0]  y;
  logic [1:0]  s_n, c_n;

  assign x1 = l1[24];
  assign x2 = l2[24];
  assign x3 = l3[32];
  assign x4 = l4[32];
  assign y  = 3'(x1) + 3'(x2) + 3'(x3) + 3'(x4);
  assign ks = x1 ^ x2 ^ x3 ^ x4 ^ c[0];

  always_comb begin
    logic [2:0] sum;
    sum = y + {1'b0, c};
    s_n = sum[2:1];
    c_n = s_n ^ c ^ {c_prev[0], c_prev[1] ^ c_prev[0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1 <= '0; l2 <= '0; l3 <= '0; l4 <= '0; c <= '0; c_prev <= '0;
    end else if (load) begin
      {l4, l3, l2, l1} <= init_state;
      c <= '0; c_prev <= '0;
    end else if (adv) begin
      l1 <= {l1[23:0], l1[24] ^ l1[19] ^ l1[11] ^ l1[7]};
      l2 <= {l2[29:0], l2[30] ^ l2[23] ^ l2[15] ^ l2[11]};
      l3 <= {l3[31:0], l3[32] ^ l3[27] ^ l3[23] ^ l3[3]};
      l4 <= {l4[37:0], l4[38] ^ l4[35] ^ l4[27] ^ l4[3]};
      c_prev <= c;
      c      <= c_n;
    end
  end
endmodule
