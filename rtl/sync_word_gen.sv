// sync_word_gen: sync word generation of the baseband unit.
//
// Builds the 64-bit sync word of the access code from the 24-bit LAP, as
// the Bluetooth specification defines it (the module only states that the
// correlator uses a 64-bit sync word):
//   1. x = {barker, LAP}, 30 bits, barker = 6'b110010 if LAP[23] else 6'b001101
//   2. x~ = x ^ p[63:34]
//   3. c~ = D^34 * x~(D) mod g(D), g = 260534236651 (octal), 34 bits
//   4. sync = {x~, c~} ^ p,  p = 64'h83848D96BBCC54FC
// Bit i of sync_word is the i-th bit on air. The division runs as a 30-step
// LFSR unrolled in combinational logic; the result is registered, so
// sync_word is valid one clock after lap changes.
module sync_word_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] lap,
  output logic [63:0] sync_word
);
  localparam logic [63:0] PN = 64'h83848D96BBCC54FC;
  localparam logic [34:0] G  = 35'o260534236651;

  logic [63:0] sw_c;
  always_comb begin
    logic [29:0] x;
    logic [33:0] r;
    x = {lap[23] ? 6'b110010 : 6'b001101, lap} ^ PN[63:34];
    r = '0;
    for (int i = 29; i >= 0; i--) begin
      logic fb;
      fb = x[i] ^ r[33];
      r  = {r[32:0], 1'b0} ^ (fb ? G[33:0] : 34'd0);
    end
    sw_c = {x, r} ^ PN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_word <= '0;
    else        sync_word <= sw_c;
  end
endmodule
