// hop_selection: frequency hop calculation of the baseband unit.
//
// Computes the RF channel (0..78) of the 79-hop system in the connection
// state from the 28 low address bits A (LAP and the four low UAP bits) and
// the master clock CLK, using the Bluetooth hop selection kernel:
//   X = CLK[6:2], Y1 = CLK[1] (in all 5 bits), Y2 = 32*CLK[1]
//   A' = A[27:23]^CLK[25:21], B = A[22:19], C = A[8,6,4,2,0]^CLK[20:16]
//   D = A[18:10]^CLK[15:7],  E = A[13,11,9,7,5,3,1], F = 16*CLK[27:7] mod 79
//   Z = ((X + A') mod 32) ^ B;  P = {C^Y1, D}
//   k = (PERM5(Z, P) + E + F + Y2) mod 79;  channel = k<40 ? 2k : 2k-79
// PERM5 is a chain of seven butterfly stages, P13/P12 first; Pi swaps the
// pair of bits listed in the table below when it is 1. The register bank
// holds the even channels first and then the odd ones, which the last line
// computes directly. The module only names this block; the kernel is taken
// from the Bluetooth specification. Page, inquiry and response hopping are
// not provided.
//
// Timing: the channel is registered one clock after clk_bt changes.
module hop_selection (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [27:0] addr,
  input  logic [27:0] clk_bt,
  output logic [6:0]  channel
);
  // Bit pairs swapped by control bit Pi, i = 0..13: {first, second}.
  localparam logic [2:0] PA [14] = '{3'd0, 3'd2, 3'd1, 3'd3, 3'd0, 3'd1, 3'd0,
                                     3'd3, 3'd1, 3'd0, 3'd2, 3'd1, 3'd0, 3'd1};
  localparam logic [2:0] PB [14] = '{3'd1, 3'd3, 3'd2, 3'd4, 3'd4, 3'd3, 3'd2,
                                     3'd4, 3'd4, 3'd3, 3'd4, 3'd3, 3'd3, 3'd2};

  function automatic logic [4:0] perm5(input logic [4:0] z, input logic [13:0] p);
    logic [4:0] v;
    logic       t;
    v = z;
    for (int i = 13; i >= 0; i--) begin
      if (p[i]) begin
        t        = v[PA[i]];
        v[PA[i]] = v[PB[i]];
        v[PB[i]] = t;
      end
    end
    return v;
  endfunction

  logic [6:0] ch_c;
  always_comb begin
    logic [4:0]  x, y1, a_, c_, z, pz;
    logic [3:0]  b_;
    logic [8:0]  d_;
    logic [6:0]  e_, f_, k;
    logic [5:0]  y2;
    logic [24:0] f_full;
    logic [9:0]  sum;
    x  = clk_bt[6:2];
    y1 = {5{clk_bt[1]}};
    y2 = {clk_bt[1], 5'd0};
    a_ = addr[27:23] ^ clk_bt[25:21];
    b_ = addr[22:19];
    c_ = {addr[8], addr[6], addr[4], addr[2], addr[0]} ^ clk_bt[20:16];
    d_ = addr[18:10] ^ clk_bt[15:7];
    e_ = {addr[13], addr[11], addr[9], addr[7], addr[5], addr[3], addr[1]};
    f_full = {clk_bt[27:7], 4'd0};
    f_  = 7'(f_full % 25'd79);
    z   = (x + a_) ^ {1'b0, b_};
    pz  = perm5(z, {c_ ^ y1, d_});
    sum = 10'(pz) + 10'(e_) + 10'(f_) + 10'(y2);
    k   = 7'(sum % 10'd79);
    ch_c = (k < 7'd40) ? {k[5:0], 1'b0} : 7'({k, 1'b0} - 8'd79);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) channel <= '0;
    else        channel <= ch_c;
  end
endmodule
