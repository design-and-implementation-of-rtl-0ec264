// rx_correlator: sliding correlator that finds the expected sync word.
//
// The last 64 received bits are kept in a shift register (oldest bit at
// index 0, the order of sync_word) and compared bit by bit with the expected
// sync word; when the number of differing bits is at most threshold, found
// pulses for one clock. The 64-bit window follows the module; the error
// threshold is a register value (the module does not give one).
//
// Timing: found comes one clock after the rx_bit_valid that completed the
// match, and only while enable is high. The window is cleared when enable
// rises, so a match needs 64 new bits. The mismatch count of the last
// comparison is available on errors for phase detection and debugging.
module rx_correlator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        rx_bit,
  input  logic        rx_bit_valid,
  input  logic [63:0] sync_word,
  input  logic [5:0]  threshold,
  output logic        found,
  output logic [6:0]  errors
);
  logic [63:0] win;
  logic [6:0]  nbits;
  logic        en_q;
  logic [63:0] win_n;
  logic [6:0]  diff;

  assign win_n = {rx_bit, win[63:1]};
  always_comb begin
    diff = '0;
    for (int i = 0; i < 64; i++) diff += 7'(win_n[i] ^ sync_word[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0; nbits <= '0; en_q <= 1'b0; found <= 1'b0; errors <= '0;
    end else begin
      en_q  <= enable;
      found <= 1'b0;
      if (enable && !en_q) begin
        nbits <= '0;
      end else if (enable && rx_bit_valid) begin
        win    <= win_n;
        errors <= diff;
        if (nbits != 7'd64) nbits <= nbits + 1'b1;
        if ((nbits >= 7'd63) && (diff <= {1'b0, threshold})) found <= 1'b1;
      end
    end
  end
endmodule
