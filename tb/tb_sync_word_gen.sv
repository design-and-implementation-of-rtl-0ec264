// tb_sync_word_gen: for random and corner LAPs, checks that the upper 30
// bits of the sync word are the LAP with its Barker extension and that,
// with the PN cover removed, the whole 64-bit word is a code word, i.e.
// divisible by the (64,30) generator polynomial (long division on a bit
// array). The Barker sequence must differ with LAP bit 23.
module tb_sync_word_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [23:0] lap;
  logic [63:0] sync_word;
  sync_word_gen dut (.*);

  localparam bit [63:0] PN = 64'h83848D96BBCC54FC;
  localparam bit [34:0] G  = 35'o260534236651;

  function automatic bit divisible(bit [63:0] cw);
    bit v[64];
    for (int i = 0; i < 64; i++) v[i] = cw[63 - i];   // v[0] = highest degree
    for (int i = 0; i <= 29; i++)
      if (v[i]) for (int j = 0; j <= 34; j++) v[i+j] ^= G[34 - j];
    foreach (v[i]) if (v[i]) return 0;
    return 1;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    bit [63:0] prev;
    lap = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      bit [63:0] cw;
      lap = (k == 0) ? 24'h000000 : (k == 1) ? 24'hFFFFFF : (k == 2) ? 24'h9E8B33 : 24'($urandom);
      @(negedge clk); @(negedge clk);
      cw = sync_word ^ PN;
      check(sync_word[57:34] == lap, $sformatf("LAP %h not in sync word", lap));
      check(sync_word[63:58] == (lap[23] ? 6'b110010 : 6'b001101), "Barker extension");
      check(divisible(cw), $sformatf("LAP %h: not a code word", lap));
      if (k > 0) check(sync_word != prev, "sync word changes with LAP");
      prev = sync_word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
