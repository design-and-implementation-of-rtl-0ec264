// tb_rx_correlator: streams random bits with an embedded sync word carrying
// 0..10 bit errors. With threshold 7, a word with up to 7 errors must be
// found exactly one clock after its last bit, and words with more errors or
// random data must not be found. Also checks that nothing is found while
// disabled.
module tb_rx_correlator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable, rx_bit, rx_bit_valid, found;
  logic [63:0] sync_word;
  logic [5:0]  threshold;
  logic [6:0]  errors;
  rx_correlator dut (.*);

  int n_found = 0;
  always @(posedge clk) if (found) n_found++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input bit b, output bit hit);
    repeat (3) @(negedge clk);
    rx_bit = b; rx_bit_valid = 1;
    @(negedge clk); rx_bit_valid = 0;
    hit = found;
  endtask

  initial begin
    bit hit;
    enable = 0; rx_bit = 0; rx_bit_valid = 0; threshold = 6'd7;
    sync_word = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // disabled: the word is ignored
    for (int i = 0; i < 64; i++) send(sync_word[i], hit);
    check(n_found == 0, "found while disabled");
    enable = 1;
    @(negedge clk);
    for (int k = 0; k <= 10; k++) begin
      bit [63:0] w;
      int found_any;
      w = sync_word;
      for (int e = 0; e < k; e++) w[e * 6 + 1] ^= 1'b1;
      found_any = 0;
      for (int i = 0; i < 40; i++) begin send(1'($urandom), hit); found_any += int'(hit); end
      check(found_any == 0, "false hit on random data");
      for (int i = 0; i < 64; i++) begin
        send(w[i], hit);
        if (i < 63) found_any += int'(hit);
      end
      check(found_any == 0, "hit before the last bit");
      check(hit == (k <= 7), $sformatf("%0d errors: found=%0d", k, hit));
      check(int'(errors) == k, $sformatf("error count %0d expected %0d", errors, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
