// tb_e0_engine: compares 2000 key stream bits per initial state with a
// reference E0 model kept as bit arrays with the feedback taps and output
// cells listed by their polynomial exponents.
module tb_e0_engine;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         load, adv, ks;
  logic [127:0] init_state;
  e0_engine dut (.*);

  // reference state
  bit r1[25], r2[31], r3[33], r4[39];
  int c, cp;

  function automatic bit ref_out();
    return r1[24] ^ r2[24] ^ r3[32] ^ r4[32] ^ bit'(c & 1);
  endfunction
  // one step of one register: new cell = XOR of the cells at (exponent - 1)
  function automatic void shift(ref bit r[], input int taps[4]);
    bit nb;
    nb = 0;
    foreach (taps[i]) nb ^= r[taps[i] - 1];
    for (int i = r.size() - 1; i > 0; i--) r[i] = r[i-1];
    r[0] = nb;
  endfunction
  function automatic void ref_step();
    int y, s, t2, cn;
    bit d1[], d2[], d3[], d4[];
    y = int'(r1[24]) + int'(r2[24]) + int'(r3[32]) + int'(r4[32]);
    s = (y + c) / 2;
    t2 = ((cp & 1) << 1) | (((cp >> 1) ^ cp) & 1);
    cn = s ^ c ^ t2;
    d1 = r1; d2 = r2; d3 = r3; d4 = r4;
    shift(d1, '{25, 20, 12, 8});
    shift(d2, '{31, 24, 16, 12});
    shift(d3, '{33, 28, 24, 4});
    shift(d4, '{39, 36, 28, 4});
    foreach (r1[i]) r1[i] = d1[i];
    foreach (r2[i]) r2[i] = d2[i];
    foreach (r3[i]) r3[i] = d3[i];
    foreach (r4[i]) r4[i] = d4[i];
    cp = c; c = cn;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int ones;
    load = 0; adv = 0; init_state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      init_state = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 25; i++) r1[i] = init_state[i];
      for (int i = 0; i < 31; i++) r2[i] = init_state[25 + i];
      for (int i = 0; i < 33; i++) r3[i] = init_state[56 + i];
      for (int i = 0; i < 39; i++) r4[i] = init_state[89 + i];
      c = 0; cp = 0;
      load = 1; @(negedge clk); load = 0;
      ones = 0;
      for (int i = 0; i < 2000; i++) begin
        adv = ($urandom_range(0, 3) != 0);
        check(ks == ref_out(), $sformatf("state %0d bit %0d", k, i));
        ones += int'(ks);
        @(negedge clk);
        if (adv) ref_step();
      end
      adv = 0;
      check(ones > 300 && ones < 1200, "key stream balance");
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
