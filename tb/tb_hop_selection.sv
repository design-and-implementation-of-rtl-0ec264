// tb_hop_selection: compares the channel with a reference kernel (integer
// arithmetic, butterflies applied as a list of stages) for random addresses
// and clocks, and checks that over 3200 consecutive master-slot clocks
// every one of the 79 channels is used and none far more often than others.
module tb_hop_selection;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [27:0] addr, clk_bt;
  logic [6:0]  channel;
  hop_selection dut (.*);

  // butterfly stages: {control bit, bit a, bit b}, first stage first
  int stages[14][3] = '{'{13, 1, 2}, '{12, 0, 3}, '{11, 1, 3}, '{10, 2, 4}, '{9, 0, 3},
                        '{8, 1, 4}, '{7, 3, 4}, '{6, 0, 2}, '{5, 1, 3}, '{4, 0, 4},
                        '{3, 3, 4}, '{2, 1, 2}, '{1, 2, 3}, '{0, 0, 1}};

  function automatic int ref_hop(bit [27:0] a, bit [27:0] c);
    int x, y1, y2, aa, b, cc, d, e, f, z, p, k;
    bit zb[5];
    x  = c[6:2];
    y1 = c[1] ? 31 : 0;
    y2 = c[1] ? 32 : 0;
    aa = a[27:23] ^ c[25:21];
    b  = a[22:19];
    cc = {a[8], a[6], a[4], a[2], a[0]} ^ c[20:16];
    d  = a[18:10] ^ c[15:7];
    e  = {a[13], a[11], a[9], a[7], a[5], a[3], a[1]};
    f  = (int'(c[27:7]) * 16) % 79;
    z  = ((x + aa) % 32) ^ b;
    p  = ((cc ^ y1) << 9) | d;
    for (int i = 0; i < 5; i++) zb[i] = z[i];
    foreach (stages[s]) if (p[stages[s][0]]) begin
      bit t;
      t = zb[stages[s][1]]; zb[stages[s][1]] = zb[stages[s][2]]; zb[stages[s][2]] = t;
    end
    z = 0;
    for (int i = 0; i < 5; i++) z |= int'(zb[i]) << i;
    k = (z + e + f + y2) % 79;
    return (k < 40) ? 2 * k : 2 * k - 79;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int hist[79];
    int mx;
    addr = 0; clk_bt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      addr = 28'($urandom); clk_bt = 28'($urandom);
      @(negedge clk);
      check(int'(channel) == ref_hop(addr, clk_bt), $sformatf("addr %h clk %h: %0d vs %0d", addr, clk_bt, channel, ref_hop(addr, clk_bt)));
    end
    addr = 28'h9E8B33A;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < 3200; i++) begin
      clk_bt = 28'h0123400 + 28'(4 * i);
      @(negedge clk);
      check(channel < 79, "channel range");
      if (channel < 79) hist[channel]++;
    end
    mx = 0;
    foreach (hist[i]) begin
      check(hist[i] > 0, $sformatf("channel %0d never used", i));
      if (hist[i] > mx) mx = hist[i];
    end
    check(mx < 120, $sformatf("channel used %0d times of 3200", mx));
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
