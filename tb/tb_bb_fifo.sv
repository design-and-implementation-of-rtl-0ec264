// tb_bb_fifo: random pushes and pops against a queue model; checks data
// order, level, full/empty, the dropped write and overflow pulse when full,
// the underflow pulse when empty, and clear.
module tb_bb_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr, wr_en, rd_en, empty, full, overflow, underflow;
  logic [7:0] wr_data, rd_data;
  logic [6:0] level;
  bb_fifo dut (.*);

  bit [7:0] q[$];
  int n_full = 0, n_ov = 0, n_un = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    clr = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit exp_ov, exp_un;
      int bias;
      bias = (k / 300) % 2 ? 70 : 30;   // alternate filling and draining phases
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == 64) && int'(level) == q.size(), "flags/level");
      if (q.size()) check(rd_data == q[0], $sformatf("data %h expected %h", rd_data, q[0]));
      wr_en   = ($urandom_range(0, 99) < bias);
      rd_en   = ($urandom_range(0, 99) < 100 - bias);
      wr_data = 8'($urandom);
      exp_ov  = wr_en && q.size() == 64;
      exp_un  = rd_en && q.size() == 0;
      if (q.size() == 64) n_full++;
      if (rd_en && q.size()) void'(q.pop_front());
      if (wr_en && !exp_ov) q.push_back(wr_data);
      @(negedge clk);
      check(overflow == exp_ov, "overflow pulse");
      check(underflow == exp_un, "underflow pulse");
      if (exp_ov) n_ov++;
      if (exp_un) n_un++;
      wr_en = 0; rd_en = 0;
    end
    clr = 1; @(negedge clk); clr = 0; q = {};
    check(empty && level == 0, "clear");
    check(n_full > 0 && n_ov > 0 && n_un > 0, "full, overflow and underflow all exercised");
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
