// tb_audio_codec: a PCM chip model feeds samples and records the played
// ones. A-law and mu-law: every encoded byte must decode (by the segment /
// interval definition of G.711, written independently here) to within one
// quantisation step of its input sample, and every code written to the RX
// FIFO must be played as that decoded value, one frame later. CVSD: bytes
// read from the TX FIFO are written back to the RX FIFO, and the played
// signal must track a 400 Hz tone. Also checks 8-bit linear samples, direct
// mode (SCO stream without the processor), the frame rate and the
// TX-half-full interrupt.
module tb_audio_codec;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cs, wr, rd, irq, pcm_clk, pcm_sync, pcm_dout, pcm_din;
  logic [3:0] addr;
  logic [7:0] wdata, rdata, sco_tx_data, sco_rx_data;
  logic       sco_tx_valid, sco_tx_ready, sco_rx_valid, sco_rx_rd;
  audio_codec dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bus_wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk) begin cs = 1; wr = 1; addr = a; wdata = d; end
    @(negedge clk) begin cs = 0; wr = 0; end
  endtask
  task automatic bus_rd(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk) begin cs = 1; rd = 1; addr = a; end
    #1 d = rdata;
    @(negedge clk) begin cs = 0; rd = 0; end
  endtask

  // ---------------- PCM chip model ----------------
  int  in_samples[$];        // samples to send, one per frame
  int  sent[$];              // samples sent, in order
  int  played[$];            // samples received, in order
  int  sidx, nbits = 16;
  bit [15:0] cur_in, cur_out;
  int  frames = 0, t_last = 0, t_period = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge pcm_clk) begin
    if (pcm_sync) begin
      if (frames > 0) begin
        played.push_back(nbits == 16 ? int'($signed(cur_out)) : int'($signed({cur_out[7:0], 8'd0})));
        t_period = cyc - t_last;
      end
      t_last = cyc;
      frames++;
      cur_in = in_samples.size() ? 16'(in_samples.pop_front()) : 16'd0;
      sent.push_back(nbits == 16 ? int'($signed(cur_in)) : int'($signed({cur_in[15:8], 8'd0})));
      if (nbits == 8) cur_in = {cur_in[15:8], 8'd0};
      sidx = 0;
    end
    pcm_din = cur_in[15 - sidx];
  end
  always @(negedge pcm_clk) begin
    cur_out[nbits - 1 - sidx] = pcm_dout;
    sidx++;
  end

  // ---------------- G.711 reference (interval midpoints) ----------------
  function automatic int dec_a(bit [7:0] c);
    bit [7:0] v;
    int seg, q, mid;
    v = c ^ 8'h55; seg = v[6:4]; q = v[3:0];
    if (seg == 0)      mid = 2 * q + 1;
    else if (seg == 1) mid = 33 + 2 * q;
    else               mid = ((16 + q) << seg) + (1 << (seg - 1));
    return v[7] ? 8 * mid : -8 * mid;
  endfunction
  function automatic int dec_u(bit [7:0] c);
    bit [7:0] v;
    int seg, q, mid;
    v = ~c; seg = v[6:4]; q = v[3:0];
    mid = ((33 + 2 * q) << seg) - 33;
    return v[7] ? -4 * mid : 4 * mid;
  endfunction
  function automatic int step_a(int x);
    int m;
    m = (x < 0 ? -x : x) / 8;
    for (int k = 7; k >= 1; k--) if (m >= (16 << k)) return 8 << k;
    return 16;
  endfunction
  function automatic int step_u(int x);
    int m;
    m = (x < 0 ? -x : x) / 4 + 33;
    for (int k = 7; k >= 0; k--) if (m >= (32 << k)) return 8 << k;
    return 8;
  endfunction

  task automatic logpcm_test(input int mode, input int n);
    logic [7:0] d;
    bit [7:0] codes[$];
    int exp_play[$];
    int base;
    // RX FIFO prefilled with codes, TX side fed with random samples
    for (int i = 0; i < n; i++) begin
      int x;
      x = (i < 4) ? ((i == 0) ? 0 : (i == 1) ? 32767 : (i == 2) ? -32768 : -1) : $signed(16'($urandom)) >>> $urandom_range(0, 8);
      in_samples.push_back(x);
      codes.push_back(8'($urandom));
    end
    bus_wr(0, 8'h20);
    for (int i = 0; i < 32 && i < n; i++) bus_wr(3, codes[i]);
    sent = {}; played = {}; frames = 0;
    bus_wr(0, 8'(4 | mode));
    for (int i = 0; i < n; i++) begin
      // keep the RX FIFO fed and drain the TX FIFO
      wait (frames > i);
      repeat (1600) @(negedge clk);
      bus_rd(2, d);
      begin
        int x, dec, st;
        x = sent[i];
        dec = (mode == 0) ? dec_a(d) : dec_u(d);
        st  = (mode == 0) ? step_a(x) : step_u(x);
        if (mode == 1 && (x > 32124 || x < -32124)) st = 700;
        check((dec - x <= st) && (x - dec <= st), $sformatf("mode %0d: sample %0d coded %h decodes to %0d", mode, x, d, dec));
      end
      if (i + 32 < n) bus_wr(3, codes[i + 32]);
    end
    bus_wr(0, 8'(mode));
    // frame k plays the code taken at frame k-1; played[j] is frame j+1's output... frame j
    for (int j = 1; j < n - 1; j++)
      check(played[j] == ((mode == 0) ? dec_a(codes[j - 1]) : dec_u(codes[j - 1])),
            $sformatf("mode %0d frame %0d: played %0d expected %0d", mode, j, played[j], (mode == 0) ? dec_a(codes[j - 1]) : dec_u(codes[j - 1])));
    check(t_period == 1500, $sformatf("frame period %0d cycles", t_period));
  endtask

  initial begin
    logic [7:0] d;
    cs = 0; wr = 0; rd = 0; addr = 0; wdata = 0; pcm_din = 0;
    sco_tx_ready = 0; sco_rx_data = 0; sco_rx_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    logpcm_test(0, 60);
    logpcm_test(1, 60);
    // CVSD: 400 Hz tone, loop back through the processor
    begin
      real err, sig;
      int best;
      in_samples = {};
      for (int i = 0; i < 400; i++) in_samples.push_back(int'(8000.0 * $sin(2.0 * 3.14159265 * 400.0 * i / 8000.0)));
      bus_wr(0, 8'h20);
      sent = {}; played = {}; frames = 0;
      bus_wr(0, 8'h06);
      for (int i = 0; i < 398; i++) begin
        wait (frames > i);
        repeat (200) @(negedge clk);
        bus_rd(1, d);
        while (!d[0]) begin bus_rd(2, d); bus_wr(3, d); bus_rd(1, d); end
      end
      bus_wr(0, 8'h02);
      best = 0;
      for (int lag = 0; lag < 20; lag++) begin
        err = 0; sig = 0;
        for (int j = 100; j < 380; j++) begin
          err += (played[j] - sent[j - lag]) ** 2;
          sig += sent[j - lag] ** 2;
        end
        if (best == 0 && err < 0.1 * sig) best = lag + 1;
      end
      check(best != 0, "CVSD output tracks the input tone");
    end
    // 8-bit linear samples, A-law
    nbits = 8;
    in_samples = {};
    for (int i = 0; i < 10; i++) in_samples.push_back(int'($signed(16'($urandom))));
    bus_wr(0, 8'h20);
    sent = {}; played = {}; frames = 0;
    bus_wr(0, 8'h0C);
    for (int i = 0; i < 8; i++) begin
      wait (frames > i);
      repeat (1600) @(negedge clk);
      bus_rd(2, d);
      check(dec_a(d) - sent[i] <= step_a(sent[i]) && sent[i] - dec_a(d) <= step_a(sent[i]), "8-bit sample coded");
    end
    bus_wr(0, 8'h08);
    nbits = 16;
    // direct mode: bytes go to and come from the SCO stream
    begin
      int n_tx = 0, n_rx = 0;
      in_samples = {};
      for (int i = 0; i < 12; i++) in_samples.push_back(1000 * i);
      bus_wr(0, 8'h20);
      sent = {}; played = {}; frames = 0;
      sco_tx_ready = 1; sco_rx_valid = 1; sco_rx_data = 8'hAA;
      bus_wr(0, 8'h14);
      fork
        begin
          while (frames < 10) begin
            @(posedge clk);
            if (sco_tx_valid && sco_tx_ready) begin
              check(dec_a(sco_tx_data) - sent[n_tx] <= step_a(sent[n_tx]) && sent[n_tx] - dec_a(sco_tx_data) <= step_a(sent[n_tx]), "direct-mode byte");
              n_tx++;
            end
            if (sco_rx_rd) n_rx++;
          end
        end
      join
      bus_wr(0, 8'h10);
      check(n_tx >= 8, $sformatf("%0d bytes sent in direct mode", n_tx));
      check(n_rx >= 30, $sformatf("%0d bytes taken in direct mode", n_rx));
      check(played[8] == dec_a(8'hAA), "direct-mode byte played");
      sco_tx_ready = 0; sco_rx_valid = 0;
    end
    // TX half-full interrupt
    bus_wr(6, 8'h01);
    in_samples = {};
    bus_wr(0, 8'h20);
    frames = 0;
    bus_wr(0, 8'h04);
    wait (frames > 17);
    repeat (1600) @(negedge clk);
    check(irq, "TX half-full interrupt");
    bus_wr(0, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
