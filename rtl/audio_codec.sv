// audio_codec: voice CODEC of the baseband module.
//
// Converts between the linear PCM samples of an external PCM chip and the
// three Bluetooth air codings, selected by a register: A-law and mu-law log
// PCM (8 bits per 8 kHz sample) and CVSD (one bit per 64 kHz step, eight
// steps per 8 kHz sample). Encoded bytes go to a TX voice FIFO and decoded
// bytes come from an RX voice FIFO; the two halves of the 64-byte buffer
// block are 32 bytes each. In direct mode the FIFOs exchange bytes with the
// link controller's SCO stream without the processor.
//
// The choice of codings, the register control, the PCM chip interface, the
// 64-byte buffer and the direct mode follow the module. The rest is this
// design's:
//  * PCM interface (this block is the master): every FRAME_DIV clocks
//    (8 kHz at 12 MHz) pcm_sync is high for the first bit period and 16 bits
//    (8 with lin8) move MSB first, BCLK_DIV clocks per bit. pcm_dout changes
//    when pcm_clk rises, pcm_din is sampled when it falls. 8-bit samples are
//    the 8 MSBs of the 16-bit linear value.
//  * Log PCM follows the ITU-T G.711 segment rules (13-bit A-law, 14-bit
//    mu-law magnitude).
//  * CVSD follows the Bluetooth parameters: h = 1-1/32, beta = 1-1/1024,
//    J = K = 4, delta_min = 10, delta_max = 1280, y limited to 16 bits.
//    The accumulator and step size carry 10 fraction bits. Upsampling is a
//    sample hold of the 8 kHz input; the decoder outputs every eighth value.
//    The first CVSD bit of a frame is bit 0 of the byte.
//  * An empty RX FIFO at a frame decodes silence (0xD5, 0xFF or 0x55).
// Latency: the sample captured in frame n is encoded at the end of frame n;
// the byte taken at the start of frame n is played in frame n+1.
//
// Registers: 0 CTRL [1:0] mode (0 A-law, 1 mu-law, 2 CVSD) [2] enable
// [3] lin8 [4] direct [5] flush both FIFOs (write only); 1 STATUS [0] TX empty [1] TX full [2] RX empty
// [3] RX full [4] TX overflow (clears on read); 2 TX data (read pops);
// 3 RX data (write pushes); 4 TX level; 5 RX level; 6 IRQ enable
// ([0] TX half full, [1] RX half empty).
module audio_codec #(
  parameter int unsigned FRAME_DIV = 1500,
  parameter int unsigned BCLK_DIV  = 48,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] rdata,
  output logic       irq,
  // PCM chip
  output logic       pcm_clk,
  output logic       pcm_sync,
  output logic       pcm_dout,
  input  logic       pcm_din,
  // SCO stream to and from the link controller
  output logic [7:0] sco_tx_data,
  output logic       sco_tx_valid,
  input  logic       sco_tx_ready,
  input  logic [7:0] sco_rx_data,
  input  logic       sco_rx_valid,
  output logic       sco_rx_rd
);
  localparam int unsigned LW = $clog2(BUF_DEPTH) + 1;
  localparam int unsigned FW = $clog2(FRAME_DIV);

  typedef struct packed {
    logic signed [25:0] y;       // accumulator, 10 fraction bits
    logic        [20:0] delta;   // step size, 10 fraction bits
    logic        [3:0]  hist;    // last bits, newest at [0]
  } cvsd_t;

  // ---------------- G.711 ----------------
  function automatic logic [7:0] lin2alaw(input logic signed [15:0] x);
    logic [7:0]  mask, aval;
    logic [12:0] v;
    logic signed [12:0] s;
    int seg;
    s = 13'(x >>> 3);
    if (s >= 0) begin mask = 8'hD5; v = s; end
    else        begin mask = 8'h55; v = 13'(-s - 13'sd1); end
    seg = 8;
    for (int i = 7; i >= 0; i--) if (v <= 13'((32 << i) - 1)) seg = i;
    if (seg >= 8) aval = 8'h7F;
    else begin
      aval = 8'(seg << 4);
      if (seg < 2) aval |= 8'((v >> 1) & 13'hF);
      else         aval |= 8'((v >> seg) & 13'hF);
    end
    return aval ^ mask;
  endfunction

  function automatic logic signed [15:0] alaw2lin(input logic [7:0] a);
    logic [7:0]  v;
    logic [15:0] t;
    int seg;
    v   = a ^ 8'h55;
    t   = {8'd0, v[3:0], 4'd0};
    seg = int'(v[6:4]);
    if (seg == 0) t += 16'd8;
    else begin t += 16'h108; t <<= (seg - 1); end
    return v[7] ? $signed(t) : -$signed(t);
  endfunction

  function automatic logic [7:0] lin2ulaw(input logic signed [15:0] x);
    logic [7:0]  mask;
    logic [13:0] v;
    logic signed [13:0] s;
    int seg;
    s = 14'(x >>> 2);
    if (s < 0) begin mask = 8'h7F; v = 14'(-s); end
    else       begin mask = 8'hFF; v = s; end
    if (v > 14'd8159) v = 14'd8159;
    v += 14'd33;
    seg = 8;
    for (int i = 7; i >= 0; i--) if (v <= 14'((64 << i) - 1)) seg = i;
    if (seg >= 8) return 8'h7F ^ mask;
    return 8'((seg << 4) | int'((v >> (seg + 1)) & 14'hF)) ^ mask;
  endfunction

  function automatic logic signed [15:0] ulaw2lin(input logic [7:0] u);
    logic [7:0]  v;
    logic [15:0] t;
    v = ~u;
    t = {9'd0, v[3:0], 3'd0} + 16'h84;
    t <<= v[6:4];
    return v[7] ? $signed(16'h84 - t) : $signed(t - 16'h84);
  endfunction

  // ---------------- CVSD ----------------
  localparam logic signed [25:0] YMAX = 26'sd32767 <<< 10;
  localparam logic signed [25:0] YMIN = -(26'sd32768 <<< 10);
  localparam logic [20:0] DMIN = 21'd10 << 10;
  localparam logic [20:0] DMAX = 21'd1280 << 10;

  function automatic cvsd_t cvsd_step(input cvsd_t s, input logic b);
    cvsd_t n;
    logic signed [26:0] y;
    logic [21:0] d;
    n.hist = {s.hist[2:0], b};
    if (n.hist == 4'hF || n.hist == 4'h0) begin
      d = 22'(s.delta) + 22'(DMIN);
      n.delta = (d > 22'(DMAX)) ? DMAX : d[20:0];
    end else begin
      d = {1'b0, s.delta - (s.delta >> 10)};
      n.delta = (d < 22'(DMIN)) ? DMIN : d[20:0];
    end
    y = b ? 27'(s.y) + 27'($signed({1'b0, n.delta})) : 27'(s.y) - 27'($signed({1'b0, n.delta}));
    if (y > 27'(YMAX)) y = 27'(YMAX);
    if (y < 27'(YMIN)) y = 27'(YMIN);
    n.y = 26'(y - (y >>> 5));                 // h * y(k)
    return n;
  endfunction

  // ---------------- registers ----------------
  logic [1:0] mode;
  logic       enable, lin8, direct, tx_ov;
  logic [1:0] ie;
  logic       wr_en, rd_en, flush;
  assign wr_en = cs && wr;
  assign rd_en = cs && rd;
  assign flush = wr_en && addr == 4'd0 && wdata[5];

  // ---------------- FIFOs ----------------
  logic [7:0]    txf_data, rxf_data, txf_wdata, rxf_wdata;
  logic          txf_empty, txf_full, rxf_empty, rxf_full;
  logic          txf_wr, txf_rd, rxf_wr, rxf_rd_frame, rxf_rd;
  logic [LW-1:0] txf_level, rxf_level;
  logic          txf_ov, txf_un, rxf_ov, rxf_un;

  assign sco_tx_data  = txf_data;
  assign sco_tx_valid = direct && !txf_empty;
  assign txf_rd       = direct ? (sco_tx_ready && !txf_empty) : (rd_en && addr == 4'd2);
  assign sco_rx_rd    = direct && sco_rx_valid && !rxf_full;
  assign rxf_wr       = direct ? sco_rx_rd : (wr_en && addr == 4'd3);
  assign rxf_wdata    = direct ? sco_rx_data : wdata;
  assign rxf_rd       = rxf_rd_frame;

  bb_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_txf (
    .clk, .rst_n, .clr(flush), .wr_en(txf_wr), .wr_data(txf_wdata), .rd_en(txf_rd),
    .rd_data(txf_data), .empty(txf_empty), .full(txf_full), .level(txf_level),
    .overflow(txf_ov), .underflow(txf_un));
  bb_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_rxf (
    .clk, .rst_n, .clr(flush), .wr_en(rxf_wr), .wr_data(rxf_wdata), .rd_en(rxf_rd),
    .rd_data(rxf_data), .empty(rxf_empty), .full(rxf_full), .level(rxf_level),
    .overflow(rxf_ov), .underflow(rxf_un));

  // ---------------- PCM frame timing ----------------
  logic [FW-1:0] fcnt;
  logic [5:0]    bcnt;
  logic [4:0]    bitn;
  logic [15:0]   sh_out, sh_in;
  logic [4:0]    nb;
  assign nb = lin8 ? 5'd8 : 5'd16;

  // encode/decode engine
  typedef enum logic [1:0] {E_IDLE, E_ENC, E_DEC} est_e;
  est_e              est;
  logic [2:0]        ecnt;
  logic signed [15:0] x_in, dec_sample;
  logic [7:0]        enc_byte, dec_byte;
  cvsd_t             enc_st, dec_st;
  logic              frame_start;

  assign frame_start = enable && fcnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= '0; enable <= 1'b0; lin8 <= 1'b0; direct <= 1'b0; ie <= '0; tx_ov <= 1'b0;
    end else begin
      if (wr_en && addr == 4'd0) {direct, lin8, enable, mode} <= wdata[4:0];
      if (wr_en && addr == 4'd6) ie <= wdata[1:0];
      if (rd_en && addr == 4'd1) tx_ov <= 1'b0;
      if (txf_ov) tx_ov <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt <= '0; bcnt <= '0; bitn <= '0; sh_out <= '0; sh_in <= '0;
      pcm_clk <= 1'b0; pcm_sync <= 1'b0; pcm_dout <= 1'b0;
      est <= E_IDLE; ecnt <= '0; x_in <= '0; dec_sample <= '0;
      enc_byte <= '0; dec_byte <= '0; enc_st <= '0; dec_st <= '0;
      txf_wr <= 1'b0; txf_wdata <= '0; rxf_rd_frame <= 1'b0;
    end else begin
      txf_wr       <= 1'b0;
      rxf_rd_frame <= 1'b0;
      if (!enable) begin
        fcnt <= '0; bcnt <= '0; bitn <= '0; pcm_clk <= 1'b0; pcm_sync <= 1'b0;
        enc_st <= '{y: '0, delta: DMIN, hist: 4'h5};
        dec_st <= '{y: '0, delta: DMIN, hist: 4'h5};
      end else begin
        fcnt <= (fcnt == FW'(FRAME_DIV - 1)) ? '0 : fcnt + 1'b1;
        // serial shifting of one sample per frame
        if (frame_start) begin
          sh_out   <= lin8 ? {dec_sample[15:8], 8'd0} : dec_sample;
          pcm_dout <= dec_sample[15];
          pcm_sync <= 1'b1;
          pcm_clk  <= 1'b1;
          bcnt <= '0; bitn <= '0;
          // fetch the next air byte
          dec_byte <= rxf_empty ? (mode == 2'd0 ? 8'hD5 : mode == 2'd1 ? 8'hFF : 8'h55) : rxf_data;
          if (!rxf_empty) rxf_rd_frame <= 1'b1;
          est <= E_DEC; ecnt <= '0;
        end else if (bitn < nb) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 6'(BCLK_DIV / 2 - 1)) begin
            pcm_clk <= 1'b0;
            sh_in   <= {sh_in[14:0], pcm_din};
          end
          if (bcnt == 6'(BCLK_DIV - 1)) begin
            bcnt <= '0;
            pcm_sync <= 1'b0;
            bitn <= bitn + 1'b1;
            if (bitn != nb - 1'b1) begin
              pcm_clk  <= 1'b1;
              sh_out   <= {sh_out[14:0], 1'b0};
              pcm_dout <= sh_out[14];
            end else begin
              // sample complete
              x_in <= lin8 ? {sh_in[7:0], 8'd0} : sh_in;
              est  <= E_ENC; ecnt <= '0;
            end
          end
        end

        // encode / decode engine
        unique case (est)
          E_DEC: begin
            if (mode == 2'd2) begin
              cvsd_t n;
              n = cvsd_step(dec_st, dec_byte[ecnt]);
              dec_st <= n;
              ecnt   <= ecnt + 1'b1;
              if (ecnt == 3'd7) begin dec_sample <= 16'(n.y >>> 10); est <= E_IDLE; end
            end else begin
              dec_sample <= (mode == 2'd0) ? alaw2lin(dec_byte) : ulaw2lin(dec_byte);
              est <= E_IDLE;
            end
          end
          E_ENC: begin
            if (mode == 2'd2) begin
              cvsd_t n;
              logic  b;
              b = ($signed({x_in, 10'd0}) >= enc_st.y);
              n = cvsd_step(enc_st, b);
              enc_st <= n;
              enc_byte[ecnt] <= b;
              ecnt <= ecnt + 1'b1;
              if (ecnt == 3'd7) begin
                txf_wdata <= {b, enc_byte[6:0]};
                txf_wr <= 1'b1; est <= E_IDLE;
              end
            end else begin
              txf_wdata <= (mode == 2'd0) ? lin2alaw(x_in) : lin2ulaw(x_in);
              txf_wr <= 1'b1; est <= E_IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign irq = (ie[0] && txf_level >= LW'(BUF_DEPTH / 2)) || (ie[1] && rxf_level < LW'(BUF_DEPTH / 2));

  always_comb begin
    unique case (addr)
      4'd0: rdata = {3'd0, direct, lin8, enable, mode};
      4'd1: rdata = {3'd0, tx_ov, rxf_full, rxf_empty, txf_full, txf_empty};
      4'd2: rdata = txf_data;
      4'd4: rdata = 8'(txf_level);
      4'd5: rdata = 8'(rxf_level);
      4'd6: rdata = {6'd0, ie};
      default: rdata = 8'h00;
    endcase
  end
endmodule
