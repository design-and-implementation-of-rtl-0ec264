// bt_clock_gen: Bluetooth clock generation (timebase, CLKN, offset and phase
// control).
//
// A prescaler divides the 12 MHz system clock by DIV = 3750 and advances the
// 28-bit native clock CLKN at 3.2 kHz (one tick per half slot, 312.5 us).
// Offset control: CLKE = CLKN + offset. The offset is written directly, or
// computed as master_clk - CLKN when the master's clock value is loaded
// (master_load). Phase control: when a packet is detected (pkt_detect, the
// correlator's hit at the end of the sync word) and phase_lock_en is set, the
// prescaler value at that moment minus SYNC_END (sys clocks from slot start
// to the end of the sync word: 68 bits of 12 cycles) becomes the phase lag
// of CLK behind CLKE; CLK ticks when its own, lagging, prescaler wraps:
//   CLK = CLKE - (presc < phase ? 1 : 0).
// The 28-bit counter at 3.2 kHz and the CLKN/CLKE/CLK relation follow the
// module; the prescaler arrangement and the phase rule are this design's.
//
// Outputs are registered. clkn_tick and clk_tick pulse for one cycle when
// CLKN and CLK advance.
module bt_clock_gen #(
  parameter int unsigned DIV      = 3750,
  parameter int unsigned SYNC_END = 816
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        offset_wr,
  input  logic [27:0] offset_in,
  input  logic        master_load,
  input  logic [27:0] master_clk,
  input  logic        phase_lock_en,
  input  logic        pkt_detect,
  output logic [27:0] clkn,
  output logic [27:0] clke,
  output logic [27:0] clk_bt,
  output logic [27:0] offset,
  output logic [11:0] phase,
  output logic        clkn_tick,
  output logic        clk_tick
);
  localparam int unsigned PW = 12;

  logic [PW-1:0] presc;
  logic [PW-1:0] phase_n;

  always_comb begin
    if (presc >= PW'(SYNC_END)) phase_n = presc - PW'(SYNC_END);
    else                        phase_n = presc + PW'(DIV) - PW'(SYNC_END);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      presc <= '0; clkn <= '0; offset <= '0; phase <= '0; clkn_tick <= 1'b0;
    end else begin
      clkn_tick <= 1'b0;
      if (presc == PW'(DIV - 1)) begin
        presc <= '0;
        clkn  <= clkn + 1'b1;
        clkn_tick <= 1'b1;
      end else begin
        presc <= presc + 1'b1;
      end
      if (offset_wr)        offset <= offset_in;
      else if (master_load) offset <= master_clk - clkn;
      if (phase_lock_en && pkt_detect) phase <= phase_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clke <= '0; clk_bt <= '0; clk_tick <= 1'b0;
    end else begin
      clke     <= clkn + offset;
      clk_bt   <= clkn + offset - ((presc < phase) ? 28'd1 : 28'd0);
      clk_tick <= (presc == phase);
    end
  end
endmodule
