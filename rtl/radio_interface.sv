// radio_interface: connection of the baseband unit to the RF module.
//
// Three parts, as the module describes them:
//  * Bit timing. Transmission follows the 1 MHz clock provided by the RF
//    module (rf_clk1m): each of its rising edges, after a two-flop
//    synchroniser, gives tx_tick, and the next tx bit is driven on rf_txd.
//    Reception follows the clock recovered by the RF module's PLL (rf_rxclk):
//    rf_rxd is sampled at each rising edge and delivered as rx_bit with a
//    one-cycle rx_bit_valid strobe.
//  * RF control signals, driven straight from a register set by firmware
//    (rf_ctrl).
//  * A serial control interface after IEEE 1149.1: on go, a TAP master
//    performs an IR scan (IR_W bits of ir) and then a DR scan (DR_W bits of
//    dr), LSB first, starting from and returning to Run-Test/Idle. TCK runs
//    at clk / (2*TCK_HALF); TMS/TDI change while TCK is low and TDO is
//    sampled at the rising edge. The DR bits shifted out by the RF module are
//    returned in dr_capture. busy is high during the scan.
// The IR/DR widths and TCK rate are this design's choices.
module radio_interface #(
  parameter int unsigned IR_W     = 8,
  parameter int unsigned DR_W     = 16,
  parameter int unsigned TCK_HALF = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  // bit timing
  input  logic            rf_clk1m,
  input  logic            rf_rxclk,
  input  logic            rf_rxd,
  output logic            rf_txd,
  output logic            tx_tick,
  input  logic            tx_bit,
  input  logic            tx_bit_valid,
  output logic            rx_bit,
  output logic            rx_bit_valid,
  // register-controlled RF signals
  input  logic [7:0]      ctrl_reg,
  output logic [7:0]      rf_ctrl,
  // serial control interface
  input  logic            go,
  input  logic [IR_W-1:0] ir,
  input  logic [DR_W-1:0] dr,
  output logic [DR_W-1:0] dr_capture,
  output logic            busy,
  output logic            rf_tck,
  output logic            rf_tms,
  output logic            rf_tdi,
  input  logic            rf_tdo
);
  // ---------------- bit timing ----------------
  logic [2:0] c1m_s, rxc_s;
  logic [1:0] rxd_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1m_s <= '0; rxc_s <= '0; rxd_s <= '0; tx_tick <= 1'b0;
      rx_bit <= 1'b0; rx_bit_valid <= 1'b0; rf_txd <= 1'b0; rf_ctrl <= '0;
    end else begin
      c1m_s <= {c1m_s[1:0], rf_clk1m};
      rxc_s <= {rxc_s[1:0], rf_rxclk};
      rxd_s <= {rxd_s[0], rf_rxd};
      tx_tick      <= c1m_s[1] && !c1m_s[2];
      rx_bit_valid <= rxc_s[1] && !rxc_s[2];
      if (rxc_s[1] && !rxc_s[2]) rx_bit <= rxd_s[1];
      if (tx_bit_valid) rf_txd <= tx_bit;
      rf_ctrl <= ctrl_reg;
    end
  end

  // ---------------- IEEE 1149.1 TAP master ----------------
  localparam int unsigned IR_STEPS = 4 + IR_W + 2;
  localparam int unsigned NSTEPS   = IR_STEPS + 3 + DR_W + 2;
  localparam int unsigned SW       = $clog2(NSTEPS + 1);
  localparam int unsigned DW       = $clog2(TCK_HALF + 1);

  logic [SW-1:0]  step;
  logic [DW-1:0]  div;
  logic [IR_W-1:0] ir_r;
  logic [DR_W-1:0] dr_r;
  logic           tms_c, tdi_c, dr_shift;

  // TMS/TDI for each TCK period of the scan.
  always_comb begin
    int unsigned s;
    s        = int'(step);
    tms_c    = 1'b0;
    tdi_c    = 1'b0;
    dr_shift = 1'b0;
    if (s < 4) begin
      tms_c = (s < 2);                              // Select-DR, Select-IR, Capture-IR, Shift-IR
    end else if (s < 4 + IR_W) begin
      tdi_c = ir_r[s - 4];
      tms_c = (s == 4 + IR_W - 1);                  // last bit -> Exit1-IR
    end else if (s < IR_STEPS) begin
      tms_c = (s == 4 + IR_W);                      // Update-IR, Run-Test/Idle
    end else if (s < IR_STEPS + 3) begin
      tms_c = (s == IR_STEPS);                      // Select-DR, Capture-DR, Shift-DR
    end else if (s < IR_STEPS + 3 + DR_W) begin
      tdi_c    = dr_r[s - IR_STEPS - 3];
      tms_c    = (s == IR_STEPS + 3 + DR_W - 1);    // last bit -> Exit1-DR
      dr_shift = 1'b1;
    end else begin
      tms_c = (s == IR_STEPS + 3 + DR_W);           // Update-DR, Run-Test/Idle
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0; div <= '0; busy <= 1'b0; ir_r <= '0; dr_r <= '0; dr_capture <= '0;
      rf_tck <= 1'b0; rf_tms <= 1'b0; rf_tdi <= 1'b0;
    end else if (!busy) begin
      rf_tck <= 1'b0;
      rf_tms <= 1'b0;
      if (go) begin
        busy <= 1'b1; step <= '0; div <= '0; ir_r <= ir; dr_r <= dr;
      end
    end else begin
      if (div == DW'(TCK_HALF - 1)) begin
        div <= '0;
        if (!rf_tck) begin
          rf_tck <= 1'b1;                           // rising edge: TAP samples TMS/TDI
          if (dr_shift) dr_capture <= {rf_tdo, dr_capture[DR_W-1:1]};
        end else begin
          rf_tck <= 1'b0;
          if (step == SW'(NSTEPS - 1)) busy <= 1'b0;
          else                         step <= step + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
        if (!rf_tck && div == '0) begin
          rf_tms <= tms_c;
          rf_tdi <= tdi_c;
        end
      end
    end
  end
endmodule
