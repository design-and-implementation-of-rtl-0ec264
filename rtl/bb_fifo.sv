// bb_fifo: the distributed buffer of the baseband module.
//
// A synchronous first-word-fall-through FIFO. Every unit of the module has
// one: the link controller's 64-byte TX and RX buffers, the 64-byte FIFOs of
// the UART and USB units and the voice buffer of the audio CODEC. The 64-byte
// default depth is the module's; the first-word-fall-through organisation and
// the overflow/underflow flags are this implementation's choice.
//
// Interface: rd_data shows the oldest entry whenever empty is low; rd_en
// removes it at the next clock edge. wr_en stores wr_data unless the FIFO is
// full, in which case the byte is dropped and overflow pulses for one cycle.
// rd_en on an empty FIFO pulses underflow. clr empties the FIFO synchronously.
// Storage is a plain array, so it maps to a register file or a RAM.
module bb_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level,
  output logic             overflow,
  output logic             underflow
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty   = (level == '0);
  assign full    = (level == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0; underflow <= 1'b0;
    end else if (clr) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0; underflow <= 1'b0;
    end else begin
      overflow  <= wr_en && full;
      underflow <= rd_en && empty;
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
