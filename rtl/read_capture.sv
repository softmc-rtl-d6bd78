// read_capture: the SoftMC read capture unit.
//
// Collects the read bursts the DDR PHY returns and sends them to the host.
// Each burst (64 DQ x 8 beats = 512 bits, beat 0 in the low bits) arrives
// in one cycle with rd_valid and is stored in a FIFO of DEPTH bursts. The
// FIFO is drained towards the host link as a valid/ready stream of 32-bit
// words, lowest word of the oldest burst first, 16 words per burst.
// A burst that arrives while the FIFO is full is dropped; overflow then
// stays high until reset and dropped counts the lost bursts, so the host can
// tell a lost burst from a DRAM error.
// Timing: a stored burst can be sent from the cycle after it arrives; one
// word per cycle while out_ready is high.
// The block is named in the SoftMC block diagram; the buffer depth (one full
// 8 KB row of a 64-bit module) and the host word width are this design's
// choices.
module read_capture
  import softmc_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned OUT_W  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rd_valid,
  input  logic [BURST_W-1:0] rd_data,
  output logic               out_valid,
  output logic [OUT_W-1:0]   out_data,
  input  logic               out_ready,
  output logic               overflow,
  output logic [15:0]        dropped
);
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned WORDS = BURST_W / OUT_W;
  localparam int unsigned WW    = $clog2(WORDS);
  initial assert (DEPTH == (1 << AW) && BURST_W % OUT_W == 0);

  logic [BURST_W-1:0] mem [DEPTH];
  logic [AW-1:0]      wptr, rptr;
  logic [CW-1:0]      count;
  logic [WW-1:0]      widx;

  wire full  = (count == CW'(DEPTH));
  wire push  = rd_valid && !full;
  wire xfer  = out_valid && out_ready;
  wire pop   = xfer && (widx == WW'(WORDS - 1));

  assign out_valid = (count != '0);
  assign out_data  = mem[rptr][widx*OUT_W +: OUT_W];

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= rd_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      widx     <= '0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      if (push) wptr <= AW'(wptr + AW'(1));
      if (xfer) widx <= (widx == WW'(WORDS - 1)) ? '0 : widx + WW'(1);
      if (pop)  rptr <= AW'(rptr + AW'(1));
      count <= count + CW'(push) - CW'(pop);
      if (rd_valid && full) begin
        overflow <= 1'b1;
        if (dropped != '1) dropped <= dropped + 16'd1;
      end
    end
  end
endmodule
