// instr_queue: the SoftMC instruction queue.
//
// A circular buffer of 32-bit instruction words between the instruction
// receiver and the instruction dispatcher. The write side takes one word per
// cycle (wr_en, only when not full). The read side shows the three oldest
// words at once (head0..head2) so that the dispatcher can execute a DDR
// instruction together with its write-data word and a WAIT that follows it
// in a single cycle; pop_n (0..3) removes that many words at the clock edge.
// pop_n must not exceed count. Reads are combinational from the array, so a
// word written at an edge is visible in the next cycle.
// The queue itself is named in the SoftMC block diagram; its depth and the
// three-word look-ahead are this design's choices.
module instr_queue #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write side
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  output logic                       full,
  // read side
  output logic [W-1:0]               head0,
  output logic [W-1:0]               head1,
  output logic [W-1:0]               head2,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [1:0]                 pop_n
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head0 = mem[rptr];
  assign head1 = mem[AW'(rptr + AW'(1))];
  assign head2 = mem[AW'(rptr + AW'(2))];

  wire push = wr_en && !full;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= AW'(wptr + AW'(1));
      rptr  <= AW'(rptr + AW'(pop_n));
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop_n);
    end
  end

  // The consumer never removes more words than are stored.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   ($bits(count))'(pop_n) <= count);
endmodule
