// instr_receiver: the SoftMC instruction receiver.
//
// Takes the raw 32-bit words the host sends over the PCIe link (a
// valid/ready stream) and writes them into the instruction queue. It parses
// the stream just enough to know where each instruction sequence ends: a
// word that follows a DDR WRITE instruction is write data and is not decoded,
// every other word is an instruction, and an END instruction closes a
// sequence. It keeps the number of complete sequences held in the queue
// (seq_avail is high while it is not zero); the dispatcher reports each
// sequence it has finished on seq_done. A sequence only starts executing
// once it is complete in the queue, so that host-link stalls never stretch
// the timing the host asked for.
// If the queue fills up before a sequence is complete, that sequence can
// never run; seq_too_long then goes high and stays high until reset.
// Timing: one word per cycle, in_ready = queue not full.
// The block is named in the SoftMC block diagram; the sequence counting and
// the stream handshake are this design's choices.
module instr_receiver
  import softmc_pkg::*;
#(
  parameter int unsigned SEQ_CNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // host stream
  input  logic               in_valid,
  input  logic [INSTR_W-1:0] in_data,
  output logic               in_ready,
  // queue write side
  output logic               q_wr_en,
  output logic [INSTR_W-1:0] q_wr_data,
  input  logic               q_full,
  // sequence bookkeeping
  input  logic               seq_done,
  output logic               seq_avail,
  output logic               seq_too_long
);
  logic                 expect_data;   // next word is WRITE data
  logic [SEQ_CNT_W-1:0] seq_cnt;

  assign in_ready  = !q_full;
  assign q_wr_en   = in_valid && !q_full;
  assign q_wr_data = in_data;
  assign seq_avail = (seq_cnt != '0);

  wire end_in = q_wr_en && !expect_data && (instr_type(in_data) == IT_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_data  <= 1'b0;
      seq_cnt      <= '0;
      seq_too_long <= 1'b0;
    end else begin
      if (q_wr_en) expect_data <= !expect_data && is_write_instr(in_data);
      seq_cnt <= seq_cnt + SEQ_CNT_W'(end_in) - SEQ_CNT_W'(seq_done);
      if (q_full && seq_cnt == '0) seq_too_long <= 1'b1;
    end
  end

  a_done_has_seq: assert property (@(posedge clk) disable iff (!rst_n)
                                   seq_done |-> seq_cnt != '0);
endmodule
