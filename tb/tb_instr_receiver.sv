// tb_instr_receiver: self-checking test of the instruction receiver.
// Streams instruction words into the receiver while a reference parser
// (written here, independent of the block) tracks where each sequence ends.
// Write-data words that happen to look like END must not close a sequence.
// Checks the words passed to the queue, in_ready under a full queue, the
// sequence count seen through seq_avail as sequences are retired with
// seq_done, and the sticky seq_too_long flag.
module tb_instr_receiver;
  import softmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, q_wr_en, q_full, seq_done, seq_avail, seq_too_long;
  logic [31:0] in_data, q_wr_data;
  int checks = 0, failures = 0;
  int model_seqs = 0;

  instr_receiver dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // send one word; the reference parser is driven from the caller
  task automatic send(input logic [31:0] w);
    @(negedge clk);
    in_valid = 1; in_data = w; #1;
    check(q_wr_en == !q_full, "q_wr_en follows full");
    check(q_wr_data == w, "word passed to queue");
    check(in_ready == !q_full, "in_ready");
    @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  logic [31:0] wr_cmd, act_cmd;
  initial begin
    in_valid = 0; in_data = 0; q_full = 0; seq_done = 0;
    wr_cmd  = mk_ddr(1, 2'b10, 1, 0, 0, 3'd2, 16'h0010);
    act_cmd = mk_ddr(1, 2'b10, 0, 1, 1, 3'd2, 16'h0123);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!seq_avail && !seq_too_long, "reset state");
    // three sequences; a WRITE data word equal to END (all zero) inside
    for (int s = 0; s < 3; s++) begin
      send(act_cmd); send(mk_wait(28'd5)); send(wr_cmd); send(32'h0000_0000);
      check(seq_avail == (model_seqs > 0), "data word is not END");
      send(wr_cmd); send(32'h2000_0001);     // data word that looks like WAIT
      send(mk_busdir(DIR_READ));
      send(mk_end());
      model_seqs++;
      @(negedge clk);
      check(seq_avail, "sequence complete");
    end
    // retire them one by one
    for (int s = 0; s < 3; s++) begin
      @(negedge clk); check(seq_avail, "still sequences");
      seq_done = 1; @(posedge clk); #1 seq_done = 0; model_seqs--;
    end
    @(negedge clk); check(!seq_avail, "all retired");
    // full queue: no write, in_ready low, and with no complete sequence -> too long
    q_full = 1;
    @(negedge clk); in_valid = 1; in_data = act_cmd;
    #1 check(!q_wr_en && !in_ready, "blocked when full");
    @(posedge clk); @(negedge clk); in_valid = 0;
    check(seq_too_long, "seq_too_long set");
    q_full = 0;
    repeat (2) @(negedge clk);
    check(seq_too_long, "seq_too_long sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
