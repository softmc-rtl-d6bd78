// tb_instr_queue: self-checking test of the instruction queue.
// Pushes random words at random times and pops 0..3 words per cycle
// (never more than are stored), comparing the three head words and the
// count against a reference queue every cycle. Also fills the queue to
// check the full flag and that a push into a full queue is dropped.
module tb_instr_queue;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en; logic [31:0] wr_data; logic full;
  logic [31:0] head0, head1, head2; logic [4:0] count; logic [1:0] pop_n;
  int checks = 0, failures = 0;
  logic [31:0] ref_q[$];

  instr_queue #(.DEPTH(DEPTH), .W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    wr_en = 0; wr_data = 0; pop_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // phase 1: random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(count == 5'(ref_q.size()), "count");
      if (ref_q.size() > 0) check(head0 == ref_q[0], "head0");
      if (ref_q.size() > 1) check(head1 == ref_q[1], "head1");
      if (ref_q.size() > 2) check(head2 == ref_q[2], "head2");
      check(full == (ref_q.size() == DEPTH), "full");
      wr_en   = ($urandom_range(0, 2) != 0);
      wr_data = $urandom();
      pop_n   = 2'($urandom_range(0, (ref_q.size() < 3) ? ref_q.size() : 3));
      if (cyc % 400 > 300) pop_n = 0;  // let it fill up
      @(posedge clk);
      for (int i = 0; i < int'(pop_n); i++) void'(ref_q.pop_front());
      if (wr_en && ref_q.size() + int'(pop_n) < DEPTH) ref_q.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0; pop_n = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
