// tb_read_capture: self-checking test of the read capture unit.
// DEPTH is reduced to 4 bursts. Random 512-bit bursts arrive at random
// times while the host side is ready at random; every 32-bit word sent must
// equal the next word of a reference list built from the bursts that were
// accepted (lowest word first). With the host stalled the buffer fills and
// further bursts must be dropped, flagged by overflow and counted.
module tb_read_capture;
  import softmc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic rd_valid, out_valid, out_ready, overflow;
  logic [BURST_W-1:0] rd_data;
  logic [31:0] out_data;
  logic [15:0] dropped;
  int checks = 0, failures = 0, stored = 0, n_drop = 0;
  logic [31:0] exp_q[$];

  read_capture #(.DEPTH(DEPTH), .OUT_W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: count bursts held, words pending
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], "word order and value");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (rd_valid) begin
      // room if fewer than DEPTH bursts are (partly) unsent
      if ((exp_q.size() + 15) / 16 < DEPTH) begin
        for (int i = 0; i < 16; i++) exp_q.push_back(rd_data[i*32 +: 32]);
        stored++;
      end else n_drop++;
    end
  end

  task automatic gen_burst();
    for (int i = 0; i < 16; i++) rd_data[i*32 +: 32] = $urandom();
  endtask

  initial begin
    rd_valid = 0; rd_data = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // random traffic, slow enough to never overflow
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      rd_valid  = ($urandom_range(0, 39) == 0);
      gen_burst();
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); rd_valid = 0; out_ready = 1;
    repeat (200) @(negedge clk);
    check(!out_valid && exp_q.size() == 0, "drained");
    check(!overflow && n_drop == 0 && stored > 50, "no drops at low rate");
    // overflow: host stalled, six bursts back to back
    out_ready = 0;
    for (int b = 0; b < 6; b++) begin @(negedge clk); rd_valid = 1; gen_burst(); end
    @(negedge clk); rd_valid = 0;
    @(negedge clk);
    check(overflow && dropped == 16'(n_drop) && n_drop == 2, "two bursts dropped");
    out_ready = 1;
    repeat (DEPTH * 16 + 5) @(negedge clk);
    check(!out_valid && exp_q.size() == 0, "kept bursts delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
