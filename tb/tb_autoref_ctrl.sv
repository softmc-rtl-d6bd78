// tb_autoref_ctrl: self-checking test of the auto-refresh controller.
// Short timing (T_REFI 50, T_RP 3, T_RFC 7, up to 4 owed refreshes).
// Part 1: grant at once; checks that each refresh is PRECHARGE ALL then
// REFRESH exactly T_RP later, that done ends the T_RFC wait, and the number
// of refreshes over a fixed time. Part 2: the bus is withheld for three
// intervals; the three owed refreshes must then come back to back, T_RFC
// apart. Part 3: withheld for longer than the owed limit; missed must pulse.
// Part 4: disabled, no request.
module tb_autoref_ctrl;
  import softmc_pkg::*;
  localparam int T_REFI = 50, T_RP = 3, T_RFC = 7, MAXP = 4;
  logic clk = 0, rst_n = 0, enable, req, grant, busy, done, missed;
  ddr_cmd_t cmd;
  int checks = 0, failures = 0, cyc = 0;
  int prea_t[$], ref_t[$], done_t[$], n_missed = 0;
  logic hold;

  autoref_ctrl #(.T_REFI(T_REFI), .T_RP(T_RP), .T_RFC(T_RFC), .MAX_PENDING(MAXP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // simple arbiter: grant while requested or busy, unless held off
  logic owner;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) owner <= 0;
    else if (!owner && req && !hold) owner <= 1;
    else if (owner && done) owner <= 0;
  assign grant = owner;

  always @(posedge clk) begin
    cyc++;
    if (cmd == cmd_prea()) prea_t.push_back(cyc);
    if (cmd == cmd_ref())  ref_t.push_back(cyc);
    if (done) done_t.push_back(cyc);
    if (missed) n_missed++;
    if (rst_n && cmd.cs_n != 2'b11) check(cmd.cs_n == 2'b00 && cmd.cke, "commands to all ranks");
  end

  initial begin
    enable = 1; hold = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // part 1: 10 intervals
    repeat (10 * T_REFI + 20) @(posedge clk);
    check(ref_t.size() == 10, $sformatf("10 refreshes (%0d)", ref_t.size()));
    check(prea_t.size() == 10, "one PREA per refresh");
    for (int i = 0; i < ref_t.size() && i < prea_t.size(); i++)
      check(ref_t[i] - prea_t[i] == T_RP, "REF T_RP after PREA");
    for (int i = 1; i < ref_t.size(); i++)
      check(ref_t[i] - ref_t[i-1] == T_REFI, "refresh period");
    // done T_RFC-2 cycles after the REFRESH: the next owner's first command
    // can then come T_RFC+1 cycles after it at the earliest
    check(done_t.size() == ref_t.size(), "one done per refresh");
    for (int i = 0; i < done_t.size() && i < ref_t.size(); i++)
      check(done_t[i] == ref_t[i] + T_RFC - 2, "done at end of tRFC");
    // part 2: postpone three refreshes
    @(negedge clk); hold = 1; ref_t.delete(); prea_t.delete();
    repeat (3 * T_REFI) @(posedge clk);
    check(ref_t.size() == 0 && req, "postponed while bus withheld");
    @(negedge clk); hold = 0;
    repeat (T_RP + 3 * T_RFC + 5) @(posedge clk);
    check(prea_t.size() == 1, "one PREA for the batch");
    check(ref_t.size() == 3, $sformatf("3 owed refreshes issued (%0d)", ref_t.size()));
    if (ref_t.size() == 3) check(ref_t[1] - ref_t[0] == T_RFC && ref_t[2] - ref_t[1] == T_RFC,
                                 "owed refreshes T_RFC apart");
    // part 3: withhold beyond the limit
    repeat (2 * T_REFI) @(posedge clk);
    @(negedge clk); hold = 1; n_missed = 0;
    repeat ((MAXP + 2) * T_REFI) @(posedge clk);
    check(n_missed >= 1, "missed refresh reported");
    @(negedge clk); hold = 0;
    repeat (T_RP + MAXP * T_RFC + 10) @(posedge clk);
    // part 4: disable
    @(negedge clk); enable = 0; ref_t.delete();
    repeat (5 * T_REFI) @(posedge clk);
    check(!req && ref_t.size() == 0, "no refresh when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
