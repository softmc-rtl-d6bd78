// tb_instr_dispatcher: self-checking test of the instruction dispatcher.
// A reference queue in the testbench feeds the dispatcher's look-ahead
// inputs and removes what it pops. Two sequences are run. Every cycle of
// the command output is logged; the test checks each command's content and
// its cycle distance to the previous one as given by the WAITs (ACT, WAIT 5,
// WR must be 5 cycles apart), the write data replicated over the burst,
// the bus direction set by BUSDIR, the CKE level held through idle cycles,
// that nothing runs without grant, and one seq_done per END.
module tb_instr_dispatcher;
  import softmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] head0, head1, head2;
  logic [12:0] q_count;
  logic [1:0]  pop_n;
  logic seq_avail, grant, busy, seq_done, wr_en;
  ddr_cmd_t cmd;
  logic [BURST_W-1:0] wr_data;
  bus_dir_e bus_dir;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int cyc = 0, n_done = 0;

  instr_dispatcher #(.CNT_W(13)) dut (.*);

  assign head0   = (q.size() > 0) ? q[0] : 32'hF000_0000;
  assign head1   = (q.size() > 1) ? q[1] : 32'hF000_0000;
  assign head2   = (q.size() > 2) ? q[2] : 32'hF000_0000;
  assign q_count = 13'(q.size());

  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // command log: cycle, command, write flag, data, dir, cke
  int       log_cyc[$];
  ddr_cmd_t log_cmd[$];
  logic     log_wr[$];
  logic [31:0] log_d[$];
  bus_dir_e log_dir[$];
  logic     cke_log[int];
  bus_dir_e dir_log[int];

  always @(posedge clk) begin
    automatic int n = int'(pop_n);
    cyc++;
    if (seq_done) n_done++;
    #1;
    for (int i = 0; i < n; i++) void'(q.pop_front());
    cke_log[cyc] = cmd.cke;
    dir_log[cyc] = bus_dir;
    if (cmd.cs_n != 2'b11) begin
      log_cyc.push_back(cyc); log_cmd.push_back(cmd); log_wr.push_back(wr_en);
      log_d.push_back(wr_data[31:0]); log_dir.push_back(bus_dir);
      check(wr_data == {16{wr_data[31:0]}} || !wr_en, "write data replicated");
    end else check(!wr_en, "no write data without WRITE");
  end

  logic [31:0] ACT, WR8, WR16, PRE, RD8, PDE, PDX;
  initial begin
    int base, c_bus, c_pde;
    ACT  = mk_ddr(1, 2'b10, 0, 1, 1, 3'd1, 16'h0055);
    WR8  = mk_ddr(1, 2'b10, 1, 0, 0, 3'd1, 16'h0008);
    WR16 = mk_ddr(1, 2'b10, 1, 0, 0, 3'd1, 16'h0010);
    PRE  = mk_ddr(1, 2'b10, 0, 1, 0, 3'd1, 16'h0000);
    RD8  = mk_ddr(1, 2'b10, 1, 0, 1, 3'd1, 16'h0008);
    PDE  = mk_ddr(0, 2'b11, 1, 1, 1, 3'd0, 16'h0000);  // CKE low, deselect
    PDX  = mk_ddr(1, 2'b11, 1, 1, 1, 3'd0, 16'h0000);  // CKE high again
    seq_avail = 0; grant = 0;
    q = '{ACT, mk_wait(5), WR8, 32'hA5A5_0001, mk_wait(1), WR16, 32'h5A5A_0002,
          mk_wait(3), mk_wait(4), PRE, mk_busdir(DIR_READ), mk_wait(2), RD8,
          PDE, mk_wait(3), PDX, mk_end(),
          // second sequence: starts with a WAIT, RD right after ACT (wait 0)
          mk_wait(7), ACT, mk_wait(0), RD8, mk_busdir(DIR_WRITE), mk_end()};
    repeat (3) @(posedge clk); rst_n = 1;
    seq_avail = 1;
    repeat (20) @(posedge clk);
    check(log_cyc.size() == 0 && !busy, "nothing without grant");
    @(negedge clk); grant = 1;
    wait (n_done == 1);
    @(negedge clk);
    check(!busy, "idle after END");
    check(q.size() == 6, "first sequence consumed exactly");
    check(log_cyc.size() == 5, "five commands in sequence 1");
    if (log_cyc.size() == 5) begin
      base = log_cyc[0];
      check(log_cmd[0] == instr_to_cmd(ACT), "ACT content");
      check(log_cyc[1] - base == 5 && log_cmd[1] == instr_to_cmd(WR8), "WR8 5 after ACT");
      check(log_wr[1] && log_d[1] == 32'hA5A5_0001, "WR8 data");
      check(log_cyc[2] - base == 6 && log_wr[2] && log_d[2] == 32'h5A5A_0002, "WR16 back-to-back");
      check(log_cyc[3] - base == 13 && log_cmd[3] == instr_to_cmd(PRE), "PRE after 3+4");
      c_bus = base + 14;
      check(dir_log[c_bus - 1] == DIR_WRITE && dir_log[c_bus] == DIR_READ, "BUSDIR one slot after PRE");
      check(log_cyc[4] - base == 16 && log_cmd[4] == instr_to_cmd(RD8) && log_dir[4] == DIR_READ,
            "RD 2 after BUSDIR");
      c_pde = base + 17;
      check(cke_log[c_pde - 1] && !cke_log[c_pde] && !cke_log[c_pde + 1] && !cke_log[c_pde + 2],
            "CKE low held");
      check(cke_log[c_pde + 3], "CKE high after WAIT 3");
    end
    // second sequence
    seq_avail = 1;
    wait (n_done == 2);
    @(negedge clk);
    seq_avail = 0;
    check(q.size() == 0, "second sequence consumed");
    check(log_cyc.size() == 7, "two commands in sequence 2");
    if (log_cyc.size() == 7) begin
      check(log_cyc[6] - log_cyc[5] == 1, "WAIT 0 means back-to-back");
      check(log_cmd[6].cas_n == 0 && log_cmd[6].we_n == 1, "RD content");
    end
    repeat (3) @(negedge clk);
    check(bus_dir == DIR_WRITE, "BUSDIR write");
    check(n_done == 2, "one seq_done per END");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
