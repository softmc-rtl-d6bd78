// tb_softmc_top: end-to-end test of the SoftMC controller with a behavioural
// PHY + DDR3 model, at reduced timing (refresh every 400 cycles, calibration
// every 3000, a 64-word instruction queue, an 8-burst read buffer, a DRAM
// whose rows decay after 5000 unrefreshed cycles).
// The host side is played by tasks that build instruction words exactly as
// the host API would (ACT, WAIT, WR + data, RD, PRE, BUSDIR, END) and stream
// them in, and a reader that collects the returned 32-bit words.
// It runs the characterization experiments SoftMC is built for:
//  1. write a row and read it back (data and ACT-to-READ spacing checked);
//  2. ready-to-access latency test: READs 3, 4, 5, 6 cycles after ACTIVATE;
//     only the 3-cycle run may (and must) show erroneous bytes;
//  3. retention test: refresh off, write, wait inside the sequence, read:
//     errors must appear; with refresh on and the host waiting between
//     sequences, none may appear;
//  4. a long WAIT inside a sequence with refresh on: refreshes are postponed
//     and, beyond the limit, reported missed;
//  5. a READ with the bus left in write direction returns nothing;
//  6. read buffer overflow with the host not reading;
//  7. a sequence longer than the queue (seq_too_long).
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_softmc_top;
  import softmc_pkg::*;
  localparam int T_REFI = 400, T_RFC = 20, T_RP = 6, T_ZQI = 3000, T_ZQCS = 16;
  localparam int QD = 64, RDD = 8;
  localparam int RET = 5000;

  logic clk = 0, rst_n = 0;
  logic host_instr_valid, host_instr_ready, host_rd_valid, host_rd_ready;
  logic [31:0] host_instr_data, host_rd_data;
  logic ref_enable, cal_enable, seq_busy, seq_done, seq_too_long, maint_busy, ref_missed, rd_overflow;
  logic [15:0] rd_dropped;
  logic phy_ready, phy_wr_en, phy_rd_valid;
  ddr_cmd_t phy_cmd;
  logic [BURST_W-1:0] phy_wr_data, phy_rd_data;
  bus_dir_e phy_bus_dir;

  softmc_top #(.Q_DEPTH(QD), .RD_DEPTH(RDD), .T_REFI(T_REFI), .T_RFC(T_RFC), .T_RP(T_RP),
               .T_ZQI(T_ZQI), .T_ZQCS(T_ZQCS)) dut (.*);

  ddr3_phy_model #(.RL(8), .TRCD_OK(4), .RET_CYCLES(RET), .INIT_CYCLES(20)) phy (
    .clk, .rst_n, .phy_ready, .cmd (phy_cmd), .wr_en (phy_wr_en), .wr_data (phy_wr_data),
    .bus_dir (phy_bus_dir), .rd_valid (phy_rd_valid), .rd_data (phy_rd_data));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    #2_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- monitors ----------------
  int cyc = 0, n_seq = 0, n_stall = 0, n_missed = 0, n_ovf_cycles = 0;
  int last_act = 0, first_rd_after_act = -1, last_ref = -1000, n_rfc_viol = 0;
  logic [31:0] rx[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (seq_done) n_seq++;
    if (host_instr_valid && !host_instr_ready) n_stall++;
    if (ref_missed) n_missed++;
    if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);
    // no command may come within tRFC of a REFRESH
    if (phy_cmd.cs_n != 2'b11 && cyc - last_ref < T_RFC) n_rfc_viol++;
    if (phy_cmd == cmd_ref()) last_ref = cyc;
    if (phy_cmd.cs_n == 2'b10 && {phy_cmd.ras_n, phy_cmd.cas_n, phy_cmd.we_n} == 3'b011) begin
      last_act = cyc; first_rd_after_act = -1;
    end
    if (phy_cmd.cs_n == 2'b10 && {phy_cmd.ras_n, phy_cmd.cas_n, phy_cmd.we_n} == 3'b101 &&
        first_rd_after_act < 0) first_rd_after_act = cyc - last_act;
  end

  // ---------------- host side ----------------
  logic [31:0] seq[$];
  function automatic logic [31:0] ACT(input int b, input int row);
    return mk_ddr(1, 2'b10, 0, 1, 1, 3'(b), 16'(row));
  endfunction
  function automatic logic [31:0] WR(input int b, input int col);
    return mk_ddr(1, 2'b10, 1, 0, 0, 3'(b), 16'(col));
  endfunction
  function automatic logic [31:0] RD(input int b, input int col);
    return mk_ddr(1, 2'b10, 1, 0, 1, 3'(b), 16'(col));
  endfunction
  function automatic logic [31:0] PRE(input int b);
    return mk_ddr(1, 2'b10, 0, 1, 0, 3'(b), 16'h0000);
  endfunction
  function automatic logic [31:0] pattern(input int row, input int burst);
    return {16'(row), 8'hC3, 8'(burst)};
  endfunction

  // write NB bursts of a row (host API: ACT, WAIT tRCD, {WR, WAIT}, WAIT, PRE, WAIT tRP)
  task automatic add_write_row(input int b, input int row, input int nb);
    seq.push_back(ACT(b, row)); seq.push_back(mk_wait(5));
    for (int i = 0; i < nb; i++) begin
      seq.push_back(WR(b, i * 8)); seq.push_back(pattern(row, i)); seq.push_back(mk_wait(4));
    end
    seq.push_back(mk_wait(10)); seq.push_back(PRE(b)); seq.push_back(mk_wait(28'(T_RP)));
  endtask
  task automatic add_read_row(input int b, input int row, input int nb, input int trcd);
    seq.push_back(mk_busdir(DIR_READ));
    seq.push_back(ACT(b, row)); seq.push_back(mk_wait(28'(trcd)));
    for (int i = 0; i < nb; i++) begin seq.push_back(RD(b, i * 8)); seq.push_back(mk_wait(4)); end
    seq.push_back(mk_wait(10)); seq.push_back(PRE(b)); seq.push_back(mk_wait(28'(T_RP)));
    seq.push_back(mk_busdir(DIR_WRITE));
  endtask
  task automatic send();
    foreach (seq[i]) begin
      @(negedge clk); host_instr_valid = 1; host_instr_data = seq[i];
      @(posedge clk); while (!host_instr_ready) @(posedge clk);
    end
    @(negedge clk); host_instr_valid = 0;
    seq.delete();
  endtask
  task automatic wait_seqs(input int n);
    int t; t = 0;
    while (n_seq < n && t < 200000) begin @(posedge clk); t++; end
    check(n_seq >= n, "sequence completed");
  endtask
  task automatic wait_words(input int n);
    int t; t = 0;
    while (rx.size() < n && t < 20000) begin @(posedge clk); t++; end
  endtask
  // erroneous bytes of NB bursts read back, against the written pattern
  function automatic int count_errors(input int row, input int nb);
    int e; e = 0;
    for (int i = 0; i < nb * 16; i++) begin
      logic [31:0] d;
      d = (rx.size() > i) ? rx[i] : ~pattern(row, i / 16);
      for (int k = 0; k < 4; k++) if (d[k*8 +: 8] != pattern(row, i / 16)[k*8 +: 8]) e++;
    end
    return e;
  endfunction

  int ref_before, errs, n_seq_exp, rcd_err[7];
  initial begin
    host_instr_valid = 0; host_instr_data = 0; host_rd_ready = 1;
    ref_enable = 1; cal_enable = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (phy_ready);

    // 1. write and read back one row
    add_write_row(2, 'h100, 8); seq.push_back(mk_end()); send();
    add_read_row(2, 'h100, 8, 5); seq.push_back(mk_end()); send();
    n_seq_exp = 2; wait_seqs(n_seq_exp); wait_words(8 * 16);
    check(rx.size() == 128, $sformatf("128 words returned (%0d)", rx.size()));
    check(count_errors('h100, 8) == 0, "read data equals written data");
    check(first_rd_after_act == 5, $sformatf("READ 5 cycles after ACT (%0d)", first_rd_after_act));
    rx.delete();

    // 2. ready-to-access latency test
    for (int trcd = 3; trcd <= 6; trcd++) begin
      add_read_row(2, 'h100, 8, trcd); seq.push_back(mk_end()); send();
      n_seq_exp++; wait_seqs(n_seq_exp); wait_words(8 * 16);
      check(first_rd_after_act == trcd, $sformatf("ACT->READ = %0d", trcd));
      rcd_err[trcd] = count_errors('h100, 8);
      $display("ready-to-access latency %0d cycles: %0d erroneous bytes", trcd, rcd_err[trcd]);
      rx.delete();
    end
    check(rcd_err[3] > 0, "errors at latency 3");
    check(rcd_err[4] == 0 && rcd_err[5] == 0 && rcd_err[6] == 0, "no errors at latency 4..6");

    // 3a. retention without refresh: write, WAIT inside the sequence, read
    ref_enable = 0;
    add_write_row(3, 'h200, 4); seq.push_back(mk_wait(28'(RET + 1000)));
    add_read_row(3, 'h200, 4, 5); seq.push_back(mk_end()); send();
    n_seq_exp++; wait_seqs(n_seq_exp); wait_words(4 * 16);
    errs = count_errors('h200, 4);
    $display("retention test, refresh off: %0d erroneous bytes", errs);
    check(errs == 1 && phy.n_retention > 0, "retention error without refresh");
    rx.delete();
    // 3b. retention with refresh, host waits between sequences
    ref_enable = 1; ref_before = phy.n_ref;
    add_write_row(4, 'h300, 4); seq.push_back(mk_end()); send();
    n_seq_exp++; wait_seqs(n_seq_exp);
    repeat (RET + 1000) @(posedge clk);
    add_read_row(4, 'h300, 4, 5); seq.push_back(mk_end()); send();
    n_seq_exp++; wait_seqs(n_seq_exp); wait_words(4 * 16);
    errs = count_errors('h300, 4);
    check(errs == 0, "no retention error with refresh");
    check(phy.n_ref - ref_before >= 2 * ((RET + 1000) / T_REFI) - 4, "refreshes while idle");
    rx.delete();

    // 4. long WAIT in a sequence with refresh on; a second sequence is queued
    //    behind it; three more fill the queue (back-pressure)
    n_missed = 0; n_stall = 0;
    seq.push_back(mk_wait(28'(12 * T_REFI))); seq.push_back(mk_end()); send();
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 25; i++) seq.push_back(mk_wait(1));
      seq.push_back(mk_end()); send();
    end
    n_seq_exp += 4; wait_seqs(n_seq_exp);
    check(n_missed > 0, "refresh missed during a long sequence");
    check(n_stall > 0, "instruction queue back-pressure");

    // 5. READ with the bus still in write direction
    begin
      int dir_before; dir_before = phy.n_dir_err;
      seq.push_back(ACT(1, 5)); seq.push_back(mk_wait(5)); seq.push_back(RD(1, 0));
      seq.push_back(mk_wait(10)); seq.push_back(PRE(1)); seq.push_back(mk_wait(28'(T_RP)));
      seq.push_back(mk_end()); send();
      n_seq_exp++; wait_seqs(n_seq_exp); repeat (30) @(posedge clk);
      check(phy.n_dir_err == dir_before + 1 && rx.size() == 0, "read blocked by bus direction");
    end

    // 6. read buffer overflow: host stops reading, 10 bursts requested
    host_rd_ready = 0;
    add_read_row(2, 'h100, RDD + 2, 5); seq.push_back(mk_end()); send();
    n_seq_exp++; wait_seqs(n_seq_exp); repeat (30) @(posedge clk);
    check(rd_overflow && rd_dropped == 16'd2, "read buffer overflow, 2 bursts dropped");
    host_rd_ready = 1; wait_words(RDD * 16);
    check(rx.size() == RDD * 16 && count_errors('h100, RDD) == 0, "buffered bursts intact");
    rx.delete();

    // maintenance counts over the whole run
    check(phy.n_ref > 0, "auto-refresh happened");
    check(phy.n_zq > 0, "calibration happened");
    check(phy.n_closed_err == 0, "no access to a closed bank");
    check(n_rfc_viol == 0, $sformatf("no command within tRFC of a REFRESH (%0d)", n_rfc_viol));

    // 7. a sequence that does not fit the queue
    check(!seq_too_long, "no overlong sequence yet");
    fork
      begin
        for (int i = 0; i < QD + 4; i++) seq.push_back(mk_wait(1));
        send();
      end
      begin repeat (QD * 4) @(posedge clk); end
    join_any
    disable fork;
    check(seq_too_long, "overlong sequence detected");

    $display("mechanisms: seqs=%0d refresh=%0d zqcs=%0d missed=%0d stall=%0d short_rcd=%0d retention=%0d",
             n_seq, phy.n_ref, phy.n_zq, n_missed, n_stall, phy.n_short_rcd, phy.n_retention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
