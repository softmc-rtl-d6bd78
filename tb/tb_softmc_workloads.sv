// tb_softmc_workloads: the two characterization experiments run as loops on
// the SoftMC controller with the behavioural PHY + DDR3 model, scaled down
// in time (rows decay after 5000 unrefreshed cycles instead of tens of ms).
//
// Retention-time sweep: for each wait interval, write reference data to a
// row, wait with auto-refresh off, read the row back, count erroneous bytes,
// change the interval. Intervals at or below the decay time must show no
// error, longer ones the model's weak bytes (one per 4-burst row).
//
// Ready-to-access latency test: for each latency (3..6 cycles) and wait
// interval: write reference data, wait, ACTIVATE-PRECHARGE the row (which
// recharges it), wait again, read back with the chosen ACT-to-READ latency,
// count erroneous bytes. The expected count is worked out here from the
// model's two effects: 64 bytes (the first burst) when the latency is below
// 4 cycles, plus one byte when a wait exceeded the decay time.
// Every ACT-to-READ distance on the bus is checked against the latency asked.
//
// Activation latency test: the same loop, but the ACT-PRE step uses a short
// ACT-to-PRECHARGE distance (4..16 cycles), checked on the bus. The model has
// no effect of a short activation, so errors come only from decay.
module tb_softmc_workloads;
  import softmc_pkg::*;
  localparam int RET = 5000, NB = 4;

  logic clk = 0, rst_n = 0;
  logic host_instr_valid, host_instr_ready, host_rd_valid, host_rd_ready;
  logic [31:0] host_instr_data, host_rd_data;
  logic ref_enable, cal_enable, seq_busy, seq_done, seq_too_long, maint_busy, ref_missed, rd_overflow;
  logic [15:0] rd_dropped;
  logic phy_ready, phy_wr_en, phy_rd_valid;
  ddr_cmd_t phy_cmd;
  logic [BURST_W-1:0] phy_wr_data, phy_rd_data;
  bus_dir_e phy_bus_dir;

  softmc_top #(.Q_DEPTH(256), .RD_DEPTH(16), .T_REFI(400), .T_RFC(20), .T_ZQI(20000), .T_ZQCS(16))
    dut (.*);
  ddr3_phy_model #(.RL(8), .TRCD_OK(4), .RET_CYCLES(RET), .INIT_CYCLES(20)) phy (
    .clk, .rst_n, .phy_ready, .cmd (phy_cmd), .wr_en (phy_wr_en), .wr_data (phy_wr_data),
    .bus_dir (phy_bus_dir), .rd_valid (phy_rd_valid), .rd_data (phy_rd_data));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    #5_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0, n_seq = 0, last_act = 0, rd_dist = -1, pre_dist = -1;
  logic [31:0] rx[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (seq_done) n_seq++;
    if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);
    if (phy_cmd.cs_n == 2'b10 && {phy_cmd.ras_n, phy_cmd.cas_n, phy_cmd.we_n} == 3'b011) begin
      last_act = cyc; rd_dist = -1; pre_dist = -1;
    end
    if (phy_cmd.cs_n == 2'b10 && {phy_cmd.ras_n, phy_cmd.cas_n, phy_cmd.we_n} == 3'b010 && pre_dist < 0)
      pre_dist = cyc - last_act;
    if (phy_cmd.cs_n == 2'b10 && {phy_cmd.ras_n, phy_cmd.cas_n, phy_cmd.we_n} == 3'b101 && rd_dist < 0)
      rd_dist = cyc - last_act;
  end

  logic [31:0] seq[$];
  int n_exp = 0;
  function automatic logic [31:0] cmd_w(input logic ras_n, cas_n, we_n, input int b, input int a);
    return mk_ddr(1, 2'b10, ras_n, cas_n, we_n, 3'(b), 16'(a));
  endfunction
  function automatic logic [31:0] pat(input int row, input int burst);
    return {8'(row), 8'h3C, 8'(row >> 8), 8'(burst)};
  endfunction
  task automatic run();  // send seq + END, wait until it has executed
    seq.push_back(mk_end());
    foreach (seq[i]) begin
      @(negedge clk); host_instr_valid = 1; host_instr_data = seq[i];
      @(posedge clk); while (!host_instr_ready) @(posedge clk);
    end
    @(negedge clk); host_instr_valid = 0;
    seq.delete();
    n_exp++;
    while (n_seq < n_exp) @(posedge clk);
  endtask
  task automatic write_row(input int b, input int row);
    seq.push_back(cmd_w(0, 1, 1, b, row)); seq.push_back(mk_wait(6));
    for (int i = 0; i < NB; i++) begin
      seq.push_back(cmd_w(1, 0, 0, b, i * 8)); seq.push_back(pat(row, i)); seq.push_back(mk_wait(4));
    end
    seq.push_back(mk_wait(12)); seq.push_back(cmd_w(0, 1, 0, b, 0)); seq.push_back(mk_wait(6));
    run();
  endtask
  task automatic act_pre(input int b, input int row, input int tras);
    seq.push_back(cmd_w(0, 1, 1, b, row)); seq.push_back(mk_wait(28'(tras)));
    seq.push_back(cmd_w(0, 1, 0, b, 0)); seq.push_back(mk_wait(6));
    run();
    check(pre_dist == tras, $sformatf("ACT->PRE distance %0d (asked %0d)", pre_dist, tras));
  endtask
  task automatic read_row(input int b, input int row, input int lat, output int errs);
    int t;
    rx.delete();
    seq.push_back(mk_busdir(DIR_READ));
    seq.push_back(cmd_w(0, 1, 1, b, row)); seq.push_back(mk_wait(28'(lat)));
    for (int i = 0; i < NB; i++) begin seq.push_back(cmd_w(1, 0, 1, b, i * 8)); seq.push_back(mk_wait(4)); end
    seq.push_back(mk_wait(10)); seq.push_back(cmd_w(0, 1, 0, b, 0)); seq.push_back(mk_wait(6));
    seq.push_back(mk_busdir(DIR_WRITE));
    run();
    check(rd_dist == lat, $sformatf("ACT->READ distance %0d (asked %0d)", rd_dist, lat));
    t = 0;
    while (rx.size() < NB * 16 && t < 1000) begin @(posedge clk); t++; end
    check(rx.size() == NB * 16, "whole row returned");
    errs = 0;
    for (int i = 0; i < NB * 16; i++) begin
      logic [31:0] d;
      d = (i < rx.size()) ? rx[i] : ~pat(row, i / 16);
      for (int k = 0; k < 4; k++) if (d[k*8 +: 8] != pat(row, i / 16)[k*8 +: 8]) errs++;
    end
  endtask

  int waits[5] = '{1000, 3000, 4500, 6000, 9000};
  int tras_l[3] = '{4, 8, 16};
  int errs, expect_errs, row, n_err_runs, n_clean_runs;
  initial begin
    host_instr_valid = 0; host_instr_data = 0; host_rd_ready = 1;
    ref_enable = 0; cal_enable = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (phy_ready);

    // retention-time sweep
    row = 'h40;
    foreach (waits[w]) begin
      write_row(1, row);
      repeat (waits[w]) @(posedge clk);
      read_row(1, row, 6, errs);
      expect_errs = (waits[w] > RET) ? 1 : 0;
      $display("retention: wait %0d cycles -> %0d erroneous bytes", waits[w], errs);
      check(errs == expect_errs, $sformatf("retention errors %0d, expected %0d", errs, expect_errs));
      if (errs > 0) n_err_runs++; else n_clean_runs++;
      row++;
    end
    check(n_err_runs > 0 && n_clean_runs > 0, "both outcomes seen in the sweep");

    // ready-to-access latency test
    for (int lat = 3; lat <= 6; lat++) begin
      foreach (waits[w]) if (w == 0 || w == 4) begin
        write_row(2, row);
        repeat (waits[w]) @(posedge clk);
        act_pre(2, row, 15);
        repeat (waits[w]) @(posedge clk);
        read_row(2, row, lat, errs);
        expect_errs = (lat < 4 ? 64 : 0) + ((waits[w] > RET) ? 1 : 0);
        $display("ready-to-access: latency %0d, wait %0d -> %0d erroneous bytes", lat, waits[w], errs);
        check(errs == expect_errs, $sformatf("errors %0d, expected %0d", errs, expect_errs));
        row++;
      end
    end
    // activation latency test
    foreach (tras_l[t]) foreach (waits[w]) if (w == 0 || w == 4) begin
      write_row(3, row);
      repeat (waits[w]) @(posedge clk);
      act_pre(3, row, tras_l[t]);
      repeat (waits[w]) @(posedge clk);
      read_row(3, row, 5, errs);
      expect_errs = (waits[w] > RET) ? 1 : 0;
      $display("activation latency: ACT-PRE %0d, wait %0d -> %0d erroneous bytes", tras_l[t], waits[w], errs);
      check(errs == expect_errs, $sformatf("errors %0d, expected %0d", errs, expect_errs));
      row++;
    end
    check(!rd_overflow && !seq_too_long, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
