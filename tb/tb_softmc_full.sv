// tb_softmc_full: the SoftMC controller at its default parameters (4096-word
// instruction queue, 128-burst read buffer, 400 MHz DDR3-800 timing:
// refresh every 3120 cycles, ZQ calibration every 51.2 M cycles = 128 ms)
// with the behavioural PHY + DDR3 model.
// One complete operation of the retention-test kind: write a whole 8 KB row
// (128 bursts, one WRITE every 4 cycles), then read the whole row back and
// compare all 2048 returned words. Auto-refresh runs meanwhile; the test then
// idles until the first ZQ calibration has been issued and checks that the
// refresh count matches the elapsed time.
// Then a retention test at full size: with refresh off, one sequence writes
// another row, waits 28 M cycles (70 ms, longer than the model's 64 ms
// decay time) with a single WAIT, and reads the row back. Exactly the
// model's 8 weak bytes of the row (bursts 1, 17, ..., 113) must be wrong,
// and no REFRESH may appear during the wait.
module tb_softmc_full;
  import softmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_instr_valid, host_instr_ready, host_rd_valid, host_rd_ready;
  logic [31:0] host_instr_data, host_rd_data;
  logic ref_enable, cal_enable, seq_busy, seq_done, seq_too_long, maint_busy, ref_missed, rd_overflow;
  logic [15:0] rd_dropped;
  logic phy_ready, phy_wr_en, phy_rd_valid;
  ddr_cmd_t phy_cmd;
  logic [BURST_W-1:0] phy_wr_data, phy_rd_data;
  bus_dir_e phy_bus_dir;

  softmc_top dut (.*);
  ddr3_phy_model phy (
    .clk, .rst_n, .phy_ready, .cmd (phy_cmd), .wr_en (phy_wr_en), .wr_data (phy_wr_data),
    .bus_dir (phy_bus_dir), .rd_valid (phy_rd_valid), .rd_data (phy_rd_data));

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_seq = 0;
  logic [31:0] rx[$];
  always #1 clk = ~clk;
  initial begin
    #200_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (seq_done) n_seq++;
    if (host_rd_valid && host_rd_ready) rx.push_back(host_rd_data);

  end

  function automatic logic [31:0] pat(input int burst);
    return {8'h5A, 8'(burst * 3), 8'hA5, 8'(burst)};
  endfunction
  logic [31:0] seq[$];
  task automatic send();
    foreach (seq[i]) begin
      @(negedge clk); host_instr_valid = 1; host_instr_data = seq[i];
      @(posedge clk); while (!host_instr_ready) @(posedge clk);
    end
    @(negedge clk); host_instr_valid = 0;
    seq.delete();
  endtask

  localparam int NB = 128, ROW = 'h1234, BANK = 5;
  localparam int RET_WAIT = 28_000_000;
  int errs, t, ref_before;
  longint t0;

  task automatic add_write(input int row);
    seq.push_back(mk_ddr(1, 2'b10, 0, 1, 1, 3'(BANK), 16'(row))); seq.push_back(mk_wait(6));
    for (int i = 0; i < NB; i++) begin
      seq.push_back(mk_ddr(1, 2'b10, 1, 0, 0, 3'(BANK), 16'(i * 8)));
      seq.push_back(pat(i)); seq.push_back(mk_wait(4));
    end
    seq.push_back(mk_wait(14)); seq.push_back(mk_ddr(1, 2'b10, 0, 1, 0, 3'(BANK), 16'h0));
    seq.push_back(mk_wait(6));
  endtask
  task automatic add_read(input int row);
    seq.push_back(mk_busdir(DIR_READ));
    seq.push_back(mk_ddr(1, 2'b10, 0, 1, 1, 3'(BANK), 16'(row))); seq.push_back(mk_wait(6));
    for (int i = 0; i < NB; i++) begin
      seq.push_back(mk_ddr(1, 2'b10, 1, 0, 1, 3'(BANK), 16'(i * 8))); seq.push_back(mk_wait(4));
    end
    seq.push_back(mk_wait(10)); seq.push_back(mk_ddr(1, 2'b10, 0, 1, 0, 3'(BANK), 16'h0));
    seq.push_back(mk_wait(6)); seq.push_back(mk_busdir(DIR_WRITE));
  endtask
  task automatic collect(input int n_seq_exp, output int n_err);
    t = 0;
    while ((n_seq < n_seq_exp || rx.size() < NB * 16) && t < 100000) begin @(posedge clk); t++; end
    check(n_seq == n_seq_exp, "sequences done");
    check(rx.size() == NB * 16, $sformatf("whole row returned (%0d words)", rx.size()));
    n_err = 0;
    foreach (rx[i]) if (rx[i] != pat(i / 16)) begin
      if (n_err < 4) $display("word %0d: got %h expected %h", i, rx[i], pat(i / 16));
      n_err++;
    end
    rx.delete();
  endtask

  initial begin
    host_instr_valid = 0; host_instr_data = 0; host_rd_ready = 1;
    ref_enable = 1; cal_enable = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (phy_ready);
    t0 = cyc;
    add_write(ROW); seq.push_back(mk_end()); send();
    add_read(ROW); seq.push_back(mk_end()); send();
    collect(2, errs);
    check(errs == 0, $sformatf("row data intact (%0d wrong words)", errs));
    check(!rd_overflow && !seq_too_long && phy.n_closed_err == 0 && phy.n_dir_err == 0,
          "no overflow, no protocol error");
    // idle until the first ZQ calibration
    while (phy.n_zq == 0 && cyc < 60_000_000) @(posedge clk);
    check(phy.n_zq > 0, "ZQ calibration issued");
    check(cyc >= 51_200_000, "not before the 128 ms interval");
    // commands go to both ranks: two counts per REFRESH
    check(longint'(phy.n_ref) / 2 >= (cyc - t0) / 3120 - 2, "refresh rate kept");
    $display("cycles=%0d refresh=%0d zqcs=%0d", cyc, phy.n_ref / 2, phy.n_zq / 2);

    // retention test, refresh off, the wait inside the sequence
    ref_enable = 0;
    repeat (200) @(posedge clk);
    ref_before = phy.n_ref;
    add_write(ROW + 1); seq.push_back(mk_wait(28'(RET_WAIT))); add_read(ROW + 1);
    seq.push_back(mk_end()); send();
    while (n_seq < 3 && cyc < 120_000_000) @(posedge clk);
    collect(3, errs);
    $display("retention after %0d cycles without refresh: %0d wrong words", RET_WAIT, errs);
    check(errs == NB / 16 && phy.n_retention == NB / 16, "the row's 8 weak bytes lost");
    check(phy.n_ref == ref_before, "no refresh while disabled");
    check(phy.n_dir_err == 0 && phy.n_closed_err == 0, "no protocol error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
