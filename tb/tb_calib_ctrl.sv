// tb_calib_ctrl: self-checking test of the calibration controller.
// Short timing (T_ZQI 100, T_RP 3, T_ZQCS 9). With the bus granted at once,
// checks PRECHARGE ALL then ZQCS exactly T_RP later, done in the last cycle
// of T_ZQCS, the calibration period and count; then that a calibration
// waits for the bus while it is withheld, and none happens when disabled.
module tb_calib_ctrl;
  import softmc_pkg::*;
  localparam int T_ZQI = 100, T_RP = 3, T_ZQCS = 9;
  logic clk = 0, rst_n = 0, enable, req, grant, busy, done;
  ddr_cmd_t cmd;
  int checks = 0, failures = 0, cyc = 0;
  int prea_t[$], zq_t[$], done_t[$];
  logic hold, owner;

  calib_ctrl #(.T_ZQI(T_ZQI), .T_RP(T_RP), .T_ZQCS(T_ZQCS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) owner <= 0;
    else if (!owner && req && !hold) owner <= 1;
    else if (owner && done) owner <= 0;
  assign grant = owner;

  always @(posedge clk) begin
    cyc++;
    if (cmd == cmd_prea()) prea_t.push_back(cyc);
    if (cmd == cmd_zqcs()) zq_t.push_back(cyc);
    if (done) done_t.push_back(cyc);
  end

  initial begin
    enable = 1; hold = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5 * T_ZQI + 25) @(posedge clk);
    check(zq_t.size() == 5, $sformatf("5 calibrations (%0d)", zq_t.size()));
    check(prea_t.size() == 5, "one PREA each");
    for (int i = 0; i < zq_t.size() && i < prea_t.size(); i++)
      check(zq_t[i] - prea_t[i] == T_RP, "ZQCS T_RP after PREA");
    for (int i = 0; i < zq_t.size() && i < done_t.size(); i++)
      check(done_t[i] == zq_t[i] + T_ZQCS - 2, "done at end of tZQCS");
    for (int i = 1; i < zq_t.size(); i++)
      check(zq_t[i] - zq_t[i-1] == T_ZQI, "calibration period");
    // withheld bus: request stays, issues once granted
    @(negedge clk); hold = 1; zq_t.delete();
    repeat (T_ZQI + 20) @(posedge clk);
    check(req && zq_t.size() == 0 && !busy, "waits for the bus");
    @(negedge clk); hold = 0;
    repeat (T_RP + 6) @(posedge clk);
    check(zq_t.size() == 1, "issued after grant");
    repeat (T_ZQCS) @(posedge clk);
    @(negedge clk); enable = 0; zq_t.delete();
    repeat (3 * T_ZQI) @(posedge clk);
    check(!req && zq_t.size() == 0, "none when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
