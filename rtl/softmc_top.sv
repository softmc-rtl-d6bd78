// softmc_top: SoftMC, an FPGA memory controller that executes DRAM command
// sequences written by the host, cycle by cycle, for DRAM characterization.
//
// Data flow: the host sends 32-bit instruction words over its PCIe link
// (host_instr_*). The instruction receiver writes them into the instruction
// queue and counts complete sequences (each ends with END). The command-bus
// arbiter gives the bus to the instruction dispatcher once a sequence is
// complete, and it runs that sequence to the end: DDR instructions become
// command-bus cycles, WAIT instructions space them exactly, BUSDIR sets the
// data-bus direction. Between sequences the auto-refresh controller and the
// calibration controller get the bus for PRECHARGE ALL + REFRESH and
// PRECHARGE ALL + ZQCS; either can be switched off (ref_enable,
// cal_enable), which is what a retention-time test does. Read bursts that
// come back from the PHY go through the read capture buffer to the host as
// 32-bit words (host_rd_*).
// The DDR PHY is outside this module: phy_cmd (one command per clock, pin
// levels), phy_wr_en/phy_wr_data (write burst presented with its WRITE
// command), phy_bus_dir and phy_rd_valid/phy_rd_data (one 512-bit read burst
// per cycle, whenever the PHY has captured it). phy_ready is the PHY's
// start-up-complete flag; nothing is issued before it.
// The block set and the instruction format follow SoftMC; the handshakes,
// widths of the status ports, the timing defaults (400 MHz DDR3-800 command
// clock) and the queue depths are this design's choices.
module softmc_top
  import softmc_pkg::*;
#(
  parameter int unsigned Q_DEPTH  = 4096,
  parameter int unsigned RD_DEPTH = 128,
  parameter int unsigned T_REFI   = 3120,
  parameter int unsigned T_RFC    = 64,
  parameter int unsigned T_RP     = 6,
  parameter int unsigned T_ZQI    = 51_200_000,
  parameter int unsigned T_ZQCS   = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // host link: instructions in
  input  logic               host_instr_valid,
  input  logic [INSTR_W-1:0] host_instr_data,
  output logic               host_instr_ready,
  // host link: read data out
  output logic               host_rd_valid,
  output logic [31:0]        host_rd_data,
  input  logic               host_rd_ready,
  // configuration and status
  input  logic               ref_enable,
  input  logic               cal_enable,
  output logic               seq_busy,
  output logic               seq_done,
  output logic               seq_too_long,
  output logic               maint_busy,     // refresh or calibration running
  output logic               ref_missed,
  output logic               rd_overflow,
  output logic [15:0]        rd_dropped,
  // DDR PHY
  input  logic               phy_ready,
  output ddr_cmd_t           phy_cmd,
  output logic               phy_wr_en,
  output logic [BURST_W-1:0] phy_wr_data,
  output bus_dir_e           phy_bus_dir,
  input  logic               phy_rd_valid,
  input  logic [BURST_W-1:0] phy_rd_data
);
  localparam int unsigned QCW = $clog2(Q_DEPTH + 1);

  logic               q_wr_en, q_full;
  logic [INSTR_W-1:0] q_wr_data, head0, head1, head2;
  logic [QCW-1:0]     q_count;
  logic [1:0]         pop_n;
  logic               seq_avail;
  logic               disp_grant, ref_req, ref_grant, ref_done, cal_req, cal_grant, cal_done;
  logic               ref_busy, cal_busy;
  ddr_cmd_t           disp_cmd, ref_cmd, cal_cmd;

  instr_receiver u_rx (
    .clk, .rst_n,
    .in_valid (host_instr_valid), .in_data (host_instr_data), .in_ready (host_instr_ready),
    .q_wr_en, .q_wr_data, .q_full,
    .seq_done, .seq_avail, .seq_too_long
  );

  instr_queue #(.DEPTH(Q_DEPTH), .W(INSTR_W)) u_q (
    .clk, .rst_n,
    .wr_en (q_wr_en), .wr_data (q_wr_data), .full (q_full),
    .head0, .head1, .head2, .count (q_count), .pop_n
  );

  instr_dispatcher #(.CNT_W(QCW)) u_disp (
    .clk, .rst_n,
    .head0, .head1, .head2, .q_count, .pop_n,
    .seq_avail, .grant (disp_grant), .busy (seq_busy), .seq_done,
    .cmd (disp_cmd), .wr_en (phy_wr_en), .wr_data (phy_wr_data), .bus_dir (phy_bus_dir)
  );

  autoref_ctrl #(.T_REFI(T_REFI), .T_RP(T_RP), .T_RFC(T_RFC)) u_ref (
    .clk, .rst_n, .enable (ref_enable),
    .req (ref_req), .grant (ref_grant), .busy (ref_busy), .done (ref_done),
    .cmd (ref_cmd), .missed (ref_missed)
  );

  calib_ctrl #(.T_ZQI(T_ZQI), .T_RP(T_RP), .T_ZQCS(T_ZQCS)) u_cal (
    .clk, .rst_n, .enable (cal_enable),
    .req (cal_req), .grant (cal_grant), .busy (cal_busy), .done (cal_done),
    .cmd (cal_cmd)
  );

  assign maint_busy = ref_busy | cal_busy;

  cmd_arbiter u_arb (
    .clk, .rst_n, .phy_ready,
    .disp_req (seq_avail), .disp_done (seq_done), .disp_cmd, .disp_grant,
    .ref_req, .ref_done, .ref_cmd, .ref_grant,
    .cal_req, .cal_done, .cal_cmd, .cal_grant,
    .cmd (phy_cmd)
  );

  read_capture #(.DEPTH(RD_DEPTH), .OUT_W(32)) u_rdc (
    .clk, .rst_n,
    .rd_valid (phy_rd_valid), .rd_data (phy_rd_data),
    .out_valid (host_rd_valid), .out_data (host_rd_data), .out_ready (host_rd_ready),
    .overflow (rd_overflow), .dropped (rd_dropped)
  );
endmodule
