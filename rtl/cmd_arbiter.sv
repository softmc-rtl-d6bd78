// cmd_arbiter: shares the DDR3 command bus between the instruction
// dispatcher, the auto-refresh controller and the calibration controller.
//
// The bus has one owner at a time. When it is free the arbiter picks, in
// this order, a pending refresh, a pending calibration, then a complete
// instruction sequence, and holds the grant until that requester reports
// done in the cycle it hands the bus back. An instruction sequence is never
// interrupted, so its timing is exactly what the host asked for. Nothing is
// granted before the PHY reports that its start-up is complete (phy_ready),
// and maintenance is held back while the last sequence left CKE low
// (power-down or self-refresh), since REFRESH and ZQCS need CKE high.
// The command output is the one requester that is not driving a deselect
// (only the owner issues commands); its CKE is the dispatcher's held level.
// Each requester's command output is already registered, so this adds no
// cycle. The SoftMC block diagram shows the three command sources; the
// arbitration rule is this design's choice.
module cmd_arbiter
  import softmc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     phy_ready,
  input  logic     disp_req,
  input  logic     disp_done,
  input  ddr_cmd_t disp_cmd,
  output logic     disp_grant,
  input  logic     ref_req,
  input  logic     ref_done,
  input  ddr_cmd_t ref_cmd,
  output logic     ref_grant,
  input  logic     cal_req,
  input  logic     cal_done,
  input  ddr_cmd_t cal_cmd,
  output logic     cal_grant,
  output ddr_cmd_t cmd
);
  typedef enum logic [1:0] {O_NONE, O_DISP, O_REF, O_CAL} owner_e;
  owner_e owner;

  wire maint_ok = disp_cmd.cke;

  assign disp_grant = (owner == O_DISP);
  assign ref_grant  = (owner == O_REF);
  assign cal_grant  = (owner == O_CAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= O_NONE;
    else unique case (owner)
      O_NONE: if (phy_ready) begin
        if      (ref_req && maint_ok) owner <= O_REF;
        else if (cal_req && maint_ok) owner <= O_CAL;
        else if (disp_req)            owner <= O_DISP;
      end
      O_DISP: if (disp_done) owner <= O_NONE;
      O_REF:  if (ref_done)  owner <= O_NONE;
      O_CAL:  if (cal_done)  owner <= O_NONE;
      default: owner <= O_NONE;
    endcase
  end

  always_comb begin
    if (ref_cmd.cs_n != '1)      cmd = ref_cmd;
    else if (cal_cmd.cs_n != '1) cmd = cal_cmd;
    else                         cmd = disp_cmd;
    cmd.cke = disp_cmd.cke;
  end

  // Only the owner may issue; two sources never issue in the same cycle.
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({disp_cmd.cs_n != '1, ref_cmd.cs_n != '1, cal_cmd.cs_n != '1}) <= 1);
endmodule
