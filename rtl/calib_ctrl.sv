// calib_ctrl: the SoftMC calibration controller.
//
// Keeps the DRAM's output drivers and termination calibrated while no
// instruction sequence runs, by issuing a ZQ short calibration (ZQCS) every
// T_ZQI cycles. When the interval has passed, req goes high and stays high
// until the command-bus arbiter grants the bus (grant, held until done).
// The controller then issues PRECHARGE ALL (ZQCS needs all banks idle),
// waits T_RP cycles, issues ZQCS to all ranks and waits T_ZQCS cycles;
// done is high T_ZQCS-2 cycles after the ZQCS, when the bus is handed back,
// so the next owner's first command comes at least T_ZQCS+1 cycles after it.
// A second interval that passes while one is still owed is not queued.
// With enable low no calibration is owed.
// The command output is registered and is a deselect when not issuing.
// Defaults assume a 400 MHz DDR3-800 command clock: a 128 ms calibration
// interval and tZQCS = 64 clocks. The block is named in the SoftMC block
// diagram; what it calibrates and how often is this design's choice.
module calib_ctrl
  import softmc_pkg::*;
#(
  parameter int unsigned T_ZQI  = 51_200_000,
  parameter int unsigned T_RP   = 6,
  parameter int unsigned T_ZQCS = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  output logic     req,
  input  logic     grant,
  output logic     busy,
  output logic     done,
  output ddr_cmd_t cmd
);
  localparam int unsigned IW = $clog2(T_ZQI + 1);
  localparam int unsigned TW = $clog2((T_RP > T_ZQCS ? T_RP : T_ZQCS) + 1);
  initial assert (T_RP >= 2 && T_ZQCS >= 2 && T_ZQI >= 2);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_WRP, S_ZQ, S_WZQ} state_e;
  state_e        state;
  logic [IW-1:0] interval;
  logic          owed;
  logic [TW-1:0] timer;

  wire tick = enable && (interval == IW'(T_ZQI - 1));

  assign req  = (state == S_IDLE) && owed;
  assign busy = (state != S_IDLE);
  assign done = (state == S_WZQ) && (timer == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      interval <= '0;
      owed     <= 1'b0;
      timer    <= '0;
      cmd      <= cmd_des(1'b1);
    end else begin
      cmd      <= cmd_des(1'b1);
      interval <= (!enable || tick) ? '0 : interval + IW'(1);
      if (!enable)                         owed <= 1'b0;
      else if (tick)                       owed <= 1'b1;
      else if (state == S_IDLE && grant)   owed <= 1'b0;

      unique case (state)
        S_IDLE: if (req && grant) state <= S_PRE;
        S_PRE: begin
          cmd   <= cmd_prea();
          timer <= TW'(T_RP - 2);
          state <= S_WRP;
        end
        S_WRP: if (timer != '0) timer <= timer - TW'(1); else state <= S_ZQ;
        S_ZQ: begin
          cmd   <= cmd_zqcs();
          timer <= TW'(T_ZQCS - 2);
          state <= S_WZQ;
        end
        S_WZQ: if (timer != '0) timer <= timer - TW'(1); else state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
