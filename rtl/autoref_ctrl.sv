// autoref_ctrl: the SoftMC auto-refresh controller.
//
// Keeps the DRAM refreshed while no instruction sequence runs. A counter
// adds one owed refresh every T_REFI cycles; up to MAX_PENDING owed
// refreshes are remembered (DDR3 allows refreshes to be postponed), more are
// counted as missed. While refreshes are owed the controller raises req.
// When the command-bus arbiter grants the bus (grant, held until done) it
// issues PRECHARGE ALL, waits T_RP cycles, then issues one REFRESH per owed
// refresh, each followed by T_RFC cycles, and pulses done.
// With enable low the interval counter stops and nothing is owed: this is
// how a retention-time test keeps the DRAM unrefreshed for a chosen wait.
// Commands go to all ranks at once. The command output is registered and is
// a deselect whenever the controller is not issuing. The REFRESH appears
// exactly T_RP cycles after the PRECHARGE ALL, consecutive REFRESHes T_RFC
// apart. done is high T_RFC-2 cycles after the last REFRESH, the cycle in
// which the bus is handed back; the arbiter and the next owner's registered
// output then put its first command at least T_RFC+1 cycles after the
// REFRESH (T_RP, T_RFC >= 2).
// Default timing assumes a 400 MHz DDR3-800 command clock: 7.8 us refresh
// interval (64 ms / 8192), tRP 13.75 ns, tRFC 160 ns. The block is named in
// the SoftMC block diagram; the 64 ms retention window is SoftMC's, all the
// rest is this design's choice.
module autoref_ctrl
  import softmc_pkg::*;
#(
  parameter int unsigned T_REFI      = 3120,
  parameter int unsigned T_RP        = 6,
  parameter int unsigned T_RFC       = 64,
  parameter int unsigned MAX_PENDING = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  output logic      req,
  input  logic      grant,
  output logic      busy,
  output logic      done,
  output ddr_cmd_t  cmd,
  output logic      missed     // an owed refresh was dropped (one-cycle pulse)
);
  localparam int unsigned IW = $clog2(T_REFI + 1);
  localparam int unsigned PW = $clog2(MAX_PENDING + 1);
  initial assert (T_RP >= 2 && T_RFC >= 2 && T_REFI >= 2);

  localparam int unsigned TW = $clog2((T_RP > T_RFC ? T_RP : T_RFC) + 1);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_REF, S_WAIT} state_e;
  state_e        state;
  logic [IW-1:0] interval;
  logic [PW-1:0] pending;
  logic [TW-1:0] timer;

  wire tick     = enable && (interval == IW'(T_REFI - 1));
  wire issue_rf = (state == S_REF);

  assign req  = (state == S_IDLE) && (pending != '0);
  assign busy = (state != S_IDLE);
  // last cycle of the last wait: the bus is handed back at the same edge
  assign done = (state == S_WAIT) && (timer == '0) && !(pending != '0 && enable);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      interval <= '0;
      pending  <= '0;
      timer    <= '0;
      cmd      <= cmd_des(1'b1);
      missed   <= 1'b0;
    end else begin
      cmd    <= cmd_des(1'b1);
      missed <= 1'b0;

      // refresh interval and owed refreshes
      interval <= (!enable || tick) ? '0 : interval + IW'(1);
      if (!enable) begin
        pending <= '0;
      end else if (tick && !issue_rf) begin
        if (pending == PW'(MAX_PENDING)) missed <= 1'b1;
        else                             pending <= pending + PW'(1);
      end else if (!tick && issue_rf) begin
        pending <= pending - PW'(1);
      end
      // (tick together with a REFRESH leaves the count unchanged)

      unique case (state)
        S_IDLE: if (req && grant) state <= S_PRE;
        S_PRE: begin
          cmd   <= cmd_prea();
          timer <= TW'(T_RP - 2);
          state <= S_WAIT;
        end
        S_REF: begin
          cmd   <= cmd_ref();
          timer <= TW'(T_RFC - 2);
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (timer != '0) timer <= timer - TW'(1);
          else if (pending != '0 && enable) state <= S_REF;
          else state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
