// instr_dispatcher: the SoftMC instruction dispatcher.
//
// Executes one complete instruction sequence from the instruction queue at a
// time and turns it into DDR3 command-bus cycles with exact timing:
//   DDR    : drives the encoded CKE/CS#/RAS#/CAS#/WE#/bank/address for one
//            cycle. If it is a WRITE, the next queue word is its data, which
//            is replicated over the 512-bit burst and presented with the
//            command (wr_en). The CKE level is kept for the following idle
//            cycles, so power-down and self-refresh can be tested.
//   WAIT n : sets the distance to the next command. A WAIT right after a
//            DDR or BUSDIR instruction counts from that instruction's cycle,
//            so "ACT, WAIT(tRCD), WR" puts the WRITE exactly tRCD cycles
//            after the ACTIVATE (n = 0 or 1 both mean back-to-back). Further
//            WAITs add their cycles.
//   BUSDIR : sets the data-bus direction output for the PHY (0 write, 1 read).
//   END    : finishes the sequence (seq_done for one cycle, combinational,
//            in the cycle the END leaves the queue).
// Idle cycles drive a deselect. A sequence starts when one is complete in the
// queue (seq_avail) and the command-bus arbiter grants the bus (grant); busy
// stays high until END, so maintenance commands never cut into a sequence.
// Timing: every instruction other than WAIT takes one cycle; all outputs
// are registered, so the command appears one cycle after it is decoded.
// The instruction set and field layout are SoftMC's; the type codes, the
// write-data word, the WAIT counting rule and the look-ahead are this
// design's choices.
module instr_dispatcher
  import softmc_pkg::*;
#(
  parameter int unsigned CNT_W = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction queue read side
  input  logic [INSTR_W-1:0] head0,
  input  logic [INSTR_W-1:0] head1,
  input  logic [INSTR_W-1:0] head2,
  input  logic [CNT_W-1:0]   q_count,
  output logic [1:0]         pop_n,
  // sequence control
  input  logic               seq_avail,
  input  logic               grant,
  output logic               busy,
  output logic               seq_done,
  // to the PHY
  output ddr_cmd_t           cmd,
  output logic               wr_en,
  output logic [BURST_W-1:0] wr_data,
  output bus_dir_e           bus_dir
);
  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e             state;
  logic [WAIT_W-1:0]  wait_cnt;
  logic               cke_q;

  // ---- combinational decode of the queue head ----
  instr_type_e        t0;
  logic               wr0;
  logic [INSTR_W-1:0] nxt;        // word after the instruction (and its data)
  logic               fold_wait;  // a WAIT follows that counts from this cycle
  logic [WAIT_W-1:0]  nxt_wait;
  logic               exec;       // an instruction is executed this cycle

  always_comb begin
    t0        = instr_type(head0);
    wr0       = is_write_instr(head0);
    nxt       = wr0 ? head2 : head1;
    fold_wait = (t0 == IT_DDR || t0 == IT_BUSDIR) && (instr_type(nxt) == IT_WAIT);
    nxt_wait  = nxt[WAIT_W-1:0];
    exec      = (state == S_RUN) && (wait_cnt == '0) && (q_count != '0);
    pop_n     = 2'd0;
    if (exec) begin
      pop_n = 2'd1;
      if (t0 == IT_DDR && wr0) pop_n = 2'd2;
      if (fold_wait)           pop_n = pop_n + 2'd1;
    end
  end

  assign busy     = (state == S_RUN);
  assign seq_done = exec && (t0 == IT_END);  // same edge as the return to idle

  function automatic logic [WAIT_W-1:0] gap(input logic [WAIT_W-1:0] n);
    return (n > WAIT_W'(1)) ? n - WAIT_W'(1) : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wait_cnt <= '0;
      cke_q    <= 1'b1;
      cmd      <= cmd_des(1'b1);
      wr_en    <= 1'b0;
      wr_data  <= '0;
      bus_dir  <= DIR_WRITE;
    end else begin
      cmd      <= cmd_des(cke_q);
      wr_en    <= 1'b0;
      case (state)
        S_IDLE: if (seq_avail && grant) state <= S_RUN;
        S_RUN: begin
          if (wait_cnt != '0) begin
            wait_cnt <= wait_cnt - WAIT_W'(1);
          end else if (exec) begin
            unique case (t0)
              IT_DDR: begin
                cmd   <= instr_to_cmd(head0);
                cke_q <= head0[24];
                if (wr0) begin
                  wr_en   <= 1'b1;
                  wr_data <= {(BURST_W/INSTR_W){head1}};
                end
                if (fold_wait) wait_cnt <= gap(nxt_wait);
              end
              IT_BUSDIR: begin
                bus_dir <= bus_dir_e'(head0[0]);
                if (fold_wait) wait_cnt <= gap(nxt_wait);
              end
              IT_WAIT: wait_cnt <= gap(head0[WAIT_W-1:0]);
              IT_END: state <= S_IDLE;
              default: ;  // unknown type: one idle cycle
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
