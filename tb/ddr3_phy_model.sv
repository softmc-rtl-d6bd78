// ddr3_phy_model: behavioural model (not synthesizable) of a DDR PHY with a
// DDR3 SODIMM behind it, for simulation only.
//
// It takes the controller-side PHY interface (one command per clock as pin
// levels, a write burst with its WRITE command, the bus direction) and
// answers READs with a 512-bit burst RL cycles later. Storage is sparse: one
// entry per (rank, bank, row, 8-column burst); unwritten locations read 0.
// It keeps the open row of every bank and counts each kind of command.
// Two DRAM effects are modelled so that characterization tests see errors:
//  * ready-to-access latency: a READ issued fewer than TRCD_OK cycles after
//    its ACTIVATE returns the data with every byte's bit 0 inverted;
//  * retention: a row not restored (ACTIVATE or REFRESH) for more than
//    RET_CYCLES (checked at its next ACTIVATE) loses the low byte of word 0
//    (its charge leaks away: it reads 0 from then on) in every written burst
//    whose column address bits [6:3] are 1 ("weak cells"). Leaking is
//    idempotent, so a row that decays twice shows the same error.
// A WRITE while the bus is set to READ, or a READ while it is set to WRITE,
// is ignored (the PHY's data drivers point the wrong way) and counted.
// phy_ready rises INIT_CYCLES after reset. Command counters count once per
// selected rank, so a command sent to both ranks counts twice.
module ddr3_phy_model
  import softmc_pkg::*;
#(
  parameter int unsigned RL          = 8,
  parameter int unsigned TRCD_OK     = 4,
  parameter longint      RET_CYCLES  = 64'd25_600_000,
  parameter int unsigned INIT_CYCLES = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               phy_ready,
  input  ddr_cmd_t           cmd,
  input  logic               wr_en,
  input  logic [BURST_W-1:0] wr_data,
  input  bus_dir_e           bus_dir,
  output logic               rd_valid,
  output logic [BURST_W-1:0] rd_data
);
  typedef logic [BURST_W-1:0] burst_t;

  burst_t      store [longint];
  longint      restored [longint];   // last restore time per row key
  logic        open_v  [2][8];
  logic [15:0] open_row [2][8];
  longint      act_time [2][8];
  longint      now;
  longint      init_cnt;

  // statistics, read by testbenches
  int n_act, n_rd, n_wr, n_pre, n_prea, n_ref, n_zq, n_dir_err, n_closed_err;
  int n_short_rcd, n_retention;
  int last_ref_time, last_prea_time, last_zq_time, last_act_time, last_rd_time, last_wr_time;

  // pending read returns
  longint rq_time[$];
  burst_t rq_data[$];

  function automatic longint row_key(int r, int b, logic [15:0] row);
    return (longint'(r) << 40) | (longint'(b) << 32) | longint'(row);
  endfunction
  function automatic longint col_key(int r, int b, logic [15:0] row, logic [15:0] col);
    return (row_key(r, b, row) << 8) | longint'(col[9:3]);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now = 0; init_cnt = 0; phy_ready <= 1'b0; rd_valid <= 1'b0; rd_data <= '0;
      for (int r = 0; r < 2; r++) for (int b = 0; b < 8; b++) open_v[r][b] = 1'b0;
      n_act = 0; n_rd = 0; n_wr = 0; n_pre = 0; n_prea = 0; n_ref = 0; n_zq = 0;
      n_dir_err = 0; n_closed_err = 0; n_short_rcd = 0; n_retention = 0;
      rq_time.delete(); rq_data.delete();
    end else begin
      now++;
      if (init_cnt < longint'(INIT_CYCLES)) init_cnt++;
      phy_ready <= (init_cnt >= longint'(INIT_CYCLES));
      // deliver reads
      rd_valid <= 1'b0;
      if (rq_time.size() > 0 && rq_time[0] <= now) begin
        rd_valid <= 1'b1;
        rd_data  <= rq_data[0];
        void'(rq_time.pop_front());
        void'(rq_data.pop_front());
      end
      for (int r = 0; r < 2; r++) begin
        if (!cmd.cs_n[r] && cmd.cke) begin
          int b;
          b = int'(cmd.bank);
          unique case ({cmd.ras_n, cmd.cas_n, cmd.we_n})
            3'b011: begin  // ACTIVATE
              n_act++; last_act_time = int'(now);
              open_v[r][b] = 1'b1; open_row[r][b] = cmd.addr; act_time[r][b] = now;
              // a decayed row loses its weak cells for good; then it is restored
              if (restored.exists(row_key(r, b, cmd.addr)) &&
                  now - restored[row_key(r, b, cmd.addr)] > RET_CYCLES) begin
                for (int i = 1; i < 128; i += 16) begin
                  longint k;
                  k = (row_key(r, b, cmd.addr) << 8) | longint'(i);
                  if (store.exists(k) && store[k][7:0] != 8'h00) begin
                    store[k][7:0] = 8'h00;
                    n_retention++;
                  end
                end
              end
              restored[row_key(r, b, cmd.addr)] = now;
            end
            3'b101: begin  // READ
              n_rd++; last_rd_time = int'(now);
              if (!open_v[r][b]) n_closed_err++;
              else if (bus_dir != DIR_READ) n_dir_err++;
              else begin
                burst_t d;
                longint k;
                k = col_key(r, b, open_row[r][b], cmd.addr);
                d = store.exists(k) ? store[k] : '0;
                if (now - act_time[r][b] < longint'(TRCD_OK)) begin
                  for (int i = 0; i < BURST_W / 8; i++) d[i*8] = ~d[i*8];
                  n_short_rcd++;
                end
                rq_time.push_back(now + longint'(RL));
                rq_data.push_back(d);
              end
            end
            3'b100: begin  // WRITE
              n_wr++; last_wr_time = int'(now);
              if (!open_v[r][b]) n_closed_err++;
              else if (bus_dir != DIR_WRITE || !wr_en) n_dir_err++;
              else store[col_key(r, b, open_row[r][b], cmd.addr)] = wr_data;
            end
            3'b010: begin  // PRECHARGE (A10: all banks)
              if (cmd.addr[10]) begin
                n_prea++; last_prea_time = int'(now);
                for (int i = 0; i < 8; i++) open_v[r][i] = 1'b0;
              end else begin
                n_pre++; open_v[r][b] = 1'b0;
              end
            end
            3'b001: begin  // REFRESH restores every row stored so far
              n_ref++; last_ref_time = int'(now);
              foreach (restored[k]) restored[k] = now;
            end
            3'b110: begin n_zq++; last_zq_time = int'(now); end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
