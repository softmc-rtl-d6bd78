// softmc_pkg: types and constants shared by the SoftMC hardware.
//
// SoftMC is driven by 32-bit instructions. Every instruction carries a
// 4-bit type in bits [31:28]. The field layout of the four instruction
// types follows the published instruction table:
//   DDR    : type(4) | unused(3) | CKE, CS(2), RAS, CAS, WE (6) | bank(3) | addr(16)
//   WAIT   : type(4) | cycles(28)
//   BUSDIR : type(4) | unused(27) | dir(1)
//   END    : type(4) | unused(28)
// The numeric codes of the types are not published; the codes below are
// this design's choice. The control bits of a DDR instruction are the pin
// levels put on the DDR3 bus (CS#, RAS#, CAS#, WE# active low, CKE active
// high), so a host builds commands from the JEDEC DDR3 truth table.
// A DDR instruction that is a WRITE is followed in the instruction stream by
// one 32-bit data word; that word is replicated over the whole burst (this
// design's choice: the table gives no data field).
package softmc_pkg;

  localparam int unsigned INSTR_W   = 32;
  localparam int unsigned BANK_W    = 3;
  localparam int unsigned ADDR_W    = 16;
  localparam int unsigned CS_W      = 2;
  localparam int unsigned WAIT_W    = 28;

  // DDR3 SODIMM data path: 64 DQ, burst length 8 -> 512 bits per burst.
  localparam int unsigned DQ_W      = 64;
  localparam int unsigned BURST_LEN = 8;
  localparam int unsigned BURST_W   = DQ_W * BURST_LEN;

  typedef enum logic [3:0] {
    IT_END    = 4'h0,
    IT_DDR    = 4'h1,
    IT_WAIT   = 4'h2,
    IT_BUSDIR = 4'h3
  } instr_type_e;

  // One cycle of the DDR3 command bus (pin levels).
  typedef struct packed {
    logic              cke;
    logic [CS_W-1:0]   cs_n;
    logic              ras_n;
    logic              cas_n;
    logic              we_n;
    logic [BANK_W-1:0] bank;
    logic [ADDR_W-1:0] addr;
  } ddr_cmd_t;

  // Bus direction, set by BUSDIR.
  typedef enum logic {
    DIR_WRITE = 1'b0,
    DIR_READ  = 1'b1
  } bus_dir_e;

  // Deselect (no command), keeping the given clock-enable level.
  function automatic ddr_cmd_t cmd_des(input logic cke);
    ddr_cmd_t c;
    c       = '0;
    c.cke   = cke;
    c.cs_n  = '1;
    c.ras_n = 1'b1;
    c.cas_n = 1'b1;
    c.we_n  = 1'b1;
    return c;
  endfunction

  // Command with CS# asserted on all ranks.
  function automatic ddr_cmd_t cmd_all(input logic ras_n, input logic cas_n,
                                       input logic we_n, input logic [ADDR_W-1:0] addr);
    ddr_cmd_t c;
    c       = '0;
    c.cke   = 1'b1;
    c.cs_n  = '0;
    c.ras_n = ras_n;
    c.cas_n = cas_n;
    c.we_n  = we_n;
    c.addr  = addr;
    return c;
  endfunction

  // Precharge all banks (A10 high), REFRESH, ZQ calibration short (A10 low).
  function automatic ddr_cmd_t cmd_prea();
    return cmd_all(1'b0, 1'b1, 1'b0, 16'h0400);
  endfunction
  function automatic ddr_cmd_t cmd_ref();
    return cmd_all(1'b0, 1'b0, 1'b1, 16'h0000);
  endfunction
  function automatic ddr_cmd_t cmd_zqcs();
    return cmd_all(1'b1, 1'b1, 1'b0, 16'h0000);
  endfunction

  function automatic instr_type_e instr_type(input logic [INSTR_W-1:0] w);
    return instr_type_e'(w[31:28]);
  endfunction

  // A DDR instruction word whose control pins encode WRITE on some rank.
  function automatic logic is_write_instr(input logic [INSTR_W-1:0] w);
    return (w[31:28] == IT_DDR) && (w[23:22] != 2'b11) &&
           (w[21:19] == 3'b100);  // RAS#=1 CAS#=0 WE#=0
  endfunction

  function automatic ddr_cmd_t instr_to_cmd(input logic [INSTR_W-1:0] w);
    ddr_cmd_t c;
    c.cke   = w[24];
    c.cs_n  = w[23:22];
    c.ras_n = w[21];
    c.cas_n = w[20];
    c.we_n  = w[19];
    c.bank  = w[18:16];
    c.addr  = w[15:0];
    return c;
  endfunction

  // Instruction builders (used by testbenches; they mirror the host API).
  function automatic logic [INSTR_W-1:0] mk_ddr(input logic cke, input logic [1:0] cs_n,
      input logic ras_n, input logic cas_n, input logic we_n,
      input logic [BANK_W-1:0] bank, input logic [ADDR_W-1:0] addr);
    return {IT_DDR, 3'b000, cke, cs_n, ras_n, cas_n, we_n, bank, addr};
  endfunction
  function automatic logic [INSTR_W-1:0] mk_wait(input logic [WAIT_W-1:0] cycles);
    return {IT_WAIT, cycles};
  endfunction
  function automatic logic [INSTR_W-1:0] mk_busdir(input bus_dir_e d);
    return {IT_BUSDIR, 27'd0, logic'(d)};
  endfunction
  function automatic logic [INSTR_W-1:0] mk_end();
    return {IT_END, 28'd0};
  endfunction

endpackage
