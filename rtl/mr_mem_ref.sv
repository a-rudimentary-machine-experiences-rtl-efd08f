// mr_mem_ref: MR memory references calculation.
//
// Produces the 8-bit memory address from one of two registers:
//   * PC, the program counter. It loads (SELADR output) + 1 when Ld_PC is 1,
//     so after a fetch from PC it points to the next word, and after a fetch
//     from R@ (a taken branch) it points to the word after the target.
//   * R@, the address register. It loads the ADDRAD sum, the low 8 bits of
//     the register-file read data plus IR7-0, when Ld_R@ is 1. For LOAD and
//     STORE this is base_addr + Ri; for a branch the register field is R0, so
//     R@ receives the target address itself.
// SELADR drives the address from PC when PC/@ is 0 and from R@ when it is 1.
// Both additions wrap modulo 256. Registers update at the rising clock edge;
// synchronous reset sets PC and R@ to 0 (a design choice: execution starts at
// address 0).
module mr_mem_ref
  import mr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld_pc,
  input  logic  ld_radr,
  input  logic  pc_adr,
  input  addr_t rx_lo,     // Rx7-0
  input  addr_t ir_lo,     // IR7-0
  output addr_t addr,      // to the memory
  output addr_t pc,
  output addr_t radr
);

  addr_t addrad_sum;
  addr_t pc_inc;

  assign addrad_sum = rx_lo + ir_lo;          // ADDRAD
  assign addr       = pc_adr ? radr : pc;     // SELADR
  assign pc_inc     = addr + addr_t'(1);      // +1

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= '0;
      radr <= '0;
    end else begin
      if (ld_pc)   pc   <= pc_inc;
      if (ld_radr) radr <= addrad_sum;
    end
  end

endmodule
