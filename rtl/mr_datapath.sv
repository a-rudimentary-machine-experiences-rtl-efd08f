// mr_datapath: the MR datapath.
//
// Connects the instruction register IR with the four parts of the datapath:
//   * register file control (mr_regfile): read port through SELREG, write
//     port at IR13-11, write data from the ALU;
//   * arithmetic-logical computation (mr_arith_unit): RA, SELDAT, sign
//     extension, ALU, flags RN and RZ;
//   * branch evaluation (mr_branch_eval): Cond from IR13-11, N and Z;
//   * memory references calculation (mr_mem_ref): PC, +1, ADDRAD, R@, SELADR.
// The memory is outside: addr and min (data to write, the register-file
// read data) go to it, mout (data read) comes back and feeds IR and SELDAT.
// Every register loads at the rising clock edge under its Ld_ signal from
// the control unit (ctrl). The datapath is not pipelined: one control state
// per clock cycle. The structure follows the published datapath; the reset
// of IR to 0 is a design choice.
module mr_datapath
  import mr_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  ctrl_t   ctrl,
  input  word_t   mout,     // memory data out
  output word_t   min,      // memory data in
  output addr_t   addr,     // memory address
  output opcode_e opcode,   // IR15-14 to the control unit
  output logic    cond,     // branch evaluation result to the control unit
  output word_t   ir,
  output addr_t   pc,
  output logic    n,
  output logic    z
);

  word_t rx;
  word_t alu_out;
  addr_t radr;

  always_ff @(posedge clk) begin
    if (rst)             ir <= '0;
    else if (ctrl.ld_ir) ir <= mout;
  end

  assign opcode = ir_opcode(ir);
  assign min    = rx;

  mr_regfile u_regfile (
    .clk   (clk),
    .rst   (rst),
    .ir    (ir),
    .crs   (ctrl.crs),
    .wrt   (ctrl.wrt),
    .wdata (alu_out),
    .rdata (rx)
  );

  mr_arith_unit u_arith (
    .clk     (clk),
    .rst     (rst),
    .ld_ra   (ctrl.ld_ra),
    .ld_rz   (ctrl.ld_rz),
    .ld_rn   (ctrl.ld_rn),
    .operate (ctrl.operate),
    .ir      (ir),
    .rx      (rx),
    .mout    (mout),
    .alu_out (alu_out),
    .n       (n),
    .z       (z)
  );

  mr_branch_eval u_branch (
    .cond (ir_cond(ir)),
    .n    (n),
    .z    (z),
    .take (cond)
  );

  mr_mem_ref u_memref (
    .clk     (clk),
    .rst     (rst),
    .ld_pc   (ctrl.ld_pc),
    .ld_radr (ctrl.ld_radr),
    .pc_adr  (ctrl.pc_adr),
    .rx_lo   (rx[ADDR_W-1:0]),
    .ir_lo   (ir[ADDR_W-1:0]),
    .addr    (addr),
    .pc      (pc),
    .radr    (radr)
  );

endmodule
