// mr_cpu: the MR processor, datapath plus centralized control unit.
//
// Executes the MR instruction set (ADD, SUB, ADDI, SUBI, ASR, AND, LOAD,
// STORE and seven branches) from a 256 x 16-bit memory with one address, a
// data-in and a data-out port and a R/W line (mem_rw = 1 writes). The memory
// is read combinationally: mem_rdata must be valid in the same cycle as
// mem_addr, and a write takes place at the rising clock edge of a cycle with
// mem_rw = 1. Execution starts at address 0 after a synchronous, active-high
// reset. Cycles per instruction: ALU and branch 2, LOAD and STORE 3.
// state and pc are for observation only.
module mr_cpu
  import mr_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  mem_rdata,
  output word_t  mem_wdata,
  output addr_t  mem_addr,
  output logic   mem_rw,
  output state_e state,
  output addr_t  pc
);

  ctrl_t   ctrl;
  opcode_e opcode;
  logic    cond;
  word_t   ir;
  logic    n, z;

  mr_control u_control (
    .clk    (clk),
    .rst    (rst),
    .opcode (opcode),
    .cond   (cond),
    .ctrl   (ctrl),
    .state  (state)
  );

  mr_datapath u_datapath (
    .clk    (clk),
    .rst    (rst),
    .ctrl   (ctrl),
    .mout   (mem_rdata),
    .min    (mem_wdata),
    .addr   (mem_addr),
    .opcode (opcode),
    .cond   (cond),
    .ir     (ir),
    .pc     (pc),
    .n      (n),
    .z      (z)
  );

  assign mem_rw = ctrl.rw;

  // Every data reference (LOAD, STORE, branch target) uses R@; a write is
  // only ever addressed through it.
  a_write_via_radr: assert property (@(posedge clk) disable iff (rst)
    ctrl.rw |-> ctrl.pc_adr);
  // The register file is written only while the ALU result is meaningful.
  a_wrt_with_flags: assert property (@(posedge clk) disable iff (rst)
    ctrl.wrt |-> (ctrl.ld_rz && ctrl.ld_rn));

endmodule
