// mr_regfile: MR register file control (SELREG and the register file).
//
// Eight 16-bit registers with one read port and one write port, usable in
// the same cycle. R0 always reads as 0 and writes to it are dropped (the
// instruction still updates the flags, which happens elsewhere).
//
// Read port: the SELREG multiplexer, driven by CRs, picks the read register
// from the instruction register: 0 = IR13-11, 1 = IR10-8, 2 = IR7-5 (input 3
// is unused and reads R0). The read is combinational.
// Write port: the register named by IR13-11 (Rt) takes wdata at the rising
// clock edge when WRt is 1.
// Reset (synchronous, active high) clears R1-R7; this is a design choice, the
// machine does not define reset values.
module mr_regfile
  import mr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t ir,
  input  crs_e  crs,
  input  logic  wrt,
  input  word_t wdata,
  output word_t rdata
);

  word_t    regs [NUM_REGS];   // regs[0] is never written or read
  reg_idx_t rd_idx;
  reg_idx_t wr_idx;

  // SELREG
  always_comb begin
    unique case (crs)
      CRS_RT:  rd_idx = ir[13:11];
      CRS_RS1: rd_idx = ir[10:8];
      CRS_RS2: rd_idx = ir[7:5];
      default: rd_idx = '0;
    endcase
  end

  assign wr_idx = ir[13:11];
  assign rdata  = (rd_idx == '0) ? '0 : regs[rd_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (wrt && wr_idx != '0) begin
      regs[wr_idx] <= wdata;
    end
  end

endmodule
