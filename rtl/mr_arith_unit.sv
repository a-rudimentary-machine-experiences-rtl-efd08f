// mr_arith_unit: MR arithmetic-logical computation.
//
// Holds the first-operand register RA, the SELDAT multiplexer for the second
// operand, the 5-to-16-bit sign extension of the immediate, the ALU and the
// flag registers RN and RZ.
//   * RA loads the register-file read data (Rx) when Ld_RA is 1.
//   * SELDAT is selected by {OPERATE, IR2}: 3 = Rx (register operand),
//     2 = sign-extended IR7-3 (immediate operand), 1 and 0 = Mout (memory
//     word, used by LOAD with OPERATE = 0).
//   * The ALU computes from RA (A) and SELDAT (B) under OPERATE and IR1-0.
//   * RN and RZ load the sign bit and the zero test of the ALU result when
//     Ld_RN / Ld_RZ are 1.
// alu_out is combinational and goes to the register-file write port. Flags
// and RA update at the rising clock edge; synchronous reset clears them
// (reset values are a design choice).
module mr_arith_unit
  import mr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld_ra,
  input  logic  ld_rz,
  input  logic  ld_rn,
  input  logic  operate,
  input  word_t ir,
  input  word_t rx,        // register file read data
  input  word_t mout,      // memory read data
  output word_t alu_out,
  output logic  n,
  output logic  z
);

  word_t ra;
  word_t imm_ext;
  word_t b;

  assign imm_ext = {{(WORD_W-IMM_W){ir[7]}}, ir[7:3]};

  // SELDAT
  always_comb begin
    unique case ({operate, ir[2]})
      2'b11:   b = rx;
      2'b10:   b = imm_ext;
      default: b = mout;
    endcase
  end

  mr_alu u_alu (
    .a       (ra),
    .b       (b),
    .operate (operate),
    .fn      (alu_fn_e'(ir[1:0])),
    .y       (alu_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ra <= '0;
      n  <= 1'b0;
      z  <= 1'b0;
    end else begin
      if (ld_ra) ra <= rx;
      if (ld_rn) n  <= alu_out[WORD_W-1];
      if (ld_rz) z  <= (alu_out == '0);
    end
  end

endmodule
