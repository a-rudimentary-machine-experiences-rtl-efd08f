// mr_branch_eval: MR branch evaluation circuit (combinational).
//
// Compares the 3-bit COND field of a branch (IR13-11) with the stored flags
// N and Z and returns one bit, Cond, to the control unit: 1 means the branch
// is taken. The seven conditions are those of the instruction set:
//   BR 1, BEQ Z, BL N, BLE N|Z, BNE !Z, BGE !N, BG !(N|Z).
// Their 3-bit codes are a design choice: bits 1-0 pick the base condition
// (always, Z, N, N|Z) and bit 2 negates it; code 100 is never taken.
module mr_branch_eval
  import mr_pkg::*;
(
  input  logic [2:0] cond,
  input  logic       n,
  input  logic       z,
  output logic       take
);

  logic base;

  always_comb begin
    unique case (cond[1:0])
      2'b00: base = 1'b1;
      2'b01: base = z;
      2'b10: base = n;
      2'b11: base = n | z;
    endcase
    take = cond[2] ? ~base : base;
  end

endmodule
