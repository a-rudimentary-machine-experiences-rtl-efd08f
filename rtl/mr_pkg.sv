// mr_pkg: types and constants shared by the MR (Maquina Rudimentaria) RTL.
//
// The MR is a 16-bit, 8-address-bit von Neumann machine with 8 general
// registers (R0 reads as zero), two flags N and Z, and a multicycle datapath
// driven by a six-state Moore control unit. This package holds the word and
// address widths, the instruction-field layout, the opcode and condition
// encodings, the control-unit states and the bundle of control signals that
// the control unit sends to the datapath.
//
// The widths, the field positions, the two-bit opcodes and the control signal
// set follow the published machine. The 3-bit branch condition codes, the
// 3-bit arithmetic OP codes and the state encoding are this design's choices
// (see the comments at each).
package mr_pkg;

  localparam int unsigned WORD_W   = 16;  // data word and instruction width
  localparam int unsigned ADDR_W   = 8;   // memory address width
  localparam int unsigned MEM_DEPTH = 256;
  localparam int unsigned NUM_REGS = 8;
  localparam int unsigned REG_AW   = 3;
  localparam int unsigned IMM_W    = 5;   // immediate field IR7-3

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [REG_AW-1:0] reg_idx_t;

  // Operation code, IR15-14.
  typedef enum logic [1:0] {
    OC_LOAD   = 2'b00,
    OC_STORE  = 2'b01,
    OC_BRANCH = 2'b10,
    OC_ARIT   = 2'b11
  } opcode_e;

  // Arithmetic OP field, IR2-0. IR2 = 1 takes operand B from the register
  // file, IR2 = 0 from the sign-extended immediate; IR1-0 select the ALU
  // function. This numbering is a design choice.
  localparam logic [2:0] OP_ADDI = 3'b000;
  localparam logic [2:0] OP_SUBI = 3'b001;
  localparam logic [2:0] OP_ADD  = 3'b100;
  localparam logic [2:0] OP_SUB  = 3'b101;
  localparam logic [2:0] OP_ASR  = 3'b110;
  localparam logic [2:0] OP_AND  = 3'b111;

  // ALU function, IR1-0 (used when OPERATE = 1).
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_ASR = 2'b10,
    ALU_AND = 2'b11
  } alu_fn_e;

  // Branch condition, IR13-11. Bit 2 negates the condition chosen by bits
  // 1-0 (code 100 is unused and never taken). Design choice.
  localparam logic [2:0] COND_BR  = 3'b000;
  localparam logic [2:0] COND_BEQ = 3'b001;
  localparam logic [2:0] COND_BL  = 3'b010;
  localparam logic [2:0] COND_BLE = 3'b011;
  localparam logic [2:0] COND_BNE = 3'b101;
  localparam logic [2:0] COND_BGE = 3'b110;
  localparam logic [2:0] COND_BG  = 3'b111;

  // SELREG select (CRs): which IR field addresses the register read port.
  typedef enum logic [1:0] {
    CRS_RT  = 2'd0,   // IR13-11 (Rs of STORE)
    CRS_RS1 = 2'd1,   // IR10-8  (Rs1 / Ri)
    CRS_RS2 = 2'd2    // IR7-5   (Rs2)
  } crs_e;

  // Control unit states.
  typedef enum logic [2:0] {
    ST_FETCH  = 3'd0,
    ST_DECO   = 3'd1,
    ST_LOAD   = 3'd2,
    ST_STORE  = 3'd3,
    ST_ARIT   = 3'd4,
    ST_BRANCH = 3'd5
  } state_e;

  // Control signals from the control unit to the datapath.
  typedef struct packed {
    logic ld_ra;
    logic ld_ir;
    logic ld_pc;
    logic ld_radr;   // Ld_R@
    logic ld_rz;
    logic ld_rn;
    logic wrt;       // register file write enable
    logic rw;        // memory R/W: 0 read, 1 write
    logic pc_adr;    // SELADR: 0 address from PC, 1 from R@
    crs_e crs;
    logic operate;
  } ctrl_t;

  // Instruction field helpers.
  function automatic opcode_e ir_opcode(word_t ir);
    return opcode_e'(ir[15:14]);
  endfunction

  function automatic logic [2:0] ir_cond(word_t ir);
    return ir[13:11];
  endfunction

endpackage
