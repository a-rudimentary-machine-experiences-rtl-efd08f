// mr_asm_pkg: testbench helpers for the MR machine.
//
// Instruction encoders (a tiny assembler) and mr_iss, an instruction-level
// reference model that executes a memory image and counts clock cycles the
// way the control unit spends them: one FETCH after reset, then per
// instruction DECO plus ARIT (ALU), LOAD+FETCH, STORE+FETCH, BRANCH (taken)
// or FETCH (not taken). The model is written from the instruction-set
// definition, independently of the RTL.
package mr_asm_pkg;

  typedef logic [15:0] word_t;

  function automatic word_t enc_rr(logic [2:0] op, logic [2:0] rt, logic [2:0] rs1, logic [2:0] rs2);
    return {2'b11, rt, rs1, rs2, 2'b00, op};
  endfunction
  function automatic word_t enc_ri(logic [2:0] op, logic [2:0] rt, logic [2:0] rs, int imm);
    logic [4:0] i5 = imm[4:0];
    return {2'b11, rt, rs, i5, op};
  endfunction
  function automatic word_t ADD(int rt, int rs1, int rs2); return enc_rr(3'b100, rt[2:0], rs1[2:0], rs2[2:0]); endfunction
  function automatic word_t SUB(int rt, int rs1, int rs2); return enc_rr(3'b101, rt[2:0], rs1[2:0], rs2[2:0]); endfunction
  function automatic word_t ASR(int rt, int rs);           return enc_rr(3'b110, rt[2:0], 3'd0, rs[2:0]); endfunction
  function automatic word_t AND(int rt, int rs1, int rs2); return enc_rr(3'b111, rt[2:0], rs1[2:0], rs2[2:0]); endfunction
  function automatic word_t ADDI(int rt, int rs, int imm); return enc_ri(3'b000, rt[2:0], rs[2:0], imm); endfunction
  function automatic word_t SUBI(int rt, int rs, int imm); return enc_ri(3'b001, rt[2:0], rs[2:0], imm); endfunction
  function automatic word_t LOAD(int rt, int base, int ri);  return {2'b00, rt[2:0], ri[2:0], base[7:0]}; endfunction
  function automatic word_t STORE(int rs, int base, int ri); return {2'b01, rs[2:0], ri[2:0], base[7:0]}; endfunction
  function automatic word_t BRC(int cond, int target);       return {2'b10, cond[2:0], 3'b000, target[7:0]}; endfunction

  localparam int C_BR = 0, C_BEQ = 1, C_BL = 2, C_BLE = 3, C_BNE = 5, C_BGE = 6, C_BG = 7;


  // Fills mem with a random program of len instructions at address 0 and a
  // halt after it, and random data in 128..255. Stores go only to 128..255
  // (index register R0) and branches only forward, so every program ends.
  function automatic void gen_random_program(ref word_t mem [256], input int len);
    for (int a = 0; a < 256; a++) mem[a] = word_t'($urandom);
    for (int a = 0; a < len; a++) begin
      int kind = $urandom_range(0, 9);
      int rt = $urandom_range(0, 7), rs1 = $urandom_range(0, 7), rs2 = $urandom_range(0, 7);
      case (kind)
        0, 1: mem[a] = enc_rr({1'b1, 2'($urandom)}, 3'(rt), 3'(rs1), 3'(rs2));
        2, 3: mem[a] = enc_ri({1'b0, 1'($urandom)}, 3'(rt), 3'(rs1), $urandom_range(0, 31));
        4:    mem[a] = LOAD(rt, $urandom_range(0, 255), rs1);
        5:    mem[a] = LOAD(rt, $urandom_range(128, 255), 0);
        6:    mem[a] = STORE(rt, $urandom_range(128, 255), 0);
        default: begin
          int c = $urandom_range(0, 7);
          int t = a + $urandom_range(1, 4);
          if (t > len) t = len;
          mem[a] = BRC(c, t);
        end
      endcase
    end
    mem[len] = BRC(C_BR, len);
  endfunction

  class mr_iss;
    word_t    mem [256];
    word_t    r   [8];
    logic     n, z;
    int       pc;
    longint   cycles;   // cycles elapsed when the current instruction enters DECO
    int       instrs;
    bit       last_taken;   // decision of the last branch executed

    function new();
      foreach (r[i]) r[i] = '0;
      n = 0; z = 0; pc = 0; cycles = 1; instrs = 0;
    endfunction

    // A halt is "BR to itself".
    function bit at_halt();
      return mem[pc] == BRC(C_BR, pc);
    endfunction

    function void setf(word_t v);
      n = v[15];
      z = (v == 0);
    endfunction

    function void step();
      word_t ir = mem[pc];
      int    rt = int'(ir[13:11]);
      int    rs1 = int'(ir[10:8]);
      int    rs2 = int'(ir[7:5]);
      word_t res;
      logic [7:0] ea;
      bit    take;
      pc = (pc + 1) % 256;
      instrs++;
      case (ir[15:14])
        2'b11: begin
          word_t b;
          if (ir[2]) b = r[rs2];
          else       b = {{11{ir[7]}}, ir[7:3]};
          case (ir[1:0])
            2'b00: res = r[rs1] + b;
            2'b01: res = r[rs1] - b;
            2'b10: res = word_t'($signed(b) >>> 1);
            default: res = r[rs1] & b;
          endcase
          if (rt != 0) r[rt] = res;
          setf(res);
          cycles += 2;
        end
        2'b00: begin
          ea = ir[7:0] + r[rs1][7:0];
          res = mem[ea];
          if (rt != 0) r[rt] = res;
          setf(res);
          cycles += 3;
        end
        2'b01: begin
          ea = ir[7:0] + r[rs1][7:0];
          mem[ea] = r[rt];
          cycles += 3;
        end
        default: begin
          case (ir[13:11])
            3'b000: take = 1;
            3'b001: take = z;
            3'b010: take = n;
            3'b011: take = n | z;
            3'b101: take = !z;
            3'b110: take = !n;
            3'b111: take = !(n | z);
            default: take = 0;
          endcase
          last_taken = take;
          if (take) pc = int'(ir[7:0]);
          cycles += 2;
        end
      endcase
    endfunction

    // Runs until the halt instruction is reached or max_instrs have run.
    function bit run(int max_instrs);
      while (!at_halt()) begin
        if (instrs >= max_instrs) return 0;
        step();
      end
      return 1;
    endfunction
  endclass

endpackage
