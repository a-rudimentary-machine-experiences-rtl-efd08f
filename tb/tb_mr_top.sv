// tb_mr_top: end-to-end test of the complete MR machine at its full size
// (256 x 16 memory, 8 registers), with the top's default parameters.
// Each program is written into memory through the access port while the
// processor is held in reset, run from address 0 until the halt instruction
// (a branch to itself) reaches DECO, then every memory word is read back
// through the port. The programs are:
//   * a 16-bit multiply by shift-and-add (ASR, AND, ADD, BEQ, BNE, LOAD,
//     STORE);
//   * the sum of a 16-word array with an indexed LOAD loop (ADDI, SUBI, BGE);
//   * a branch test: every condition evaluated after flags set by an ALU
//     result that is negative, zero (written to R0) and positive, and by a
//     LOAD, plus an address computation that wraps past 255;
//   * random programs.
// Results, flags and cycle counts are compared with the instruction-level
// model; the multiply and the sum are also checked against values computed
// here directly. Each mechanism of the machine (every control state, every
// ALU function, each branch condition taken and not taken, a write to R0,
// a negative immediate, an address wrap) is counted, and one that never
// occurs counts as a failure.
module tb_mr_top;
  import mr_pkg::*;
  import mr_asm_pkg::*;

  logic   clk = 0, rst = 1;
  logic   ext_en = 0, ext_we = 0;
  addr_t  ext_addr = '0;
  word_t  ext_wdata = '0, ext_rdata;
  state_e state;
  addr_t  pc;
  int     checks = 0, failures = 0;

  mr_top dut (.clk(clk), .rst(rst), .ext_en(ext_en), .ext_we(ext_we), .ext_addr(ext_addr),
              .ext_wdata(ext_wdata), .ext_rdata(ext_rdata), .state(state), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- coverage
  int n_state [6];
  int n_alu [8];
  int n_br [8][2];
  int n_r0_write, n_imm_neg, n_addr_wrap, n_mem_write;

  always @(negedge clk) if (!rst) begin
    word_t ir;
    ir = dut.u_cpu.u_datapath.ir;
    n_state[int'(state)]++;
    if (state == ST_ARIT) begin
      n_alu[ir[2:0]]++;
      if (!ir[2] && ir[7]) n_imm_neg++;
      if (ir[13:11] == 0) n_r0_write++;
    end
    if (state == ST_LOAD && ir[13:11] == 0) n_r0_write++;
    if (state == ST_STORE) n_mem_write++;
    if (state == ST_DECO && ir[15:14] == 2'b10)
      n_br[ir[13:11]][int'(dut.u_cpu.cond)]++;
    if (state == ST_DECO && !ir[15] &&
        int'(ir[7:0]) + int'(dut.u_cpu.u_datapath.rx[7:0]) > 255) n_addr_wrap++;
  end

  // ------------------------------------------------------------- programs
  word_t prog [256];
  int    len;

  task automatic emit(word_t w);
    prog[len] = w;
    len++;
  endtask

  task automatic clear_prog();
    foreach (prog[i]) prog[i] = '0;
    len = 0;
  endtask

  // Loads prog, runs it, compares with the model; returns the final memory.
  task automatic run_prog(string name, output word_t final_mem [256]);
    mr_iss  iss;
    longint cyc;
    int     halt_at;
    iss = new();
    iss.mem = prog;
    if (!iss.run(5000)) begin
      failures++;
      $display("FAIL %s: model did not halt", name);
    end
    halt_at = iss.pc;
    rst = 1;
    ext_en = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ext_addr = addr_t'(a); ext_wdata = prog[a]; ext_we = 1;
    end
    @(negedge clk);
    ext_we = 0; ext_en = 0;
    @(negedge clk);
    rst = 0;
    cyc = 0;
    while (!(state == ST_DECO && int'(pc) == (halt_at + 1) % 256)) begin
      @(negedge clk);
      cyc++;
      if (cyc > 100000) break;
    end
    chk({name, " cycles"}, cyc, iss.cycles);
    rst = 1;
    for (int r = 1; r < 8; r++)
      chk($sformatf("%s R%0d", name, r), longint'(dut.u_cpu.u_datapath.u_regfile.regs[r]), longint'(iss.r[r]));
    chk({name, " N"}, longint'(dut.u_cpu.n), longint'(iss.n));
    chk({name, " Z"}, longint'(dut.u_cpu.z), longint'(iss.z));
    ext_en = 1;
    for (int a = 0; a < 256; a++) begin
      ext_addr = addr_t'(a);
      #1;
      final_mem[a] = ext_rdata;
      chk($sformatf("%s M[%0d]", name, a), longint'(ext_rdata), longint'(iss.mem[a]));
    end
    ext_en = 0;
    $display("%s: %0d instructions, %0d cycles", name, iss.instrs, cyc);
  endtask

  initial begin
    word_t fm [256];
    int    x, y, s;
    @(negedge clk);

    // Multiply M[0x80] * M[0x81] -> M[0x82]
    clear_prog();
    emit(LOAD(1, 8'h80, 0));
    emit(LOAD(2, 8'h81, 0));
    emit(ADD(3, 0, 0));
    emit(ADDI(4, 0, 1));          // 3: loop
    emit(AND(4, 2, 4));
    emit(BRC(C_BEQ, 7));
    emit(ADD(3, 3, 1));
    emit(ADD(1, 1, 1));           // 7
    emit(ASR(2, 2));
    emit(BRC(C_BNE, 3));
    emit(STORE(3, 8'h82, 0));
    emit(BRC(C_BR, len));
    x = -123; y = 45;
    prog[8'h80] = word_t'(x); prog[8'h81] = word_t'(y);
    run_prog("multiply", fm);
    chk("multiply product", longint'(fm[8'h82]), longint'(word_t'(x * y)));

    // Sum of M[0x90..0x9F] -> M[0xA0]
    clear_prog();
    emit(ADDI(5, 0, 15));
    emit(ADD(6, 0, 0));
    emit(LOAD(7, 8'h90, 5));      // 2: loop
    emit(ADD(6, 6, 7));
    emit(SUBI(5, 5, 1));
    emit(BRC(C_BGE, 2));
    emit(STORE(6, 8'hA0, 0));
    emit(BRC(C_BR, len));
    s = 0;
    for (int i = 0; i < 16; i++) begin
      int v = (i * 977) % 601 - 300;
      prog[8'h90 + i] = word_t'(v);
      s += v;
    end
    run_prog("array sum", fm);
    chk("array sum result", longint'(fm[8'hA0]), longint'(word_t'(s)));

    // Branch conditions after each kind of flag setting.
    clear_prog();
    emit(ADDI(3, 0, 7));          // marker value
    emit(ADDI(2, 0, 8'h10));      // index 16 for the address wrap
    for (int f = 0; f < 4; f++) begin
      case (f)
        0: emit(SUBI(1, 0, 1));   // negative
        1: emit(ADD(0, 3, 3));    // result 14 into R0: dropped, flags N=0 Z=0
        2: emit(SUB(0, 3, 3));    // zero into R0: N=0 Z=1
        default: emit(LOAD(4, 8'hF8, 2));  // wraps to 0x08, loads a negative word
      endcase
      for (int c = 0; c < 8; c++) begin
        if (c == 4) continue;
        emit(BRC(c, len + 2));
        emit(STORE(3, 8'hC0 + f * 8 + c, 0));
      end
    end
    emit(BRC(C_BR, len));
    prog[8'h08] = 16'h8001;
    run_prog("branches", fm);

    // Random programs.
    for (int k = 0; k < 25; k++) begin
      clear_prog();
      gen_random_program(prog, 100);
      run_prog($sformatf("random %0d", k), fm);
    end

    // Mechanism coverage.
    for (int i = 0; i < 6; i++) begin
      $display("state %s: %0d cycles", state_e'(i), n_state[i]);
      checks++; if (n_state[i] == 0) begin failures++; $display("FAIL state %0d never entered", i); end
    end
    foreach (n_alu[i]) if (i != 2 && i != 3) begin
      checks++; if (n_alu[i] == 0) begin failures++; $display("FAIL ALU op %0d never executed", i); end
    end
    for (int c = 0; c < 8; c++) begin
      $display("branch cond %0d: taken %0d, not taken %0d", c, n_br[c][1], n_br[c][0]);
      if (c == 4) continue;
      checks++; if (n_br[c][1] == 0) begin failures++; $display("FAIL cond %0d never taken", c); end
      if (c != 0) begin
        checks++; if (n_br[c][0] == 0) begin failures++; $display("FAIL cond %0d never fell through", c); end
      end
    end
    $display("writes to R0 %0d, negative immediates %0d, address wraps %0d, stores %0d",
             n_r0_write, n_imm_neg, n_addr_wrap, n_mem_write);
    checks++; if (n_r0_write == 0)  begin failures++; $display("FAIL no write to R0"); end
    checks++; if (n_imm_neg == 0)   begin failures++; $display("FAIL no negative immediate"); end
    checks++; if (n_addr_wrap == 0) begin failures++; $display("FAIL no address wrap"); end
    checks++; if (n_mem_write == 0) begin failures++; $display("FAIL no store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
