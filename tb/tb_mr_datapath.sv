// tb_mr_datapath: self-checking test of the MR datapath on its own.
// The testbench plays the control unit from its own copy of the state
// sequence and output table, and provides the memory (combinational read,
// write at the clock edge). It runs random programs instruction by
// instruction and, each time an instruction has finished, compares the
// register file, N, Z and PC with the instruction-level model; it also
// checks the Cond bit against the model's branch decision and the final
// memory contents.
module tb_mr_datapath;
  import mr_pkg::*;
  import mr_asm_pkg::mr_iss;
  import mr_asm_pkg::gen_random_program;

  logic    clk = 0, rst = 1;
  ctrl_t   ctrl;
  word_t   mout, min, ir;
  addr_t   addr, pc;
  opcode_e opcode;
  logic    cond, n, z;
  word_t   mem [256];
  int      checks = 0, failures = 0;

  mr_datapath dut (.clk(clk), .rst(rst), .ctrl(ctrl), .mout(mout), .min(min), .addr(addr),
                   .opcode(opcode), .cond(cond), .ir(ir), .pc(pc), .n(n), .z(z));

  assign mout = mem[addr];
  always_ff @(posedge clk) if (ctrl.rw) mem[addr] <= min;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  // {ld_ra, ld_ir, ld_pc, ld_radr, ld_rz, ld_rn, wrt, rw, pc_adr, crs, operate}
  function automatic ctrl_t cw(string s);
    ctrl_t c = '{default: '0, crs: CRS_RT};
    case (s)
      "F": begin c.ld_ir = 1; c.ld_pc = 1; end
      "D": begin c.ld_ra = 1; c.ld_radr = 1; c.crs = CRS_RS1; end
      "L": begin c.ld_rz = 1; c.ld_rn = 1; c.wrt = 1; c.pc_adr = 1; end
      "S": begin c.rw = 1; c.pc_adr = 1; c.crs = CRS_RT; end
      "A": begin c.ld_ir = 1; c.ld_pc = 1; c.ld_rz = 1; c.ld_rn = 1; c.wrt = 1;
                 c.crs = CRS_RS2; c.operate = 1; end
      default: begin c.ld_ir = 1; c.ld_pc = 1; c.pc_adr = 1; end   // "B"
    endcase
    return c;
  endfunction

  task automatic cycle(string s);
    ctrl = cw(s);
    @(negedge clk);
  endtask

  task automatic compare(mr_iss iss);
    for (int r = 1; r < 8; r++) chk($sformatf("R%0d", r), int'(dut.u_regfile.regs[r]), int'(iss.r[r]));
    chk("N", int'(n), int'(iss.n));
    chk("Z", int'(z), int'(iss.z));
    chk("PC", int'(pc), (iss.pc + 1) % 256);
  endtask

  initial begin
    ctrl = cw("D"); ctrl.ld_ra = 0; ctrl.ld_radr = 0;
    for (int prog = 0; prog < 30; prog++) begin
      mr_iss iss;
      iss = new();
      gen_random_program(iss.mem, 60);
      mem = iss.mem;
      rst = 1; ctrl = '{default: '0, crs: CRS_RT};
      repeat (2) @(negedge clk);
      rst = 0;
      cycle("F");
      while (!iss.at_halt()) begin
        logic [1:0] oc;
        compare(iss);
        chk("IR", int'(ir), int'(iss.mem[iss.pc]));
        oc = ir[15:14];
        begin
          iss.step();
          cycle("D");
          case (oc)
            2'b00: begin cycle("L"); cycle("F"); end
            2'b01: begin cycle("S"); cycle("F"); end
            2'b11: cycle("A");
            default: begin
              chk("Cond", int'(cond), int'(iss.last_taken));
              if (cond) cycle("B"); else cycle("F");
            end
          endcase
        end
      end
      compare(iss);
      for (int a = 0; a < 256; a++) chk($sformatf("M[%0d]", a), int'(mem[a]), int'(iss.mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
