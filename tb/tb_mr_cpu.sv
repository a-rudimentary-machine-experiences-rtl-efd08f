// tb_mr_cpu: self-checking test of the MR processor (datapath + control).
// The testbench provides the memory: combinational read, write at the clock
// edge when mem_rw is 1. It runs random programs from reset until the halt
// instruction (a branch to itself) reaches DECO and compares the number of
// clock cycles, the register file, N, Z and the whole memory with the
// instruction-level model, which charges 2 cycles per ALU instruction or
// branch, 3 per LOAD or STORE, and 1 for the first FETCH.
module tb_mr_cpu;
  import mr_pkg::*;
  import mr_asm_pkg::*;

  logic   clk = 0, rst = 1;
  word_t  mem_rdata, mem_wdata;
  addr_t  mem_addr, pc;
  logic   mem_rw;
  state_e state;
  word_t  mem [256];
  int     checks = 0, failures = 0;

  mr_cpu dut (.clk(clk), .rst(rst), .mem_rdata(mem_rdata), .mem_wdata(mem_wdata),
              .mem_addr(mem_addr), .mem_rw(mem_rw), .state(state), .pc(pc));

  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) if (mem_rw && !rst) mem[mem_addr] <= mem_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    for (int prog = 0; prog < 40; prog++) begin
      mr_iss  iss;
      longint cyc;
      int     halt_at;
      iss = new();
      gen_random_program(iss.mem, 80);
      mem = iss.mem;
      void'(iss.run(1000));
      halt_at = iss.pc;
      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
      cyc = 0;
      while (!(state == ST_DECO && int'(pc) == (halt_at + 1) % 256)) begin
        @(negedge clk);
        cyc++;
        if (cyc > 5000) break;
      end
      chk("cycles", cyc, iss.cycles);
      for (int r = 1; r < 8; r++) chk($sformatf("R%0d", r), longint'(dut.u_datapath.u_regfile.regs[r]), longint'(iss.r[r]));
      chk("N", longint'(dut.n), longint'(iss.n));
      chk("Z", longint'(dut.z), longint'(iss.z));
      for (int a = 0; a < 256; a++) chk($sformatf("M[%0d]", a), longint'(mem[a]), longint'(iss.mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
