// tb_mr_mem_ref: self-checking test of the memory references calculation
// (PC, +1, ADDRAD, R@, SELADR).
// Random control and operands each cycle; a model of PC and R@ predicts the
// address driven to memory and the register contents, including the
// modulo-256 wrap of ADDRAD and of the incrementer and the PC <- R@ + 1
// update used by a taken branch.
module tb_mr_mem_ref;
  import mr_pkg::*;

  logic  clk = 0, rst = 1;
  logic  ld_pc, ld_radr, pc_adr;
  addr_t rx_lo, ir_lo, addr, pc, radr;
  int    checks = 0, failures = 0;
  int    n_wrap = 0, n_branch_pc = 0;

  mr_mem_ref dut (.clk(clk), .rst(rst), .ld_pc(ld_pc), .ld_radr(ld_radr), .pc_adr(pc_adr),
                  .rx_lo(rx_lo), .ir_lo(ir_lo), .addr(addr), .pc(pc), .radr(radr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int m_pc = 0, m_radr = 0, m_addr;
    ld_pc = 0; ld_radr = 0; pc_adr = 0; rx_lo = 0; ir_lo = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1 chk("reset pc", int'(pc), 0);
    chk("reset addr", int'(addr), 0);
    for (int k = 0; k < 5000; k++) begin
      ld_pc = 1'($urandom); ld_radr = 1'($urandom); pc_adr = 1'($urandom);
      rx_lo = addr_t'($urandom); ir_lo = addr_t'($urandom);
      if (k < 300) begin pc_adr = 0; ld_pc = 1; end   // run PC through its wrap
      #1;
      m_addr = pc_adr ? m_radr : m_pc;
      chk("addr", int'(addr), m_addr);
      if (int'(rx_lo) + int'(ir_lo) > 255 && ld_radr) n_wrap++;
      if (ld_pc && pc_adr) n_branch_pc++;
      @(negedge clk);
      if (ld_pc)   m_pc   = (m_addr + 1) % 256;
      if (ld_radr) m_radr = (int'(rx_lo) + int'(ir_lo)) % 256;
      chk("pc", int'(pc), m_pc);
      chk("radr", int'(radr), m_radr);
    end
    if (n_wrap == 0 || n_branch_pc == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
