// tb_mr_arith_unit: self-checking test of the arithmetic-logical computation
// part (RA, SELDAT, sign extension, ALU, RN/RZ).
// Each step loads RA from rx, then applies one operation: register operand
// (OPERATE = 1, IR2 = 1), immediate operand (OPERATE = 1, IR2 = 0, IR7-3
// sign-extended) or memory pass-through (OPERATE = 0). The result and the
// flags loaded at the next edge are compared with values computed here. Also
// checks that RA, RN and RZ hold when their load signals are 0.
module tb_mr_arith_unit;
  import mr_pkg::*;

  logic  clk = 0, rst = 1;
  logic  ld_ra, ld_rz, ld_rn, operate;
  word_t ir, rx, mout, alu_out;
  logic  n, z;
  int    checks = 0, failures = 0;
  int    n_imm_neg = 0;

  mr_arith_unit dut (.clk(clk), .rst(rst), .ld_ra(ld_ra), .ld_rz(ld_rz), .ld_rn(ld_rn),
                     .operate(operate), .ir(ir), .rx(rx), .mout(mout),
                     .alu_out(alu_out), .n(n), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int    a_val, b_val, r_val;
    word_t exp;
    ld_ra = 0; ld_rz = 0; ld_rn = 0; operate = 0; ir = '0; rx = '0; mout = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3000; k++) begin
      int mode = $urandom_range(0, 2);
      int fn = $urandom_range(0, 3);
      word_t a = word_t'($urandom);
      if (k % 7 == 0) a = '0;
      // cycle 1: load RA
      ld_ra = 1; rx = a; ld_rz = 0; ld_rn = 0; operate = 0;
      @(negedge clk);
      // cycle 2: operate
      ld_ra = 0;
      ir = word_t'($urandom); ir[1:0] = 2'(fn);
      rx = word_t'($urandom); mout = word_t'($urandom);
      if (k % 5 == 0) begin rx = a; mout = '0; end
      a_val = int'($signed(a));
      case (mode)
        0: begin operate = 1; ir[2] = 1; b_val = int'($signed(rx)); end
        1: begin operate = 1; ir[2] = 0;
                 b_val = int'($signed(ir[7:3]));
                 if (b_val < 0) n_imm_neg++; end
        default: begin operate = 0; b_val = int'($signed(mout)); end
      endcase
      if (!operate) r_val = b_val;
      else case (fn)
        0: r_val = a_val + b_val;
        1: r_val = a_val - b_val;
        2: r_val = b_val >>> 1;
        default: r_val = int'($signed(a & word_t'(b_val)));
      endcase
      exp = word_t'(r_val);
      ld_rz = 1'($urandom); ld_rn = 1'($urandom);
      begin
        logic old_n, old_z, ln, lz;
        old_n = n; old_z = z; ln = ld_rn; lz = ld_rz;
        #1 chk("alu_out", alu_out, exp);
        @(negedge clk);
        chk("N", word_t'(n), word_t'(ln ? exp[15] : old_n));
        chk("Z", word_t'(z), word_t'(lz ? (exp == 0) : old_z));
      end
    end
    // RA holds with ld_ra = 0: operate ADD with b = 0 (immediate 0)
    ld_ra = 1; rx = 16'h1234; @(negedge clk);
    ld_ra = 0; rx = 16'hffff; @(negedge clk);
    operate = 1; ir = '0; #1 chk("RA hold", alu_out, 16'h1234);
    if (n_imm_neg == 0) begin failures++; $display("FAIL no negative immediate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
