// tb_mr_alu: self-checking test of the MR ALU.
// Applies every function (OPERATE = 1, OP1-0 = 0..3) and the pass-through
// (OPERATE = 0) to directed corner values and random operands, comparing
// with results computed here from integer arithmetic.
module tb_mr_alu;
  import mr_pkg::*;

  logic    clk = 0;
  word_t   a, b, y;
  logic    operate;
  alu_fn_e fn;
  int      checks = 0, failures = 0;

  mr_alu dut (.a(a), .b(b), .operate(operate), .fn(fn), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(word_t ma, word_t mb, logic mop, int mfn);
    int sa = int'($signed(ma));
    int sb = int'($signed(mb));
    if (!mop) return mb;
    case (mfn)
      0: return word_t'(sa + sb);
      1: return word_t'(sa - sb);
      2: return word_t'(sb >>> 1);   // arithmetic on a sign-extended int
      default: return ma & mb;
    endcase
  endfunction

  task automatic apply(word_t ta, word_t tb, logic top, int tfn);
    word_t exp;
    a = ta; b = tb; operate = top; fn = alu_fn_e'(tfn[1:0]);
    #1;
    exp = model(ta, tb, top, tfn);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h op=%0d fn=%0d y=%h exp=%h", ta, tb, top, tfn, y, exp);
    end
  endtask

  initial begin
    word_t corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5a5a};
    foreach (corners[i]) foreach (corners[j]) for (int f = 0; f < 4; f++) begin
      apply(corners[i], corners[j], 1'b1, f);
      apply(corners[i], corners[j], 1'b0, f);
    end
    // explicit values
    apply(16'h0003, 16'hfffe, 1, 0);  if (y !== 16'h0001) begin failures++; end checks++;
    apply(16'h8000, 16'h0001, 1, 1);  if (y !== 16'h7fff) begin failures++; end checks++;
    apply(16'h0000, 16'h8004, 1, 2);  if (y !== 16'hc002) begin failures++; end checks++;
    apply(16'h0000, 16'h0005, 1, 2);  if (y !== 16'h0002) begin failures++; end checks++;
    repeat (2000) apply(word_t'($urandom), word_t'($urandom), 1'($urandom), int'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
