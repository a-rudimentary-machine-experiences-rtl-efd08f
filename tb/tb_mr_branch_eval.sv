// tb_mr_branch_eval: exhaustive test of the MR branch evaluation circuit.
// Every condition code against every N, Z pair, compared with the
// instruction-set table: BR always, BEQ Z, BL N, BLE N|Z, BNE !Z, BGE !N,
// BG !(N|Z); code 100 is never taken.
module tb_mr_branch_eval;
  import mr_pkg::*;

  logic       clk = 0;
  logic [2:0] cond;
  logic       n, z, take;
  int         checks = 0, failures = 0;

  mr_branch_eval dut (.cond(cond), .n(n), .z(z), .take(take));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int c = 0; c < 8; c++) for (int f = 0; f < 4; f++) begin
      cond = 3'(c); n = f[1]; z = f[0];
      #1;
      case (c)
        0: exp = 1;               // BR
        1: exp = z;               // BEQ
        2: exp = n;               // BL
        3: exp = n || z;          // BLE
        4: exp = 0;               // unused
        5: exp = !z;              // BNE
        6: exp = !n;              // BGE
        default: exp = !(n || z); // BG
      endcase
      checks++;
      if (take !== exp) begin
        failures++;
        $display("FAIL cond=%0d n=%0d z=%0d take=%0d exp=%0d", c, n, z, take, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
