// tb_mr_regfile: self-checking test of the MR register file and SELREG.
// Random writes (register named by IR13-11, enable WRt) and reads through
// each SELREG input (IR13-11, IR10-8, IR7-5) are compared with a model.
// Checks that R0 reads 0 after writes to it, that WRt = 0 writes nothing,
// and that a read and a write to different registers work in one cycle.
module tb_mr_regfile;
  import mr_pkg::*;

  logic  clk = 0, rst = 1;
  word_t ir, wdata, rdata;
  crs_e  crs;
  logic  wrt;
  word_t model [8];
  int    checks = 0, failures = 0;

  mr_regfile dut (.clk(clk), .rst(rst), .ir(ir), .crs(crs), .wrt(wrt), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_chk(int sel, int idx);
    word_t exp;
    ir = word_t'($urandom);
    case (sel)
      0: ir[13:11] = 3'(idx);
      1: ir[10:8]  = 3'(idx);
      default: ir[7:5] = 3'(idx);
    endcase
    crs = crs_e'(sel); wrt = 0;
    #1;
    exp = (idx == 0) ? '0 : model[idx];
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read sel=%0d r%0d = %h exp %h", sel, idx, rdata, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    ir = '0; crs = CRS_RT; wrt = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) read_chk(i % 3, i);   // reset values
    for (int k = 0; k < 2000; k++) begin
      int widx = $urandom_range(0, 7);
      @(negedge clk);
      ir = word_t'($urandom); ir[13:11] = 3'(widx);
      wdata = word_t'($urandom); wrt = 1'($urandom);
      crs = CRS_RS2;
      #1;
      // same-cycle read of another register through IR7-5
      checks++;
      if (rdata !== ((ir[7:5] == 0) ? '0 : model[ir[7:5]])) begin
        failures++;
        $display("FAIL concurrent read");
      end
      if (wrt && widx != 0) model[widx] = wdata;
      @(negedge clk);
      wrt = 0;
      read_chk($urandom_range(0, 2), $urandom_range(0, 7));
      read_chk($urandom_range(0, 2), widx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
