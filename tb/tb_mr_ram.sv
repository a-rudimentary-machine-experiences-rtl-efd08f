// tb_mr_ram: self-checking test of the 256 x 16 memory.
// Fills every word through the write port, checks the combinational read of
// every word, then mixes random writes and reads against a model array and
// checks that a cycle with rw = 0 writes nothing.
module tb_mr_ram;
  logic        clk = 0;
  logic [7:0]  addr;
  logic [15:0] din, dout;
  logic        rw;
  logic [15:0] model [256];
  int          checks = 0, failures = 0;

  mr_ram dut (.clk(clk), .addr(addr), .din(din), .rw(rw), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] a);
    addr = a; rw = 0; #1;
    checks++;
    if (dout !== model[a]) begin
      failures++;
      $display("FAIL addr=%h dout=%h exp=%h", a, dout, model[a]);
    end
  endtask

  initial begin
    rw = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); din = 16'(i * 37 + 5); rw = 1; model[i] = din;
      @(negedge clk);
    end
    rw = 0;
    for (int i = 0; i < 256; i++) chk(8'(i));
    // rw = 0 with new din must not write
    addr = 8'h42; din = 16'hdead; rw = 0;
    @(negedge clk);
    chk(8'h42);
    repeat (3000) begin
      addr = 8'($urandom); din = 16'($urandom); rw = 1'($urandom);
      if (rw) model[addr] = din;
      @(negedge clk);
      rw = 0;
      chk(8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
