// tb_mr_control: self-checking test of the MR control unit.
// Drives random opcodes and Cond values, predicts the next state from the
// state diagram and checks, every cycle, the state and all eleven outputs
// against the output table (outputs the table leaves free are not checked).
// Every state and every transition out of DECO must occur.
module tb_mr_control;
  import mr_pkg::*;

  logic    clk = 0, rst = 1;
  opcode_e opcode;
  logic    cond;
  ctrl_t   ctrl;
  state_e  state;
  int      checks = 0, failures = 0;
  int      seen [6];

  mr_control dut (.clk(clk), .rst(rst), .opcode(opcode), .cond(cond), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output table: RA IR PC R@ RZ RN WRt RW PC/@ CRs OPERATE; -1 = don't care.
  function automatic void row(int s, output int v [11]);
    case (s)
      0: v = '{0, 1, 1, 0, 0, 0, 0, 0,  0, -1, -1};   // FETCH
      1: v = '{1, 0, 0, 1, 0, 0, 0, 0, -1,  1, -1};   // DECO
      2: v = '{0, 0, 0, 0, 1, 1, 1, 0,  1, -1,  0};   // LOAD
      3: v = '{0, 0, 0, 0, 0, 0, 0, 1,  1,  0, -1};   // STORE
      4: v = '{0, 1, 1, 0, 1, 1, 1, 0,  0,  2,  1};   // ARIT
      default: v = '{0, 1, 1, 0, 0, 0, 0, 0, 1, -1, -1}; // BRANCH
    endcase
  endfunction

  task automatic chk_outputs(int s);
    int v [11];
    int got [11];
    row(s, v);
    got = '{int'(ctrl.ld_ra), int'(ctrl.ld_ir), int'(ctrl.ld_pc), int'(ctrl.ld_radr),
            int'(ctrl.ld_rz), int'(ctrl.ld_rn), int'(ctrl.wrt), int'(ctrl.rw),
            int'(ctrl.pc_adr), int'(ctrl.crs), int'(ctrl.operate)};
    for (int i = 0; i < 11; i++) if (v[i] >= 0) begin
      checks++;
      if (got[i] != v[i]) begin
        failures++;
        $display("FAIL state %0d output %0d = %0d exp %0d", s, i, got[i], v[i]);
      end
    end
  endtask

  initial begin
    // model state numbering: 0 F, 1 D, 2 L, 3 S, 4 A, 5 B
    int m = 0, nx;
    int deco_out [5];
    state_e names [6] = '{ST_FETCH, ST_DECO, ST_LOAD, ST_STORE, ST_ARIT, ST_BRANCH};
    opcode = OC_LOAD; cond = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 4000; k++) begin
      opcode = opcode_e'($urandom_range(0, 3)); cond = 1'($urandom);
      #1;
      checks++;
      if (state !== names[m]) begin
        failures++;
        $display("FAIL state %0d exp %0d", state, m);
      end
      seen[m]++;
      chk_outputs(m);
      case (m)
        0: nx = 1;
        1: case ({opcode, cond})
             3'b000, 3'b001: nx = 2;
             3'b010, 3'b011: nx = 3;
             3'b110, 3'b111: nx = 4;
             3'b101: nx = 5;
             default: nx = 0;
           endcase
        2, 3: nx = 0;
        default: nx = 1;
      endcase
      if (m == 1) deco_out[nx == 0 ? 0 : nx - 1]++;
      @(negedge clk);
      m = nx;
    end
    // synchronous reset returns to FETCH
    rst = 1; @(negedge clk); rst = 0; #1;
    checks++; if (state !== ST_FETCH) failures++;
    foreach (seen[i]) if (seen[i] == 0) begin failures++; $display("FAIL state %0d never seen", i); end
    foreach (deco_out[i]) if (deco_out[i] == 0) begin failures++; $display("FAIL DECO exit %0d never taken", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
