// mr_control: the MR control unit, a Moore state machine.
//
// Six states: FETCH, DECO(de), LOAD, STORE, ARIT and BRANCH. The next state
// depends on the current state, the opcode IR15-14 and the Cond bit from the
// branch evaluation circuit:
//   FETCH  -> DECO
//   DECO   -> LOAD (00x), STORE (01x), ARIT (11x), BRANCH (101), FETCH (100)
//   LOAD   -> FETCH     STORE -> FETCH
//   ARIT   -> DECO      BRANCH -> DECO
// ARIT and BRANCH also fetch the next instruction (Ld_IR, Ld_PC), so they
// return straight to DECO. The outputs depend on the state only:
//   state   RA IR PC R@ RZ RN WRt R/W PC/@ CRs OPERATE
//   FETCH    0  1  1  0  0  0  0   0   0    -    -
//   DECO     1  0  0  1  0  0  0   0   -    1    -
//   ARIT     0  1  1  0  1  1  1   0   0    2    1
//   LOAD     0  0  0  0  1  1  1   0   1    -    0
//   STORE    0  0  0  0  0  0  0   1   1    0    -
//   BRANCH   0  1  1  0  0  0  0   0   1    -    -
// The transitions and the table are the published ones. Where the table
// leaves a signal free ("-"), this design drives 0. The state encoding and
// the synchronous, active-high reset into FETCH are design choices.
// Timing: ALU instructions and branches take 2 cycles, LOAD and STORE 3
// (DECO, LOAD/STORE, FETCH).
module mr_control
  import mr_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,
  input  logic    cond,
  output ctrl_t   ctrl,
  output state_e  state
);

  state_e next;

  always_comb begin
    next = state;
    unique case (state)
      ST_FETCH: next = ST_DECO;
      ST_DECO: begin
        unique case (opcode)
          OC_LOAD:   next = ST_LOAD;
          OC_STORE:  next = ST_STORE;
          OC_ARIT:   next = ST_ARIT;
          OC_BRANCH: next = cond ? ST_BRANCH : ST_FETCH;
        endcase
      end
      ST_LOAD:   next = ST_FETCH;
      ST_STORE:  next = ST_FETCH;
      ST_ARIT:   next = ST_DECO;
      ST_BRANCH: next = ST_DECO;
      default:   next = ST_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_FETCH;
    else     state <= next;
  end

  always_comb begin
    ctrl = '{default: '0, crs: CRS_RT};
    unique case (state)
      ST_FETCH: begin
        ctrl.ld_ir = 1'b1;
        ctrl.ld_pc = 1'b1;
      end
      ST_DECO: begin
        ctrl.ld_ra   = 1'b1;
        ctrl.ld_radr = 1'b1;
        ctrl.crs     = CRS_RS1;
      end
      ST_ARIT: begin
        ctrl.ld_ir   = 1'b1;
        ctrl.ld_pc   = 1'b1;
        ctrl.ld_rz   = 1'b1;
        ctrl.ld_rn   = 1'b1;
        ctrl.wrt     = 1'b1;
        ctrl.crs     = CRS_RS2;
        ctrl.operate = 1'b1;
      end
      ST_LOAD: begin
        ctrl.ld_rz  = 1'b1;
        ctrl.ld_rn  = 1'b1;
        ctrl.wrt    = 1'b1;
        ctrl.pc_adr = 1'b1;
      end
      ST_STORE: begin
        ctrl.rw     = 1'b1;
        ctrl.pc_adr = 1'b1;
        ctrl.crs    = CRS_RT;
      end
      ST_BRANCH: begin
        ctrl.ld_ir  = 1'b1;
        ctrl.ld_pc  = 1'b1;
        ctrl.pc_adr = 1'b1;
      end
      default: ;
    endcase
  end

  // Only the six defined states are ever reached.
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {ST_FETCH, ST_DECO, ST_LOAD, ST_STORE, ST_ARIT, ST_BRANCH});

endmodule
