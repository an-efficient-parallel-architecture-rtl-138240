// rl_tb_pkg: helpers shared by the testbenches to build LE configurations.
package rl_tb_pkg;
  import rl_pkg::*;

  function automatic le_cfg_t le_op(rsel_e s0, rsel_e s1, osel_e p0, osel_e p1,
                                    alu_op_e op = ALU_ADD,
                                    sh_op_e h0 = SH_NONE, int a0 = 0,
                                    sh_op_e h1 = SH_NONE, int a1 = 0);
    le_cfg_t c;
    c.alu_op = op; c.sh0_op = h0; c.sh0_amt = 5'(a0); c.sh1_op = h1; c.sh1_amt = 5'(a1);
    c.r0_sel = s0; c.r1_sel = s1; c.o0_sel = p0; c.o1_sel = p1;
    return c;
  endfunction

  // LE index of row r in column c
  function automatic int le_idx(int c, int r);
    return c*ROWS + r;
  endfunction

  // Array configuration of the streaming 4-tap multiply/add tree: column 0
  // multiplies scheduler pairs (h, x), column 1 rows 0 and 2 add pairs of
  // products, column 2 row 0 adds the two partial sums, column 3 row 0 loads the sum into R1
  // and accumulates R0 <= R0 + R1; its out0 shows the sum (R1) and out1 the
  // running total (R0).
  function automatic array_cfg_t fir4_cfg(bit accumulate);
    array_cfg_t a;
    a = '0;
    for (int r = 0; r < ROWS; r++) begin
      a.le[le_idx(0, r)] = le_op(RS_XIN, RS_XIN, OS_MUL, OS_R0);
      a.rt[0][2*r]   = SRC_SCHED + src_t'(2*r);
      a.rt[0][2*r+1] = SRC_SCHED + src_t'(2*r+1);
    end
    a.le[le_idx(1, 0)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R0);
    a.le[le_idx(1, 2)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R0);
    a.rt[1][0] = SRC_PREV + 0; a.rt[1][1] = SRC_PREV + 2;
    a.rt[1][4] = SRC_PREV + 4; a.rt[1][5] = SRC_PREV + 6;
    a.le[le_idx(2, 0)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R0);
    a.rt[2][0] = SRC_PREV + 0; a.rt[2][1] = SRC_PREV + 4;
    a.le[le_idx(3, 0)] = le_op(accumulate ? RS_ALU : RS_HOLD, RS_XIN, OS_R1, OS_R0);
    a.rt[3][1] = SRC_PREV + 0;
    return a;
  endfunction
endpackage
