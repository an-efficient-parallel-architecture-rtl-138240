// rl_pkg: shared widths, encodings and configuration records of the
// register-in-logic DSP array.
//
// The array has no register file. Each logic element (LE) keeps two 32-bit
// registers, R0 and R1, next to its ALU, optional multiplier and two shifters.
// Sixteen LEs in four columns of four give the 32 working registers of the
// system. Every cycle the whole array is driven by one configuration: what each
// LE loads into R0/R1, what it puts on its two outputs, and which source each
// column router steers onto the LE inputs. The sizes (32 bits, 2 registers per
// LE, 16 LEs) follow the architecture description. The encodings, the memory
// sizes and the program word layout are choices of this implementation.
package rl_pkg;

  localparam int XLEN    = 32;          // data word width
  localparam int ROWS    = 4;           // LEs per column
  localparam int COLS    = 4;           // columns (one router each)
  localparam int NLE     = ROWS * COLS; // 16 logic elements, 32 registers
  localparam int NOUT    = 2 * NLE;     // LE output ports in the array
  localparam int NRD     = 8;           // data scheduler read ports
  localparam int NWR     = 4;           // data scheduler write ports
  localparam int DADDR_W = 10;          // data memory address width
  localparam int PADDR_W = 6;           // program buffer address width
  localparam int ITER_W  = 10;          // repeat / iteration counter width
  localparam int SRC_W   = 5;           // router source select width

  typedef logic [XLEN-1:0] word_t;

  // ALU operations, operand A = R0, operand B = R1.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,   // R0 + R1
    ALU_SUB  = 3'd1,   // R0 - R1
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_MIN  = 3'd5,   // signed minimum
    ALU_MAX  = 3'd6,   // signed maximum
    ALU_RSUB = 3'd7    // R1 - R0
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_NONE = 2'd0,
    SH_SLL  = 2'd1,
    SH_SRL  = 2'd2,
    SH_SRA  = 2'd3
  } sh_op_e;

  // What a register loads at the clock edge. HOLD is zero so that an
  // all-zero configuration leaves the array unchanged.
  typedef enum logic [2:0] {
    RS_HOLD = 3'd0,
    RS_XIN  = 3'd1,    // the LE input xR0 (for R0) or xR1 (for R1)
    RS_ALU  = 3'd2,
    RS_MUL  = 3'd3,
    RS_SH0  = 3'd4,    // shifter on R0
    RS_SH1  = 3'd5     // shifter on R1
  } rsel_e;

  // What an LE output port shows.
  typedef enum logic [2:0] {
    OS_R0  = 3'd0,
    OS_R1  = 3'd1,
    OS_ALU = 3'd2,
    OS_MUL = 3'd3,
    OS_SH0 = 3'd4,
    OS_SH1 = 3'd5
  } osel_e;

  typedef struct packed {
    alu_op_e    alu_op;
    sh_op_e     sh0_op;
    logic [4:0] sh0_amt;
    sh_op_e     sh1_op;
    logic [4:0] sh1_amt;
    rsel_e      r0_sel;
    rsel_e      r1_sel;
    osel_e      o0_sel;
    osel_e      o1_sel;
  } le_cfg_t;

  // Router source index. An LE port is numbered 2*row + port.
  //   0..7   outputs of the previous column (column 0 takes the last column)
  //   8..15  outputs of the router's own column
  //   16..23 data scheduler read ports 0..7
  //   24..31 constant zero
  typedef logic [SRC_W-1:0] src_t;
  localparam src_t SRC_PREV  = 5'd0;
  localparam src_t SRC_SAME  = 5'd8;
  localparam src_t SRC_SCHED = 5'd16;
  localparam src_t SRC_ZERO  = 5'd24;

  typedef src_t [2*ROWS-1:0] rt_cfg_t;   // one select per LE input of a column

  typedef struct packed {
    le_cfg_t [NLE-1:0]  le;   // LE index = column*ROWS + row
    rt_cfg_t [COLS-1:0] rt;
  } array_cfg_t;

  // Scheduler read port: address = base + iteration*stride.
  typedef struct packed {
    logic [DADDR_W-1:0] base;
    logic signed [7:0]  stride;
  } rd_cfg_t;

  // Scheduler write port (one of NWR): LE output number src (2*LE index + port) is written
  // to base + (iteration-skip)*stride for iterations >= skip.
  typedef struct packed {
    logic               en;
    logic [4:0]         src;
    logic [DADDR_W-1:0] base;
    logic signed [7:0]  stride;
    logic [3:0]         skip;
  } wr_cfg_t;

  typedef struct packed {
    rd_cfg_t [NRD-1:0] rd;
    wr_cfg_t [NWR-1:0] wr;
  } sched_cfg_t;

  typedef struct packed {
    logic              halt;  // stop after this word's last iteration
    logic [ITER_W-1:0] rep;   // the word is issued rep+1 times
  } ctrl_t;

  typedef struct packed {
    ctrl_t      ctrl;
    sched_cfg_t sched;
    array_cfg_t arr;
  } instr_t;

  localparam int IW     = $bits(instr_t);
  localparam int NCHUNK = (IW + 31) / 32;   // 32-bit host words per program word

endpackage
