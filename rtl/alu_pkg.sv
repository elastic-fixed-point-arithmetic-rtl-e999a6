// alu_pkg: function-select codes of the real/complex ALU.
//
// The 5-bit select S[4:0] and the R/C bit choose the operation:
//   S4=0, S3=1             : A*B (real multiplication)
//   S4=0, S3=0, R/C=0      : S2..S0 pick one of seven real add/sub forms
//   S4=0, S3=0, R/C=1      : S1..S0 pick complex add, subtract, conjugate
//   S4=1                   : S2..S0 pick one of eight logic operations
// The codes follow the published function table; the meaning given to the
// two codes it leaves undefined is this design's choice.
package alu_pkg;

  typedef enum logic [2:0] {
    R_ADD     = 3'b000,  // A+B
    R_SUB     = 3'b001,  // A-B
    R_DEC     = 3'b010,  // A-1
    R_INC     = 3'b011,  // A+1
    R_SUB_BRW = 3'b100,  // A-B-1
    R_ADD_CRY = 3'b101,  // A+B+1
    R_DOUBLE  = 3'b110,  // 2A
    R_UNUSED  = 3'b111   // not defined; behaves as A+1
  } real_op_e;

  typedef enum logic [1:0] {
    C_ADD    = 2'b00,  // X+Y per part
    C_SUB    = 2'b01,  // X-Y per part
    C_CONJ   = 2'b10,  // conjugate of Y
    C_UNUSED = 2'b11   // not defined; X+Y+1 per part
  } cplx_op_e;

  typedef enum logic [2:0] {
    L_AND  = 3'b000,
    L_OR   = 3'b001,
    L_NAND = 3'b010,
    L_NOR  = 3'b011,
    L_XOR  = 3'b100,
    L_XNOR = 3'b101,
    L_NOT  = 3'b110,  // NOT A
    L_BUF  = 3'b111   // A
  } logic_op_e;

endpackage
