// ralu_pkg: control encodings shared by the reversible ALU blocks and their testbenches.
//
// ralu_op_e is the RALU control word {Cpn, AS, Ctl2, Ctl1}. The eleven named codes are the
// operations the design is specified for; the other five codes are legal inputs too (the circuit
// is a fixed gate cascade) but have no name. Ctl2/Ctl1 pick one of the four generated functions
// (00 AND, 01 OR, 10 SUM, 11 XOR); AS inverts Y (and turns the sum into a difference when the
// carry-in is 1); Cpn inverts the AND and OR functions.
//
// vs_op_e is the control word {Cres, Csns, Cnop, AS, Ccarry} of the smaller RALU variant that
// offers modular arithmetic, XOR and no-op (ralu_vs_bit / ralu_vs_nbit).
package ralu_pkg;

  typedef enum logic [3:0] {
    OP_AND   = 4'b0000,
    OP_OR    = 4'b0001,
    OP_ADD   = 4'b0010,
    OP_XOR   = 4'b0011,
    OP_NAND  = 4'b1000,
    OP_NOR   = 4'b1001,
    OP_XNY   = 4'b0100,  // X and not Y
    OP_YIMPX = 4'b0101,  // Y -> X, i.e. X or not Y
    OP_XIMPY = 4'b1100,  // X -> Y, i.e. not X or Y
    OP_SUB   = 4'b0110,  // X - Y, needs carry-in 1
    OP_XNOR  = 4'b0111
  } ralu_op_e;

  typedef struct packed {
    logic cpn;
    logic as_sub;
    logic ctl2;
    logic ctl1;
  } ralu_ctrl_t;

  typedef enum logic [4:0] {
    VS_ADD   = 5'b10000,  // Y + X
    VS_SUB   = 5'b11010,  // Y - X
    VS_NSUB  = 5'b10011,  // X - Y
    VS_XOR   = 5'b00000,  // Y ^ X
    VS_NOP   = 5'b00100,  // Y
    VS_NOTY  = 5'b00110,  // ~Y
    VS_XNX   = 5'b00010,  // Y ^ ~X
    VS_ADD1  = 5'b10001,  // Y + X + 1
    VS_SUB1  = 5'b10010   // X - Y - 1
  } vs_op_e;

  typedef struct packed {
    logic cres;
    logic csns;
    logic cnop;
    logic as_sub;
    logic ccarry;
  } vs_ctrl_t;

endpackage
