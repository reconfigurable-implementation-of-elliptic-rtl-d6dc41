// ecc_pkg: shared constants and types of the GF(2^191) elliptic curve coprocessor.
//
// Field: GF(2^n) in polynomial basis, n = 191, reduction polynomial
// f(x) = x^191 + x^9 + 1 (the field and polynomial of the reference design).
// Curve: y^2 + xy = x^3 + a2*x^2 + a6 (only a2 is needed by the datapath).
//
// Control between the controller units and the datapath is expressed as
// "transfers": in one clock one value moves over the single operand bus
// from a source (operand memory, register, constant one or an arithmetic
// unit's output register) to a destination (operand memory, register or an
// arithmetic unit's operand register). Loading the B operand of a
// multiplier or adder, or the operand of a squarer, starts that unit. A
// transfer whose source or destination unit is still busy is held until the
// unit is free; this interlock is a choice of this implementation, the
// schedules themselves are fixed orders of transfers.
package ecc_pkg;

  localparam int unsigned FIELD_N = 191;
  // low part of f(x): x^9 + 1
  localparam logic [FIELD_N-1:0] FIELD_POLY = FIELD_N'(1) | (FIELD_N'(1) << 9);

  localparam int unsigned RAM_DEPTH = 32;

  // operand memory map (word addresses)
  localparam logic [4:0] A_PX  = 5'd0;   // affine x of the base point P
  localparam logic [4:0] A_PY  = 5'd1;   // affine y of P
  localparam logic [4:0] A_CA  = 5'd2;   // curve coefficient a2
  localparam logic [4:0] A_X   = 5'd3;   // Jacobian accumulator X
  localparam logic [4:0] A_Y   = 5'd4;   // Jacobian accumulator Y
  localparam logic [4:0] A_Z   = 5'd5;   // Jacobian accumulator Z
  localparam logic [4:0] A_XR  = 5'd6;   // affine x of the result mP
  localparam logic [4:0] A_YR  = 5'd7;   // affine y of the result mP
  localparam logic [4:0] A_T0  = 5'd8;   // scratch words 8..15
  localparam logic [4:0] A_T1  = 5'd9;
  localparam logic [4:0] A_T2  = 5'd10;
  localparam logic [4:0] A_T3  = 5'd11;
  localparam logic [4:0] A_T4  = 5'd12;
  localparam logic [4:0] A_T5  = 5'd13;

  localparam int unsigned NUM_MUL = 4;
  localparam int unsigned NUM_SQR = 2;
  localparam int unsigned NUM_ADD = 2;

  typedef enum logic [2:0] {
    S_RAM = 3'd0,   // operand memory word, address in sa
    S_REG = 3'd1,   // the register
    S_MUL = 3'd2,   // multiplier output, unit in sa
    S_SQR = 3'd3,   // squarer output, unit in sa
    S_ADD = 3'd4,   // adder output, unit in sa
    S_ONE = 3'd5    // the field element 1
  } src_e;

  typedef enum logic [2:0] {
    D_RAM  = 3'd0,  // operand memory word, address in da
    D_REG  = 3'd1,  // the register
    D_MULA = 3'd2,  // multiplier operand A, unit in da
    D_MULB = 3'd3,  // multiplier operand B, starts the multiplication
    D_SQR  = 3'd4,  // squarer operand, starts the squaring
    D_ADDA = 3'd5,  // adder operand A
    D_ADDB = 3'd6   // adder operand B, starts the addition
  } dst_e;

  typedef struct packed {
    src_e       src;
    logic [4:0] sa;
    dst_e       dst;
    logic [4:0] da;
  } xfer_t;

  function automatic xfer_t mv(src_e s, logic [4:0] sa, dst_e d, logic [4:0] da);
    xfer_t x;
    x.src = s;
    x.sa  = sa;
    x.dst = d;
    x.da  = da;
    return x;
  endfunction
endpackage
