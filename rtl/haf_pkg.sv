// haf_pkg: types and constants shared by the HaF-256 core.
//
// HaF-256 works on a 256-bit chaining value split into sixteen n-bit
// working variables A0..A15 (n = 16), two rounds of sixteen steps per
// message block. The word size, the number of words, steps and rounds and
// the 7-bit rotation of A10 inside a step are those of the algorithm. The
// algorithm's tables and constants (the masking constant c, the polynomials
// alpha0/2/3/5, the reduction polynomial R(x), the four S-boxes and the
// initial value IV) are not published with the structure this core follows,
// so the values below are placeholders of this design: any other values can
// be dropped in here without touching the datapath.
//
// The package also holds the fault model used by the concurrent error
// detection: a 16-bit error vector applied to one operand of one basic
// operation as a bit flip, a stuck-at-1 or a stuck-at-0.
package haf_pkg;

  // ---------------- sizes of the algorithm ----------------
  localparam int unsigned HAF_N      = 16;           // bits per working variable
  localparam int unsigned HAF_WORDS  = 16;           // working variables A0..A15
  localparam int unsigned HAF_STEPS  = 16;           // steps per round
  localparam int unsigned HAF_ROUNDS = 2;            // rounds per block
  localparam int unsigned HAF_BITS   = HAF_N * HAF_WORDS;  // 256
  localparam int unsigned HAF_ROT10  = 7;            // A10 <<< 7 in every step

  // ---------------- placeholder constants (own choice) ----------------
  localparam logic [15:0] HAF_C      = 16'hB7E1;     // masking constant c
  localparam logic [15:0] HAF_ALPHA0 = 16'h0002;     // x
  localparam logic [15:0] HAF_ALPHA2 = 16'h0003;     // x + 1
  localparam logic [15:0] HAF_ALPHA3 = 16'h0005;     // x^2 + 1
  localparam logic [15:0] HAF_ALPHA5 = 16'h0007;     // x^2 + x + 1
  localparam logic [16:0] HAF_RPOLY  = 17'h1100B;    // x^16+x^12+x^3+x+1
  localparam logic [255:0] HAF_IV    =
    256'h0123456789ABCDEF_FEDCBA9876543210_F0E1D2C3B4A59687_78695A4B3C2D1E0F;

  // Four 4-bit S-boxes, entry x of box k is nibble x counted from the left.
  localparam logic [3:0][63:0] HAF_SBOX = {
    64'h0F74E2D1A6CB9538,    // S3
    64'hE4D12FB83A6C5907,    // S2
    64'h4A92D80E6B1C7F53,    // S1
    64'hC56B90AD3EF84712     // S0
  };

  function automatic logic [3:0] haf_sbox4(input int unsigned box, input logic [3:0] x);
    logic [63:0] t;
    t = HAF_SBOX[box];
    return t[63 - 4*x -: 4];
  endfunction

  // ---------------- basic operations ----------------
  typedef enum logic [1:0] {
    OP_ADD    = 2'd0,   // addition mod 2^n
    OP_XOR    = 2'd1,   // addition mod 2
    OP_MULMOD = 2'd2,   // multiplication mod 2^n + 1
    OP_GFMUL  = 2'd3    // polynomial multiplication mod R(x)
  } haf_op_e;

  // The sixteen basic operations of one step, in data-flow order.
  typedef enum logic [3:0] {
    S_M0  = 4'd0,   // alpha0 (x) A0
    S_M2  = 4'd1,   // alpha2 (x) A2
    S_M3  = 4'd2,   // alpha3 (x) A3
    S_M5  = 4'd3,   // alpha5 (x) A5
    S_X02 = 4'd4,   // (alpha0 A0) xor (alpha2 A2)
    S_X3  = 4'd5,   // ... xor (alpha3 A3)
    S_X5  = 4'd6,   // ... xor (alpha5 A5) = X
    S_A16 = 4'd7,   // A1 + A6
    S_X57 = 4'd8,   // A5 xor A7
    S_MUL = 4'd9,   // (A1 + A6) . (A5 xor A7)
    S_X8  = 4'd10,  // ... xor A8 = Y
    S_A9B = 4'd11,  // A9 + A11
    S_A14 = 4'd12,  // ... + A14
    S_XC  = 4'd13,  // ... xor (c <<< j)
    S_AS  = 4'd14,  // S_j(...) + Y
    S_XF  = 4'd15   // ... xor X = new A15
  } haf_stepop_e;
  localparam int unsigned HAF_NOPS = 16;

  // ---------------- fault model ----------------
  typedef enum logic [1:0] {
    FI_FLIP = 2'd0,     // xe = x xor e
    FI_SA1  = 2'd1,     // xe = x or e
    FI_SA0  = 2'd2      // xe = x and not e
  } fi_mode_e;

  typedef struct packed {
    logic        en;        // inject while high
    haf_stepop_e op;        // which basic operation of the step
    logic        operand;   // 0: first operand, 1: second operand
    fi_mode_e    mode;
    logic [15:0] vec;       // error vector E
  } fault_t;

endpackage
