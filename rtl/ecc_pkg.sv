// ecc_pkg: types and constants shared by the dual-field ECC processor.
//
// It holds the field selector, the arithmetic-unit operation codes, the
// control word passed from the U,V data-path to the R,S data-paths, the
// register-file map used by the EC controller and the host command codes.
// The operation set (MA, MS, multiplication, division, each in integer,
// Montgomery or random domain) follows the arithmetic unit of the design;
// the numeric encodings and the register map are choices of this RTL.
package ecc_pkg;

  // Default maximum field size (bits). Fields of any size m <= N_MAX are run.
  localparam int unsigned N_MAX = 521;

  typedef enum logic {
    FIELD_P = 1'b0,   // GF(p), p an odd prime
    FIELD_B = 1'b1    // GF(2^m), p an irreducible polynomial of degree m
  } field_e;

  typedef enum logic [1:0] {
    GF_ADD = 2'd0,    // MA  : X + Y mod p
    GF_SUB = 2'd1,    // MS  : X - Y mod p
    GF_MUL = 2'd2,    // URM : X * Y * 2^-lambda mod p
    GF_DIV = 2'd3     // URD : X / Y * 2^lambda  mod p
  } gf_op_e;

  // Decision of one binary-GCD step, passed from the U,V data-path
  // to the R,S data-paths one cycle later.
  typedef enum logic [1:0] {
    UV_U_EVEN = 2'd0, // U = U/2
    UV_V_EVEN = 2'd1, // V = V/2
    UV_U_GT   = 2'd2, // U = (U-V)/2
    UV_V_GE   = 2'd3  // V = (V-U)/2
  } uv_ctrl_e;

  // Register-file map (16 entries). 14 and 15 read as constants.
  typedef enum logic [3:0] {
    RF_PX = 4'd0,  RF_PY = 4'd1,  RF_QX = 4'd2,  RF_QY = 4'd3,
    RF_A  = 4'd4,  RF_T1 = 4'd5,  RF_T2 = 4'd6,  RF_L  = 4'd7,
    RF_RX = 4'd8,  RF_RY = 4'd9,  RF_G0 = 4'd10, RF_G1 = 4'd11,
    RF_G2 = 4'd12, RF_G3 = 4'd13, RF_ZERO = 4'd14, RF_ONE = 4'd15
  } rf_addr_e;

  // Host commands.
  typedef enum logic [3:0] {
    CMD_NOP   = 4'd0,
    CMD_FF    = 4'd1,  // one field operation on the register file
    CMD_PRE   = 4'd2,  // P and a into the working domain
    CMD_POST  = 4'd3,  // Q back to the integer domain
    CMD_ECDBL = 4'd4,  // Q = 2Q
    CMD_ECADD = 4'd5,  // Q = Q + P
    CMD_ECSUB = 4'd6,  // Q = Q - P
    CMD_ECSM  = 4'd7   // Q = [k]P, integer domain in and out
  } cmd_e;

  // Domain selector of a single field operation issued by the host.
  typedef enum logic [1:0] {
    DOM_INT  = 2'd0,   // r = 0      : MM / MD
    DOM_MONT = 2'd1,   // r = 1..1   : MMM / MMD
    DOM_RAND = 2'd2    // r = current random mask : RM / RD
  } dom_e;

  // One micro-operation of the EC controller.
  typedef struct packed {
    logic     valid;
    gf_op_e   op;
    rf_addr_e dst;
    rf_addr_e src_a;
    rf_addr_e src_b;
  } uop_t;

endpackage
