// fpu_pkg: types, constants and small helper functions shared by the units
// of the fixed-latency floating point execution stage.
//
// Operands travel as 64-bit words. A double occupies the whole word; a
// single occupies bits [31:0]; an integer occupies bits [31:0]. Inside the
// units an IEEE number is held "unpacked": sign, an unbiased signed exponent
// and a 53-bit significand whose leading one sits at bit 52, so that
// value = (-1)^sign * sig * 2^(exp-52). Subnormal inputs are normalised on
// unpacking (their exponent then lies below the format's minimum); the shared
// rounder denormalises again on the way out. The latencies and throughputs
// are the ones of the specification table of the execution stage; the op
// encoding, the flag order and the canonical NaN are this design's choices.
package fpu_pkg;

  // Latency (cycles from issue to result) and issue interval of each unit.
  localparam int unsigned LAT_FADD  = 3;
  localparam int unsigned LAT_FMUL  = 4;
  localparam int unsigned LAT_FDIV  = 21;
  localparam int unsigned THR_FDIV  = 18;
  localparam int unsigned LAT_FCMP  = 1;
  localparam int unsigned LAT_FCVT  = 2;
  localparam int unsigned LAT_IMUL  = 2;
  localparam int unsigned LAT_IDIV  = 12;
  localparam int unsigned THR_IDIV  = 10;

  localparam int EXP_W = 14;             // signed unbiased exponent width

  typedef enum logic [0:0] {FMT_D = 1'b0, FMT_S = 1'b1} fmt_e;

  // IEEE 754 rounding directions
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // nearest, ties to even
    RM_RTZ = 2'd1,   // toward zero
    RM_RUP = 2'd2,   // toward +infinity
    RM_RDN = 2'd3    // toward -infinity
  } rm_e;

  // Exception flags
  typedef struct packed {
    logic nv;   // invalid operation
    logic dz;   // divide by zero
    logic of;   // overflow
    logic uf;   // underflow
    logic nx;   // inexact
  } fflags_t;

  // Compare predicates
  typedef enum logic [2:0] {
    CMP_EQ = 3'd0, CMP_NE = 3'd1, CMP_LT = 3'd2,
    CMP_LE = 3'd3, CMP_GT = 3'd4, CMP_GE = 3'd5
  } cmp_e;

  // Conversions: source format -> destination format
  typedef enum logic [2:0] {
    CVT_I2D = 3'd0, CVT_I2S = 3'd1, CVT_D2I = 3'd2,
    CVT_S2I = 3'd3, CVT_S2D = 3'd4, CVT_D2S = 3'd5
  } cvt_e;

  // Operations accepted by the execution stage
  typedef enum logic [4:0] {
    OP_FADD  = 5'd0,  OP_FSUB  = 5'd1,  OP_FMUL  = 5'd2,  OP_FDIV  = 5'd3,
    OP_FEQ   = 5'd4,  OP_FNE   = 5'd5,  OP_FLT   = 5'd6,  OP_FLE   = 5'd7,
    OP_FGT   = 5'd8,  OP_FGE   = 5'd9,
    OP_CVTI2D = 5'd10, OP_CVTI2S = 5'd11, OP_CVTD2I = 5'd12,
    OP_CVTS2I = 5'd13, OP_CVTS2D = 5'd14, OP_CVTD2S = 5'd15,
    OP_MULT  = 5'd16, OP_MULTU = 5'd17, OP_DIV   = 5'd18, OP_DIVU  = 5'd19
  } fpu_op_e;

  typedef struct packed {
    logic                     sign;
    logic signed [EXP_W-1:0]  exp;
    logic [52:0]              sig;    // leading one at bit 52 unless zero
    logic                     zero;
    logic                     inf;
    logic                     nan;
    logic                     snan;
  } fp_unpacked_t;

  localparam logic [63:0] QNAN_D = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] QNAN_S = 64'h0000_0000_7FC0_0000;

  // Number of leading zeros of a 53-bit value (53 when zero).
  function automatic logic [5:0] lzc53(input logic [52:0] v);
    logic [5:0] n;
    n = 6'd53;
    for (int i = 0; i < 53; i++) if (v[i]) n = 6'(52 - i);
    return n;
  endfunction

  // Number of leading zeros of a 64-bit value (64 when zero).
  function automatic logic [6:0] lzc64(input logic [63:0] v);
    logic [6:0] n;
    n = 7'd64;
    for (int i = 0; i < 64; i++) if (v[i]) n = 7'(63 - i);
    return n;
  endfunction

  // Split a packed double or single into the unpacked form.
  function automatic fp_unpacked_t unpack(input logic [63:0] w, input fmt_e fmt);
    fp_unpacked_t u;
    logic [52:0]  frac;
    logic         expz, expo;
    logic [5:0]   lz;
    logic signed [EXP_W-1:0] e;
    if (fmt == FMT_D) begin
      u.sign = w[63];
      frac   = {1'b0, w[51:0]};
      expz   = (w[62:52] == 11'h000);
      expo   = (w[62:52] == 11'h7FF);
      e      = expz ? EXP_W'(-1022) : EXP_W'(signed'({3'b000, w[62:52]})) - EXP_W'(1023);
    end else begin
      u.sign = w[31];
      frac   = {1'b0, w[22:0], 29'b0};
      expz   = (w[30:23] == 8'h00);
      expo   = (w[30:23] == 8'hFF);
      e      = expz ? EXP_W'(-126) : EXP_W'(signed'({6'b0, w[30:23]})) - EXP_W'(127);
    end
    u.zero = expz && (frac == '0);
    u.inf  = expo && (frac == '0);
    u.nan  = expo && (frac != '0);
    u.snan = u.nan && !frac[51];
    if (expz) begin
      lz    = lzc53(frac);
      u.sig = frac << lz;
      u.exp = e - EXP_W'(signed'({1'b0, lz}));
    end else begin
      u.sig = {1'b1, frac[51:0]};
      u.exp = e;
    end
    if (u.zero) u.exp = EXP_W'(-4000);
    return u;
  endfunction

  function automatic logic [63:0] qnan(input fmt_e fmt);
    return (fmt == FMT_D) ? QNAN_D : QNAN_S;
  endfunction

  function automatic logic [63:0] pack_inf(input logic s, input fmt_e fmt);
    return (fmt == FMT_D) ? {s, 11'h7FF, 52'h0} : {32'h0, s, 8'hFF, 23'h0};
  endfunction

  function automatic logic [63:0] pack_zero(input logic s, input fmt_e fmt);
    return (fmt == FMT_D) ? {s, 63'h0} : {32'h0, s, 31'h0};
  endfunction

endpackage
