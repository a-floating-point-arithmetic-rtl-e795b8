// fp_round: shared IEEE 754 rounding and packing (combinational).
//
// Input is an unrounded, normalised result: value = sig/2^63 * 2^exp, with
// the leading one at sig[63], plus a sticky bit for anything already
// discarded below sig[0]. The module denormalises results below the format's
// minimum exponent, picks the 53 (double) or 24 (single) kept bits, and
// applies the rounding direction rm.
//
// Rounding follows the "aggressive" pattern of the document's Fig. 2: the
// kept significand S and S+1 are formed side by side, and a small rounding
// module decides from sign, LSB, guard and sticky bits whether to carry;
// a multiplexer then selects S or S+1, so the carry never ripples through
// the slow path after the decision. A carry out of the top bit renormalises
// the result (exponent + 1). Overflow gives infinity or the largest finite
// number as the rounding direction requires. Underflow is flagged when the
// unrounded result is below the smallest normal number and inexact
// (tininess before rounding, this design's choice).
//
// Ports: sign, exp, sig, sticky, fmt, rm in; result (packed, single in bits
// [31:0]) and of/uf/nx flags out. Purely combinational.
module fp_round
  import fpu_pkg::*;
(
  input  logic                    sign,
  input  logic signed [EXP_W-1:0] exp,
  input  logic [63:0]             sig,
  input  logic                    sticky,
  input  fmt_e                    fmt,
  input  rm_e                     rm,
  output logic [63:0]             result,
  output logic                    of,
  output logic                    uf,
  output logic                    nx
);

  logic signed [EXP_W-1:0] emin, emax, exp_d, exp_r;
  logic [EXP_W-1:0]        sh;
  logic [63:0]             sig_d, lost_mask;
  logic                    st_d, tiny;
  logic [53:0]             s_keep, s_plus1, s_rnd;   // S, S+1, selected
  logic                    lsb, guard, st, inc, carry, hidden;
  logic [10:0]             bexp;

  always_comb begin
    emin = (fmt == FMT_D) ? EXP_W'(-1022) : EXP_W'(-126);
    emax = (fmt == FMT_D) ? EXP_W'(1023)  : EXP_W'(127);

    // denormalise a tiny result
    tiny = (exp < emin) && (sig != '0);
    lost_mask = '0;
    sh   = tiny ? EXP_W'(emin - exp) : '0;
    if (sh > EXP_W'(63)) begin
      sig_d = '0;
      st_d  = sticky | (sig != '0);
    end else begin
      lost_mask = ~(64'hFFFF_FFFF_FFFF_FFFF << sh[5:0]);
      sig_d = sig >> sh[5:0];
      st_d  = sticky | ((sig & lost_mask) != '0);
    end
    exp_d = tiny ? emin : exp;

    // kept bits, guard and sticky for the target precision
    if (fmt == FMT_D) begin
      s_keep = {1'b0, sig_d[63:11]};
      guard  = sig_d[10];
      st     = st_d | (sig_d[9:0] != '0);
    end else begin
      s_keep = {30'b0, sig_d[63:40]};
      guard  = sig_d[39];
      st     = st_d | (sig_d[38:0] != '0);
    end
    lsb = s_keep[0];

    // rounding module: the carry by rounding
    unique case (rm)
      RM_RNE: inc = guard & (st | lsb);
      RM_RTZ: inc = 1'b0;
      RM_RUP: inc = ~sign & (guard | st);
      RM_RDN: inc =  sign & (guard | st);
      default: inc = 1'b0;
    endcase

    // parallel S and S+1, selected by the rounding carry
    s_plus1 = s_keep + 54'd1;
    s_rnd   = inc ? s_plus1 : s_keep;

    if (fmt == FMT_D) begin
      carry  = s_rnd[53];
      hidden = s_rnd[52] | carry;
    end else begin
      carry  = s_rnd[24];
      hidden = s_rnd[23] | carry;
    end
    exp_r = exp_d + (carry ? EXP_W'(1) : EXP_W'(0));

    nx = guard | st;
    of = hidden && (exp_r > emax);
    uf = tiny && nx;

    if (fmt == FMT_D) bexp = hidden ? 11'(exp_r + EXP_W'(1023)) : 11'd0;
    else              bexp = hidden ? 11'(exp_r + EXP_W'(127))  : 11'd0;

    if (of) begin
      nx = 1'b1;
      if ((rm == RM_RTZ) || (rm == RM_RUP && sign) || (rm == RM_RDN && !sign))
        result = (fmt == FMT_D) ? {sign, 11'h7FE, {52{1'b1}}}
                                : {32'h0, sign, 8'hFE, {23{1'b1}}};
      else
        result = pack_inf(sign, fmt);
    end else if (fmt == FMT_D) begin
      result = {sign, bexp, carry ? 52'h0 : s_rnd[51:0]};
    end else begin
      result = {32'h0, sign, bexp[7:0], carry ? 23'h0 : s_rnd[22:0]};
    end
  end

endmodule
