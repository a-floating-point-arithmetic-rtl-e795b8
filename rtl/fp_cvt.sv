// fp_cvt: format conversion unit, two pipeline stages, one new operation
// per cycle.
//
// Conversions (in_op): 32-bit signed integer to double or single, double or
// single to 32-bit signed integer, single to double and double to single.
// Stage (1) unpacks the source. For an integer source it takes the absolute
// value and left-justifies it by its leading zero count; for a floating
// point to integer conversion it shifts the significand right so that the
// integer part, a guard bit and a sticky bit are separated. Stage (2)
// rounds: floating point destinations go through the shared fp_round,
// integer destinations add the rounding carry chosen by in_rm, check the
// range and restore the sign. The result is registered two clock edges after
// the operands were sampled. Integers travel in bits [31:0] of the 64-bit
// word, with bits [63:32] zero.
//
// The latency (2) and throughput (1) and the integer <-> floating point
// conversions are the document's. The single <-> double conversions, the
// rounding of integer results by in_rm, and the saturated result of an
// invalid conversion (0x7FFFFFFF for NaN and large positive values,
// 0x80000000 for large negative ones) are this design's choices.
//
// The divide-by-zero flag (out_flags.dz) is always 0: IEEE 754 raises it
// only for division and logarithm. It is kept so every unit shares one flag
// type.
module fp_cvt
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  cvt_e              in_op,
  input  rm_e               in_rm,
  input  logic [63:0]       in_a,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [63:0]       out_result,
  output fflags_t           out_flags,
  output logic [TAG_W-1:0]  out_tag
);

  typedef struct packed {
    logic             to_int;      // integer destination
    fmt_e             dst;         // destination format when floating
    rm_e              rm;
    logic             special;
    logic [63:0]      spec_res;
    logic             spec_nv;
    logic             sign;
    logic signed [EXP_W-1:0] exp;  // floating destination
    logic [63:0]      sig;         // floating destination
    logic [31:0]      ipart;       // integer destination
    logic             guard;
    logic             sticky;
    logic             big;         // integer destination out of range
    logic [TAG_W-1:0] tag;
  } ctl_t;

  // ---------------- stage (1) ----------------
  fp_unpacked_t u;
  fmt_e         src;
  ctl_t         c1;
  logic [31:0]  mag;
  logic [6:0]   lz;
  logic [55:0]  v;
  logic [55:0]  lost_mask;
  logic [5:0]   rsh;

  always_comb begin
    src = (in_op == CVT_S2I || in_op == CVT_S2D) ? FMT_S : FMT_D;
    u   = unpack(in_a, src);
    c1  = '0;
    c1.rm     = in_rm;
    c1.tag    = in_tag;
    c1.to_int = (in_op == CVT_D2I) || (in_op == CVT_S2I);
    c1.dst    = (in_op == CVT_I2S || in_op == CVT_D2S) ? FMT_S : FMT_D;
    mag       = '0;
    lz        = '0;
    v         = '0;
    lost_mask = '0;
    rsh       = '0;

    unique case (in_op)
      CVT_I2D, CVT_I2S: begin
        c1.sign = in_a[31];
        mag     = in_a[31] ? 32'(-in_a[31:0]) : in_a[31:0];
        lz      = lzc64({mag, 32'h0});
        c1.sig  = {mag, 32'h0} << lz;
        c1.exp  = EXP_W'(31) - EXP_W'(signed'({1'b0, lz}));
        if (mag == '0) begin
          c1.special  = 1'b1;
          c1.spec_res = pack_zero(1'b0, c1.dst);
        end
      end
      CVT_S2D, CVT_D2S: begin
        c1.sign = u.sign;
        c1.sig  = {u.sig, 11'h000};
        c1.exp  = u.exp;
        c1.special = u.nan || u.inf || u.zero;
        if (u.nan) begin
          c1.spec_res = qnan(c1.dst);
          c1.spec_nv  = u.snan;
        end else if (u.inf) c1.spec_res = pack_inf(u.sign, c1.dst);
        else                c1.spec_res = pack_zero(u.sign, c1.dst);
      end
      default: begin  // CVT_D2I, CVT_S2I
        c1.sign = u.sign;
        if (u.nan) begin
          c1.special  = 1'b1;
          c1.spec_res = 64'h7FFF_FFFF;
          c1.spec_nv  = 1'b1;
        end else if (u.inf) begin
          c1.special  = 1'b1;
          c1.spec_res = u.sign ? 64'h8000_0000 : 64'h7FFF_FFFF;
          c1.spec_nv  = 1'b1;
        end else if (u.zero) begin
          c1.special  = 1'b1;
          c1.spec_res = '0;
        end else if (u.exp > EXP_W'(31)) begin
          c1.big      = 1'b1;
        end else if (u.exp < EXP_W'(-2)) begin
          c1.sticky   = 1'b1;     // 0 < |x| < 1/4
        end else begin
          // value = v * 2^(exp-54); keep bits of weight >= 1 as ipart
          v         = {1'b0, u.sig, 2'b00};
          rsh       = 6'(EXP_W'(54) - u.exp);
          c1.ipart  = 32'(v >> rsh);
          c1.guard  = v[rsh - 6'd1];
          lost_mask = ~(56'hFF_FFFF_FFFF_FFFF << (rsh - 6'd1));
          c1.sticky = ((v & lost_mask) != '0);
        end
      end
    endcase
  end

  logic s1_valid;
  ctl_t s1_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_c <= c1;
  end

  // ---------------- stage (2) ----------------
  logic [63:0] rnd_res;
  logic        rnd_of, rnd_uf, rnd_nx;
  logic        inc;
  logic [32:0] imag;
  logic [63:0] res_c;
  fflags_t     flg_c;

  fp_round u_round (
    .sign(s1_c.sign), .exp(s1_c.exp), .sig(s1_c.sig), .sticky(1'b0),
    .fmt(s1_c.dst), .rm(s1_c.rm),
    .result(rnd_res), .of(rnd_of), .uf(rnd_uf), .nx(rnd_nx)
  );

  always_comb begin
    unique case (s1_c.rm)
      RM_RNE: inc = s1_c.guard & (s1_c.sticky | s1_c.ipart[0]);
      RM_RTZ: inc = 1'b0;
      RM_RUP: inc = ~s1_c.sign & (s1_c.guard | s1_c.sticky);
      RM_RDN: inc =  s1_c.sign & (s1_c.guard | s1_c.sticky);
      default: inc = 1'b0;
    endcase
    imag = {1'b0, s1_c.ipart} + 33'(inc);

    flg_c = '0;
    if (s1_c.special) begin
      res_c    = s1_c.spec_res;
      flg_c.nv = s1_c.spec_nv;
    end else if (!s1_c.to_int) begin
      res_c    = rnd_res;
      flg_c.of = rnd_of;
      flg_c.uf = rnd_uf;
      flg_c.nx = rnd_nx;
    end else if (s1_c.big || (!s1_c.sign && imag > 33'h7FFF_FFFF)
                           || ( s1_c.sign && imag > 33'h8000_0000)) begin
      res_c    = s1_c.sign ? 64'h8000_0000 : 64'h7FFF_FFFF;
      flg_c.nv = 1'b1;
    end else begin
      res_c    = {32'h0, s1_c.sign ? 32'(-imag[31:0]) : imag[31:0]};
      flg_c.nx = s1_c.guard | s1_c.sticky;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    out_result <= res_c;
    out_flags  <= flg_c;
    out_tag    <= s1_c.tag;
  end

endmodule
