// fp_addsub: IEEE 754 add/subtract unit, double or single precision,
// three pipeline stages, one new operation per cycle.
//
// (1) Unpack both operands, flip the sign of b for a subtraction, sort them
//     so that |big| >= |small|, and work out the alignment distance and the
//     special cases (NaN, infinities, two zeros).
// (2) Shift the small significand right by the distance into a field with
//     guard, round and sticky bits, and add or subtract it from the big one.
// (3) Normalise (one place right on a carry out, or left by the leading zero
//     count after cancellation) and round with fp_round, whose S / S+1 pair
//     and multiplexer follow the document's "aggressive" adder pattern.
// The result is registered at the end of stage (3), so it appears three
// clock edges after the operands were sampled, whatever the operands: no
// early completion for trivial cases, as static scheduling requires.
//
// Latency 3 and throughput 1 are the document's. The stage split, the
// canonical quiet NaN on any NaN input, and the flag set are this design's.
// An exact zero difference is +0, or -0 when rounding toward minus infinity.
//
// The divide-by-zero flag (out_flags.dz) is always 0: IEEE 754 raises it
// only for division and logarithm. It is kept so every unit shares one flag
// type.
module fp_addsub
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_sub,
  input  fmt_e              in_fmt,
  input  rm_e               in_rm,
  input  logic [63:0]       in_a,
  input  logic [63:0]       in_b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [63:0]       out_result,
  output fflags_t           out_flags,
  output logic [TAG_W-1:0]  out_tag
);

  // common control carried down the pipe
  typedef struct packed {
    fmt_e             fmt;
    rm_e              rm;
    logic             special;     // result already known
    logic [63:0]      spec_res;
    logic             spec_nv;
    logic             sign;
    logic signed [EXP_W-1:0] exp;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  // ---------------- stage (1) ----------------
  fp_unpacked_t ua, ub;
  logic         sb, a_big, eff_sub;
  logic [52:0]  sig_l, sig_s;
  logic [5:0]   shamt;
  ctl_t         c1;
  logic signed [EXP_W-1:0] ediff;

  always_comb begin
    ua = unpack(in_a, in_fmt);
    ub = unpack(in_b, in_fmt);
    sb = ub.sign ^ in_sub;
    a_big   = (ua.exp > ub.exp) || ((ua.exp == ub.exp) && (ua.sig >= ub.sig));
    sig_l   = a_big ? ua.sig : ub.sig;
    sig_s   = a_big ? ub.sig : ua.sig;
    ediff   = a_big ? ua.exp - ub.exp : ub.exp - ua.exp;
    shamt    = (ediff > EXP_W'(63)) ? 6'd63 : 6'(ediff);
    eff_sub = ua.sign ^ sb;

    c1.fmt      = in_fmt;
    c1.rm       = in_rm;
    c1.tag      = in_tag;
    c1.sign     = a_big ? ua.sign : sb;
    c1.exp      = a_big ? ua.exp : ub.exp;
    c1.special  = 1'b1;
    c1.spec_nv  = 1'b0;
    c1.spec_res = '0;
    if (ua.nan || ub.nan) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = ua.snan || ub.snan;
    end else if (ua.inf && ub.inf && eff_sub) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = 1'b1;
    end else if (ua.inf) begin
      c1.spec_res = pack_inf(ua.sign, in_fmt);
    end else if (ub.inf) begin
      c1.spec_res = pack_inf(sb, in_fmt);
    end else if (ua.zero && ub.zero) begin
      c1.spec_res = pack_zero(eff_sub ? (in_rm == RM_RDN) : ua.sign, in_fmt);
    end else begin
      c1.special  = 1'b0;
    end
  end

  logic        s1_valid, s1_eff_sub;
  logic [52:0] s1_sig_l, s1_sig_s;
  logic [5:0]  s1_dist;
  ctl_t        s1_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_sig_l   <= sig_l;
    s1_sig_s   <= sig_s;
    s1_dist    <= shamt;
    s1_eff_sub <= eff_sub;
    s1_c       <= c1;
  end

  // ---------------- stage (2) ----------------
  logic [55:0] small_ext, shifted, lost_mask, aligned;
  logic [56:0] sum_c;

  always_comb begin
    small_ext = {s1_sig_s, 3'b000};
    shifted   = small_ext >> s1_dist;
    lost_mask = ~(56'hFF_FFFF_FFFF_FFFF << s1_dist);
    aligned   = {shifted[55:1], shifted[0] | ((small_ext & lost_mask) != '0)};
    if (s1_eff_sub) sum_c = {1'b0, s1_sig_l, 3'b000} - {1'b0, aligned};
    else            sum_c = {1'b0, s1_sig_l, 3'b000} + {1'b0, aligned};
  end

  logic        s2_valid;
  logic [56:0] s2_sum;
  logic        s2_eff_sub;
  ctl_t        s2_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    s2_sum     <= sum_c;
    s2_eff_sub <= s1_eff_sub;
    s2_c       <= s1_c;
  end

  // ---------------- stage (3) ----------------
  logic [63:0] norm_sig;
  logic        norm_st;
  logic [6:0]  lz;
  logic signed [EXP_W-1:0] norm_exp;
  logic [63:0] rnd_res;
  logic        rnd_of, rnd_uf, rnd_nx;
  logic [63:0] res_c;
  fflags_t     flg_c;

  always_comb begin
    lz = lzc64({s2_sum[55:0], 8'h00});
    if (s2_sum[56]) begin
      norm_sig = {s2_sum[56:1], 8'h00};
      norm_st  = s2_sum[0];
      norm_exp = s2_c.exp + EXP_W'(1);
    end else begin
      norm_sig = {s2_sum[55:0], 8'h00} << lz;
      norm_st  = 1'b0;
      norm_exp = s2_c.exp - EXP_W'(signed'({1'b0, lz}));
    end
  end

  fp_round u_round (
    .sign(s2_c.sign), .exp(norm_exp), .sig(norm_sig), .sticky(norm_st),
    .fmt(s2_c.fmt), .rm(s2_c.rm),
    .result(rnd_res), .of(rnd_of), .uf(rnd_uf), .nx(rnd_nx)
  );

  always_comb begin
    flg_c = '0;
    if (s2_c.special) begin
      res_c    = s2_c.spec_res;
      flg_c.nv = s2_c.spec_nv;
    end else if (s2_sum == '0) begin
      // exact cancellation
      res_c = pack_zero(s2_eff_sub ? (s2_c.rm == RM_RDN) : s2_c.sign, s2_c.fmt);
    end else begin
      res_c    = rnd_res;
      flg_c.of = rnd_of;
      flg_c.uf = rnd_uf;
      flg_c.nx = rnd_nx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    out_result <= res_c;
    out_flags  <= flg_c;
    out_tag    <= s2_c.tag;
  end

endmodule
