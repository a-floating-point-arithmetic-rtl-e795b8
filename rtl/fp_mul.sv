// fp_mul: IEEE 754 multiply unit, double or single precision, four
// pipeline stages, one new operation per cycle.
//
// (1) Unpack the operands (subnormals normalised), add the exponents, sort
//     out the special cases, and run the 54 x 54 bit radix-4 Booth encoded
//     multiplier array with its Wallace tree down to a sum and a carry row.
// (2) Add the two rows: the exact 106-bit significand product.
// (3) Normalise the product (it lies in [1, 4)) into a 64-bit field plus a
//     sticky bit.
// (4) Round with fp_round and register the packed result.
// A result appears four clock edges after its operands were sampled, for
// every operand value (0.0 x 0.0 takes as long as any other product).
//
// The document gives the latency (4), the throughput (1) and the algorithm
// (radix-4 Booth encoding, Wallace tree compression). The split of work
// between the four stages and the exception handling are this design's.
//
// The divide-by-zero flag (out_flags.dz) is always 0: IEEE 754 raises it
// only for division and logarithm. It is kept so every unit shares one flag
// type.
module fp_mul
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
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

  typedef struct packed {
    fmt_e             fmt;
    rm_e              rm;
    logic             special;
    logic [63:0]      spec_res;
    logic             spec_nv;
    logic             sign;
    logic signed [EXP_W-1:0] exp;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  // ---------------- stage (1) ----------------
  fp_unpacked_t ua, ub;
  ctl_t         c1;
  logic [107:0] tree_sum, tree_carry;

  always_comb begin
    ua = unpack(in_a, in_fmt);
    ub = unpack(in_b, in_fmt);
    c1.fmt      = in_fmt;
    c1.rm       = in_rm;
    c1.tag      = in_tag;
    c1.sign     = ua.sign ^ ub.sign;
    c1.exp      = ua.exp + ub.exp;
    c1.special  = 1'b1;
    c1.spec_nv  = 1'b0;
    c1.spec_res = '0;
    if (ua.nan || ub.nan) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = ua.snan || ub.snan;
    end else if ((ua.inf && ub.zero) || (ua.zero && ub.inf)) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = 1'b1;
    end else if (ua.inf || ub.inf) begin
      c1.spec_res = pack_inf(c1.sign, in_fmt);
    end else if (ua.zero || ub.zero) begin
      c1.spec_res = pack_zero(c1.sign, in_fmt);
    end else begin
      c1.special  = 1'b0;
    end
  end

  booth_wallace #(.W(54)) u_array (
    .a({1'b0, ua.sig}), .b({1'b0, ub.sig}), .sum(tree_sum), .carry(tree_carry)
  );

  logic         s1_valid;
  logic [105:0] s1_sum, s1_carry;
  ctl_t         s1_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_sum   <= tree_sum[105:0];
    s1_carry <= tree_carry[105:0];
    s1_c     <= c1;
  end

  // ---------------- stage (2): carry-propagate add ----------------
  logic         s2_valid;
  logic [105:0] s2_prod;
  ctl_t         s2_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    s2_prod <= s1_sum + s1_carry;
    s2_c    <= s1_c;
  end

  // ---------------- stage (3): normalise ----------------
  logic [63:0] norm_sig;
  logic        norm_st;
  logic signed [EXP_W-1:0] norm_exp;

  always_comb begin
    if (s2_prod[105]) begin
      norm_sig = s2_prod[105:42];
      norm_st  = (s2_prod[41:0] != '0);
      norm_exp = s2_c.exp + EXP_W'(1);
    end else begin
      norm_sig = s2_prod[104:41];
      norm_st  = (s2_prod[40:0] != '0);
      norm_exp = s2_c.exp;
    end
  end

  logic        s3_valid, s3_st;
  logic [63:0] s3_sig;
  logic signed [EXP_W-1:0] s3_exp;
  ctl_t        s3_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    s3_sig <= norm_sig;
    s3_st  <= norm_st;
    s3_exp <= norm_exp;
    s3_c   <= s2_c;
  end

  // ---------------- stage (4): round ----------------
  logic [63:0] rnd_res;
  logic        rnd_of, rnd_uf, rnd_nx;
  logic [63:0] res_c;
  fflags_t     flg_c;

  fp_round u_round (
    .sign(s3_c.sign), .exp(s3_exp), .sig(s3_sig), .sticky(s3_st),
    .fmt(s3_c.fmt), .rm(s3_c.rm),
    .result(rnd_res), .of(rnd_of), .uf(rnd_uf), .nx(rnd_nx)
  );

  always_comb begin
    flg_c = '0;
    if (s3_c.special) begin
      res_c    = s3_c.spec_res;
      flg_c.nv = s3_c.spec_nv;
    end else begin
      res_c    = rnd_res;
      flg_c.of = rnd_of;
      flg_c.uf = rnd_uf;
      flg_c.nx = rnd_nx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s3_valid;
  end

  always_ff @(posedge clk) begin
    out_result <= res_c;
    out_flags  <= flg_c;
    out_tag    <= s3_c.tag;
  end

endmodule
