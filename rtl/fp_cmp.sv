// fp_cmp: IEEE 754 compare unit, double or single precision, one pipeline
// stage, one new operation per cycle.
//
// The operands are compared as sign-magnitude numbers (+0 equals -0); any
// NaN makes the pair unordered. The predicate in_pred selects one of
// =, !=, <, <=, >, >=; the one-bit answer is registered and appears one clock
// edge after the operands were sampled. "=" and "!=" raise invalid only for
// a signalling NaN; the four ordering predicates raise invalid for any NaN,
// as IEEE 754 asks of predicates that are not "unordered-aware".
//
// The latency (1) and throughput (1) are the document's; the predicate set
// (that of the DLX-like instruction set the processor follows) and the
// encoding are this design's.
//
// Only out_flags.nv can be set; dz, of, uf and nx are always 0, because a
// comparison produces no rounded value. They are kept so every unit shares
// one flag type.
module fp_cmp
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fmt_e              in_fmt,
  input  cmp_e              in_pred,
  input  logic [63:0]       in_a,
  input  logic [63:0]       in_b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic              out_cond,
  output fflags_t           out_flags,
  output logic [TAG_W-1:0]  out_tag
);

  logic        sa, sb, nan_a, nan_b, snan_a, snan_b, unord, eq, lt, gt, res;
  logic [62:0] ma, mb;
  fflags_t     flg;

  always_comb begin
    if (in_fmt == FMT_D) begin
      sa = in_a[63];
      sb = in_b[63];
      ma = in_a[62:0];
      mb = in_b[62:0];
      nan_a  = (in_a[62:52] == 11'h7FF) && (in_a[51:0] != '0);
      nan_b  = (in_b[62:52] == 11'h7FF) && (in_b[51:0] != '0);
      snan_a = nan_a && !in_a[51];
      snan_b = nan_b && !in_b[51];
    end else begin
      sa = in_a[31];
      sb = in_b[31];
      ma = {32'h0, in_a[30:0]};
      mb = {32'h0, in_b[30:0]};
      nan_a  = (in_a[30:23] == 8'hFF) && (in_a[22:0] != '0);
      nan_b  = (in_b[30:23] == 8'hFF) && (in_b[22:0] != '0);
      snan_a = nan_a && !in_a[22];
      snan_b = nan_b && !in_b[22];
    end
    unord = nan_a || nan_b;
    eq    = !unord && (((ma == '0) && (mb == '0)) || ((sa == sb) && (ma == mb)));
    if (sa != sb) lt = sa && !((ma == '0) && (mb == '0));
    else if (!sa) lt = ma < mb;
    else          lt = ma > mb;
    lt  = lt && !unord;
    gt  = !unord && !lt && !eq;

    flg = '0;
    unique case (in_pred)
      CMP_EQ: begin res = eq;       flg.nv = snan_a || snan_b; end
      CMP_NE: begin res = !eq;      flg.nv = snan_a || snan_b; end
      CMP_LT: begin res = lt;       flg.nv = unord; end
      CMP_LE: begin res = lt || eq; flg.nv = unord; end
      CMP_GT: begin res = gt;       flg.nv = unord; end
      CMP_GE: begin res = gt || eq; flg.nv = unord; end
      default: begin res = 1'b0;    flg.nv = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_cond  <= res;
    out_flags <= flg;
    out_tag   <= in_tag;
  end

endmodule
