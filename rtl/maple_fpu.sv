// maple_fpu: floating point execution stage of a statically scheduled
// RISC processing element (DLX-like pipeline: decode -> FP execute ->
// memory access).
//
// One operation per cycle arrives from the instruction decode stage and is
// steered to one of seven functional units that work side by side:
//   FP add/subtract   fp_addsub  latency  3, throughput  1
//   FP multiply       fp_mul     latency  4, throughput  1
//   FP divide         fp_div     latency 21, throughput 18 (SRT loop x18)
//   INT multiply      int_mul    latency  2, throughput  1
//   INT divide        int_div    latency 12, throughput 10 (SRT loop x10)
//   FP format conv.   fp_cvt     latency  2, throughput  1
//   FP compare        fp_cmp     latency  1, throughput  1
// Every operation finishes in exactly its unit's latency, whatever the
// operand values, so that a compiler can schedule the code statically. The
// results of all units are merged onto one write-back port towards the memory
// access stage.
//
// Because the schedule is fixed at compile time the stage has no stall or
// interlock. It reports rule breaks instead: issue_reject when an operation
// is sent to a divider that is still iterating (the operation is dropped),
// and wb_collision when two units finish in the same cycle (the unit earlier
// in the list cmp, cvt, imul, fadd, fmul, idiv, fdiv wins; the other result
// is lost). fdiv_ready and idiv_ready tell whether a division may be issued.
//
// Interface: issue_* in (op, format, rounding direction, two 64-bit
// operands, destination tag); wb_* out (64-bit result, compare condition,
// exception flags, tag, unit index). Singles and integers sit in bits
// [31:0]. A compare result is 0 or 1 in wb_result and also on wb_cond.
// The seven units, their latencies and issue intervals follow the document;
// the op set, the write-back merge and the error outputs are this design's.
module maple_fpu
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the instruction decode stage
  input  logic              issue_valid,
  input  fpu_op_e           issue_op,
  input  fmt_e              issue_fmt,
  input  rm_e               issue_rm,
  input  logic [63:0]       issue_a,
  input  logic [63:0]       issue_b,
  input  logic [TAG_W-1:0]  issue_tag,
  output logic              fdiv_ready,
  output logic              idiv_ready,
  output logic              issue_reject,
  // to the memory access stage
  output logic              wb_valid,
  output logic [63:0]       wb_result,
  output logic              wb_cond,
  output fflags_t           wb_flags,
  output logic [TAG_W-1:0]  wb_tag,
  output logic [2:0]        wb_unit,
  output logic              wb_collision
);

  // ---------------- decode to units ----------------
  logic v_add, v_mul, v_div, v_cmp, v_cvt, v_imul, v_idiv;
  cmp_e pred;
  cvt_e cop;

  always_comb begin
    v_add = 1'b0; v_mul = 1'b0; v_div = 1'b0; v_cmp = 1'b0;
    v_cvt = 1'b0; v_imul = 1'b0; v_idiv = 1'b0;
    pred  = CMP_EQ;
    cop   = CVT_I2D;
    if (issue_valid) begin
      unique case (issue_op)
        OP_FADD, OP_FSUB:   v_add  = 1'b1;
        OP_FMUL:            v_mul  = 1'b1;
        OP_FDIV:            v_div  = 1'b1;
        OP_FEQ, OP_FNE, OP_FLT, OP_FLE, OP_FGT, OP_FGE: v_cmp = 1'b1;
        OP_CVTI2D, OP_CVTI2S, OP_CVTD2I, OP_CVTS2I, OP_CVTS2D, OP_CVTD2S:
                            v_cvt  = 1'b1;
        OP_MULT, OP_MULTU:  v_imul = 1'b1;
        OP_DIV, OP_DIVU:    v_idiv = 1'b1;
        default: ;
      endcase
    end
    unique case (issue_op)
      OP_FNE:    pred = CMP_NE;
      OP_FLT:    pred = CMP_LT;
      OP_FLE:    pred = CMP_LE;
      OP_FGT:    pred = CMP_GT;
      OP_FGE:    pred = CMP_GE;
      default:   pred = CMP_EQ;
    endcase
    unique case (issue_op)
      OP_CVTI2S: cop = CVT_I2S;
      OP_CVTD2I: cop = CVT_D2I;
      OP_CVTS2I: cop = CVT_S2I;
      OP_CVTS2D: cop = CVT_S2D;
      OP_CVTD2S: cop = CVT_D2S;
      default:   cop = CVT_I2D;
    endcase
  end

  assign issue_reject = (v_div && !fdiv_ready) || (v_idiv && !idiv_ready);

  // ---------------- the seven functional units ----------------
  logic             o_add_v, o_mul_v, o_div_v, o_cmp_v, o_cvt_v, o_imul_v, o_idiv_v;
  logic [63:0]      o_add_r, o_mul_r, o_div_r, o_cvt_r, o_imul_r;
  logic [31:0]      o_idiv_q;
  logic             o_cmp_c, o_idiv_dz;
  fflags_t          o_add_f, o_mul_f, o_div_f, o_cmp_f, o_cvt_f;
  logic [TAG_W-1:0] o_add_t, o_mul_t, o_div_t, o_cmp_t, o_cvt_t, o_imul_t, o_idiv_t;

  fp_addsub #(.TAG_W(TAG_W)) u_fadd (
    .clk, .rst_n, .in_valid(v_add), .in_sub(issue_op == OP_FSUB),
    .in_fmt(issue_fmt), .in_rm(issue_rm), .in_a(issue_a), .in_b(issue_b),
    .in_tag(issue_tag),
    .out_valid(o_add_v), .out_result(o_add_r), .out_flags(o_add_f), .out_tag(o_add_t)
  );

  fp_mul #(.TAG_W(TAG_W)) u_fmul (
    .clk, .rst_n, .in_valid(v_mul),
    .in_fmt(issue_fmt), .in_rm(issue_rm), .in_a(issue_a), .in_b(issue_b),
    .in_tag(issue_tag),
    .out_valid(o_mul_v), .out_result(o_mul_r), .out_flags(o_mul_f), .out_tag(o_mul_t)
  );

  fp_div #(.TAG_W(TAG_W)) u_fdiv (
    .clk, .rst_n, .in_valid(v_div),
    .in_fmt(issue_fmt), .in_rm(issue_rm), .in_a(issue_a), .in_b(issue_b),
    .in_tag(issue_tag), .in_ready(fdiv_ready),
    .out_valid(o_div_v), .out_result(o_div_r), .out_flags(o_div_f), .out_tag(o_div_t)
  );

  fp_cmp #(.TAG_W(TAG_W)) u_fcmp (
    .clk, .rst_n, .in_valid(v_cmp), .in_fmt(issue_fmt), .in_pred(pred),
    .in_a(issue_a), .in_b(issue_b), .in_tag(issue_tag),
    .out_valid(o_cmp_v), .out_cond(o_cmp_c), .out_flags(o_cmp_f), .out_tag(o_cmp_t)
  );

  fp_cvt #(.TAG_W(TAG_W)) u_fcvt (
    .clk, .rst_n, .in_valid(v_cvt), .in_op(cop), .in_rm(issue_rm),
    .in_a(issue_a), .in_tag(issue_tag),
    .out_valid(o_cvt_v), .out_result(o_cvt_r), .out_flags(o_cvt_f), .out_tag(o_cvt_t)
  );

  int_mul #(.TAG_W(TAG_W)) u_imul (
    .clk, .rst_n, .in_valid(v_imul), .in_signed(issue_op == OP_MULT),
    .in_a(issue_a[31:0]), .in_b(issue_b[31:0]), .in_tag(issue_tag),
    .out_valid(o_imul_v), .out_prod(o_imul_r), .out_tag(o_imul_t)
  );

  int_div #(.TAG_W(TAG_W)) u_idiv (
    .clk, .rst_n, .in_valid(v_idiv), .in_signed(issue_op == OP_DIV),
    .in_a(issue_a[31:0]), .in_b(issue_b[31:0]), .in_tag(issue_tag),
    .in_ready(idiv_ready),
    .out_valid(o_idiv_v), .out_quot(o_idiv_q), .out_dz(o_idiv_dz), .out_tag(o_idiv_t)
  );

  // ---------------- write-back merge ----------------
  logic [2:0] n_done;
  fflags_t    idiv_f;

  always_comb begin
    idiv_f    = '0;
    idiv_f.dz = o_idiv_dz;
    n_done = 3'(o_cmp_v) + 3'(o_cvt_v) + 3'(o_imul_v) + 3'(o_add_v)
           + 3'(o_mul_v) + 3'(o_idiv_v) + 3'(o_div_v);
    wb_valid  = (n_done != 0);
    wb_collision = (n_done > 1);
    wb_result = '0;
    wb_cond   = 1'b0;
    wb_flags  = '0;
    wb_tag    = '0;
    wb_unit   = 3'd0;
    if (o_cmp_v) begin
      wb_result = {63'h0, o_cmp_c}; wb_cond = o_cmp_c;
      wb_flags = o_cmp_f; wb_tag = o_cmp_t; wb_unit = 3'd0;
    end else if (o_cvt_v) begin
      wb_result = o_cvt_r;  wb_flags = o_cvt_f; wb_tag = o_cvt_t;  wb_unit = 3'd1;
    end else if (o_imul_v) begin
      wb_result = o_imul_r; wb_tag = o_imul_t; wb_unit = 3'd2;
    end else if (o_add_v) begin
      wb_result = o_add_r;  wb_flags = o_add_f; wb_tag = o_add_t;  wb_unit = 3'd3;
    end else if (o_mul_v) begin
      wb_result = o_mul_r;  wb_flags = o_mul_f; wb_tag = o_mul_t;  wb_unit = 3'd4;
    end else if (o_idiv_v) begin
      wb_result = {32'h0, o_idiv_q}; wb_flags = idiv_f; wb_tag = o_idiv_t; wb_unit = 3'd5;
    end else if (o_div_v) begin
      wb_result = o_div_r;  wb_flags = o_div_f; wb_tag = o_div_t;  wb_unit = 3'd6;
    end
  end

  // a correct static schedule never lets two units finish together
  assert property (@(posedge clk) disable iff (!rst_n) !wb_collision)
    else $warning("maple_fpu: two results in one write-back cycle");

endmodule
