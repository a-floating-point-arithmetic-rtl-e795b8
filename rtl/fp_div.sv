// fp_div: IEEE 754 divide unit, double or single precision, radix-2 SRT,
// fixed latency 21 cycles, a new division every 18 cycles.
//
// (1) Unpack the operands, decide the special cases, subtract exponents and
//     scale the significands so that the divisor D = b/2 lies in [1/2, 1)
//     and the dividend X (a/4, or a/2 when a's significand is the smaller)
//     gives a quotient X/D in [1/2, 1).
// (2) Is iterated ITER (18) times; each pass retires STEPS (3) radix-2 SRT
//     quotient digits from {-1, 0, +1}, 54 digits in all: 53 significand
//     bits and a guard bit. Each digit is chosen from the top four bits of
//     the doubled partial remainder only (>= 1/2 gives +1, < -1/2 gives -1,
//     otherwise 0); the remainder is kept in two's complement.
// (3) Corrects a negative final remainder (quotient - 1, remainder + D) and
//     turns a non-zero remainder into the sticky bit.
// (4) Rounds with fp_round and registers the result.
// Stages (1), (3) and (4) are pipelined around the loop, so the issue
// interval is the 18 passes of stage (2).
//
// The document gives the latency (21), the issue interval (18), the
// algorithm (radix-2 SRT) and the four-stage shape with the second stage
// looping 18 times. The three digits per pass follow from these numbers
// (18 x 3 = 54 digits); the scaling, the digit selection rule and the
// exception handling are this design's.
//
// Handshake: in_ready is high when an operation issued now will find the
// loop free when it leaves stage (1). Issuing while in_ready is low breaks
// the static schedule: the operation is dropped and an assertion warns.
module fp_div
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = 5,
  parameter int unsigned ITER  = 18,  // passes through stage (2)
  parameter int unsigned STEPS = 3    // SRT digits per pass
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fmt_e              in_fmt,
  input  rm_e               in_rm,
  input  logic [63:0]       in_a,
  input  logic [63:0]       in_b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              in_ready,
  output logic              out_valid,
  output logic [63:0]       out_result,
  output fflags_t           out_flags,
  output logic [TAG_W-1:0]  out_tag
);

  localparam int QD = ITER * STEPS;   // quotient digits (54)
  localparam int WW = 57;             // partial remainder, units of 2^-54
  localparam int QW = QD + 2;

  typedef struct packed {
    fmt_e             fmt;
    rm_e              rm;
    logic             special;
    logic [63:0]      spec_res;
    logic             spec_nv;
    logic             spec_dz;
    logic             sign;
    logic signed [EXP_W-1:0] exp;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  // ---------------- stage (1) ----------------
  fp_unpacked_t ua, ub;
  ctl_t         c1;
  logic         a_lt_b;
  logic [53:0]  x_c;

  always_comb begin
    ua = unpack(in_a, in_fmt);
    ub = unpack(in_b, in_fmt);
    a_lt_b      = ua.sig < ub.sig;
    x_c         = a_lt_b ? {ua.sig, 1'b0} : {1'b0, ua.sig};
    c1.fmt      = in_fmt;
    c1.rm       = in_rm;
    c1.tag      = in_tag;
    c1.sign     = ua.sign ^ ub.sign;
    c1.exp      = ua.exp - ub.exp - (a_lt_b ? EXP_W'(1) : EXP_W'(0));
    c1.special  = 1'b1;
    c1.spec_nv  = 1'b0;
    c1.spec_dz  = 1'b0;
    c1.spec_res = '0;
    if (ua.nan || ub.nan) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = ua.snan || ub.snan;
    end else if ((ua.inf && ub.inf) || (ua.zero && ub.zero)) begin
      c1.spec_res = qnan(in_fmt);
      c1.spec_nv  = 1'b1;
    end else if (ua.inf) begin
      c1.spec_res = pack_inf(c1.sign, in_fmt);
    end else if (ub.zero) begin
      c1.spec_res = pack_inf(c1.sign, in_fmt);
      c1.spec_dz  = 1'b1;
    end else if (ua.zero || ub.inf) begin
      c1.spec_res = pack_zero(c1.sign, in_fmt);
    end else begin
      c1.special  = 1'b0;
    end
  end

  logic        s1_valid;
  logic [53:0] s1_x;
  logic [52:0] s1_d;
  ctl_t        s1_c;

  // ---------------- stage (2) state ----------------
  logic                      it_active;
  logic [$clog2(ITER+1)-1:0] it_cnt;
  logic signed [WW-1:0]      it_w, it_d;
  logic signed [QW-1:0]      it_q;
  ctl_t                      it_c;

  assign in_ready = !s1_valid && (!it_active || it_cnt <= 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      s1_x <= x_c;
      s1_d <= ub.sig;
      s1_c <= c1;
    end
  end

  // STEPS radix-2 SRT steps on (w, q)
  function automatic logic [WW+QW-1:0] srt_steps(input logic signed [WW-1:0] w_in,
                                                 input logic signed [QW-1:0] q_in,
                                                 input logic signed [WW-1:0] d);
    logic signed [WW-1:0] w, w2;
    logic signed [QW-1:0] q;
    logic signed [3:0]    est;       // 2w truncated to multiples of 1/2
    w = w_in;
    q = q_in;
    for (int k = 0; k < int'(STEPS); k++) begin
      w2  = w <<< 1;
      est = w2[WW-1 -: 4];
      if (est >= 4'sd1) begin
        w = w2 - d;
        q = (q <<< 1) + QW'(1);
      end else if (est <= -4'sd2) begin
        w = w2 + d;
        q = (q <<< 1) - QW'(1);
      end else begin
        w = w2;
        q = q <<< 1;
      end
    end
    return {w, q};
  endfunction

  logic signed [WW-1:0] w_nx, d_load;
  logic signed [QW-1:0] q_nx;
  logic                 load;

  assign load   = s1_valid;
  assign d_load = WW'({s1_d, 1'b0});

  always_comb begin
    if (load) {w_nx, q_nx} = srt_steps(WW'(s1_x), '0, d_load);
    else      {w_nx, q_nx} = srt_steps(it_w, it_q, it_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it_active <= 1'b0;
      it_cnt    <= '0;
    end else if (load) begin
      it_active <= 1'b1;
      it_cnt    <= ($clog2(ITER+1))'(ITER - 1);
    end else if (it_active && it_cnt != 0) begin
      it_cnt    <= it_cnt - 1'b1;
    end else begin
      it_active <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      it_w <= w_nx;
      it_q <= q_nx;
      it_d <= d_load;
      it_c <= s1_c;
    end else if (it_active && it_cnt != 0) begin
      it_w <= w_nx;
      it_q <= q_nx;
    end
  end

  // ---------------- stage (3): remainder correction ----------------
  logic                 done;
  logic signed [QW-1:0] q_fix;
  logic signed [WW-1:0] w_fix;

  assign done = it_active && (it_cnt == 0);

  always_comb begin
    if (it_w < 0) begin
      q_fix = it_q - QW'(1);
      w_fix = it_w + it_d;
    end else begin
      q_fix = it_q;
      w_fix = it_w;
    end
  end

  logic        s3_valid, s3_st;
  logic [63:0] s3_sig;
  ctl_t        s3_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= done;
  end

  always_ff @(posedge clk) begin
    if (done) begin
      s3_sig <= {q_fix[53:0], 10'b0};
      s3_st  <= (w_fix != '0);
      s3_c   <= it_c;
    end
  end

  // ---------------- stage (4): round ----------------
  logic [63:0] rnd_res;
  logic        rnd_of, rnd_uf, rnd_nx;
  logic [63:0] res_c;
  fflags_t     flg_c;

  fp_round u_round (
    .sign(s3_c.sign), .exp(s3_c.exp), .sig(s3_sig), .sticky(s3_st),
    .fmt(s3_c.fmt), .rm(s3_c.rm),
    .result(rnd_res), .of(rnd_of), .uf(rnd_uf), .nx(rnd_nx)
  );

  always_comb begin
    flg_c = '0;
    if (s3_c.special) begin
      res_c    = s3_c.spec_res;
      flg_c.nv = s3_c.spec_nv;
      flg_c.dz = s3_c.spec_dz;
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
    if (s3_valid) begin
      out_result <= res_c;
      out_flags  <= flg_c;
      out_tag    <= s3_c.tag;
    end
  end

  // an operation must not be issued while the loop is still busy
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $warning("fp_div: operation issued while busy, dropped");

endmodule
