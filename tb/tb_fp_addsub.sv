// tb_fp_addsub: self-checking testbench for fp_addsub.
//
// Issues one operation per cycle (the unit's throughput) and checks that
// each result appears exactly three edges later (the latency) with the
// expected bits. Doubles are checked in all four rounding directions
// against tb_fp_ref_pkg (host IEEE arithmetic plus TwoSum); singles in
// round-to-nearest. Operands include cancellation cases (close exponents),
// zeros, infinities, NaNs and subnormals. Directed vectors cover overflow,
// the sign of an exact zero and invalid operations.
module tb_fp_addsub;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_sub = 1'b0;
  fmt_e        in_fmt = FMT_D;
  rm_e         in_rm = RM_RNE;
  logic [63:0] in_a = '0, in_b = '0;
  logic [4:0]  in_tag = '0;
  logic        out_valid;
  logic [63:0] out_result;
  fflags_t     out_flags;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0, cyc = 0;

  fp_addsub dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the cycle they are due
  logic        exp_v   [64];
  logic [63:0] exp_r   [64];
  logic        exp_nan [64];
  logic [4:0]  exp_t   [64];
  logic        exp_fchk[64];
  fflags_t     exp_f   [64];
  initial for (int i = 0; i < 64; i++) exp_v[i] = 1'b0;

  // check at every falling edge
  always @(negedge clk) if (rst_n) begin
    int s;
    s = cyc % 64;
    checks++;
    if (out_valid !== exp_v[s]) begin
      failures++;
      $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v[s]);
    end else if (exp_v[s]) begin
      checks++;
      if (exp_nan[s] ? !(is_nan_d(out_result) || is_nan_s(out_result[31:0]))
                     : (out_result !== exp_r[s] || out_tag !== exp_t[s])) begin
        failures++;
        $display("cycle %0d: result %h expected %h tag %0d/%0d", cyc, out_result, exp_r[s],
                 out_tag, exp_t[s]);
      end
      if (exp_fchk[s]) begin
        checks++;
        if (out_flags !== exp_f[s]) begin
          failures++;
          $display("cycle %0d: flags %b expected %b (res %h)", cyc, out_flags, exp_f[s], out_result);
        end
      end
    end
    exp_v[s] = 1'b0;
  end

  task automatic issue(input logic sub, input fmt_e f, input rm_e rm,
                       input logic [63:0] a, input logic [63:0] bb,
                       input logic [63:0] expect_r, input logic expect_nan,
                       input logic fchk, input fflags_t ef);
    int s;
    in_valid = 1'b1; in_sub = sub; in_fmt = f; in_rm = rm; in_a = a; in_b = bb;
    in_tag = 5'($urandom());
    s = (cyc + LAT) % 64;
    exp_v[s] = 1'b1; exp_r[s] = expect_r; exp_nan[s] = expect_nan;
    exp_t[s] = in_tag; exp_fchk[s] = fchk; exp_f[s] = ef;
    @(negedge clk);
  endtask

  task automatic idle();
    in_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic rand_double(input int base, input int spread, input logic ordinary);
    logic [63:0] a, bb, e, bneg;
    logic        sub;
    rm_e         rm;
    fflags_t     f;
    real         s, t, err;
    a   = ordinary ? rand_norm_d(base, spread) : rand_d(base, spread);
    bb  = ordinary ? rand_norm_d(base, spread) : rand_d(base, spread);
    sub = 1'($urandom());
    rm  = rm_e'($urandom_range(0, 3));
    bneg = sub ? {~bb[63], bb[62:0]} : bb;
    e   = ref_add_d(a, bneg, rm);
    f   = '0;
    if (ordinary) begin
      s   = r(a) + r(bneg);
      t   = s - r(a);
      err = (r(a) - (s - t)) + (r(bneg) - t);
      f.nx = (err != 0.0);
    end
    issue(sub, FMT_D, rm, a, bb, e, is_nan_d(e), ordinary, f);
  endtask

  initial begin
    logic [31:0] sa, sb;
    logic [63:0] e;
    fflags_t     f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed: exact zero signs, overflow, invalid
    f = '0;
    issue(1'b1, FMT_D, RM_RNE, b(1.5), b(1.5), 64'h0, 1'b0, 1'b1, f);
    issue(1'b1, FMT_D, RM_RDN, b(1.5), b(1.5), 64'h8000_0000_0000_0000, 1'b0, 1'b1, f);
    issue(1'b0, FMT_D, RM_RNE, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000,
          64'h8000_0000_0000_0000, 1'b0, 1'b1, f);
    f = '0; f.of = 1'b1; f.nx = 1'b1;
    issue(1'b0, FMT_D, RM_RNE, 64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF,
          64'h7FF0_0000_0000_0000, 1'b0, 1'b1, f);
    issue(1'b0, FMT_D, RM_RTZ, 64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF,
          64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 1'b1, f);
    issue(1'b0, FMT_D, RM_RDN, 64'hFFEF_FFFF_FFFF_FFFF, 64'hFFEF_FFFF_FFFF_FFFF,
          64'hFFF0_0000_0000_0000, 1'b0, 1'b1, f);
    f = '0; f.nv = 1'b1;
    issue(1'b1, FMT_D, RM_RNE, 64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000,
          QNAN_D, 1'b1, 1'b1, f);
    issue(1'b0, FMT_D, RM_RNE, 64'h7FF0_0000_0000_0001, b(1.0), QNAN_D, 1'b1, 1'b1, f);
    // 1 + 2^-53 rounds to even (down), 1 + 3*2^-53 rounds up
    f = '0; f.nx = 1'b1;
    issue(1'b0, FMT_D, RM_RNE, b(1.0), 64'h3CA0_0000_0000_0000, b(1.0), 1'b0, 1'b1, f);
    issue(1'b0, FMT_D, RM_RNE, b(1.0), 64'h3CB8_0000_0000_0000,
          64'h3FF0_0000_0000_0002, 1'b0, 1'b1, f);
    // smallest subnormals: exact
    f = '0;
    issue(1'b0, FMT_D, RM_RNE, 64'h1, 64'h1, 64'h2, 1'b0, 1'b1, f);
    issue(1'b1, FMT_D, RM_RNE, 64'h0010_0000_0000_0000, 64'h1,
          64'h000F_FFFF_FFFF_FFFF, 1'b0, 1'b1, f);
    idle();

    // random doubles: ordinary values, all rounding directions
    for (int i = 0; i < 3000; i++) rand_double(1023, 2, 1'b1);
    for (int i = 0; i < 3000; i++) rand_double(1023, 60, 1'b1);
    // random doubles with specials and subnormals, round to nearest
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] a, bb, bn;
      logic        sub;
      a   = rand_d(3, 3);
      bb  = (i % 2 == 1) ? rand_d(1023, 40) : rand_d(3, 3);
      sub = 1'($urandom());
      bn  = sub ? {~bb[63], bb[62:0]} : bb;
      e   = ref_add_d(a, bn, 2'd0);
      f   = '0;
      issue(sub, FMT_D, RM_RNE, a, bb, e, is_nan_d(e), 1'b0, f);
    end
    // random singles, round to nearest
    for (int i = 0; i < 3000; i++) begin
      logic sub;
      sa  = rand_s();
      sb  = rand_s();
      sub = 1'($urandom());
      e   = {32'h0, d2s(b(sub ? r(s2d(sa)) - r(s2d(sb)) : r(s2d(sa)) + r(s2d(sb))))};
      if (e[31:0] == 32'h0 && sa[31] != (sb[31] ^ sub)) e = 64'h0;
      f   = '0;
      issue(sub, FMT_S, RM_RNE, {32'h0, sa}, {32'h0, sb}, e, is_nan_s(e[31:0]), 1'b0, f);
    end
    repeat (LAT + 2) idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
