// tb_fp_div: self-checking testbench for fp_div.
//
// Issues a division every 18 cycles (the unit's issue interval) and checks
// that each quotient appears exactly 21 edges later (the latency), that
// in_ready is low for the 17 cycles after an issue and high again on the
// 18th, and that an operation issued while busy is dropped. Doubles are
// checked in all four rounding directions against tb_fp_ref_pkg (host IEEE
// division plus the exact residual a - q*b); singles in round-to-nearest.
// Operands include zeros, infinities, NaNs and subnormals.
module tb_fp_div;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 21;
  localparam int THR = 18;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0;
  fmt_e        in_fmt = FMT_D;
  rm_e         in_rm = RM_RNE;
  logic [63:0] in_a = '0, in_b = '0;
  logic [4:0]  in_tag = '0;
  logic        in_ready;
  logic        out_valid;
  logic [63:0] out_result;
  fflags_t     out_flags;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0, cyc = 0;

  fp_div dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic issue(input fmt_e f, input rm_e rm,
                       input logic [63:0] a, input logic [63:0] bb,
                       input logic [63:0] expect_r, input logic expect_nan,
                       input logic fchk, input fflags_t ef);
    int s;
    in_valid = 1'b1; in_fmt = f; in_rm = rm; in_a = a; in_b = bb;
    in_tag = 5'($urandom());
    s = (cyc + LAT) % 64;
    exp_v[s] = 1'b1; exp_r[s] = expect_r; exp_nan[s] = expect_nan;
    exp_t[s] = in_tag; exp_fchk[s] = fchk; exp_f[s] = ef;
    checks++;
    if (!in_ready) begin failures++; $display("cycle %0d: not ready at issue", cyc); end
    @(negedge clk);
    in_valid = 1'b0;
    for (int k = 1; k < THR; k++) begin
      checks++;
      if (in_ready !== 1'b0) begin
        failures++;
        $display("cycle %0d: in_ready=%0b, %0d cycles after issue", cyc, in_ready, k);
      end
      @(negedge clk);
    end
  endtask

  task automatic idle();
    in_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic rand_double(input int base, input int spread);
    logic [63:0] a, bb, e;
    rm_e         rm;
    fflags_t     f;
    real         q, p, er, rem;
    a   = rand_norm_d(base, spread);
    bb  = rand_norm_d(base, spread);
    rm  = rm_e'($urandom_range(0, 3));
    e   = ref_div_d(a, bb, rm);
    q   = r(a) / r(bb);
    p   = q * r(bb);
    er  = two_prod_err(q, r(bb), p);
    rem = (r(a) - p) - er;
    f   = '0;
    f.nx = (rem != 0.0);
    issue(FMT_D, rm, a, bb, e, 1'b0, 1'b1, f);
  endtask

  initial begin
    logic [31:0] sa, sb;
    logic [63:0] e;
    fflags_t     f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed vectors
    f = '0;
    issue(FMT_D, RM_RNE, b(7.5), b(-2.5), b(-3.0), 1'b0, 1'b1, f);
    f.nx = 1'b1;
    issue(FMT_D, RM_RNE, b(1.0), b(3.0), 64'h3FD5_5555_5555_5555, 1'b0, 1'b1, f);
    issue(FMT_D, RM_RUP, b(1.0), b(3.0), 64'h3FD5_5555_5555_5556, 1'b0, 1'b1, f);
    issue(FMT_D, RM_RTZ, b(2.0), b(3.0), 64'h3FE5_5555_5555_5555, 1'b0, 1'b1, f);
    issue(FMT_D, RM_RNE, b(2.0), b(3.0), 64'h3FE5_5555_5555_5555, 1'b0, 1'b1, f);
    f = '0; f.dz = 1'b1;
    issue(FMT_D, RM_RNE, b(-1.0), 64'h0, 64'hFFF0_0000_0000_0000, 1'b0, 1'b1, f);
    f = '0; f.nv = 1'b1;
    issue(FMT_D, RM_RNE, 64'h0, 64'h0, QNAN_D, 1'b1, 1'b1, f);
    f = '0; f.of = 1'b1; f.nx = 1'b1;
    issue(FMT_D, RM_RNE, b(1.0e300), b(1.0e-300), 64'h7FF0_0000_0000_0000, 1'b0, 1'b1, f);
    f = '0;
    // 2^-1000 / 2^70 = 2^-1070, exact subnormal
    issue(FMT_D, RM_RNE, 64'h0170_0000_0000_0000, 64'h4450_0000_0000_0000,
          64'h0000_0000_0000_0010, 1'b0, 1'b1, f);
    // a division issued while the loop is busy is dropped
    in_valid = 1'b1; in_a = b(1.0); in_b = b(2.0);
    @(negedge clk);                      // accepted
    in_valid = 1'b1;
    @(negedge clk);                      // busy: dropped
    in_valid = 1'b0;
    exp_v[(cyc + LAT - 2) % 64] = 1'b1; exp_r[(cyc + LAT - 2) % 64] = b(0.5);
    exp_nan[(cyc + LAT - 2) % 64] = 1'b0; exp_t[(cyc + LAT - 2) % 64] = in_tag;
    exp_fchk[(cyc + LAT - 2) % 64] = 1'b0;
    repeat (THR) @(negedge clk);

    for (int i = 0; i < 3000; i++) rand_double(1023, 100);
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] a, bb;
      a  = rand_d(1023, 600);
      bb = (i % 3 == 0) ? rand_d(3, 3) : rand_d(1023, 600);
      e  = b(r(a) / r(bb));
      f  = '0;
      issue(FMT_D, RM_RNE, a, bb, e, is_nan_d(e), 1'b0, f);
    end
    for (int i = 0; i < 2000; i++) begin
      sa = rand_s();
      sb = rand_s();
      e  = {32'h0, d2s(b(r(s2d(sa)) / r(s2d(sb))))};
      f  = '0;
      issue(FMT_S, RM_RNE, {32'h0, sa}, {32'h0, sb}, e, is_nan_s(e[31:0]), 1'b0, f);
    end
    repeat (LAT + 2) idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
