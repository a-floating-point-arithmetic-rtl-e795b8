// tb_fp_round: self-checking testbench for the combinational fp_round.
//
// Random normalised 64-bit significands, exponents inside the normal range
// and sticky bits are rounded to double and to single in all four
// directions; the expected result is worked out here by comparing the
// discarded bits with one half as integers. Directed cases cover the carry
// out of an all-ones significand, overflow to infinity or to the largest
// finite number, and results that become subnormal or round up to the
// smallest normal number.
module tb_fp_round;
  import fpu_pkg::*;

  logic        sign = 1'b0;
  logic signed [EXP_W-1:0] exp = '0;
  logic [63:0] sig = '0;
  logic        sticky = 1'b0;
  fmt_e        fmt = FMT_D;
  rm_e         rm = RM_RNE;
  logic [63:0] result;
  logic        of, uf, nx;

  int checks = 0, failures = 0;

  fp_round dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_res(input logic [63:0] er, input logic eof, input logic euf,
                            input logic enx);
    #1;
    checks++;
    if (result !== er || of !== eof || uf !== euf || nx !== enx) begin
      failures++;
      $display("s=%0b e=%0d sig=%h st=%0b fmt=%0d rm=%0d: %h of%0b uf%0b nx%0b, expected %h %0b %0b %0b",
               sign, exp, sig, sticky, fmt, rm, result, of, uf, nx, er, eof, euf, enx);
    end
  endtask

  initial begin
    logic [63:0] keep, rem, half, er;
    int          drop, e, pbits;
    logic        up, inexact;
    for (int i = 0; i < 40000; i++) begin
      sign   = 1'($urandom());
      fmt    = fmt_e'($urandom_range(0, 1));
      rm     = rm_e'($urandom_range(0, 3));
      sig    = {1'b1, 31'($urandom()), $urandom()};
      if (i % 5 == 0) sig[20:0] = {21{1'b1}};   // many carries
      if (i % 7 == 0) sig[39:0] = 40'h80_0000_0000;  // ties
      if (i % 11 == 0) sig[10:0] = 11'h400;
      sticky = ($urandom_range(0, 3) == 0);
      exp    = (fmt == FMT_D) ? EXP_W'($urandom_range(0, 2000)) - EXP_W'(1000)
                              : EXP_W'($urandom_range(0, 240)) - EXP_W'(120);
      drop   = (fmt == FMT_D) ? 11 : 40;
      pbits  = (fmt == FMT_D) ? 53 : 24;
      keep   = sig >> drop;
      rem    = sig & ((64'd1 << drop) - 1);
      half   = 64'd1 << (drop - 1);
      inexact = (rem != 0) || sticky;
      case (rm)
        RM_RNE: up = (rem > half) || (rem == half && (sticky || keep[0]));
        RM_RTZ: up = 1'b0;
        RM_RUP: up = !sign && inexact;
        default: up = sign && inexact;
      endcase
      keep = keep + 64'(up);
      e = int'(exp);
      if (keep == (64'd1 << pbits)) begin keep = keep >> 1; e++; end
      if (fmt == FMT_D) er = {sign, 11'(e + 1023), keep[51:0]};
      else              er = {32'h0, sign, 8'(e + 127), keep[22:0]};
      expect_res(er, 1'b0, 1'b0, inexact);
    end

    // directed: carry out of all ones
    sign = 0; fmt = FMT_D; rm = RM_RNE; sticky = 0;
    exp = 5; sig = 64'hFFFF_FFFF_FFFF_FFFF;
    expect_res({1'b0, 11'(6 + 1023), 52'h0}, 0, 0, 1);
    // overflow
    exp = 1023;
    expect_res(64'h7FF0_0000_0000_0000, 1, 0, 1);
    rm = RM_RTZ;                 // rounds down to the largest finite: no overflow
    expect_res(64'h7FEF_FFFF_FFFF_FFFF, 0, 0, 1);
    exp = 1024;
    expect_res(64'h7FEF_FFFF_FFFF_FFFF, 1, 0, 1);
    sign = 1; rm = RM_RUP;
    expect_res(64'hFFEF_FFFF_FFFF_FFFF, 1, 0, 1);
    // exact subnormal: 2^-1074
    sign = 0; rm = RM_RNE; exp = -1074; sig = 64'h8000_0000_0000_0000;
    expect_res(64'h1, 0, 0, 0);
    // half of the smallest subnormal: tie to even gives zero, up gives 2^-1074
    exp = -1075;
    expect_res(64'h0, 0, 1, 1);
    rm = RM_RUP;
    expect_res(64'h1, 0, 1, 1);
    // just below the smallest normal rounds up to it
    rm = RM_RNE; exp = -1023; sig = 64'hFFFF_FFFF_FFFF_FFFF;
    expect_res(64'h0010_0000_0000_0000, 0, 1, 1);
    // single subnormal 3 * 2^-149
    fmt = FMT_S; exp = -148; sig = 64'hC000_0000_0000_0000;
    expect_res(64'h3, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
