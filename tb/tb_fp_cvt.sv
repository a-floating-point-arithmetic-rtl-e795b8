// tb_fp_cvt: self-checking testbench for fp_cvt.
//
// Issues one conversion per cycle and checks each result two edges later.
// Integer to double is exact (the simulator's own int-to-real); integer to
// single is that double rounded to single. Double or single to integer is
// checked in all four rounding directions with floor/ceil on the simulator's
// reals, including ties, values just inside and outside the 32-bit range,
// infinities and NaNs (saturated result, invalid flag). Single to double is
// exact; double to single is checked in round-to-nearest.
module tb_fp_cvt;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0;
  cvt_e        in_op = CVT_I2D;
  rm_e         in_rm = RM_RNE;
  logic [63:0] in_a = '0;
  logic [4:0]  in_tag = '0;
  logic        out_valid;
  logic [63:0] out_result;
  fflags_t     out_flags;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0, cyc = 0;

  fp_cvt dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        exp_v   [16];
  logic [63:0] exp_r   [16];
  logic        exp_nan [16];
  logic        exp_ichk[16];
  logic        exp_nv  [16];
  logic        exp_nx  [16];
  initial for (int i = 0; i < 16; i++) exp_v[i] = 1'b0;

  always @(negedge clk) if (rst_n) begin
    int s;
    s = cyc % 16;
    checks++;
    if (out_valid !== exp_v[s]) begin
      failures++;
      $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v[s]);
    end else if (exp_v[s]) begin
      checks++;
      if (exp_nan[s] ? !(is_nan_d(out_result) || is_nan_s(out_result[31:0]))
                     : out_result !== exp_r[s]) begin
        failures++;
        $display("cycle %0d: result %h expected %h", cyc, out_result, exp_r[s]);
      end
      if (exp_ichk[s]) begin
        checks++;
        if (out_flags.nv !== exp_nv[s] || out_flags.nx !== exp_nx[s]) begin
          failures++;
          $display("cycle %0d: nv %0b nx %0b expected %0b %0b (res %h)", cyc, out_flags.nv,
                   out_flags.nx, exp_nv[s], exp_nx[s], out_result);
        end
      end
    end
    exp_v[s] = 1'b0;
  end

  // floating value to int32 with rounding direction rm
  task automatic to_int(input real x, input logic nan, input rm_e rm,
                        output logic [63:0] res, output logic nv, output logic nx);
    real f, d, y;
    nv = 1'b0; nx = 1'b0;
    if (nan) begin res = 64'h7FFF_FFFF; nv = 1'b1; return; end
    f = $floor(x);
    d = x - f;
    case (rm)
      RM_RNE:  y = (d > 0.5 || (d == 0.5 && ($floor(f / 2.0) * 2.0 != f))) ? f + 1.0 : f;
      RM_RTZ:  y = (x >= 0.0) ? f : $ceil(x);
      RM_RUP:  y = $ceil(x);
      default: y = f;
    endcase
    if (y > 2147483647.0 || y < -2147483648.0) begin
      nv = 1'b1;
      res = (x < 0.0) ? 64'h8000_0000 : 64'h7FFF_FFFF;
    end else begin
      res = {32'h0, 32'($rtoi(y))};
      nx = (y != x);
    end
  endtask

  initial begin
    logic [63:0] a, e;
    logic        nv, nx, ichk, isn;
    int          iv;
    int          s;
    real         specials [10];
    specials = '{0.5, 1.5, 2.5, -2.5, 2147483647.4, 2147483647.5, -2147483648.5,
                 -2147483648.4, 4294967296.0, -0.3};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      in_op = cvt_e'($urandom_range(0, 5));
      in_rm = rm_e'($urandom_range(0, 3));
      ichk = 1'b0; isn = 1'b0; nv = 1'b0; nx = 1'b0;
      case (in_op)
        CVT_I2D, CVT_I2S: begin
          iv = ($urandom_range(0, 3) == 0) ? int'($urandom()) >>> $urandom_range(0, 31)
                                           : int'($urandom());
          if (i % 97 == 0) iv = 0;
          if (i % 89 == 0) iv = 32'h8000_0000;
          a = {32'h0, iv};
          e = b($itor(iv));
          if (in_op == CVT_I2S) begin in_rm = RM_RNE; e = {32'h0, d2s(e)}; end
        end
        CVT_D2I: begin
          if ($urandom_range(0, 4) == 0) a = b(specials[$urandom_range(0, 9)]);
          else a = rand_d(1023 + $urandom_range(0, 33), 3);
          to_int(r(a), is_nan_d(a), in_rm, e, nv, nx);
          ichk = 1'b1;
        end
        CVT_S2I: begin
          a = {32'h0, rand_s()};
          if ($urandom_range(0, 3) == 0) a[30:23] = 8'(127 + $urandom_range(0, 33));
          to_int(r(s2d(a[31:0])), is_nan_s(a[31:0]), in_rm, e, nv, nx);
          ichk = 1'b1;
        end
        CVT_S2D: begin
          a = {32'h0, rand_s()};
          e = s2d(a[31:0]);
          isn = is_nan_s(a[31:0]);
        end
        default: begin  // CVT_D2S
          in_rm = RM_RNE;
          a = ($urandom_range(0, 1) == 0) ? rand_d(1023, 40) : rand_d(1023 - 140, 20);
          e = {32'h0, d2s(a)};
          isn = is_nan_d(a);
        end
      endcase
      in_a = a; in_valid = 1'b1; in_tag = 5'($urandom());
      s = (cyc + LAT) % 16;
      exp_v[s] = 1'b1; exp_r[s] = e; exp_nan[s] = isn; exp_ichk[s] = ichk;
      exp_nv[s] = nv; exp_nx[s] = nx;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
