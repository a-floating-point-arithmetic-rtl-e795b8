// tb_fp_cmp: self-checking testbench for fp_cmp.
//
// Issues one comparison per cycle with a random predicate on random doubles
// and singles (including equal values, signed zeros, infinities, quiet and
// signalling NaNs and subnormals), and checks the condition bit and the
// invalid flag one edge later against the simulator's own comparisons.
module tb_fp_cmp;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0;
  fmt_e        in_fmt = FMT_D;
  cmp_e        in_pred = CMP_EQ;
  logic [63:0] in_a = '0, in_b = '0;
  logic [4:0]  in_tag = '0;
  logic        out_valid, out_cond;
  fflags_t     out_flags;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0;
  logic        e_v = 1'b0, e_c = 1'b0, e_nv = 1'b0;
  logic [4:0]  e_t = '0;

  fp_cmp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic snan_d(input logic [63:0] x);
    return is_nan_d(x) && !x[51];
  endfunction

  initial begin
    logic [63:0] a, bb, da, db;
    real         ra, rb;
    logic        un, sn;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      in_fmt = fmt_e'($urandom_range(0, 1));
      if (in_fmt == FMT_D) begin
        a  = rand_d(1023, 2);
        bb = ($urandom_range(0, 3) == 0) ? a : rand_d(1023, 2);
        if ($urandom_range(0, 9) == 0) begin a = 64'h0; bb = 64'h8000_0000_0000_0000; end
        da = a; db = bb;
      end else begin
        a  = {32'h0, rand_s()};
        bb = ($urandom_range(0, 3) == 0) ? a : {32'h0, rand_s()};
        da = s2d(a[31:0]); db = s2d(bb[31:0]);
        if (is_nan_s(a[31:0]))  da = a[22] ? 64'h7FF8_0000_0000_0000 : 64'h7FF0_0000_0000_0001;
        if (is_nan_s(bb[31:0])) db = bb[22] ? 64'h7FF8_0000_0000_0000 : 64'h7FF0_0000_0000_0001;
      end
      in_pred = cmp_e'($urandom_range(0, 5));
      in_a = a; in_b = bb; in_tag = 5'($urandom()); in_valid = 1'b1;
      ra = r(da); rb = r(db);
      un = is_nan_d(da) || is_nan_d(db);
      sn = snan_d(da) || snan_d(db);
      @(posedge clk);
      e_v = 1'b1; e_t = in_tag;
      case (in_pred)
        CMP_EQ: begin e_c = (ra == rb);    e_nv = sn; end
        CMP_NE: begin e_c = !(ra == rb);   e_nv = sn; end
        CMP_LT: begin e_c = (ra < rb);     e_nv = un; end
        CMP_LE: begin e_c = (ra <= rb);    e_nv = un; end
        CMP_GT: begin e_c = (ra > rb);     e_nv = un; end
        default: begin e_c = (ra >= rb);   e_nv = un; end
      endcase
      @(negedge clk);
      checks++;
      if (out_valid !== 1'b1 || out_cond !== e_c || out_flags.nv !== e_nv || out_tag !== e_t
          || out_flags.nx || out_flags.of) begin
        failures++;
        $display("%h %h pred %0d: cond %0b nv %0b expected %0b %0b", a, bb, in_pred,
                 out_cond, out_flags.nv, e_c, e_nv);
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
