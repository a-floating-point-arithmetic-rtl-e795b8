// tb_int_mul: self-checking testbench for int_mul.
//
// Issues one multiplication per cycle, signed and unsigned at random, with
// random operands and corner values (0, 1, -1, most negative, all ones),
// and checks that each 64-bit product, computed here with the simulator's
// own multiplication, appears exactly two edges after issue with its tag.
module tb_int_mul;

  localparam int LAT = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_signed = 1'b0;
  logic [31:0] in_a = '0, in_b = '0;
  logic [4:0]  in_tag = '0;
  logic        out_valid;
  logic [63:0] out_prod;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0, cyc = 0;

  int_mul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        exp_v [16];
  logic [63:0] exp_p [16];
  logic [4:0]  exp_t [16];
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
      if (out_prod !== exp_p[s] || out_tag !== exp_t[s]) begin
        failures++;
        $display("cycle %0d: product %h expected %h", cyc, out_prod, exp_p[s]);
      end
    end
    exp_v[s] = 1'b0;
  end

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 9))
      0: return 32'h0;
      1: return 32'h1;
      2: return 32'hFFFF_FFFF;
      3: return 32'h8000_0000;
      4: return 32'h7FFF_FFFF;
      default: return $urandom();
    endcase
  endfunction

  initial begin
    logic [31:0] a, bb;
    logic        sg;
    int          s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      a  = pick();
      bb = pick();
      sg = 1'($urandom());
      in_valid = ($urandom_range(0, 7) != 0);
      in_signed = sg; in_a = a; in_b = bb; in_tag = 5'($urandom());
      if (in_valid) begin
        s = (cyc + LAT) % 16;
        exp_v[s] = 1'b1;
        exp_t[s] = in_tag;
        if (sg) exp_p[s] = 64'($signed({{32{a[31]}}, a}) * $signed({{32{bb[31]}}, bb}));
        else    exp_p[s] = {32'h0, a} * {32'h0, bb};
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
