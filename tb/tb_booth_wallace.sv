// tb_booth_wallace: self-checking testbench for the combinational
// booth_wallace array at its default width (54 bits, as used by the double
// precision multiplier) and at 34 bits (as used by the integer multiplier).
// Random two's complement operands, plus the extreme values, are applied;
// the sum and carry rows must add up to the exact product modulo 2^(2W),
// computed here with the simulator's own multiplication.
module tb_booth_wallace;

  logic signed [53:0]  a54 = '0, b54 = '0;
  logic        [107:0] s54, c54;
  logic signed [33:0]  a34 = '0, b34 = '0;
  logic        [67:0]  s34, c34;

  int checks = 0, failures = 0;

  booth_wallace              dut54 (.a(a54), .b(b54), .sum(s54), .carry(c54));
  booth_wallace #(.W(34))    dut34 (.a(a34), .b(b34), .sum(s34), .carry(c34));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [53:0] pick54();
    case ($urandom_range(0, 7))
      0: return '0;
      1: return 54'h1;
      2: return {1'b1, 53'h0};
      3: return {1'b0, {53{1'b1}}};
      4: return '1;
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    logic [107:0] p54;
    logic [67:0]  p34;
    for (int i = 0; i < 20000; i++) begin
      a54 = pick54();
      b54 = pick54();
      a34 = 34'(pick54());
      b34 = 34'(pick54());
      #1;
      p54 = 108'(a54 * b54);
      p34 = 68'(a34 * b34);
      checks += 2;
      if (s54 + c54 !== p54) begin
        failures++;
        $display("W=54: %h * %h gives %h, expected %h", a54, b54, s54 + c54, p54);
      end
      if (s34 + c34 !== p34) begin
        failures++;
        $display("W=34: %h * %h gives %h, expected %h", a34, b34, s34 + c34, p34);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
