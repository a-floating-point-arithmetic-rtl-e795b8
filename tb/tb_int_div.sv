// tb_int_div: self-checking testbench for int_div.
//
// Issues a division every 10 cycles (the issue interval), signed and
// unsigned at random, and checks that each quotient (truncated toward zero,
// computed here with the simulator's own division) appears exactly 12 edges
// after issue, that in_ready stays low for the 9 cycles after an issue, and
// that a zero divisor gives all ones with out_dz set.
module tb_int_div;

  localparam int LAT = 12;
  localparam int THR = 10;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_signed = 1'b0;
  logic [31:0] in_a = '0, in_b = '0;
  logic [4:0]  in_tag = '0;
  logic        in_ready;
  logic        out_valid;
  logic [31:0] out_quot;
  logic        out_dz;
  logic [4:0]  out_tag;

  int checks = 0, failures = 0, cyc = 0;

  int_div dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        exp_v  [32];
  logic [31:0] exp_q  [32];
  logic        exp_dz [32];
  logic [4:0]  exp_t  [32];
  initial for (int i = 0; i < 32; i++) exp_v[i] = 1'b0;

  always @(negedge clk) if (rst_n) begin
    int s;
    s = cyc % 32;
    checks++;
    if (out_valid !== exp_v[s]) begin
      failures++;
      $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v[s]);
    end else if (exp_v[s]) begin
      checks++;
      if (out_quot !== exp_q[s] || out_dz !== exp_dz[s] || out_tag !== exp_t[s]) begin
        failures++;
        $display("cycle %0d: quotient %h dz %0b expected %h %0b", cyc, out_quot, out_dz,
                 exp_q[s], exp_dz[s]);
      end
    end
    exp_v[s] = 1'b0;
  end

  function automatic logic [31:0] pick(input logic divisor);
    case ($urandom_range(0, 11))
      0: return divisor ? 32'h1 : 32'h0;
      1: return 32'h1;
      2: return 32'hFFFF_FFFF;
      3: return 32'h8000_0000;
      4: return 32'h7FFF_FFFF;
      5: return divisor ? $urandom_range(1, 20) : $urandom_range(0, 100);
      6: return $urandom() >> $urandom_range(0, 31);
      default: return $urandom();
    endcase
  endfunction

  task automatic div(input logic [31:0] a, input logic [31:0] bb, input logic sg);
    int s;
    in_valid = 1'b1; in_signed = sg; in_a = a; in_b = bb; in_tag = 5'($urandom());
    s = (cyc + LAT) % 32;
    exp_v[s] = 1'b1; exp_t[s] = in_tag; exp_dz[s] = (bb == 0);
    if (bb == 0)  exp_q[s] = 32'hFFFF_FFFF;
    else if (sg)  exp_q[s] = 32'($signed(a) / $signed(bb));
    else          exp_q[s] = a / bb;
    if (sg && a == 32'h8000_0000 && bb == 32'hFFFF_FFFF) exp_q[s] = 32'h8000_0000;
    checks++;
    if (!in_ready) begin failures++; $display("cycle %0d: not ready", cyc); end
    @(negedge clk);
    in_valid = 1'b0;
    for (int k = 1; k < THR; k++) begin
      checks++;
      if (in_ready !== 1'b0) begin failures++; $display("cycle %0d: ready too early", cyc); end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    div(32'd7, 32'd2, 1'b0);
    div(32'hFFFF_FFF9, 32'd2, 1'b1);     // -7 / 2 = -3
    div(32'd100, 32'd0, 1'b0);
    div(32'hFFFF_FFFF, 32'd1, 1'b0);
    for (int i = 0; i < 15000; i++) div(pick(1'b0), pick(1'b1), 1'($urandom()));
    repeat (LAT + 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
