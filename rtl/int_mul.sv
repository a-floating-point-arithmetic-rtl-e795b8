// int_mul: 32 x 32 bit integer multiplier of the execution stage,
// two pipeline stages, one new operation per cycle.
//
// Stage 1 extends the operands to 34 bits (sign or zero extension, chosen
// by in_signed), Booth-encodes them in radix 4 and compresses the 17 partial
// products in a Wallace tree to a sum and a carry row, which are registered.
// Stage 2 adds the two rows and registers the 64-bit product. The latency
// (2) and throughput (1) are the document's; the full 64-bit product (the
// low half being the usual 32-bit result) and the tag that travels with the
// operation are this design's choices.
//
// Timing: operands sampled at the clock edge where in_valid is high appear
// on out_* two edges later. rst_n (asynchronous, active low) clears only the
// valid bits.
module int_mul #(
  parameter int unsigned TAG_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_signed,
  input  logic [31:0]       in_a,
  input  logic [31:0]       in_b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [63:0]       out_prod,
  output logic [TAG_W-1:0]  out_tag
);

  logic signed [33:0] a_ext, b_ext;
  logic [67:0]        tree_sum, tree_carry;

  assign a_ext = in_signed ? {{2{in_a[31]}}, in_a} : {2'b00, in_a};
  assign b_ext = in_signed ? {{2{in_b[31]}}, in_b} : {2'b00, in_b};

  booth_wallace #(.W(34)) u_array (
    .a(a_ext), .b(b_ext), .sum(tree_sum), .carry(tree_carry)
  );

  // stage 1 -> 2 register
  logic              s1_valid;
  logic [63:0]       s1_sum, s1_carry;
  logic [TAG_W-1:0]  s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_sum   <= tree_sum[63:0];
    s1_carry <= tree_carry[63:0];
    s1_tag   <= in_tag;
  end

  // stage 2: carry-propagate addition
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    out_prod <= s1_sum + s1_carry;
    out_tag  <= s1_tag;
  end

endmodule
