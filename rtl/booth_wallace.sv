// booth_wallace: radix-4 Booth encoded multiplier array reduced by a
// Wallace tree of 3:2 carry-save adders (combinational).
//
// The multiplier b is recoded three bits at a time (overlapping by one)
// into W/2 digits in {-2,-1,0,+1,+2}; each digit selects 0, +-a or +-2a as a
// partial product, sign-extended to 2W bits and shifted by two bit positions
// per digit. The Wallace tree then compresses the W/2 rows, three into two
// per level, until two rows remain. Those two rows, sum and carry, are the
// outputs: sum + carry equals a*b modulo 2^(2W). The final carry-propagate
// addition is left to the caller so that a pipeline register can sit in
// front of it. Operands are two's complement; callers that need an unsigned
// product zero-extend by at least one bit. W must be even.
//
// The document names the algorithm (radix-4 Booth encoding, Wallace tree
// compression) for both the floating point and the integer multiplier; the
// way partial products are negated and the tree schedule are this design's.
//
// Bit 0 of the carry row is always 0, because a carry-save adder shifts its
// carries up by one place; it is kept so both rows have the same width.
module booth_wallace #(
  parameter int unsigned W = 54
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic        [2*W-1:0] sum,
  output logic        [2*W-1:0] carry
);

  localparam int NPP = W / 2;

  // rows remaining after lvl levels of 3:2 compression
  function automatic int rows_at(input int lvl);
    int n;
    n = NPP;
    for (int k = 0; k < lvl; k++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int num_levels();
    int n, l;
    n = NPP;
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int NLVL = num_levels();

  logic [2*W-1:0] pp_row [NPP];

  // Booth encoding and partial product selection
  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [2:0]            grp;
    logic signed [2*W-1:0] a_ext, pp;
    if (i == 0) begin : g_first
      assign grp = {b[1], b[0], 1'b0};
    end else begin : g_rest
      assign grp = {b[2*i+1], b[2*i], b[2*i-1]};
    end
    assign a_ext = {{W{a[W-1]}}, a};
    always_comb begin
      unique case (grp)
        3'b001, 3'b010: pp = a_ext;
        3'b011:         pp = a_ext <<< 1;
        3'b100:         pp = -(a_ext <<< 1);
        3'b101, 3'b110: pp = -a_ext;
        default:        pp = '0;
      endcase
    end
    assign pp_row[i] = pp << (2 * i);
  end

  // Wallace tree: each level turns groups of three rows into two
  for (genvar l = 0; l < NLVL; l++) begin : g_lvl
    localparam int N  = rows_at(l);
    localparam int NG = N / 3;
    localparam int NN = rows_at(l + 1);
    logic [2*W-1:0] cur [NPP];
    logic [2*W-1:0] nxt [NPP];
    if (l == 0) begin : g_src_pp
      assign cur = pp_row;
    end else begin : g_src_lvl
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar t = 0; t < NG; t++) begin : g_csa
      logic [2*W-1:0] x, y, z;
      assign x = cur[3*t];
      assign y = cur[3*t+1];
      assign z = cur[3*t+2];
      assign nxt[2*t]   = x ^ y ^ z;
      assign nxt[2*t+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar t = 0; t < N % 3; t++) begin : g_pass
      assign nxt[2*NG+t] = cur[3*NG+t];
    end
    for (genvar t = NN; t < NPP; t++) begin : g_idle
      assign nxt[t] = '0;
    end
  end

  assign sum   = g_lvl[NLVL-1].nxt[0];
  assign carry = g_lvl[NLVL-1].nxt[1];

endmodule
