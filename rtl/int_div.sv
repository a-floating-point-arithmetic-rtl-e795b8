// int_div: 32-bit integer divider of the execution stage, radix-2 SRT,
// fixed latency 12 cycles, a new division every 10 cycles.
//
// Stage (1) takes absolute values, counts the divisor's leading zeros s and
// shifts the divisor left by s so that, read as a binary fraction, it lies
// in [1/2, 1); the dividend is read as a fraction below 1/2. Stage (2) is
// iterated ITER times, each pass retiring STEPS radix-2 SRT digits from
// {-1, 0, +1}: the digit is chosen from the top four bits of the doubled
// partial remainder alone (>= 1/2 gives +1, < -1/2 gives -1, otherwise 0),
// and the remainder stays in two's complement. Stage (3) corrects a negative
// final remainder, shifts the fractional quotient right by (ITER*STEPS-1-s)
// to get the integer quotient, restores the sign and registers the result.
//
// The document gives the algorithm (radix-2 SRT), the latency (12), the
// issue interval (10) and the three-stage structure with the middle stage
// looping ten times. The digits per pass (4, enough for the 32 quotient bits
// after normalisation), the unsigned/signed select, truncation toward zero,
// and the result for a zero divisor (all ones, out_dz set) are this
// design's choices. There is no remainder output.
//
// Handshake: in_ready is high when an operation issued now can enter the
// loop as soon as it leaves stage (1); an operation issued while in_ready is
// low is a scheduling error and is dropped (an assertion reports it).
module int_div #(
  parameter int unsigned TAG_W = 5,
  parameter int unsigned ITER  = 10,   // passes through stage (2)
  parameter int unsigned STEPS = 4     // SRT digits per pass
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_signed,
  input  logic [31:0]       in_a,       // dividend
  input  logic [31:0]       in_b,       // divisor
  input  logic [TAG_W-1:0]  in_tag,
  output logic              in_ready,
  output logic              out_valid,
  output logic [31:0]       out_quot,
  output logic              out_dz,
  output logic [TAG_W-1:0]  out_tag
);

  localparam int QD = ITER * STEPS;  // quotient digits
  localparam int WW = 36;            // partial remainder width (2^-33 units)
  localparam int QW = QD + 2;

  // ---------------- stage (1) ----------------
  logic        neg_c, dz_c;
  logic [31:0] n_abs, d_abs, d_norm;
  logic [4:0]  s_c;

  always_comb begin
    n_abs = (in_signed && in_a[31]) ? 32'(-in_a) : in_a;
    d_abs = (in_signed && in_b[31]) ? 32'(-in_b) : in_b;
    neg_c = in_signed && (in_a[31] ^ in_b[31]);
    dz_c  = (in_b == '0);
    s_c   = '0;
    for (int i = 0; i < 32; i++) if (d_abs[i]) s_c = 5'(31 - i);
    d_norm = d_abs << s_c;
  end

  logic              s1_valid, s1_neg, s1_dz;
  logic [4:0]        s1_s;
  logic [31:0]       s1_n, s1_d;
  logic [TAG_W-1:0]  s1_tag;

  // ---------------- stage (2) state ----------------
  logic                    it_active;
  logic [$clog2(ITER+1)-1:0] it_cnt;
  logic signed [WW-1:0]    it_w, it_d;
  logic signed [QW-1:0]    it_q;
  logic                    it_neg, it_dz;
  logic [4:0]              it_s;
  logic [TAG_W-1:0]        it_tag;

  assign in_ready = !s1_valid && (!it_active || it_cnt <= 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      s1_neg <= neg_c;
      s1_dz  <= dz_c;
      s1_s   <= s_c;
      s1_n   <= n_abs;
      s1_d   <= d_norm;
      s1_tag <= in_tag;
    end
  end

  // STEPS radix-2 SRT steps on (w, q)
  function automatic logic [WW+QW-1:0] srt_steps(input logic signed [WW-1:0] w_in,
                                                 input logic signed [QW-1:0] q_in,
                                                 input logic signed [WW-1:0] d);
    logic signed [WW-1:0] w, w2;
    logic signed [QW-1:0] q;
    logic signed [3:0]    est;       // 2w truncated to multiples of 1/2
    w = w_in;
    q = q_in;
    for (int k = 0; k < int'(STEPS); k++) begin
      w2  = w <<< 1;
      est = w2[WW-1 -: 4];
      if (est >= 4'sd1) begin
        w = w2 - d;
        q = (q <<< 1) + QW'(1);
      end else if (est <= -4'sd2) begin
        w = w2 + d;
        q = (q <<< 1) - QW'(1);
      end else begin
        w = w2;
        q = q <<< 1;
      end
    end
    return {w, q};
  endfunction

  logic signed [WW-1:0] w_nx;
  logic signed [QW-1:0] q_nx;
  logic                 load;

  assign load = s1_valid;

  always_comb begin
    if (load) {w_nx, q_nx} = srt_steps(WW'(s1_n), '0, WW'({s1_d, 1'b0}));
    else      {w_nx, q_nx} = srt_steps(it_w, it_q, it_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it_active <= 1'b0;
      it_cnt    <= '0;
    end else if (load) begin
      it_active <= 1'b1;
      it_cnt    <= ($clog2(ITER+1))'(ITER - 1);
    end else if (it_active && it_cnt != 0) begin
      it_cnt    <= it_cnt - 1'b1;
    end else begin
      it_active <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      it_w   <= w_nx;
      it_q   <= q_nx;
      it_d   <= WW'({s1_d, 1'b0});
      it_neg <= s1_neg;
      it_dz  <= s1_dz;
      it_s   <= s1_s;
      it_tag <= s1_tag;
    end else if (it_active && it_cnt != 0) begin
      it_w   <= w_nx;
      it_q   <= q_nx;
    end
  end

  // ---------------- stage (3) ----------------
  logic              done;
  logic signed [QW-1:0] q_fix;
  logic [QW-1:0]     q_int;
  logic [31:0]       quot_c;

  assign done = it_active && (it_cnt == 0);

  always_comb begin
    q_fix  = (it_w < 0) ? it_q - QW'(1) : it_q;
    q_int  = q_fix >> (QD - 1 - int'(it_s));
    quot_c = it_neg ? 32'(-q_int[31:0]) : q_int[31:0];
    if (it_dz) quot_c = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= done;
  end

  always_ff @(posedge clk) begin
    if (done) begin
      out_quot <= quot_c;
      out_dz   <= it_dz;
      out_tag  <= it_tag;
    end
  end

  // an operation must not be issued while the loop is still busy
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $warning("int_div: operation issued while busy, dropped");

endmodule
