// tb_fp_kernels: runs small versions of the two kinds of program the
// execution stage was evaluated with, an FFT and a floating point benchmark
// made of numerical integration and a Maclaurin series, through maple_fpu at
// its default parameters.
//
// The testbench stands in for the compiler's static scheduler and for the
// processor's registers and memory. Each program is cut into batches of
// operations that do not depend on one another. A batch is issued one
// operation per cycle; an operation is held back only when its write-back
// cycle (issue cycle + the unit's fixed latency) is already taken or the
// divider is still iterating. Results are collected by tag from the
// write-back port, and each must arrive in exactly the cycle it was booked
// for, with no collision and no rejected issue.
//
// Kernels (all double precision, round to nearest):
//   FFT       64-point complex radix-2 decimation-in-time FFT, 6 stages of
//             32 butterflies (4 multiplies and 6 add/subtracts each).
//   integral  midpoint rule for the integral of 4/(1+x^2) over [0,1] with
//             16 intervals (conversion, add, multiply, divide).
//   series    exp(0.5) from its Maclaurin series; term k = term(k-1)*x/k;
//             the loop ends when a compare finds the term below 1e-17.
// Every value the stage returns is compared bit for bit with the same
// operations done in the simulator's IEEE double arithmetic in the same
// order, and the final answers are compared with a direct DFT, pi and e^0.5
// within a tolerance. The sizes are this testbench's; the original FFT ran
// on 2^20 points held in the processor's memory, which is not modelled here.
module tb_fp_kernels;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int N    = 64;   // FFT points
  localparam int LOGN = 6;
  localparam int NINT = 16;   // integration intervals

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        issue_valid = 1'b0;
  fpu_op_e     issue_op = OP_FADD;
  fmt_e        issue_fmt = FMT_D;
  rm_e         issue_rm = RM_RNE;
  logic [63:0] issue_a = '0, issue_b = '0;
  logic [4:0]  issue_tag = '0;
  logic        fdiv_ready, idiv_ready, issue_reject;
  logic        wb_valid, wb_cond, wb_collision;
  logic [63:0] wb_result;
  fflags_t     wb_flags;
  logic [4:0]  wb_tag;
  logic [2:0]  wb_unit;

  maple_fpu dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_flop = 0, n_held = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- batch scheduler ----------------
  fpu_op_e     q_op [32];
  logic [63:0] q_a  [32], q_b [32], q_r [32];
  logic        q_got[32];
  int          q_due[32];
  logic        busy [256];          // booked write-back cycles, by cycle mod 256
  int          fdiv_free = 0;
  initial for (int i = 0; i < 256; i++) busy[i] = 1'b0;

  function automatic int lat_of(input fpu_op_e op);
    case (op)
      OP_FADD, OP_FSUB: return LAT_FADD;
      OP_FMUL:          return LAT_FMUL;
      OP_FDIV:          return LAT_FDIV;
      OP_FEQ, OP_FNE, OP_FLT, OP_FLE, OP_FGT, OP_FGE: return LAT_FCMP;
      default:          return LAT_FCVT;
    endcase
  endfunction

  always @(negedge clk) if (rst_n) begin
    int s;
    s = cyc % 256;
    checks++;
    if (wb_valid !== busy[s] || wb_collision) begin
      failures++;
      $display("cycle %0d: wb_valid=%0b booked=%0b collision=%0b", cyc, wb_valid, busy[s],
               wb_collision);
    end
    if (wb_valid) begin
      checks++;
      if (q_due[wb_tag] != cyc) begin
        failures++;
        $display("cycle %0d: tag %0d due in cycle %0d", cyc, wb_tag, q_due[wb_tag]);
      end
      // none of these kernels may overflow, divide by zero or be invalid
      if (wb_flags.nv || wb_flags.dz || wb_flags.of) begin
        failures++;
        $display("cycle %0d: unexpected flags %b", cyc, wb_flags);
      end
      if (wb_unit == 3'd0 && wb_cond !== wb_result[0]) begin
        failures++;
        $display("cycle %0d: wb_cond %0b disagrees with the compare result", cyc, wb_cond);
      end
      q_r[wb_tag]   = wb_result;
      q_got[wb_tag] = 1'b1;
      if (wb_unit inside {3'd3, 3'd4, 3'd6}) n_flop++;
    end
    busy[s] = 1'b0;
  end

  // issue q_*[0..n-1] and wait until every result is back
  task automatic run_batch(input int n);
    int lat;
    logic all;
    for (int i = 0; i < n; i++) q_got[i] = 1'b0;
    for (int i = 0; i < n; i++) begin
      lat = lat_of(q_op[i]);
      while (busy[(cyc + lat) % 256] || (q_op[i] == OP_FDIV && cyc < fdiv_free)) begin
        n_held++;
        @(negedge clk);
      end
      if (q_op[i] == OP_FDIV) begin
        checks++;
        if (!fdiv_ready) begin failures++; $display("cycle %0d: divider not ready", cyc); end
      end
      issue_valid = 1'b1; issue_op = q_op[i]; issue_a = q_a[i]; issue_b = q_b[i];
      issue_tag = 5'(i);
      busy[(cyc + lat) % 256] = 1'b1;
      q_due[i] = cyc + lat;
      if (q_op[i] == OP_FDIV) fdiv_free = cyc + THR_FDIV;
      #1;
      checks++;
      if (issue_reject) begin failures++; $display("cycle %0d: issue rejected", cyc); end
      @(negedge clk);
      issue_valid = 1'b0;
    end
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < n; i++) all &= q_got[i];
    end while (!all);
  endtask

  // compare a returned value with the host's
  task automatic expect_bits(input string what, input logic [63:0] got, input real ref_v);
    checks++;
    if (got !== b(ref_v)) begin
      failures++;
      $display("%s: %h (%g), expected %h (%g)", what, got, r(got), b(ref_v), ref_v);
    end
  endtask

  function automatic real rnd_unit();
    return real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0;
  endfunction

  // ---------------- FFT ----------------
  real         in_re [N], in_im [N], w_re [N/2], w_im [N/2];
  logic [63:0] x_re [N], x_im [N];     // values held by "the processor"
  real         h_re [N], h_im [N];     // host copy, same operations

  task automatic fft();
    int half, tw_step, nb, top, bot, tw;
    int blist_top [N/2], blist_tw [N/2];
    real pr, pi_, tr, ti, sre, sim, err, maxerr;
    logic [63:0] t_re [8], t_im [8];
    int  c0, fl0;
    c0 = cyc; fl0 = n_flop;
    for (int k = 0; k < N; k++) begin
      int rev;
      rev = 0;
      for (int j = 0; j < LOGN; j++) rev |= ((k >> j) & 1) << (LOGN - 1 - j);
      x_re[rev] = b(in_re[k]); x_im[rev] = b(in_im[k]);
      h_re[rev] = in_re[k];    h_im[rev] = in_im[k];
    end
    for (half = 1; half < N; half *= 2) begin
      tw_step = N / (2 * half);
      nb = 0;
      for (int i = 0; i < N; i += 2 * half)
        for (int j = 0; j < half; j++) begin
          blist_top[nb] = i + j; blist_tw[nb] = j * tw_step; nb++;
        end
      // 8 butterflies at a time: 32 products, then 16 and 32 sums
      for (int g = 0; g < nb; g += 8) begin
        for (int k = 0; k < 8; k++) begin
          top = blist_top[g + k]; bot = top + half; tw = blist_tw[g + k];
          q_op[4*k]   = OP_FMUL; q_a[4*k]   = x_re[bot]; q_b[4*k]   = b(w_re[tw]);
          q_op[4*k+1] = OP_FMUL; q_a[4*k+1] = x_im[bot]; q_b[4*k+1] = b(w_im[tw]);
          q_op[4*k+2] = OP_FMUL; q_a[4*k+2] = x_re[bot]; q_b[4*k+2] = b(w_im[tw]);
          q_op[4*k+3] = OP_FMUL; q_a[4*k+3] = x_im[bot]; q_b[4*k+3] = b(w_re[tw]);
        end
        run_batch(32);
        for (int k = 0; k < 8; k++) begin
          logic [63:0] p0, p1, p2, p3;
          p0 = q_r[4*k]; p1 = q_r[4*k+1]; p2 = q_r[4*k+2]; p3 = q_r[4*k+3];
          q_op[2*k]   = OP_FSUB; q_a[2*k]   = p0; q_b[2*k]   = p1;
          q_op[2*k+1] = OP_FADD; q_a[2*k+1] = p2; q_b[2*k+1] = p3;
        end
        run_batch(16);
        for (int k = 0; k < 8; k++) begin
          t_re[k] = q_r[2*k]; t_im[k] = q_r[2*k+1];
        end
        for (int k = 0; k < 8; k++) begin
          top = blist_top[g + k];
          q_op[4*k]   = OP_FADD; q_a[4*k]   = x_re[top]; q_b[4*k]   = t_re[k];
          q_op[4*k+1] = OP_FADD; q_a[4*k+1] = x_im[top]; q_b[4*k+1] = t_im[k];
          q_op[4*k+2] = OP_FSUB; q_a[4*k+2] = x_re[top]; q_b[4*k+2] = t_re[k];
          q_op[4*k+3] = OP_FSUB; q_a[4*k+3] = x_im[top]; q_b[4*k+3] = t_im[k];
        end
        run_batch(32);
        for (int k = 0; k < 8; k++) begin
          top = blist_top[g + k]; bot = top + half;
          x_re[top] = q_r[4*k];   x_im[top] = q_r[4*k+1];
          x_re[bot] = q_r[4*k+2]; x_im[bot] = q_r[4*k+3];
        end
        // the host does the same butterflies in the same order
        for (int k = 0; k < 8; k++) begin
          top = blist_top[g + k]; bot = top + half; tw = blist_tw[g + k];
          pr  = h_re[bot] * w_re[tw];
          pi_ = h_im[bot] * w_im[tw];
          tr  = pr - pi_;
          pr  = h_re[bot] * w_im[tw];
          pi_ = h_im[bot] * w_re[tw];
          ti  = pr + pi_;
          h_re[bot] = h_re[top] - tr; h_im[bot] = h_im[top] - ti;
          h_re[top] = h_re[top] + tr; h_im[top] = h_im[top] + ti;
          expect_bits("fft re", x_re[top], h_re[top]);
          expect_bits("fft im", x_im[top], h_im[top]);
          expect_bits("fft re", x_re[bot], h_re[bot]);
          expect_bits("fft im", x_im[bot], h_im[bot]);
        end
      end
    end
    // against a direct DFT
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      sre = 0.0; sim = 0.0;
      for (int n = 0; n < N; n++) begin
        real ang;
        ang = -2.0 * 3.14159265358979323846 * real'((k * n) % N) / real'(N);
        sre += in_re[n] * $cos(ang) - in_im[n] * $sin(ang);
        sim += in_re[n] * $sin(ang) + in_im[n] * $cos(ang);
      end
      err = (r(x_re[k]) - sre) * (r(x_re[k]) - sre) + (r(x_im[k]) - sim) * (r(x_im[k]) - sim);
      if (err > maxerr) maxerr = err;
    end
    checks++;
    if (maxerr > 1e-24) begin
      failures++;
      $display("FFT differs from the direct DFT: squared error %g", maxerr);
    end
    $display("FFT %0d points: %0d cycles, %0d flops, %0d issues held back", N, cyc - c0,
             n_flop - fl0, n_held);
  endtask

  // ---------------- numerical integration ----------------
  task automatic integral();
    logic [63:0] h, acc, fx [NINT];
    real         hh, hacc, hx;
    int          c0, fl0;
    c0 = cyc; fl0 = n_flop;
    h  = b(1.0 / real'(NINT));
    for (int i = 0; i < NINT; i++) begin q_op[i] = OP_CVTI2D; q_a[i] = 64'(i); q_b[i] = '0; end
    run_batch(NINT);
    for (int i = 0; i < NINT; i++) begin
      expect_bits("i to double", q_r[i], real'(i));
      q_op[i] = OP_FADD; q_a[i] = q_r[i]; q_b[i] = b(0.5);
    end
    run_batch(NINT);
    for (int i = 0; i < NINT; i++) begin q_op[i] = OP_FMUL; q_a[i] = q_r[i]; q_b[i] = h; end
    run_batch(NINT);                                            // x_i
    for (int i = 0; i < NINT; i++) begin q_op[i] = OP_FMUL; q_a[i] = q_r[i]; q_b[i] = q_r[i]; end
    run_batch(NINT);                                            // x_i^2
    for (int i = 0; i < NINT; i++) begin q_op[i] = OP_FADD; q_a[i] = q_r[i]; q_b[i] = b(1.0); end
    run_batch(NINT);
    for (int i = 0; i < NINT; i++) begin q_op[i] = OP_FDIV; q_a[i] = b(4.0); q_b[i] = q_r[i]; end
    run_batch(NINT);
    for (int i = 0; i < NINT; i++) fx[i] = q_r[i];
    acc = '0;
    for (int i = 0; i < NINT; i++) begin
      q_op[0] = OP_FADD; q_a[0] = acc; q_b[0] = fx[i];
      run_batch(1);
      acc = q_r[0];
    end
    q_op[0] = OP_FMUL; q_a[0] = acc; q_b[0] = h;
    run_batch(1);
    hh = 1.0 / real'(NINT);
    hacc = 0.0;
    for (int i = 0; i < NINT; i++) begin
      hx = (real'(i) + 0.5) * hh;
      hacc = hacc + 4.0 / (hx * hx + 1.0);
    end
    expect_bits("integral", q_r[0], hacc * hh);
    checks++;
    if (r(q_r[0]) - 3.14159265358979323846 > 1e-3 || 3.14159265358979323846 - r(q_r[0]) > 1e-3) begin
      failures++;
      $display("integral %g is not close to pi", r(q_r[0]));
    end
    $display("integral: %0.15f in %0d cycles, %0d flops", r(q_r[0]), cyc - c0, n_flop - fl0);
  endtask

  // ---------------- Maclaurin series ----------------
  task automatic series();
    logic [63:0] x, term, sum, kd;
    real         ht, hs;
    int          k, c0, fl0;
    c0 = cyc; fl0 = n_flop;
    x = b(0.5); term = b(1.0); sum = b(1.0);
    ht = 1.0; hs = 1.0;
    k = 1;
    forever begin
      q_op[0] = OP_CVTI2D; q_a[0] = 64'(k); q_b[0] = '0;
      q_op[1] = OP_FMUL;   q_a[1] = term;   q_b[1] = x;
      run_batch(2);
      kd = q_r[0];
      q_op[0] = OP_FDIV; q_a[0] = q_r[1]; q_b[0] = kd;
      run_batch(1);
      term = q_r[0];
      ht = ht * 0.5 / real'(k);
      expect_bits("series term", term, ht);
      q_op[0] = OP_FADD; q_a[0] = sum;  q_b[0] = term;
      q_op[1] = OP_FLT;  q_a[1] = term; q_b[1] = b(1e-17);
      run_batch(2);
      sum = q_r[0];
      hs = hs + ht;
      expect_bits("series sum", sum, hs);
      checks++;
      if (q_r[1] !== {63'h0, ht < 1e-17}) begin
        failures++;
        $display("compare of term %g gave %0d", ht, q_r[1]);
      end
      if (q_r[1][0]) break;
      k++;
      if (k > 40) begin failures++; $display("series did not end"); break; end
    end
    checks++;
    if (r(sum) - 1.6487212707001282 > 1e-15 || 1.6487212707001282 - r(sum) > 1e-15) begin
      failures++;
      $display("series %g is not close to exp(0.5)", r(sum));
    end
    $display("series: exp(0.5) = %0.16f after %0d terms, %0d cycles, %0d flops", r(sum), k,
             cyc - c0, n_flop - fl0);
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin in_re[k] = rnd_unit(); in_im[k] = rnd_unit(); end
    for (int k = 0; k < N / 2; k++) begin
      w_re[k] = $cos(-2.0 * 3.14159265358979323846 * real'(k) / real'(N));
      w_im[k] = $sin(-2.0 * 3.14159265358979323846 * real'(k) / real'(N));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fft();
    integral();
    series();
    repeat (30) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
