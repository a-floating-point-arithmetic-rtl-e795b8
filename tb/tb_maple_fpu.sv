// tb_maple_fpu: end-to-end testbench of the execution stage at its default
// parameters.
//
// The testbench plays the compiler's static scheduler: every cycle it picks
// a random operation whose unit can accept it and whose write-back cycle
// (issue cycle + the unit's fixed latency) is still free, reserves that
// cycle, and issues it. Each result must then appear on the write-back port
// in exactly the reserved cycle, from the right unit, with the right tag,
// bits and flags. Expected values come from tb_fp_ref_pkg and the
// simulator's own integer arithmetic. A directed prologue makes overflow,
// underflow to a subnormal, invalid, divide-by-zero and single precision
// happen; an epilogue breaks the schedule on purpose (a division issued to
// a busy divider, two units finishing in one cycle) and checks that the
// stage reports it. Each mechanism is counted, and one that never happened
// counts as a failure.
module tb_maple_fpu;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

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

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_unit [7];
  int n_of = 0, n_uf = 0, n_nv = 0, n_dz = 0, n_nx = 0, n_single = 0;
  int n_reject = 0, n_collision = 0, n_subnormal = 0;
  int n_rm [4];

  // write-back reservations, indexed by due cycle
  logic        res_v    [128];
  logic [63:0] res_r    [128];
  logic        res_nan  [128];
  logic [4:0]  res_t    [128];
  logic [2:0]  res_u    [128];
  logic        res_fchk [128];
  fflags_t     res_f    [128];
  int          col_cycle = -1;      // cycle a collision is planned for
  initial begin
    for (int i = 0; i < 128; i++) res_v[i] = 1'b0;
    for (int i = 0; i < 7; i++) n_unit[i] = 0;
    for (int i = 0; i < 4; i++) n_rm[i] = 0;
  end

  always @(negedge clk) if (rst_n) begin
    int s;
    s = cyc % 128;
    checks++;
    if (wb_valid !== res_v[s]) begin
      failures++;
      $display("cycle %0d: wb_valid=%0b expected %0b", cyc, wb_valid, res_v[s]);
    end else if (res_v[s]) begin
      checks++;
      if ((res_nan[s] ? !(is_nan_d(wb_result) || is_nan_s(wb_result[31:0]))
                      : wb_result !== res_r[s]) || wb_tag !== res_t[s] || wb_unit !== res_u[s]) begin
        failures++;
        $display("cycle %0d: unit %0d tag %0d result %h, expected unit %0d tag %0d %h", cyc,
                 wb_unit, wb_tag, wb_result, res_u[s], res_t[s], res_r[s]);
      end
      if (res_fchk[s]) begin
        checks++;
        if (wb_flags !== res_f[s]) begin
          failures++;
          $display("cycle %0d: flags %b expected %b", cyc, wb_flags, res_f[s]);
        end
      end
      if (wb_flags.of) n_of++;
      if (wb_flags.uf) n_uf++;
      if (wb_flags.nv) n_nv++;
      if (wb_flags.dz) n_dz++;
      if (wb_flags.nx) n_nx++;
      if (wb_result[62:52] == 0 && wb_result[51:0] != 0 && wb_unit inside {3'd3, 3'd4, 3'd6})
        n_subnormal++;
      n_unit[wb_unit]++;
    end
    checks++;
    if (wb_collision !== (cyc == col_cycle)) begin
      failures++;
      $display("cycle %0d: wb_collision=%0b", cyc, wb_collision);
    end
    if (wb_collision) n_collision++;
    res_v[s] = 1'b0;
  end

  function automatic int lat_of(input fpu_op_e op);
    case (op)
      OP_FADD, OP_FSUB: return LAT_FADD;
      OP_FMUL:          return LAT_FMUL;
      OP_FDIV:          return LAT_FDIV;
      OP_MULT, OP_MULTU: return LAT_IMUL;
      OP_DIV, OP_DIVU:  return LAT_IDIV;
      OP_FEQ, OP_FNE, OP_FLT, OP_FLE, OP_FGT, OP_FGE: return LAT_FCMP;
      default:          return LAT_FCVT;
    endcase
  endfunction

  function automatic logic [2:0] unit_of(input fpu_op_e op);
    case (op)
      OP_FADD, OP_FSUB: return 3'd3;
      OP_FMUL:          return 3'd4;
      OP_FDIV:          return 3'd6;
      OP_MULT, OP_MULTU: return 3'd2;
      OP_DIV, OP_DIVU:  return 3'd5;
      OP_FEQ, OP_FNE, OP_FLT, OP_FLE, OP_FGT, OP_FGE: return 3'd0;
      default:          return 3'd1;
    endcase
  endfunction

  int fdiv_free = 0, idiv_free = 0;   // first cycle a divider may be issued

  // issue one operation in the current cycle and reserve its write-back
  task automatic issue(input fpu_op_e op, input fmt_e f, input rm_e rm,
                       input logic [63:0] a, input logic [63:0] bb,
                       input logic [63:0] er, input logic enan,
                       input logic fchk, input fflags_t ef);
    int s;
    issue_valid = 1'b1; issue_op = op; issue_fmt = f; issue_rm = rm;
    issue_a = a; issue_b = bb; issue_tag = 5'($urandom());
    s = (cyc + lat_of(op)) % 128;
    res_v[s] = 1'b1; res_r[s] = er; res_nan[s] = enan; res_t[s] = issue_tag;
    res_u[s] = unit_of(op); res_fchk[s] = fchk; res_f[s] = ef;
    if (op == OP_FDIV) fdiv_free = cyc + THR_FDIV;
    if (op == OP_DIV || op == OP_DIVU) idiv_free = cyc + THR_IDIV;
    if (f == FMT_S) n_single++;
    n_rm[rm]++;
    #1;
    checks++;
    if (issue_reject) begin failures++; $display("cycle %0d: unexpected reject", cyc); end
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  // build a random operation with its expected result
  task automatic rand_op(output fpu_op_e op, output fmt_e f, output rm_e rm,
                         output logic [63:0] a, output logic [63:0] bb,
                         output logic [63:0] er, output logic enan);
    int k, ia, ib;
    f = FMT_D; rm = RM_RNE; enan = 1'b0;
    a = rand_norm_d(1023, 30); bb = rand_norm_d(1023, 30);
    k = $urandom_range(0, 12);
    case (k)
      0, 1: begin
        op = (k == 0) ? OP_FADD : OP_FSUB; rm = rm_e'($urandom_range(0, 3));
        er = ref_add_d(a, (k == 0) ? bb : {~bb[63], bb[62:0]}, rm);
      end
      2: begin op = OP_FMUL; rm = rm_e'($urandom_range(0, 3)); er = ref_mul_d(a, bb, rm); end
      3: begin op = OP_FDIV; rm = rm_e'($urandom_range(0, 3)); er = ref_div_d(a, bb, rm); end
      4: begin op = OP_FLT; er = {63'h0, r(a) < r(bb)}; end
      5: begin op = OP_FGE; bb = ($urandom_range(0, 1) == 1) ? a : bb; er = {63'h0, r(a) >= r(bb)}; end
      6: begin
        op = OP_CVTI2D; ia = int'($urandom()); a = {32'h0, ia}; er = b($itor(ia));
      end
      7: begin
        op = OP_CVTD2I; rm = RM_RTZ; a = rand_norm_d(1023 + 15, 10);
        er = {32'h0, 32'($rtoi(r(a)))};
      end
      8: begin
        op = OP_CVTD2S; f = FMT_D; er = {32'h0, d2s(a)};
      end
      9, 10: begin
        op = (k == 9) ? OP_MULT : OP_MULTU;
        a = {32'h0, $urandom()}; bb = {32'h0, $urandom()};
        if (k == 9) er = 64'($signed(a[31:0]) * $signed(bb[31:0]));
        else        er = a * bb;
      end
      default: begin
        op = (k == 11) ? OP_DIV : OP_DIVU;
        a = {32'h0, $urandom()}; bb = {32'h0, $urandom() >> $urandom_range(0, 31)};
        if (bb == 0) bb = 64'd3;
        if (k == 11) begin
          ia = int'(a[31:0]); ib = int'(bb[31:0]);
          er = {32'h0, 32'(ia / ib)};
        end else er = {32'h0, a[31:0] / bb[31:0]};
      end
    endcase
  endtask

  initial begin
    fpu_op_e     op;
    fmt_e        f;
    rm_e         rm;
    logic [63:0] a, bb, er;
    logic        enan;
    fflags_t     ef;
    int          tries;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // prologue: one of each exception, a single precision add, a subnormal
    ef = '0; ef.of = 1'b1; ef.nx = 1'b1;
    issue(OP_FMUL, FMT_D, RM_RNE, b(1.0e200), b(1.0e200), 64'h7FF0_0000_0000_0000, 0, 1, ef);
    repeat (25) @(negedge clk);
    ef = '0; ef.dz = 1'b1;
    issue(OP_FDIV, FMT_D, RM_RNE, b(1.0), 64'h0, 64'h7FF0_0000_0000_0000, 0, 1, ef);
    repeat (25) @(negedge clk);
    ef = '0; ef.nv = 1'b1;
    issue(OP_FSUB, FMT_D, RM_RNE, 64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, QNAN_D, 1, 1, ef);
    repeat (25) @(negedge clk);
    ef = '0; ef.uf = 1'b1; ef.nx = 1'b1;
    issue(OP_FMUL, FMT_D, RM_RNE, 64'h0010_0000_0000_0001, b(0.75), 64'h000C_0000_0000_0001, 0, 1, ef);
    ef = '0;
    repeat (25) @(negedge clk);
    issue(OP_FADD, FMT_S, RM_RNE, {32'h0, 32'h3FC0_0000}, {32'h0, 32'h4020_0000},
          {32'h0, 32'h4080_0000}, 0, 1, ef);                          // 1.5 + 2.5 = 4
    repeat (25) @(negedge clk);
    issue(OP_CVTS2D, FMT_S, RM_RNE, {32'h0, 32'h3FC0_0000}, 64'h0, b(1.5), 0, 1, ef);
    repeat (25) @(negedge clk);

    // main run: random statically scheduled stream
    for (int i = 0; i < 6000; i++) begin
      tries = 0;
      do begin
        rand_op(op, f, rm, a, bb, er, enan);
        tries++;
      end while (tries < 20 &&
                 (res_v[(cyc + lat_of(op)) % 128] ||
                  (op == OP_FDIV && cyc < fdiv_free) ||
                  ((op == OP_DIV || op == OP_DIVU) && cyc < idiv_free)));
      if (tries >= 20) begin
        @(negedge clk);
        continue;
      end
      checks++;
      if ((op == OP_FDIV && !fdiv_ready) || ((op == OP_DIV || op == OP_DIVU) && !idiv_ready)) begin
        failures++;
        $display("cycle %0d: divider not ready when the schedule allows it", cyc);
      end
      ef = '0;
      issue(op, f, rm, a, bb, er, enan, 1'b0, ef);
    end
    repeat (30) @(negedge clk);

    // epilogue 1: a division issued to a busy divider is rejected
    issue(OP_FDIV, FMT_D, RM_RNE, b(3.0), b(2.0), b(1.5), 0, 0, ef);
    issue_valid = 1'b1; issue_op = OP_FDIV; issue_a = b(5.0); issue_b = b(2.0);
    #1;
    checks++;
    if (!issue_reject) begin failures++; $display("busy divider not reported"); end
    else n_reject++;
    @(negedge clk);
    issue_valid = 1'b0;
    issue(OP_DIVU, FMT_D, RM_RNE, 64'd100, 64'd7, 64'd14, 0, 0, ef);
    issue_valid = 1'b1; issue_op = OP_DIV; issue_a = 64'd9; issue_b = 64'd3;
    #1;
    checks++;
    if (!issue_reject) begin failures++; $display("busy int divider not reported"); end
    else n_reject++;
    @(negedge clk);
    issue_valid = 1'b0;
    repeat (30) @(negedge clk);

    // epilogue 2: a multiply and an add scheduled to finish together; the
    // add has the higher write-back priority, the product is lost
    issue_valid = 1'b1; issue_op = OP_FMUL; issue_a = b(2.0); issue_b = b(3.0);
    col_cycle = cyc + LAT_FMUL;
    @(negedge clk);
    issue(OP_FADD, FMT_D, RM_RNE, b(1.0), b(1.0), b(2.0), 0, 0, ef);
    repeat (8) @(negedge clk);

    // every mechanism must have happened
    for (int u = 0; u < 7; u++) begin
      checks++;
      if (n_unit[u] == 0) begin failures++; $display("unit %0d never used", u); end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_rm[m] == 0) begin failures++; $display("rounding direction %0d never used", m); end
    end
    checks += 8;
    if (n_of == 0)        begin failures++; $display("no overflow"); end
    if (n_uf == 0)        begin failures++; $display("no underflow"); end
    if (n_nv == 0)        begin failures++; $display("no invalid"); end
    if (n_dz == 0)        begin failures++; $display("no divide by zero"); end
    if (n_nx == 0)        begin failures++; $display("no inexact"); end
    if (n_single == 0)    begin failures++; $display("no single precision"); end
    if (n_reject < 2)     begin failures++; $display("busy dividers not both reported"); end
    if (n_collision == 0) begin failures++; $display("no write-back collision"); end
    $display("units cmp %0d cvt %0d imul %0d fadd %0d fmul %0d idiv %0d fdiv %0d",
             n_unit[0], n_unit[1], n_unit[2], n_unit[3], n_unit[4], n_unit[5], n_unit[6]);
    $display("of %0d uf %0d nv %0d dz %0d nx %0d single %0d subnormal %0d reject %0d collision %0d",
             n_of, n_uf, n_nv, n_dz, n_nx, n_single, n_subnormal, n_reject, n_collision);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
