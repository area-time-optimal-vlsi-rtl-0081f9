// tb_tri_matrix_top: end-to-end test of the whole design at its default
// sizes (no parameter is overridden).
//   1. A random 16 x 16 upper triangular matrix (odd diagonal) is inverted
//      by both the Type-2 mixed inverter and the systolic inverter while
//      both multipliers (pipelined mesh and serially fed) work through
//      three back-to-back products; a second start offered to each busy
//      inverter must be ignored.
//   2. Matrix multiplication by inversion: with 5 x 5 matrices A and B the
//      16 x 16 triangular matrix [I A 0 0; 0 I B 0; 0 0 I 0; 0 0 0 1] is
//      inverted by both inverters; rows 0-4, columns 10-14 of the inverse
//      must equal A*B, which both multipliers also compute.
// All results are compared with values computed here (back substitution,
// triple-loop products). Latencies are checked: 2N cycles for the systolic
// inverter, mixed_inv_lat for the mixed one, pipe_mult_lat / ser_mult_lat
// and the issue interval (R or R*R cycles) for the multipliers. The test
// also counts how often each mechanism happened and fails if one never
// did: stalls of both multipliers (start held while in_ready is low), mesh
// steps of the mixed inverter and
// of its inner Type-1 inverters, inner-product accumulations, starts
// ignored while busy, and the three M-module instructions.
module tb_tri_matrix_top;
  import ring_pkg::*;
  localparam int unsigned N = 16, S = 4, R = 4, NN = 5;
  localparam int unsigned LAT_MIX = mixed_inv_lat(2, N, S, S / clog2i(S), clog2i(S));
  localparam int unsigned LAT_MUL = pipe_mult_lat(N, R);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  mix_start = 1'b0, mix_busy, mix_done;
  logic  sys_start = 1'b0, sys_busy, sys_done;
  logic  mul_start = 1'b0, mul_in_ready, mul_out_valid;
  elem_t mix_a [N][N], mix_ainv [N][N], sys_a [N][N], sys_ainv [N][N];
  elem_t mul_a [N][N], mul_b [N][N], mul_c [N][N];
  logic  ser_start = 1'b0, ser_in_ready, ser_out_valid;
  elem_t ser_a [N][N], ser_b [N][N], ser_c [N][N];
  localparam int unsigned RS = 2;
  localparam int unsigned LAT_SER = ser_mult_lat(N, RS);
  int    checks = 0, failures = 0;

  tri_matrix_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ser_stall = 0, n_stall = 0, n_mix_step = 0, n_inner_step = 0, n_acc = 0, n_ignored = 0;
  int n_first = 0, n_general = 0, n_final = 0;
  always @(negedge clk) if (rst_n) begin
    if (mul_start && !mul_in_ready) n_stall++;
    if (ser_start && !ser_in_ready) n_ser_stall++;
    if (dut.u_mix.commit) n_mix_step++;
    if (dut.u_mix.g_row[0].g_col[0].g_d.g_mix.u_dinv.commit) n_inner_step++;
    if (dut.u_mul.g_row[0].g_col[0].u_ip.p_valid) n_acc++;
    if ((mix_start && mix_busy) || (sys_start && sys_busy)) n_ignored++;
    if (dut.u_sys.g_row[0].g_col[3].g_m.u_cell.op == 2'd1) n_first++;
    if (dut.u_sys.g_row[0].g_col[3].g_m.u_cell.op == 2'd2) n_general++;
    if (dut.u_sys.g_row[0].g_col[3].g_m.u_cell.op == 2'd3) n_final++;
  end

  // ---------------- reference models ----------------
  typedef elem_t mat_t [N][N];
  function automatic mat_t ref_inv(input mat_t m);
    mat_t x;
    foreach (x[i, j]) x[i][j] = '0;
    for (int j = 0; j < N; j++) begin
      x[j][j] = ring_inv(m[j][j]);
      for (int i = j - 1; i >= 0; i--) begin
        elem_t s;
        s = '0;
        for (int p = i + 1; p <= j; p++) s += elem_t'(m[i][p] * x[p][j]);
        x[i][j] = elem_t'(-s * ring_inv(m[i][i]));
      end
    end
    return x;
  endfunction
  function automatic mat_t ref_mul(input mat_t x, input mat_t y);
    mat_t z;
    foreach (z[i, k]) begin
      z[i][k] = '0;
      for (int p = 0; p < N; p++) z[i][k] += elem_t'(x[i][p] * y[p][k]);
    end
    return z;
  endfunction

  task automatic cmp_mat(input string nm, input mat_t got, input mat_t exp);
    int bad;
    bad = 0;
    foreach (got[i, j]) begin
      checks++;
      if (got[i][j] !== exp[i][j]) begin
        bad++;
        if (bad <= 4) $display("%s[%0d][%0d]=%0h expected %0h", nm, i, j, got[i][j], exp[i][j]);
      end
    end
    failures += bad;
  endtask

  // Runs both inverters on m (starting them together) and checks both.
  task automatic run_inverters(input mat_t m, output mat_t mix_res, output mat_t sys_res);
    int  t0;
    bit  gm, gs;
    mat_t x;
    x = ref_inv(m);
    @(negedge clk);
    mix_a = m; sys_a = m;
    mix_start = 1'b1; sys_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    // offered while busy: must be ignored
    foreach (mix_a[i, j]) begin mix_a[i][j] = elem_t'($urandom); sys_a[i][j] = elem_t'($urandom); end
    @(negedge clk);
    mix_start = 1'b0; sys_start = 1'b0;
    gm = 0; gs = 0;
    while (!(gm && gs)) begin
      if (sys_done) begin
        gs = 1; checks++;
        if (cyc - t0 != 2 * N) begin failures++; $display("systolic done after %0d, expected %0d", cyc - t0, 2 * N); end
        sys_res = sys_ainv;
        cmp_mat("sys_ainv", sys_ainv, x);
      end
      if (mix_done) begin
        gm = 1; checks++;
        if (cyc - t0 != LAT_MIX) begin failures++; $display("mixed done after %0d, expected %0d", cyc - t0, LAT_MIX); end
        mix_res = mix_ainv;
        cmp_mat("mix_ainv", mix_ainv, x);
      end
      @(negedge clk);
    end
  endtask

  // Multiplier driver: issues the queued pairs back to back.
  // (fixed arrays with counters rather than queues of unpacked arrays)
  mat_t mq_a [4], mq_b [4], mq_exp [4];
  int   mq_t [4];
  int   n_queued = 0, n_issued = 0, mul_got = 0, mul_last = -1;
  int   ns_issued = 0, ser_got = 0, ser_last = -1;
  int   ms_t [4];
  task automatic run_ser();
    while (ns_issued < n_queued) begin
      ser_a = mq_a[ns_issued];
      ser_b = mq_b[ns_issued];
      ser_start = 1'b1;
      while (!ser_in_ready) @(negedge clk);
      ms_t[ns_issued] = cyc;
      ns_issued++;
      @(negedge clk);
    end
    ser_start = 1'b0;
  endtask
  always @(negedge clk) if (rst_n && ser_out_valid) begin
    checks++;
    if (cyc - ms_t[ser_got] != LAT_SER) begin failures++; $display("serial product after %0d, expected %0d", cyc - ms_t[ser_got], LAT_SER); end
    if (ser_last >= 0 && cyc - ser_last < RS * RS) begin failures++; $display("serial products too close"); end
    ser_last = cyc;
    cmp_mat("ser_c", ser_c, mq_exp[ser_got]);
    ser_got++;
  end

  task automatic run_mul();
    while (n_issued < n_queued) begin
      mul_a = mq_a[n_issued];
      mul_b = mq_b[n_issued];
      mul_start = 1'b1;
      while (!mul_in_ready) @(negedge clk);
      mq_t[n_issued] = cyc;
      n_issued++;
      @(negedge clk);
    end
    mul_start = 1'b0;
  endtask
  always @(negedge clk) if (rst_n && mul_out_valid) begin
    mat_t e;
    int   t;
    e = mq_exp[mul_got];
    t = mq_t[mul_got];
    checks++;
    if (cyc - t != LAT_MUL) begin failures++; $display("product after %0d, expected %0d", cyc - t, LAT_MUL); end
    if (mul_last >= 0 && cyc - mul_last < R) begin failures++; $display("products too close"); end
    mul_last = cyc;
    cmp_mat("mul_c", mul_c, e);
    mul_got++;
  end

  initial begin
    mat_t m, mr, sr, x, y, t2;
    foreach (m[i, j]) begin
      ser_a[i][j] = '0; ser_b[i][j] = '0;
      mix_a[i][j] = '0; sys_a[i][j] = '0; mul_a[i][j] = '0; mul_b[i][j] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1: random triangular matrix; three products in the multiplier
    foreach (m[i, j])
      if (i == j)     m[i][j] = elem_t'($urandom) | elem_t'(1);
      else if (j > i) m[i][j] = elem_t'($urandom);
      else            m[i][j] = '0;
    for (int k = 0; k < 3; k++) begin
      foreach (x[i, j]) begin x[i][j] = elem_t'($urandom); y[i][j] = elem_t'($urandom); end
      mq_a[n_queued] = x; mq_b[n_queued] = y; mq_exp[n_queued] = ref_mul(x, y);
      n_queued++;
    end
    fork
      run_mul();
      run_ser();
      run_inverters(m, mr, sr);
    join

    // ---- 2: multiplication by inversion
    foreach (m[i, j]) m[i][j] = (i == j) ? elem_t'(1) : '0;
    foreach (x[i, j]) begin x[i][j] = '0; y[i][j] = '0; end
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NN; j++) begin
        x[i][j] = elem_t'($urandom);
        y[i][j] = elem_t'($urandom);
        m[i][NN + j]      = x[i][j];
        m[NN + i][2 * NN + j] = y[i][j];
      end
    t2 = ref_mul(x, y);
    mq_a[n_queued] = x; mq_b[n_queued] = y; mq_exp[n_queued] = t2;
    n_queued++;
    fork
      run_mul();
      run_ser();
      run_inverters(m, mr, sr);
    join
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NN; j++) begin
        checks += 2;
        if (mr[i][2 * NN + j] !== t2[i][j]) begin failures++; $display("mixed: AB[%0d][%0d] wrong", i, j); end
        if (sr[i][2 * NN + j] !== t2[i][j]) begin failures++; $display("systolic: AB[%0d][%0d] wrong", i, j); end
      end
    repeat (LAT_MUL + LAT_SER + 4) @(negedge clk);
    checks++;
    if (mul_got != 4) begin failures++; $display("multiplier returned %0d of 4 products", mul_got); end
    checks++;
    if (ser_got != 4) begin failures++; $display("serial multiplier returned %0d of 4 products", ser_got); end

    checks++;
    if (n_ser_stall == 0) begin failures++; $display("no serial multiplier stall happened"); end
    $display("mechanisms: serial_stalls=%0d stalls=%0d mixed_steps=%0d inner_type1_steps=%0d accumulations=%0d ignored_starts=%0d first=%0d general=%0d final=%0d",
             n_ser_stall, n_stall, n_mix_step, n_inner_step, n_acc, n_ignored, n_first, n_general, n_final);
    checks += 8;
    if (n_stall == 0)      begin failures++; $display("no multiplier stall happened"); end
    if (n_mix_step != 2 * (2 * (N / S) - 1)) begin failures++; $display("mixed mesh steps %0d", n_mix_step); end
    if (n_inner_step == 0) begin failures++; $display("no inner Type-1 step happened"); end
    if (n_acc == 0)        begin failures++; $display("no accumulation happened"); end
    if (n_ignored == 0)    begin failures++; $display("no start was ignored"); end
    if (n_first == 0)      begin failures++; $display("no first instruction"); end
    if (n_general == 0)    begin failures++; $display("no general instruction"); end
    if (n_final == 0)      begin failures++; $display("no final instruction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
