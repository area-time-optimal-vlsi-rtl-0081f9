// tb_sys_inv: self-checking test of the first-order systolic inverter.
// Inverts NTEST random upper triangular matrices (odd diagonal) at the
// default size; the first is the identity. Each inverse is compared with
// one computed here by back substitution and checked by A * Ainv = I.
// `done` must arrive after the loading cycle and exactly 2N-1 steps, and
// a start offered while the mesh is busy must be ignored.
module tb_sys_inv;
  import ring_pkg::*;
  localparam int unsigned N     = 16;
  localparam int unsigned NTEST = 8;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  elem_t a [N][N], ainv [N][N], am [N][N], ax [N][N];
  int    checks = 0, failures = 0;

  sys_inv #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_inv(input elem_t m [N][N], output elem_t x [N][N]);
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
  endfunction

  initial begin
    foreach (a[i, j]) a[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      int t0;
      foreach (a[i, j])
        if (n == 0)      a[i][j] = (i == j) ? elem_t'(1) : '0;
        else if (i == j) a[i][j] = elem_t'($urandom) | elem_t'(1);
        else             a[i][j] = elem_t'($urandom);
      am = a;
      foreach (am[i, j]) if (j < i) am[i][j] = '0;
      ref_inv(am, ax);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy before start"); end
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      // A second start while busy must be ignored: offer different data.
      foreach (a[i, j]) a[i][j] = elem_t'($urandom);
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      // one loading cycle, then the 2N-1 steps
      if (cyc - t0 != 1 + 2 * N - 1) begin
        failures++;
        $display("done after %0d cycles, expected %0d", cyc - t0, 2 * N);
      end
      foreach (ainv[i, j]) begin
        elem_t s;
        s = '0;
        for (int p = 0; p < N; p++) s += elem_t'(am[i][p] * ainv[p][j]);
        checks += 2;
        if (ainv[i][j] !== ax[i][j]) begin
          failures++;
          $display("ainv[%0d][%0d]=%0h expected %0h", i, j, ainv[i][j], ax[i][j]);
        end
        if (s !== ((i == j) ? elem_t'(1) : elem_t'(0))) begin
          failures++;
          $display("(A*Ainv)[%0d][%0d]=%0h", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
