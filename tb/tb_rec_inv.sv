// tb_rec_inv: self-checking test of the recursive triangular inverter.
// Streams NTEST random upper triangular N x N matrices with odd diagonal
// entries into rec_inv, one per cycle with occasional gaps; the first is the
// identity. Each result is checked two ways: against an inverse computed
// here by back substitution, and by forming A * Ainv, which must be the
// identity. The arrival cycle is checked against rec_inv_lat(N).
module tb_rec_inv;
  import ring_pkg::*;
  localparam int unsigned N     = 8;
  localparam int unsigned NTEST = 30;
  localparam int unsigned LAT   = rec_inv_lat(N);

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  elem_t a [N][N], ainv [N][N];
  int    checks = 0, failures = 0;

  rec_inv #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { elem_t m [N][N]; elem_t x [N][N]; int t; } exp_t;
  exp_t q[$];
  int   got = 0;

  // Inverse of an upper triangular matrix, column by column from the
  // diagonal upwards: x[i][j] = -(sum_{p=i+1..j} a[i][p] x[p][j]) / a[i][i].
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

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    got++;
    checks++;
    if (cyc - e.t != LAT) begin
      failures++;
      $display("result after %0d cycles, expected %0d", cyc - e.t, LAT);
    end
    foreach (ainv[i, j]) begin
      elem_t s;
      s = '0;
      for (int p = 0; p < N; p++) s += elem_t'(e.m[i][p] * ainv[p][j]);
      checks += 2;
      if (ainv[i][j] !== e.x[i][j]) begin
        failures++;
        $display("ainv[%0d][%0d]=%0h expected %0h", i, j, ainv[i][j], e.x[i][j]);
      end
      if (s !== ((i == j) ? elem_t'(1) : elem_t'(0))) begin
        failures++;
        $display("(A*Ainv)[%0d][%0d]=%0h", i, j, s);
      end
    end
  end

  initial begin
    foreach (a[i, j]) a[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      exp_t e;
      @(negedge clk);
      foreach (a[i, j])
        if (n == 0)      a[i][j] = (i == j) ? elem_t'(1) : '0;
        else if (i == j) a[i][j] = elem_t'($urandom) | elem_t'(1);
        else if (j > i)  a[i][j] = elem_t'($urandom);
        else             a[i][j] = elem_t'($urandom);   // ignored by the inverter
      in_valid = 1'b1;
      e.m = a;
      foreach (e.m[i, j]) if (j < i) e.m[i][j] = '0;
      ref_inv(e.m, e.x);
      e.t = cyc;
      q.push_back(e);
      if (n % 5 == 4) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (got != NTEST) begin failures++; $display("got %0d of %0d", got, NTEST); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
