// tb_mixed_inv: self-checking test of the mixed inverters.
// Two instances run side by side on the same stimulus: a Type-2 network at
// the default size (N = 16, 4 x 4 blocks, D-modules Type-1 networks with
// 2 x 2 blocks, M-modules 2 x 2 pipelined meshes) and a Type-1 network
// (N = 8, 2 x 2 blocks, recursive inverters and multipliers). Each inverts
// NTEST random upper triangular matrices with odd diagonal, the first being
// the identity; every inverse is compared with back substitution and
// checked by A * Ainv = I, and `done` must come exactly mixed_inv_lat(...)
// cycles after the start.
module tb_mixed_inv;
  import ring_pkg::*;
  localparam int unsigned N2 = 16, S2 = 4;
  localparam int unsigned N1 = 8,  S1 = 2;
  localparam int unsigned NTEST = 5;
  localparam int unsigned LAT2 = mixed_inv_lat(2, N2, S2, S2 / clog2i(S2), clog2i(S2));
  localparam int unsigned LAT1 = mixed_inv_lat(1, N1, S1, 1, 1);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  busy2, done2, busy1, done1;
  elem_t a2 [N2][N2], ainv2 [N2][N2], a1 [N1][N1], ainv1 [N1][N1];
  int    checks = 0, failures = 0;

  mixed_inv dut2 (.clk, .rst_n, .start, .a(a2), .busy(busy2), .done(done2), .ainv(ainv2));
  mixed_inv #(.N(N1), .S(S1), .TYPE(1)) dut1 (
    .clk, .rst_n, .start, .a(a1), .busy(busy1), .done(done1), .ainv(ainv1));

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inverse by back substitution, and the check of one result, for size NN.
  class ref_t #(int unsigned NN = 4);
    static function automatic void inv(input elem_t m [NN][NN], output elem_t x [NN][NN]);
      foreach (x[i, j]) x[i][j] = '0;
      for (int j = 0; j < NN; j++) begin
        x[j][j] = ring_inv(m[j][j]);
        for (int i = j - 1; i >= 0; i--) begin
          elem_t s;
          s = '0;
          for (int p = i + 1; p <= j; p++) s += elem_t'(m[i][p] * x[p][j]);
          x[i][j] = elem_t'(-s * ring_inv(m[i][i]));
        end
      end
    endfunction
    static function automatic int check(input elem_t m [NN][NN], input elem_t got [NN][NN],
                                        inout int checks);
      elem_t x [NN][NN];
      int    bad;
      bad = 0;
      inv(m, x);
      foreach (got[i, j]) begin
        elem_t s;
        s = '0;
        for (int p = 0; p < NN; p++) s += elem_t'(m[i][p] * got[p][j]);
        checks += 2;
        if (got[i][j] !== x[i][j]) begin
          bad++;
          if (bad < 5) $display("N=%0d ainv[%0d][%0d]=%0h expected %0h", NN, i, j, got[i][j], x[i][j]);
        end
        if (s !== ((i == j) ? elem_t'(1) : elem_t'(0))) bad++;
      end
      return bad;
    endfunction
  endclass

  initial begin
    elem_t m2 [N2][N2], m1 [N1][N1];
    foreach (a2[i, j]) a2[i][j] = '0;
    foreach (a1[i, j]) a1[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      int t0;
      bit got1, got2;
      foreach (a2[i, j])
        if (n == 0)      a2[i][j] = (i == j) ? elem_t'(1) : '0;
        else if (i == j) a2[i][j] = elem_t'($urandom) | elem_t'(1);
        else             a2[i][j] = elem_t'($urandom);
      foreach (a1[i, j]) a1[i][j] = a2[i + 3][j + 5 - ((j >= 3) ? 2 : 0)];
      foreach (a1[i, j]) if (i == j) a1[i][j] = a1[i][j] | elem_t'(1);
      m2 = a2; m1 = a1;
      foreach (m2[i, j]) if (j < i) m2[i][j] = '0;
      foreach (m1[i, j]) if (j < i) m1[i][j] = '0;
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      got1 = 0; got2 = 0;
      while (!(got1 && got2)) begin
        if (done1) begin
          got1 = 1;
          checks++;
          if (cyc - t0 != LAT1) begin failures++; $display("Type-1 done after %0d, expected %0d", cyc - t0, LAT1); end
          failures += ref_t#(N1)::check(m1, ainv1, checks);
        end
        if (done2) begin
          got2 = 1;
          checks++;
          if (cyc - t0 != LAT2) begin failures++; $display("Type-2 done after %0d, expected %0d", cyc - t0, LAT2); end
          failures += ref_t#(N2)::check(m2, ainv2, checks);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
