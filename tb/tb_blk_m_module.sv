// tb_blk_m_module: self-checking test of the block M-module.
// Two cells (I,J) = (1,3) on 4 x 4 blocks, one with a recursive multiplier
// and one with a 2 x 2 pipelined mesh multiplier, are loaded with the same
// random block and stepped through t = 0..7 with the same random W and S
// blocks. Each step is a strobe followed by a commit exactly the
// multiplier's latency later; after each commit R, H and V of both cells
// are compared with a model of the four instructions written here.
module tb_blk_m_module;
  import ring_pkg::*;
  localparam int unsigned S = 4, I = 1, J = 3, TW = 4, MR = 2;
  localparam int unsigned LM0 = rec_mult_lat(S);
  localparam int unsigned LM1 = pipe_mult_lat(S, MR);

  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0, strobe = 1'b0;
  logic          commit0 = 1'b0, commit1 = 1'b0;
  logic [TW-1:0] t;
  elem_t         a_ld [S][S], w [S][S], s [S][S];
  elem_t         e0 [S][S], n0 [S][S], r0 [S][S], e1 [S][S], n1 [S][S], r1 [S][S];
  int            checks = 0, failures = 0;

  blk_m_module #(.S(S), .I(I), .J(J), .TW(TW), .MKIND(0)) dut0 (
    .clk, .rst_n, .load, .a_ld, .t, .strobe, .commit(commit0), .w, .s,
    .e(e0), .n(n0), .r(r0));
  blk_m_module #(.S(S), .I(I), .J(J), .TW(TW), .MKIND(1), .MR(MR)) dut1 (
    .clk, .rst_n, .load, .a_ld, .t, .strobe, .commit(commit1), .w, .s,
    .e(e1), .n(n1), .r(r1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef elem_t blk_t [S][S];
  function automatic blk_t mul(input blk_t x, input blk_t y);
    blk_t z;
    foreach (z[i, k]) begin
      z[i][k] = '0;
      for (int p = 0; p < S; p++) z[i][k] += elem_t'(x[i][p] * y[p][k]);
    end
    return z;
  endfunction

  task automatic cmp(input string nm, input blk_t got, input blk_t exp, input int st);
    checks++;
    if (got != exp) begin
      failures++;
      $display("step %0d: %s differs from the model", st, nm);
    end
  endtask

  initial begin
    blk_t mr, mh, mv, p;
    t = '0;
    foreach (a_ld[x, y]) begin a_ld[x][y] = '0; w[x][y] = '0; s[x][y] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      load = 1'b1;
      foreach (a_ld[x, y]) a_ld[x][y] = elem_t'($urandom);
      @(negedge clk);
      load = 1'b0;
      mr = a_ld; mh = e0; mv = n0;
      for (int st = 0; st < 8; st++) begin
        t = TW'(st);
        foreach (w[x, y]) begin w[x][y] = elem_t'($urandom); s[x][y] = elem_t'($urandom); end
        if (st == J) begin
          p = mul(w, mr); mv = mr; mr = p; mh = w;
        end else if (st == 2 * J - I) begin
          p = mul(mr, s);
          foreach (p[x, y]) p[x][y] = elem_t'(-p[x][y]);
          mr = p; mh = p; mv = s;
        end else if (st > J && st < 2 * J - I) begin
          p = mul(w, s);
          foreach (p[x, y]) mr[x][y] = elem_t'(mr[x][y] + p[x][y]);
          mh = w; mv = s;
        end else begin
          mh = w; mv = s;
        end
        strobe = 1'b1;
        @(negedge clk);
        strobe = 1'b0;
        for (int c = 1; c <= LM1; c++) begin
          commit0 = (c == LM0);
          commit1 = (c == LM1);
          @(negedge clk);
        end
        commit0 = 1'b0;
        commit1 = 1'b0;
        cmp("R (recursive)", r0, mr, st);
        cmp("H (recursive)", e0, mh, st);
        cmp("V (recursive)", n0, mv, st);
        cmp("R (pipelined)", r1, mr, st);
        cmp("H (pipelined)", e1, mh, st);
        cmp("V (pipelined)", n1, mv, st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
