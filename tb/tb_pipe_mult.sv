// tb_pipe_mult: self-checking test of the pipelined mesh multiplier.
// Multiplies NTEST pairs of random N x N matrices, issuing a new pair as
// soon as in_ready allows (one every R cycles), so several products are in
// the mesh at once; the first pair is an identity product whose result is
// known without arithmetic. Each result is compared with a reference
// product computed here, and its arrival is checked against the latency
// pipe_mult_lat(N,R). Throughput is checked too: with back-to-back issue the
// results must arrive exactly R cycles apart.
module tb_pipe_mult;
  import ring_pkg::*;
  localparam int unsigned N     = 8;
  localparam int unsigned R     = 4;
  localparam int unsigned NTEST = 6;
  localparam int unsigned LAT   = pipe_mult_lat(N, R);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_ready, out_valid;
  elem_t a [N][N], b [N][N], c [N][N];
  int    checks = 0, failures = 0;

  pipe_mult #(.N(N), .R(R)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { elem_t m [N][N]; int t; } exp_t;
  exp_t q[$];
  int   got = 0, last_t = -1;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    got++;
    checks++;
    if (cyc - e.t != LAT) begin
      failures++;
      $display("result after %0d cycles, expected %0d", cyc - e.t, LAT);
    end
    if (last_t >= 0) begin
      checks++;
      if (cyc - last_t != R) begin
        failures++;
        $display("results %0d cycles apart, expected %0d", cyc - last_t, R);
      end
    end
    last_t = cyc;
    foreach (c[r, k]) begin
      checks++;
      if (c[r][k] !== e.m[r][k]) begin
        failures++;
        $display("c[%0d][%0d]=%0h expected %0h", r, k, c[r][k], e.m[r][k]);
      end
    end
  end

  initial begin
    foreach (a[r, k]) begin a[r][k] = '0; b[r][k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      exp_t e;
      foreach (a[r, k]) begin
        a[r][k] = elem_t'($urandom);
        b[r][k] = (n == 0) ? ((r == k) ? elem_t'(1) : '0) : elem_t'($urandom);
      end
      foreach (e.m[r, k]) begin
        e.m[r][k] = '0;
        for (int x = 0; x < N; x++) e.m[r][k] += elem_t'(a[r][x] * b[x][k]);
      end
      start = 1'b1;
      while (!in_ready) @(negedge clk);
      e.t = cyc;         // accepted at the coming rising edge
      q.push_back(e);
      @(negedge clk);
    end
    start = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (got != NTEST) begin failures++; $display("got %0d of %0d results", got, NTEST); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
