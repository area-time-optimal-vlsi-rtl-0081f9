// tb_rec_mult: self-checking test of the recursive matrix multiplier.
// Streams NTEST random S x S matrix pairs into rec_mult, one per cycle with
// a few idle cycles mixed in, and compares every product with a reference
// triple loop computed here. Also checks that each result comes out exactly
// 2*log2(S)+1 cycles after its operands went in.
module tb_rec_mult;
  import ring_pkg::*;
  localparam int unsigned S     = 4;
  localparam int unsigned NTEST = 40;
  localparam int unsigned LAT   = 2 * $clog2(S) + 1;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  elem_t u [S][S], v [S][S], p [S][S];
  int    checks = 0, failures = 0;

  rec_mult #(.S(S)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { elem_t m [S][S]; int t; } exp_t;
  exp_t q[$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker.
  int got = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (cyc - e.t != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - e.t, LAT);
    end
    foreach (p[r, c]) begin
      checks++;
      if (p[r][c] !== e.m[r][c]) begin
        failures++;
        $display("p[%0d][%0d]=%0h expected %0h", r, c, p[r][c], e.m[r][c]);
      end
    end
    got++;
  end

  initial begin
    foreach (u[r, c]) begin u[r][c] = '0; v[r][c] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = 1'b1;
      foreach (u[r, c]) begin u[r][c] = elem_t'($urandom); v[r][c] = elem_t'($urandom); end
      if (n == 0) foreach (u[r, c]) begin u[r][c] = elem_t'(r * S + c + 1); v[r][c] = (r == c) ? elem_t'(1) : '0; end
      foreach (e.m[r, c]) begin
        e.m[r][c] = '0;
        for (int k = 0; k < S; k++) e.m[r][c] += elem_t'(u[r][k] * v[k][c]);
      end
      e.t = cyc;   // cycle count just before the edge that samples it
      q.push_back(e);
      if (n % 7 == 6) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (got != NTEST || q.size() != 0) begin
      failures++;
      $display("received %0d of %0d products", got, NTEST);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
