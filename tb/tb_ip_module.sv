// tb_ip_module: self-checking test of one inner product module.
// Feeds three inner products of different lengths (1, 3 and 4 terms) back
// to back, each term a random S x S block pair, and checks the accumulated
// block against a reference computed here, the forwarding of a, b and the
// token to the east/south one cycle later, and that c_valid rises
// rec_mult_lat(S)+1 cycles after the last term went in.
module tb_ip_module;
  import ring_pkg::*;
  localparam int unsigned S   = 2;
  localparam int unsigned LAT = rec_mult_lat(S) + 1;

  logic     clk = 1'b0, rst_n = 1'b0, c_valid;
  blk_tag_t tag_in, tag_out;
  elem_t    a_in [S][S], b_in [S][S], a_out [S][S], b_out [S][S], c [S][S];
  int       checks = 0, failures = 0;

  ip_module #(.S(S)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { elem_t m [S][S]; int t; } exp_t;
  exp_t q[$];
  int   got = 0;
  elem_t pa [S][S], pb [S][S];
  blk_tag_t ptag;
  logic  pend = 1'b0;

  always @(negedge clk) if (rst_n) begin
    #1;
    // forwarding of the inputs sampled at the last rising edge
    if (pend) begin
      checks++;
      if (tag_out !== ptag || a_out != pa || b_out != pb) begin
        failures++;
        $display("forwarding mismatch at cycle %0d", cyc);
      end
    end
    pa = a_in; pb = b_in; ptag = tag_in; pend = 1'b1;
    if (c_valid) begin
      exp_t e;
      e = q.pop_front();
      got++;
      checks++;
      if (cyc - e.t != LAT) begin
        failures++;
        $display("c_valid after %0d cycles, expected %0d", cyc - e.t, LAT);
      end
      foreach (c[r, k]) begin
        checks++;
        if (c[r][k] !== e.m[r][k]) begin
          failures++;
          $display("c[%0d][%0d]=%0h expected %0h", r, k, c[r][k], e.m[r][k]);
        end
      end
    end
  end

  initial begin
    int lens [3] = '{1, 3, 4};
    tag_in = '0;
    foreach (a_in[r, k]) begin a_in[r][k] = '0; b_in[r][k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[n]) begin
      exp_t e;
      foreach (e.m[r, k]) e.m[r][k] = '0;
      for (int t = 0; t < lens[n]; t++) begin
        @(negedge clk);
        tag_in.valid = 1'b1;
        tag_in.first = (t == 0);
        tag_in.last  = (t == lens[n] - 1);
        foreach (a_in[r, k]) begin a_in[r][k] = elem_t'($urandom); b_in[r][k] = elem_t'($urandom); end
        foreach (e.m[r, k])
          for (int x = 0; x < S; x++) e.m[r][k] += elem_t'(a_in[r][x] * b_in[x][k]);
        e.t = cyc;
      end
      q.push_back(e);
    end
    @(negedge clk);
    tag_in = '0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (got != 3) begin failures++; $display("got %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
