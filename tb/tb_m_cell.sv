// tb_m_cell: self-checking test of one M-module of the systolic inverter.
// Cell (I,J) = (2,5) is loaded with a random value and stepped through
// t = 0..11 with random west and south inputs, several times. After every
// step R, H and V are compared with a model of the four instructions
// (first at t = J, general for J < t < 2J-I, final at t = 2J-I, pass
// otherwise) written here.
module tb_m_cell;
  import ring_pkg::*;
  localparam int unsigned I = 2, J = 5, TW = 5;

  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  elem_t         a_ld, w, s, e, n, r;
  logic [TW-1:0] t;
  int            checks = 0, failures = 0;

  m_cell #(.I(I), .J(J), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t mr, mh, mv;
  initial begin
    t = '0; w = '0; s = '0; a_ld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk);
      load = 1'b1;
      a_ld = elem_t'($urandom);
      @(negedge clk);
      load = 1'b0;
      checks++;
      if (r !== a_ld) begin failures++; $display("load failed"); end
      mr = a_ld; mh = e; mv = n;
      for (int st = 0; st < 12; st++) begin
        elem_t p;
        t = TW'(st);
        w = elem_t'($urandom);
        s = elem_t'($urandom);
        if (st == J) begin
          p = elem_t'(w * mr); mv = mr; mr = p; mh = w;
        end else if (st == 2 * J - I) begin
          p = elem_t'(mr * s); mr = elem_t'(-p); mh = elem_t'(-p); mv = s;
        end else if (st > J && st < 2 * J - I) begin
          p = elem_t'(w * s); mr = elem_t'(mr + p); mh = w; mv = s;
        end else begin
          mh = w; mv = s;
        end
        @(negedge clk);
        checks += 3;
        if (r !== mr) begin failures++; $display("step %0d: R=%0h expected %0h", st, r, mr); end
        if (e !== mh) begin failures++; $display("step %0d: H=%0h expected %0h", st, e, mh); end
        if (n !== mv) begin failures++; $display("step %0d: V=%0h expected %0h", st, n, mv); end
      end
      t = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
