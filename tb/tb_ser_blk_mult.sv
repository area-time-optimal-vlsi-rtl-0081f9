// tb_ser_blk_mult: self-checking test of the serial-I/O block multiplier.
// Sends NTEST pairs of random R x R blocks back to back (entries row-major,
// one per cycle, with no gap between blocks) and compares every released
// entry with a reference product computed here. Checks that the first entry
// of each product appears R*R + R cycles after the block's first entry went
// in and that the R*R entries of a product are released on consecutive
// cycles.
module tb_ser_blk_mult;
  import ring_pkg::*;
  localparam int unsigned R = 3, R2 = R * R, NTEST = 6, LAT = R2 + R;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  elem_t a, b, p;
  int    checks = 0, failures = 0;

  ser_blk_mult #(.R(R)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t exp_e [NTEST * R2];
  int    t_first [NTEST];
  int    nout = 0, last_out = -1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (p !== exp_e[nout]) begin
      failures++;
      $display("entry %0d = %0h expected %0h", nout, p, exp_e[nout]);
    end
    if (nout % R2 == 0) begin
      checks++;
      if (cyc - t_first[nout / R2] != LAT) begin
        failures++;
        $display("product %0d started after %0d cycles, expected %0d", nout / R2, cyc - t_first[nout / R2], LAT);
      end
    end else begin
      checks++;
      if (cyc - last_out != 1) begin failures++; $display("gap in released block"); end
    end
    last_out = cyc;
    nout++;
  end

  initial begin
    elem_t ba [R][R], bb [R][R];
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      foreach (ba[i, j]) begin ba[i][j] = elem_t'($urandom); bb[i][j] = elem_t'($urandom); end
      foreach (ba[i, j]) begin
        elem_t s;
        s = '0;
        for (int k = 0; k < R; k++) s += elem_t'(ba[i][k] * bb[k][j]);
        exp_e[n * R2 + i * R + j] = s;
      end
      for (int x = 0; x < R2; x++) begin
        in_valid = 1'b1;
        a = ba[x / R][x % R];
        b = bb[x / R][x % R];
        if (x == 0) t_first[n] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (LAT + R2 + 4) @(negedge clk);
    checks++;
    if (nout != NTEST * R2) begin failures++; $display("released %0d of %0d entries", nout, NTEST * R2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
