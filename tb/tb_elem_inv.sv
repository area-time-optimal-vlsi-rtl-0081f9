// tb_elem_inv: exhaustive-by-sampling test of the elementary inverter.
// Checks y * a = 1 (mod 2**W) for every odd a in a sample of 4096 values,
// including 1 and 2**W-1, and that `unit` flags exactly the odd inputs.
module tb_elem_inv;
  import ring_pkg::*;
  elem_t a, y;
  logic  unit;
  int    checks = 0, failures = 0;

  elem_inv dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4096; n++) begin
      case (n)
        0:       a = elem_t'(1);
        1:       a = '1;
        2:       a = '0;
        default: a = elem_t'($urandom);
      endcase
      #1;
      checks++;
      if (unit !== a[0]) begin failures++; $display("unit wrong for %0h", a); end
      if (a[0]) begin
        checks++;
        if (elem_t'(a * y) !== elem_t'(1)) begin
          failures++;
          $display("inverse of %0h gave %0h", a, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
