// elem_inv: elementary D-module, the inverse of one ring element.
//
// The diagonal modules of the triangular inverters have to produce
// a_ii^-1 = 1/a_ii. In the ring Z/2**W used here (see ring_pkg) the input
// must be odd; the inverse is formed by a fixed number of Newton steps,
// unrolled into combinational logic, so the operation takes one step as the
// inversion algorithm assumes. Output `unit` is low when the input has no
// inverse (even value); the output value is then meaningless.
// Purely combinational: no clock.
module elem_inv
  import ring_pkg::*;
(
  input  elem_t a,
  output elem_t y,
  output logic  unit
);
  always_comb begin
    y    = ring_inv(a);
    unit = a[0];
  end
endmodule
