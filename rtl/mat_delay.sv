// mat_delay: delay line for an R x C matrix of ring elements plus a valid
// bit, D register stages deep (D = 0 is a plain wire). It is the buffer the
// networks use wherever one operand has to wait for another one computed
// along a longer path; with D > 0 it holds D matrices in flight, so the
// enclosing network keeps accepting one new operation per cycle.
// With D = 0 the clock and reset are not used, which lint reports.
module mat_delay
  import ring_pkg::*;
#(
  parameter int unsigned R = 2,
  parameter int unsigned C = 2,
  parameter int unsigned D = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t d [R][C],
  output logic  out_valid,
  output elem_t q [R][C]
);
  if (D == 0) begin : g_wire
    assign q         = d;
    assign out_valid = in_valid;
  end else begin : g_regs
    elem_t mem [D][R][C];
    logic  vld [D];
    always_ff @(posedge clk) begin
      mem[0] <= d;
      for (int k = 1; k < D; k++) mem[k] <= mem[k-1];
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) for (int k = 0; k < D; k++) vld[k] <= 1'b0;
      else begin
        vld[0] <= in_valid;
        for (int k = 1; k < D; k++) vld[k] <= vld[k-1];
      end
    assign q         = mem[D-1];
    assign out_valid = vld[D-1];
  end
endmodule
