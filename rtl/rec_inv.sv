// rec_inv: recursive inverter for an N x N upper triangular matrix,
// fully pipelined.
//
// With A = [A11 A12; 0 A22] the inverse is
//   [A11^-1   -(A11^-1 A12) A22^-1;  0   A22^-1].
// Two rec_inv #(N/2) invert A11 and A22 side by side; one recursive
// multiplier then forms X = A11^-1 * A12 and a second one Y = X * A22^-1,
// in that order; the upper right block of the result is -Y. Buffers hold
// A12 while the half inverses are formed, and hold the two half inverses
// while the products are formed. At N = 1 the network is one elementary
// inverter with an output register.
//
// Interface: in_valid with `a` in (entries below the diagonal are ignored,
// diagonal entries must be odd, i.e. units of the ring); out_valid with the
// inverse `ainv` out rec_inv_lat(N) cycles later, where
//   rec_inv_lat(1) = 1,  rec_inv_lat(N) = rec_inv_lat(N/2) + 2*(2*log2(N/2)+1) + 1.
// One new matrix can enter every cycle. The block formula, the two
// half-size inverters working in parallel and the two multipliers in series
// follow the recursive scheme; making each buffer a delay line (so that the
// network is pipelined), the output register and upper triangular
// orientation are this design's choices. N must be a power of two.
//
// Linting this module on its own, as a top, reports the signals of the
// recursive branch as unused or undriven. They are connected, as the
// simulations show: the report is an artefact of how a lint tool treats a
// module that instantiates itself, and is left standing.
module rec_inv
  import ring_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t a    [N][N],
  output logic  out_valid,
  output elem_t ainv [N][N]
);
  if ((N & (N - 1)) != 0 || N == 0) begin : g_bad_size
    $error("rec_inv: N must be a power of two");
  end

  if (N == 1) begin : g_leaf
    elem_t y;
    logic  unit_unused;
    elem_inv u_inv (.a(a[0][0]), .y(y), .unit(unit_unused));
    always_ff @(posedge clk) ainv[0][0] <= y;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
  end else begin : g_node
    localparam int unsigned H  = N / 2;
    localparam int unsigned LI = rec_inv_lat(H);
    localparam int unsigned LM = rec_mult_lat(H);

    elem_t a11 [H][H], a12 [H][H], a22 [H][H];
    always_comb
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) begin
          a11[r][c] = a[r][c];
          a12[r][c] = a[r][H + c];
          a22[r][c] = a[H + r][H + c];
        end

    // Half-size inverters, in parallel.
    elem_t i11 [H][H], i22 [H][H];
    logic  iv11, iv22_unused;
    rec_inv #(.N(H)) u_inv11 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                              .a(a11), .out_valid(iv11), .ainv(i11));
    rec_inv #(.N(H)) u_inv22 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                              .a(a22), .out_valid(iv22_unused), .ainv(i22));

    // Buffer: A12 waits for A11^-1.
    elem_t a12d [H][H];
    logic  a12v_unused;
    mat_delay #(.R(H), .C(H), .D(LI)) u_buf12 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(a12),
      .out_valid(a12v_unused), .q(a12d));

    // X = A11^-1 * A12.
    elem_t x [H][H];
    logic  xv;
    rec_mult #(.S(H)) u_mul1 (.clk(clk), .rst_n(rst_n), .in_valid(iv11),
                              .u(i11), .v(a12d), .out_valid(xv), .p(x));

    // Buffers: both half inverses wait for the first product.
    elem_t i22d [H][H], i11d [H][H];
    logic  i22dv_unused, i11dv_unused;
    mat_delay #(.R(H), .C(H), .D(LM)) u_buf22 (
      .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .d(i22),
      .out_valid(i22dv_unused), .q(i22d));
    mat_delay #(.R(H), .C(H), .D(2 * LM)) u_buf11 (
      .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .d(i11),
      .out_valid(i11dv_unused), .q(i11d));

    // Y = X * A22^-1.
    elem_t y [H][H];
    logic  yv;
    rec_mult #(.S(H)) u_mul2 (.clk(clk), .rst_n(rst_n), .in_valid(xv),
                              .u(x), .v(i22d), .out_valid(yv), .p(y));

    // The second half inverse also waits for the second product.
    elem_t i22dd [H][H];
    logic  i22ddv_unused;
    mat_delay #(.R(H), .C(H), .D(LM)) u_buf22b (
      .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .d(i22d),
      .out_valid(i22ddv_unused), .q(i22dd));

    always_ff @(posedge clk)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) begin
          ainv[r][c]         <= i11d[r][c];
          ainv[r][H + c]     <= elem_t'(-y[r][c]);
          ainv[H + r][c]     <= '0;
          ainv[H + r][H + c] <= i22dd[r][c];
        end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= yv;
  end
endmodule
