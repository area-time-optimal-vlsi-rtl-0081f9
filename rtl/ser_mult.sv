// ser_mult: serially fed matrix multiplier, the second pipelining strategy
// for meeting the A*T^2 = O(n^4) bound.
//
// The N x N operands are viewed as Q x Q matrices (Q = N/R) whose elements
// are R x R blocks. A single Q x Q recursive multiplier (rec_mult in
// serial-block mode) computes the product: each of its (N/R)^2 input lines
// per operand carries the R*R entries of one block serially, row-major, the
// copy and adder levels work entry by entry, and each leaf is an R x R
// block multiplier with serial input and output (ser_blk_mult). The
// product leaves on (N/R)^2 lines, again as serial R x R blocks.
//
// Interface: `start` with full matrices a, b is accepted when in_ready is
// high; the blocks are then sent on R*R consecutive cycles, so a new
// product can be accepted every R*R cycles. The serial result blocks are
// collected and the whole of C is presented for the one cycle out_valid is
// high, ser_mult_lat(N,R) cycles after the start.
// The structure follows the scheme; the operand capture, the serializer
// and the collection of the result into one matrix are this design's
// interface. Defaults N = 16, R = 2 are this design's choice and meet the
// scheme's conditions R*R >= log2 N and R <= N^((2-log2 3)/(3-log2 3)) = N^0.29
// (about 2.25 for N = 16).
module ser_mult
  import ring_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned R = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  in_ready,
  input  elem_t a [N][N],
  input  elem_t b [N][N],
  output logic  out_valid,
  output elem_t c [N][N]
);
  localparam int unsigned Q  = N / R;
  localparam int unsigned R2 = R * R;
  localparam int unsigned EW = (R2 > 1) ? $clog2(R2) : 1;

  if (N % R != 0 || R < 2) begin : g_bad_size
    $error("ser_mult: need R >= 2 dividing N");
  end

  // ---- operand capture and serializer
  elem_t         ar [N][N], br [N][N];
  logic          sending;
  logic [EW-1:0] e;
  assign in_ready = !sending || (e == EW'(R2 - 1));

  always_ff @(posedge clk)
    if (start && in_ready) begin
      ar <= a;
      br <= b;
    end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sending <= 1'b0;
      e       <= '0;
    end else if (start && in_ready) begin
      sending <= 1'b1;
      e       <= '0;
    end else if (sending) begin
      if (e == EW'(R2 - 1)) sending <= 1'b0;
      else                  e <= e + 1'b1;
    end

  elem_t su [Q][Q], sv [Q][Q];
  always_comb
    for (int bi = 0; bi < Q; bi++)
      for (int bj = 0; bj < Q; bj++) begin
        su[bi][bj] = ar[bi * R + int'(e) / R][bj * R + int'(e) % R];
        sv[bi][bj] = br[bi * R + int'(e) / R][bj * R + int'(e) % R];
      end

  // ---- the recursive multiplier over serial blocks
  logic  pv;
  elem_t sp [Q][Q];
  rec_mult #(.S(Q), .BLK(R)) u_net (
    .clk(clk), .rst_n(rst_n), .in_valid(sending), .u(su), .v(sv),
    .out_valid(pv), .p(sp));

  // ---- collection of the serial result blocks
  logic [EW-1:0] oc;
  elem_t         cc [N][N];
  always_ff @(posedge clk)
    if (pv)
      for (int bi = 0; bi < Q; bi++)
        for (int bj = 0; bj < Q; bj++)
          cc[bi * R + int'(oc) / R][bj * R + int'(oc) % R] <= sp[bi][bj];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      oc        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= pv && (oc == EW'(R2 - 1));
      if (pv) oc <= (oc == EW'(R2 - 1)) ? '0 : oc + 1'b1;
    end
  assign c = cc;
endmodule
