// ip_module: inner product module of the pipelined matrix multiplier.
//
// One node of the r x r mesh. Operands are S x S blocks: a block `a` arrives
// from the west and a block `b` from the north in the same cycle; the module
// forwards a to the east and b to the south one cycle later and feeds both
// into its own S x S recursive multiplier (rec_mult). When the product comes
// out rec_mult_lat(S) cycles later it is accumulated, c <- c + a*b. The
// control token that travels with a marks the first term of an inner product
// (the accumulator is then loaded instead of added to) and the last one;
// one cycle after the last term is added, c holds the finished block and
// c_valid is high for one cycle. c keeps its value until the first term of
// the next inner product arrives, so back-to-back products need no pause.
// The first/last token is this design's way of clearing and reading the
// accumulator register c.
module ip_module
  import ring_pkg::*;
#(
  parameter int unsigned S = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  blk_tag_t tag_in,          // travels west -> east with a
  input  elem_t    a_in  [S][S],    // west
  input  elem_t    b_in  [S][S],    // north
  output blk_tag_t tag_out,
  output elem_t    a_out [S][S],    // east
  output elem_t    b_out [S][S],    // south
  output logic     c_valid,
  output elem_t    c     [S][S]
);
  localparam int unsigned LM = rec_mult_lat(S);

  // Forwarding registers.
  always_ff @(posedge clk) begin
    a_out <= a_in;
    b_out <= b_in;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;

  // Block multiplier.
  logic  p_valid;
  elem_t p [S][S];
  rec_mult #(.S(S)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tag_in.valid),
    .u        (a_in),
    .v        (b_in),
    .out_valid(p_valid),
    .p        (p)
  );

  // first/last flags follow the product through the multiplier.
  logic [1:0] fl [LM];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int k = 0; k < LM; k++) fl[k] <= '0;
    else begin
      fl[0] <= {tag_in.first, tag_in.last};
      for (int k = 1; k < LM; k++) fl[k] <= fl[k-1];
    end

  // Accumulator register c.
  always_ff @(posedge clk)
    if (p_valid)
      for (int r = 0; r < S; r++)
        for (int k = 0; k < S; k++)
          c[r][k] <= fl[LM-1][1] ? p[r][k] : elem_t'(c[r][k] + p[r][k]);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c_valid <= 1'b0;
    else        c_valid <= p_valid && fl[LM-1][0];
endmodule
