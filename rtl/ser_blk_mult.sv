// ser_blk_mult: elementary multiplier with serial input and output for
// R x R blocks, the leaf of the serially fed recursive multiplier.
//
// Each of the two operand lines carries the R*R entries of one block,
// row-major, on R*R consecutive valid cycles. The cell stores both blocks,
// then multiplies them in R cycles on an R x R array of multiply-accumulate
// cells (cell (i,j) adds a_ik*b_kj at cycle k, so the area is O(R^2) and
// the time O(R)), and releases the product serially, row-major, on R*R
// consecutive cycles. Because arrival and release take R*R cycles and the
// product only R, the next pair of blocks is collected while the previous
// product is being formed and released: one block product every R*R cycles.
// Block boundaries are found by counting valid entries from reset, so
// operands must come as whole blocks.
// Latency from the first entry in to the first entry out: R*R + R cycles.
// The serial operand and result lines and the O(R^2)-area, O(R)-time leaf
// follow the scheme; the output-stationary MAC array stands in for the
// hexagonal mesh the scheme names as one possible leaf.
module ser_blk_mult
  import ring_pkg::*;
#(
  parameter int unsigned R = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t a,
  input  elem_t b,
  output logic  out_valid,
  output elem_t p
);
  localparam int unsigned R2 = R * R;
  localparam int unsigned CW = (R2 > 1) ? $clog2(R2) : 1;
  localparam int unsigned KW = (R > 1) ? $clog2(R) : 1;

  // ---- arrival
  elem_t         ca [R2], cb [R2];
  logic [CW-1:0] icnt;
  logic          blk_in;   // last entry of a block arrives this cycle
  assign blk_in = in_valid && (icnt == CW'(R2 - 1));

  always_ff @(posedge clk)
    if (in_valid) begin
      ca[icnt] <= a;
      cb[icnt] <= b;
    end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        icnt <= '0;
    else if (blk_in)   icnt <= '0;
    else if (in_valid) icnt <= icnt + 1'b1;

  // ---- multiplication: R steps on the R x R MAC array
  elem_t         ma [R][R], mb [R][R], acc [R][R], nxt [R][R];
  logic          comp;
  logic [KW-1:0] k;
  logic          comp_end;
  assign comp_end = comp && (k == KW'(R - 1));

  always_comb
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++)
        nxt[i][j] = elem_t'(((k == '0) ? elem_t'(0) : acc[i][j]) +
                            elem_t'(ma[i][int'(k)] * mb[int'(k)][j]));

  always_ff @(posedge clk) begin
    if (blk_in)
      for (int i = 0; i < R; i++)
        for (int j = 0; j < R; j++) begin
          // the block's last entry is still on the input lines
          ma[i][j] <= (i * R + j == R2 - 1) ? a : ca[i * R + j];
          mb[i][j] <= (i * R + j == R2 - 1) ? b : cb[i * R + j];
        end
    if (comp) acc <= nxt;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      comp <= 1'b0;
      k    <= '0;
    end else if (blk_in) begin
      comp <= 1'b1;
      k    <= '0;
    end else if (comp) begin
      if (comp_end) comp <= 1'b0;
      else          k    <= k + 1'b1;
    end

  // ---- release
  elem_t         ob [R2];
  logic [CW-1:0] ocnt;
  logic          emit;
  always_ff @(posedge clk)
    if (comp_end)
      for (int i = 0; i < R; i++)
        for (int j = 0; j < R; j++) ob[i * R + j] <= nxt[i][j];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      emit <= 1'b0;
      ocnt <= '0;
    end else if (comp_end) begin
      emit <= 1'b1;
      ocnt <= '0;
    end else if (emit) begin
      if (ocnt == CW'(R2 - 1)) emit <= 1'b0;
      else                     ocnt <= ocnt + 1'b1;
    end
  assign out_valid = emit;
  assign p         = ob[ocnt];
endmodule
