// rec_mult: recursive S x S matrix multiplier, fully pipelined.
//
// For U = [a b; c d] and V = [e g; f h] the product is
//   [ae+bf  ag+bh; ce+df  cg+dh],
// built from eight (S/2) x (S/2) multipliers of the same kind and four
// matrix adders. The recursion stops at S = 1 with one elementary ring
// multiplier. Each recursion level has a buffer-driver stage in front, whose
// only job is to make the two copies of every quadrant that the eight
// sub-products need, and an adder stage behind, so the network has
// log S copy levels, one multiplier level and log S adder levels, all
// registered: latency 2*log2(S)+1 cycles, one new product accepted every
// cycle (all data in flight sits on one level).
// The register at every level is this design's choice of how to clock the
// levels; S must be a power of two.
//
// Interface: in_valid with u, v in; out_valid with p out after
// rec_mult_lat(S) cycles. u, v, p are indexed [row][column].
//
// Serial-block mode (BLK > 1): every element of u, v and p is then an
// BLK x BLK block sent serially, one entry per valid cycle, row-major, over
// BLK*BLK cycles, and the leaves are ser_blk_mult cells. Copy and adder
// levels work entry by entry on these streams unchanged. Latency from the
// first entry in to the first entry out: 2*log2(S) + BLK*BLK + BLK cycles;
// one block product per BLK*BLK cycles.
//
// Linting this module on its own, as a top, reports the signals of the
// recursive branch as unused or undriven. They are connected, as the
// simulations show: the report is an artefact of how a lint tool treats a
// module that instantiates itself, and is left standing.
module rec_mult
  import ring_pkg::*;
#(
  parameter int unsigned S   = 4,
  parameter int unsigned BLK = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  elem_t u [S][S],
  input  elem_t v [S][S],
  output logic  out_valid,
  output elem_t p [S][S]
);
  if ((S & (S - 1)) != 0 || S == 0) begin : g_bad_size
    $error("rec_mult: S must be a power of two");
  end

  if (S == 1 && BLK > 1) begin : g_sleaf
    // Elementary multiplier for serially sent BLK x BLK blocks.
    ser_blk_mult #(.R(BLK)) u_leaf (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(u[0][0]),
      .b(v[0][0]), .out_valid(out_valid), .p(p[0][0]));
  end else if (S == 1) begin : g_leaf
    // Elementary multiplier cell.
    always_ff @(posedge clk) p[0][0] <= elem_t'(u[0][0] * v[0][0]);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
  end else begin : g_node
    localparam int unsigned H = S / 2;

    // Buffer-driver level: registered copy of both operands.
    elem_t uc [S][S];
    elem_t vc [S][S];
    logic  vld_c;
    always_ff @(posedge clk) begin
      uc <= u;
      vc <= v;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld_c <= 1'b0;
      else        vld_c <= in_valid;

    // Quadrants: qu[k] / qv[k], k = 2*row_half + col_half.
    elem_t qu [4][H][H];
    elem_t qv [4][H][H];
    always_comb
      for (int q = 0; q < 4; q++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < H; c++) begin
            qu[q][r][c] = uc[(q / 2) * H + r][(q % 2) * H + c];
            qv[q][r][c] = vc[(q / 2) * H + r][(q % 2) * H + c];
          end

    // Eight sub-products. Output quadrant o = 2*i + j needs
    // U(i,0)*V(0,j) + U(i,1)*V(1,j): sub-product 2*o + t uses
    // U quadrant 2*i + t and V quadrant 2*t + j.
    elem_t sp [8][H][H];
    logic  sp_v [8];
    for (genvar m = 0; m < 8; m++) begin : g_sub
      localparam int unsigned O  = m / 2;
      localparam int unsigned T  = m % 2;
      localparam int unsigned QU = 2 * (O / 2) + T;
      localparam int unsigned QV = 2 * T + (O % 2);
      rec_mult #(.S(H), .BLK(BLK)) u_mul (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (vld_c),
        .u        (qu[QU]),
        .v        (qv[QV]),
        .out_valid(sp_v[m]),
        .p        (sp[m])
      );
    end

    // Adder level: four matrix adders, registered.
    always_ff @(posedge clk)
      for (int o = 0; o < 4; o++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < H; c++)
            p[(o / 2) * H + r][(o % 2) * H + c] <=
              elem_t'(sp[2 * o][r][c] + sp[2 * o + 1][r][c]);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= sp_v[0];
  end
endmodule
