// pipe_mult: pipelined N x N matrix multiplier, an R x R mesh of inner
// product modules.
//
// A and B are cut into R x R blocks of size S = N/R. Their product is
// C = C_1 + ... + C_R with C_j = (block column j of A) x (block row j of B),
// and the mesh accumulates those R outer products. Block column j of A is
// presented at the west edge (row i receives A_ij) and block row j of B at
// the north edge (column k receives B_jk); A moves east and B moves south one
// module per cycle, so module (i,k) meets A_ij and B_jk and adds their
// product into its register. Row i and column k enter the mesh i and k
// cycles late (the skew of the classic one-way pipeline), so the active
// front of each outer product is an anti-diagonal of the mesh.
//
// Interface: start with a, b (full N x N matrices) is accepted when
// in_ready is high; the R block columns/rows are then issued on R
// consecutive cycles, and a new product can be accepted every R cycles.
// Module (i,k) finishes i+k cycles after module (0,0); each finished block
// is delayed by 2R-2-i-k cycles so that all of C appears at once: c is valid
// for the one cycle out_valid is high, pipe_mult_lat(N,R) cycles after start.
// The block decomposition, mesh and skewed feeding follow the scheme this
// network is built on; the operand capture, the issue sequencer and the
// output alignment (instead of shifting C out) are this design's choices.
module pipe_mult
  import ring_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned R = 4
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
  localparam int unsigned S  = N / R;
  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  if (N % R != 0) begin : g_bad_size
    $error("pipe_mult: R must divide N");
  end

  // ---------------- operand capture and issue sequencer ----------------
  elem_t          ar [N][N];
  elem_t          br [N][N];
  logic           issuing;
  logic [CW-1:0]  j;

  assign in_ready = !issuing || (j == CW'(R - 1));

  always_ff @(posedge clk)
    if (start && in_ready) begin
      ar <= a;
      br <= b;
    end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      issuing <= 1'b0;
      j       <= '0;
    end else if (start && in_ready) begin
      issuing <= 1'b1;
      j       <= '0;
    end else if (issuing) begin
      if (j == CW'(R - 1)) issuing <= 1'b0;
      else                 j <= j + 1'b1;
    end

  blk_tag_t tag_issue;
  always_comb begin
    tag_issue.valid = issuing;
    tag_issue.first = (j == '0);
    tag_issue.last  = (j == CW'(R - 1));
  end

  // Block column j of A, block row j of B.
  elem_t a_col [R][S][S];
  elem_t b_row [R][S][S];
  always_comb
    for (int i = 0; i < R; i++)
      for (int r = 0; r < S; r++)
        for (int k = 0; k < S; k++) begin
          a_col[i][r][k] = ar[i * S + r][int'(j) * S + k];
          b_row[i][r][k] = br[int'(j) * S + r][i * S + k];
        end

  // ---------------- mesh ----------------
  blk_tag_t tag_w [R][R+1];      // tag entering module (i,k) from the west
  elem_t    a_w   [R][R+1][S][S];
  elem_t    b_n   [R+1][R][S][S];
  logic     cv    [R][R];
  elem_t    cb    [R][R][S][S];

  for (genvar i = 0; i < R; i++) begin : g_skew
    // West edge, row i: delay by i cycles (tag and data together).
    logic tv;
    mat_delay #(.R(S), .C(S), .D(i)) u_ad (
      .clk(clk), .rst_n(rst_n), .in_valid(tag_issue.valid), .d(a_col[i]),
      .out_valid(tv), .q(a_w[i][0]));
    blk_tag_t tq [i+1];
    always_comb tq[0] = tag_issue;
    for (genvar k = 1; k <= i; k++) begin : g_t
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) tq[k] <= '0;
        else        tq[k] <= tq[k-1];
    end
    always_comb begin
      tag_w[i][0]       = tq[i];
      tag_w[i][0].valid = tv;
    end
    // North edge, column i: delay by i cycles.
    logic bv_unused;
    mat_delay #(.R(S), .C(S), .D(i)) u_bd (
      .clk(clk), .rst_n(rst_n), .in_valid(tag_issue.valid), .d(b_row[i]),
      .out_valid(bv_unused), .q(b_n[0][i]));
  end

  for (genvar i = 0; i < R; i++) begin : g_row
    for (genvar k = 0; k < R; k++) begin : g_col
      ip_module #(.S(S)) u_ip (
        .clk    (clk),
        .rst_n  (rst_n),
        .tag_in (tag_w[i][k]),
        .a_in   (a_w[i][k]),
        .b_in   (b_n[i][k]),
        .tag_out(tag_w[i][k+1]),
        .a_out  (a_w[i][k+1]),
        .b_out  (b_n[i+1][k]),
        .c_valid(cv[i][k]),
        .c      (cb[i][k])
      );
    end
  end

  // ---------------- output alignment ----------------
  elem_t cal [R][R][S][S];
  logic  cal_v [R][R];
  for (genvar i = 0; i < R; i++) begin : g_orow
    for (genvar k = 0; k < R; k++) begin : g_ocol
      mat_delay #(.R(S), .C(S), .D(2 * R - 2 - i - k)) u_od (
        .clk(clk), .rst_n(rst_n), .in_valid(cv[i][k]), .d(cb[i][k]),
        .out_valid(cal_v[i][k]), .q(cal[i][k]));
    end
  end

  always_ff @(posedge clk)
    if (cal_v[R-1][R-1])
      for (int i = 0; i < R; i++)
        for (int k = 0; k < R; k++)
          for (int r = 0; r < S; r++)
            for (int q = 0; q < S; q++)
              c[i * S + r][k * S + q] <= cal[i][k][r][q];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= cal_v[R-1][R-1];
endmodule
