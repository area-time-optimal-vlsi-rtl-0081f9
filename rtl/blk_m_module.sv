// blk_m_module: M-module of a mixed inverter, working on S x S blocks.
//
// The block version of the systolic M-module: register R, buffers H (east)
// and V (north), inputs W (west) and S (south), all S x S blocks. Cell
// (I,J), J > I (1-based block indices), is loaded with block A_IJ and at
// mesh step t executes
//   t = J         (first)   R <- W*R,        H <- W,      V <- A_IJ
//   J < t < 2J-I  (general) R <- R + W*S,    H <- W,      V <- S
//   t = 2J-I      (final)   R <- -(R*S),     H <- -(R*S), V <- S
//   other t                                  H <- W,      V <- S
// with matrix products formed by one block multiplier: a recursive
// multiplier (rec_mult, Type-1 networks, MKIND = 0) or a pipelined mesh
// multiplier (pipe_mult with MR x MR modules, Type-2 networks, MKIND = 1).
//
// Timing: a step takes the multiplier's latency. On `strobe` the cell hands
// its two operands to the multiplier (if the step is not a pass); on
// `commit`, which the mesh controller raises in the cycle the product comes
// out, R, H and V take their new values. Between strobe and commit no
// register of the mesh changes, so the neighbours' H and V that the cell
// sampled at the strobe are still the step's operands. The strobe/commit
// step control is this design's own; the instructions are the systolic
// algorithm's.
module blk_m_module
  import ring_pkg::*;
#(
  parameter int unsigned S     = 4,
  parameter int unsigned I     = 1,
  parameter int unsigned J     = 2,
  parameter int unsigned TW    = 4,
  parameter int unsigned MKIND = 0,
  parameter int unsigned MR    = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  elem_t         a_ld [S][S],
  input  logic [TW-1:0] t,
  input  logic          strobe,
  input  logic          commit,
  input  elem_t         w    [S][S],
  input  elem_t         s    [S][S],
  output elem_t         e    [S][S],
  output elem_t         n    [S][S],
  output elem_t         r    [S][S]
);
  typedef enum logic [1:0] {OP_PASS, OP_FIRST, OP_GENERAL, OP_FINAL} op_e;

  localparam int unsigned TFIRST = J;
  localparam int unsigned TFINAL = 2 * J - I;

  op_e op;
  always_comb
    if      (int'(t) == TFIRST)                     op = OP_FIRST;
    else if (int'(t) == TFINAL)                     op = OP_FINAL;
    else if (int'(t) > TFIRST && int'(t) < TFINAL)  op = OP_GENERAL;
    else                                            op = OP_PASS;

  elem_t m1 [S][S], m2 [S][S], prod [S][S];
  logic  go, prod_v_unused;
  always_comb begin
    m1 = (op == OP_FINAL) ? r : w;
    m2 = (op == OP_FIRST) ? r : s;
    go = strobe && (op != OP_PASS);
  end

  if (MKIND == 0) begin : g_rec
    rec_mult #(.S(S)) u_mul (
      .clk(clk), .rst_n(rst_n), .in_valid(go), .u(m1), .v(m2),
      .out_valid(prod_v_unused), .p(prod));
  end else begin : g_pipe
    logic rdy_unused;
    pipe_mult #(.N(S), .R(MR)) u_mul (
      .clk(clk), .rst_n(rst_n), .start(go), .in_ready(rdy_unused),
      .a(m1), .b(m2), .out_valid(prod_v_unused), .c(prod));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int x = 0; x < S; x++)
        for (int y = 0; y < S; y++) begin
          r[x][y] <= '0;
          e[x][y] <= '0;
          n[x][y] <= '0;
        end
    end else if (load) begin
      r <= a_ld;
    end else if (commit) begin
      for (int x = 0; x < S; x++)
        for (int y = 0; y < S; y++)
          unique case (op)
            OP_FIRST: begin
              r[x][y] <= prod[x][y];
              e[x][y] <= w[x][y];
              n[x][y] <= r[x][y];
            end
            OP_GENERAL: begin
              r[x][y] <= elem_t'(r[x][y] + prod[x][y]);
              e[x][y] <= w[x][y];
              n[x][y] <= s[x][y];
            end
            OP_FINAL: begin
              r[x][y] <= elem_t'(-prod[x][y]);
              e[x][y] <= elem_t'(-prod[x][y]);
              n[x][y] <= s[x][y];
            end
            default: begin
              e[x][y] <= w[x][y];
              n[x][y] <= s[x][y];
            end
          endcase
    end
endmodule
