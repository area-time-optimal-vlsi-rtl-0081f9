// mixed_inv: mixed triangular inverter, a systolic mesh over S x S blocks.
//
// The N x N upper triangular matrix is treated as an M x M block matrix,
// M = N/S, and inverted by the systolic algorithm of sys_inv with blocks in
// place of entries: block A_ij^-1 = -(sum_p A_ip^-1 A_pj) A_jj^-1. The
// diagonal positions hold D-modules, which invert their S x S diagonal
// block; the off-diagonal positions hold block M-modules (blk_m_module).
//   TYPE = 1: D-modules are recursive inverters (rec_inv #(S)) and
//             M-modules use recursive multipliers (rec_mult #(S)).
//   TYPE = 2: D-modules are Type-1 mixed inverters for S x S matrices with
//             DS x DS blocks, and M-modules use pipelined multipliers
//             (pipe_mult #(S, MR)). The defaults DS = S/log2(S) and
//             MR = log2(S) are the block size and mesh size that make both
//             kinds of module O(S^2/log S) on a side.
// Operation: all diagonal blocks are inverted at once; then the mesh runs
// 2M-1 steps. Each step is a strobe cycle, in which every active M-module
// starts its block product, followed by the multiplier latency; the cycle
// the products come out is the commit, in which every cell takes its new
// R, H and V. `done` rises mixed_inv_lat(TYPE,N,S,DS,MR) cycles after the
// start was accepted, and `ainv` holds the inverse until the next start.
// Interface as sys_inv: `start` with `a` accepted while `busy` is low,
// entries below the diagonal ignored, diagonal entries odd.
// The block mesh, the choice of D- and M-modules for the two types and the
// order (diagonal inverses first, then the mesh) follow the mixed-network
// scheme; the step controller and the default sizes are this design's.
//
// A TYPE = 2 instance contains TYPE = 1 instances of this same module.
// Linting this module on its own as a top reports the signals of the
// branch that instantiates it again (dinv, dv, DS) as undriven or unused.
// They are connected, as the simulations show: the report is an artefact
// of how a lint tool treats a module that instantiates itself, and is left
// standing.
module mixed_inv
  import ring_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned S    = 4,
  parameter int unsigned TYPE = 2,
  parameter int unsigned DS   = (S >= 4) ? S / clog2i(S) : 1,
  parameter int unsigned MR   = (S >= 2) ? clog2i(S) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  elem_t a    [N][N],
  output logic  busy,
  output logic  done,
  output elem_t ainv [N][N]
);
  localparam int unsigned M   = N / S;
  localparam int unsigned TW  = $clog2(2 * M + 1) + 1;
  localparam int unsigned LM  = (TYPE == 1) ? rec_mult_lat(S) : pipe_mult_lat(S, MR);
  localparam int unsigned CW  = $clog2(LM + 1) + 1;

  if (N % S != 0 || M < 2 || (TYPE != 1 && TYPE != 2)) begin : g_bad_cfg
    $error("mixed_inv: need S dividing N, N/S >= 2 and TYPE 1 or 2");
  end

  // ---------------- controller ----------------
  typedef enum logic [1:0] {ST_IDLE, ST_DINV, ST_STROBE, ST_WAIT} state_e;
  state_e         st;
  logic [TW-1:0]  t;
  logic [CW-1:0]  cnt;
  logic           load, strobe, commit, d_done;

  assign busy   = (st != ST_IDLE);
  assign load   = start && !busy;
  assign strobe = (st == ST_STROBE);
  assign commit = (st == ST_WAIT) && (cnt == CW'(LM - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st   <= ST_IDLE;
      t    <= '0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        ST_IDLE:   if (load) st <= ST_DINV;
        ST_DINV:   if (d_done) begin st <= ST_STROBE; t <= TW'(1); end
        ST_STROBE: begin st <= ST_WAIT; cnt <= '0; end
        ST_WAIT:   if (commit) begin
                     if (int'(t) == 2 * M - 1) begin
                       st   <= ST_IDLE;
                       t    <= '0;
                       done <= 1'b1;
                     end else begin
                       st <= ST_STROBE;
                       t  <= t + 1'b1;
                     end
                   end else cnt <= cnt + 1'b1;
        default:   st <= ST_IDLE;
      endcase
    end

  // ---------------- block views of the input and output ----------------
  elem_t ab [M][M][S][S];
  always_comb
    for (int bi = 0; bi < M; bi++)
      for (int bj = 0; bj < M; bj++)
        for (int x = 0; x < S; x++)
          for (int y = 0; y < S; y++)
            ab[bi][bj][x][y] = a[bi * S + x][bj * S + y];

  elem_t hb [M][M][S][S];   // H of each cell
  elem_t vb [M][M][S][S];   // V of each cell
  elem_t rb [M][M][S][S];   // R of each cell
  logic  dd [M];            // D-module finished

  always_comb
    for (int bi = 0; bi < M; bi++)
      for (int bj = 0; bj < M; bj++)
        for (int x = 0; x < S; x++)
          for (int y = 0; y < S; y++)
            ainv[bi * S + x][bj * S + y] = rb[bi][bj][x][y];

  assign d_done = dd[0];

  // ---------------- mesh ----------------
  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      if (j == i) begin : g_d
        // D-module: inverts A_ii once at the start; its inverse is then
        // the cell's R, and is sent east and north.
        elem_t dinv [S][S];
        elem_t dreg [S][S];
        logic  dv;
        if (TYPE == 1) begin : g_rec
          rec_inv #(.N(S)) u_dinv (
            .clk(clk), .rst_n(rst_n), .in_valid(load), .a(ab[i][i]),
            .out_valid(dv), .ainv(dinv));
        end else begin : g_mix
          logic dbusy_unused;
          mixed_inv #(.N(S), .S(DS), .TYPE(1)) u_dinv (
            .clk(clk), .rst_n(rst_n), .start(load), .a(ab[i][i]),
            .busy(dbusy_unused), .done(dv), .ainv(dinv));
        end
        always_ff @(posedge clk) if (dv) dreg <= dinv;
        assign dd[i]    = dv;
        assign hb[i][j] = dreg;
        assign vb[i][j] = dreg;
        assign rb[i][j] = dreg;
      end else if (j > i) begin : g_m
        blk_m_module #(.S(S), .I(i + 1), .J(j + 1), .TW(TW),
                       .MKIND(TYPE - 1), .MR(MR)) u_cell (
          .clk   (clk),
          .rst_n (rst_n),
          .load  (load),
          .a_ld  (ab[i][j]),
          .t     (t),
          .strobe(strobe),
          .commit(commit),
          .w     (hb[i][j-1]),
          .s     (vb[i+1][j]),
          .e     (hb[i][j]),
          .n     (vb[i][j]),
          .r     (rb[i][j])
        );
      end else begin : g_zero
        always_comb
          for (int x = 0; x < S; x++)
            for (int y = 0; y < S; y++) begin
              hb[i][j][x][y] = '0;
              vb[i][j][x][y] = '0;
              rb[i][j][x][y] = '0;
            end
      end
    end
  end
endmodule
