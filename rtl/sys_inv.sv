// sys_inv: first-order systolic inverter for an N x N upper triangular
// matrix.
//
// A triangular mesh: cell (i,j) exists for j >= i. Diagonal cells are
// D-modules, which replace their entry a_ii by 1/a_ii at step i; the others
// are M-modules (m_cell). Entries of the inverse flow east along the rows
// (H buffers), entries of A and the diagonal inverses flow north along the
// columns (V buffers). Cell (i,j) completes a_ij^-1 at step 2j-i, so the
// whole inverse is done after 2N-1 steps, one step per clock cycle.
//
// Interface: `start` with `a` (entries below the diagonal ignored, diagonal
// entries odd) is accepted when `busy` is low and loads every cell with its
// entry in that cycle; steps 1..2N-1 follow on the next 2N-1 cycles; `done`
// is high for one cycle right after the last step, 2N cycles after the
// start was accepted, and `ainv` (the R
// registers, zero below the diagonal) holds the inverse until the next start.
// The cells, their instructions and the step schedule follow the systolic
// algorithm; the global step counter that tells each cell its step is this
// design's choice of control.
module sys_inv
  import ring_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  elem_t a    [N][N],
  output logic  busy,
  output logic  done,
  output elem_t ainv [N][N]
);
  localparam int unsigned TW    = $clog2(2 * N + 1);
  localparam int unsigned TLAST = 2 * N - 1;

  logic [TW-1:0] t;
  logic          load;
  assign load = start && !busy;
  assign busy = (t != '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load)                        t <= TW'(1);
      else if (int'(t) == TLAST)     begin t <= '0; done <= 1'b1; end
      else if (busy)                   t <= t + 1'b1;
    end

  elem_t hh [N][N];    // H of each cell (east output)
  elem_t vv [N][N];    // V of each cell (north output)

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      if (j == i) begin : g_d
        // D-module: R <- 1/R at step i+1 (1-based), result sent east and north.
        elem_t dr, dinv;
        logic  unit_unused;
        elem_inv u_inv (.a(dr), .y(dinv), .unit(unit_unused));
        always_ff @(posedge clk or negedge rst_n)
          if (!rst_n)                         dr <= '0;
          else if (load)                      dr <= a[i][i];
          else if (int'(t) == i + 1)          dr <= dinv;
        assign hh[i][j]   = dr;
        assign vv[i][j]   = dr;
        assign ainv[i][j] = dr;
      end else if (j > i) begin : g_m
        m_cell #(.I(i + 1), .J(j + 1), .TW(TW)) u_cell (
          .clk (clk),
          .rst_n(rst_n),
          .load(load),
          .a_ld(a[i][j]),
          .t   (t),
          .w   (hh[i][j-1]),
          .s   (vv[i+1][j]),
          .e   (hh[i][j]),
          .n   (vv[i][j]),
          .r   (ainv[i][j])
        );
      end else begin : g_zero
        assign hh[i][j]   = '0;
        assign vv[i][j]   = '0;
        assign ainv[i][j] = '0;
      end
    end
  end
endmodule
