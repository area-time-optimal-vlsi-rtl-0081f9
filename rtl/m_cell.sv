// m_cell: M-module (off-diagonal cell) of the first-order systolic
// triangular inverter.
//
// Cell (I,J), J > I (1-based), computes entry (I,J) of the inverse in place.
// It holds one operand register R and two buffers, H feeding the east
// output and V feeding the north output; W (west) and S (south) are its
// operand inputs. R is loaded with a_IJ. At step t of the mesh the cell
// executes:
//   t = J         (first)   R <- W*R,        H <- W,       V <- a_IJ
//   J < t < 2J-I  (general) R <- R + W*S,    H <- W,       V <- S
//   t = 2J-I      (final)   R <- -R*S,       H <- -R*S,    V <- S
//   other t                                  H <- W,       V <- S
// At step t the west input carries a_{I,p}^-1 and the south input a_{p,J}
// with p = t+I-J, so R accumulates the inner product of row I of the
// inverse with column J of A, and the final step multiplies by a_JJ^-1,
// which reaches the cell from the diagonal at step 2J-I.
// The two instructions "general" and "final" are the cell's as given by the
// algorithm; using the loaded a_IJ as the south operand of the first step
// (p = I, when a_IJ is in the cell itself) and sending it north from there
// is how this design reads the start of the upward flow of column J.
// One step per clock cycle; `t` is the mesh step counter (0 = idle), `load`
// loads R. Combinational multiply, registered R, H, V.
module m_cell
  import ring_pkg::*;
#(
  parameter int unsigned I  = 1,
  parameter int unsigned J  = 2,
  parameter int unsigned TW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  elem_t         a_ld,
  input  logic [TW-1:0] t,
  input  elem_t         w,      // from the west neighbour's H
  input  elem_t         s,      // from the south neighbour's V
  output elem_t         e,      // H
  output elem_t         n,      // V
  output elem_t         r       // R: the inverse entry once the mesh is done
);
  typedef enum logic [1:0] {OP_PASS, OP_FIRST, OP_GENERAL, OP_FINAL} op_e;

  localparam int unsigned TFIRST = J;
  localparam int unsigned TFINAL = 2 * J - I;

  op_e   op;
  elem_t m1, m2, prod;
  always_comb begin
    if      (int'(t) == TFIRST)                     op = OP_FIRST;
    else if (int'(t) == TFINAL)                     op = OP_FINAL;
    else if (int'(t) > TFIRST && int'(t) < TFINAL)  op = OP_GENERAL;
    else                                            op = OP_PASS;
    m1   = (op == OP_FINAL) ? r : w;
    m2   = (op == OP_FIRST) ? r : s;
    prod = elem_t'(m1 * m2);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r <= '0;
      e <= '0;
      n <= '0;
    end else if (load) begin
      r <= a_ld;
    end else begin
      unique case (op)
        OP_FIRST:   begin r <= prod;               e <= w;     n <= r; end
        OP_GENERAL: begin r <= elem_t'(r + prod);  e <= w;     n <= s; end
        OP_FINAL:   begin r <= elem_t'(-prod);     e <= elem_t'(-prod); n <= s; end
        default:    begin                          e <= w;     n <= s; end
      endcase
    end
endmodule
