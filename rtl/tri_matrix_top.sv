// tri_matrix_top: the optimal networks of this design side by side.
//
//   mix_*  Type-2 mixed triangular inverter (mixed_inv, N_MIX x N_MIX in
//          S_MIX x S_MIX blocks). It is the inverter that meets the
//          A*T^2 = O(n^4) bound over the widest range of times; inside it
//          are Type-1 mixed inverters, recursive inverters, pipelined mesh
//          multipliers, inner product modules and recursive multipliers.
//   sys_*  First-order systolic triangular inverter (sys_inv, N_SYS x N_SYS),
//          the network that is optimal for T = O(n), one entry per cell.
//   mul_*  Pipelined matrix multiplier (pipe_mult, N_MUL x N_MUL on an
//          R_MUL x R_MUL mesh of inner product modules).
//   ser_*  Serially fed multiplier (ser_mult, N_SER x N_SER): one recursive
//          multiplier over R_SER x R_SER blocks sent entry by entry, the
//          second pipelining strategy for multiplication.
// The four share only clock and reset; each has the handshake of its own
// module (see there). Because inverting [I A 0; 0 I B; 0 0 I] yields the
// product AB in its upper right block, either inverter can also be used as
// a matrix multiplier.
// Sizes: the document fixes no sizes; N = 16 for all three, S_MIX = 4
// (so that S <= N/log2 N), R_MUL = 4 and R_SER = 2 are this design's
// defaults.
module tri_matrix_top
  import ring_pkg::*;
#(
  parameter int unsigned N_MIX = 16,
  parameter int unsigned S_MIX = 4,
  parameter int unsigned N_SYS = 16,
  parameter int unsigned N_MUL = 16,
  parameter int unsigned R_MUL = 4,
  parameter int unsigned N_SER = 16,
  parameter int unsigned R_SER = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // Type-2 mixed inverter
  input  logic  mix_start,
  input  elem_t mix_a    [N_MIX][N_MIX],
  output logic  mix_busy,
  output logic  mix_done,
  output elem_t mix_ainv [N_MIX][N_MIX],
  // first-order systolic inverter
  input  logic  sys_start,
  input  elem_t sys_a    [N_SYS][N_SYS],
  output logic  sys_busy,
  output logic  sys_done,
  output elem_t sys_ainv [N_SYS][N_SYS],
  // pipelined matrix multiplier
  input  logic  mul_start,
  output logic  mul_in_ready,
  input  elem_t mul_a    [N_MUL][N_MUL],
  input  elem_t mul_b    [N_MUL][N_MUL],
  output logic  mul_out_valid,
  output elem_t mul_c    [N_MUL][N_MUL],
  // serially fed multiplier
  input  logic  ser_start,
  output logic  ser_in_ready,
  input  elem_t ser_a    [N_SER][N_SER],
  input  elem_t ser_b    [N_SER][N_SER],
  output logic  ser_out_valid,
  output elem_t ser_c    [N_SER][N_SER]
);
  mixed_inv #(.N(N_MIX), .S(S_MIX), .TYPE(2)) u_mix (
    .clk(clk), .rst_n(rst_n), .start(mix_start), .a(mix_a),
    .busy(mix_busy), .done(mix_done), .ainv(mix_ainv));

  sys_inv #(.N(N_SYS)) u_sys (
    .clk(clk), .rst_n(rst_n), .start(sys_start), .a(sys_a),
    .busy(sys_busy), .done(sys_done), .ainv(sys_ainv));

  pipe_mult #(.N(N_MUL), .R(R_MUL)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(mul_start), .in_ready(mul_in_ready),
    .a(mul_a), .b(mul_b), .out_valid(mul_out_valid), .c(mul_c));

  ser_mult #(.N(N_SER), .R(R_SER)) u_ser (
    .clk(clk), .rst_n(rst_n), .start(ser_start), .in_ready(ser_in_ready),
    .a(ser_a), .b(ser_b), .out_valid(ser_out_valid), .c(ser_c));
endmodule
