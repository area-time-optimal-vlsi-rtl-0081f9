// ring_pkg: the number system shared by every network in this design.
//
// All matrix entries are elements of a finite ring, so that one small
// elementary cell can multiply and add entries in constant time and area.
// This design fixes that ring to the integers modulo 2**W. Multiplication
// and addition are the ordinary W-bit wrap-around operations. The units of
// this ring are exactly the odd numbers, so the triangular inverters
// require every diagonal entry to be odd; the inverse of a unit is computed
// by Newton iteration x <- x*(2 - a*x), which doubles the number of correct
// low-order bits at each step starting from x = a (correct to 3 bits, since
// a*a = 1 mod 8 for odd a). The choice of ring and of W is this design's own.
package ring_pkg;

  // Width of one ring element (the ring is Z / 2**W).
  parameter int unsigned W = 16;

  typedef logic [W-1:0] elem_t;

  // Control token that travels with the A blocks through the mesh of the
  // pipelined multiplier: a valid block, and whether it is the first or the
  // last of the r terms of one block inner product.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } blk_tag_t;

  // Multiplicative inverse of an odd element; undefined for even inputs.
  function automatic elem_t ring_inv(elem_t a);
    elem_t x;
    x = a;
    for (int unsigned b = 3; b < W; b = b * 2)
      x = elem_t'(x * (elem_t'(2) - elem_t'(a * x)));
    return x;
  endfunction

  // Number of buffer-driver/adder levels of an s x s recursive multiplier.
  function automatic int unsigned clog2i(int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Latency in cycles of rec_mult #(S): log S copy levels, one multiplier
  // level and log S adder levels, each registered.
  function automatic int unsigned rec_mult_lat(int unsigned s);
    return 2 * clog2i(s) + 1;
  endfunction

  // Latency of rec_mult #(Q, BLK) in serial-block mode, first entry in to
  // first entry out.
  function automatic int unsigned ser_rec_mult_lat(int unsigned q, int unsigned blk);
    return 2 * clog2i(q) + blk * blk + blk;
  endfunction

  // Latency of ser_mult #(N, R), from the accepted start to out_valid:
  // R*R entries sent, the network latency, the last of R*R entries
  // received, and the output register.
  function automatic int unsigned ser_mult_lat(int unsigned n, int unsigned r);
    return ser_rec_mult_lat(n / r, r) + r * r + 1;
  endfunction

  // Latency in cycles of rec_inv #(N): inverse of the two halves, then two
  // half-size products in series, then one output register.
  function automatic int unsigned rec_inv_lat(int unsigned n);
    if (n <= 1) return 1;
    return rec_inv_lat(n / 2) + 2 * rec_mult_lat(n / 2) + 1;
  endfunction

  // Latency in cycles of pipe_mult #(N, R), from the accepted start to the
  // cycle out_valid is high.
  //   1              operand capture
  //   (R-1)          last block column issued
  //   (R-1)+(R-1)    skew: row i / column k enter i / k cycles late
  //   rec_mult_lat   block product
  //   1              accumulate into c
  //   deskew aligns every block on the last one, then one output register.
  function automatic int unsigned pipe_mult_lat(int unsigned n, int unsigned r);
    return 1 + (r - 1) + 2 * (r - 1) + rec_mult_lat(n / r) + 1 + 1;
  endfunction

  // Latency in cycles of mixed_inv, from the accepted start to the cycle
  // `done` is high: the diagonal block inverses (latency ld), then 2m-1
  // mesh steps of lm+1 cycles each (m = n/s blocks per side, lm the block
  // multiplier latency), then the done register.
  function automatic int unsigned mixed_inv_lat(int unsigned typ, int unsigned n,
                                                int unsigned s, int unsigned ds,
                                                int unsigned mr);
    int unsigned ld, lm;
    if (typ == 1) begin
      ld = rec_inv_lat(s);
      lm = rec_mult_lat(s);
    end else begin
      ld = mixed_inv_lat(1, s, ds, 1, 1);
      lm = pipe_mult_lat(s, mr);
    end
    return ld + (2 * (n / s) - 1) * (lm + 1) + 1;
  endfunction

endpackage
