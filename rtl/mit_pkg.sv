// mit_pkg - shared constants, the mesh-size type and helper functions of the
// mutual inter-unit test hardware.
//
// A processor node talks to each of its 2d direct neighbours over one test
// link. On that link the testing side drives a request strobe, the test
// signature, its free flag b (low while it tests) and its healthy/faulty
// decision phi; the tested side answers with its response token and the
// arbitration flag z that permits this tester to start. That is
// W_T + W_R + 4 terminals per direction, matching the per-NCU terminal count
// W_R + W_T + 4 of the connection-complexity analysis. Which single-bit
// signal is the fourth one (here: the request strobe) is this design's choice.
//
// Neighbour numbering: for a node with coordinates c[0..d-1], neighbour
// i (1 <= i <= d) sits at c[i-1]+1 and neighbour d+i at c[i-1]-1, both modulo
// the size of that dimension (the mesh wraps around at its edges). In two dimensions with
// c[0] = y and c[1] = x this gives 1 = up, 2 = right, 3 = down, 4 = left.
// The node in direction i sees this node as its neighbour opp(i).
package mit_pkg;

  // Default widths of one test signature and one response token. Only their
  // sum (32, 64, 128 or 256) and W_R = W_T appear in the evaluation; the
  // smallest case is taken as the default.
  parameter int unsigned W_T_DEF = 16;
  parameter int unsigned W_R_DEF = 16;

  // Index of the opposite direction (1-based, 2d directions).
  function automatic int unsigned opp_dir(int unsigned i, int unsigned d);
    return ((i - 1 + d) % (2 * d)) + 1;
  endfunction

  // Mesh sizes, one 16-bit entry per dimension, entry 0 first. Dimensions
  // beyond d are ignored. At most MAX_D dimensions.
  parameter int unsigned MAX_D = 16;
  typedef logic [MAX_D-1:0][15:0] dims_t;

  // The same size in each of d dimensions.
  function automatic dims_t uniform_dims(int unsigned d, int unsigned side);
    dims_t v;
    for (int unsigned k = 0; k < MAX_D; k++) v[k] = (k < d) ? 16'(side) : 16'd1;
    return v;
  endfunction

  // Number of nodes of a d-dimensional mesh.
  function automatic int unsigned node_count(int unsigned d, dims_t sizes);
    int unsigned nn;
    nn = 1;
    for (int unsigned k = 0; k < d; k++) nn = nn * int'(sizes[k]);
    return nn;
  endfunction

  // Linear index of the neighbour of node idx in direction dir (1..2d) of a
  // d-dimensional wrap-around mesh. Node coordinates are the mixed-radix
  // digits of idx, digit 0 first, digit k running over 0 .. sizes[k]-1.
  function automatic int unsigned nbr_index(int unsigned idx, int unsigned dir,
                                            int unsigned d, dims_t sizes);
    int unsigned dim, stride, c, nc, side;
    dim    = (dir - 1) % d;
    stride = 1;
    for (int unsigned k = 0; k < dim; k++) stride = stride * int'(sizes[k]);
    side = int'(sizes[dim]);
    c  = (idx / stride) % side;
    nc = (dir <= d) ? ((c + 1) % side) : ((c + side - 1) % side);
    return idx - c * stride + nc * stride;
  endfunction

  // The predefined test signatures: T(k) for k = 0 .. kmax-1. A signature is
  // the address of a test routine that every core holds; this design derives
  // the table from k with a multiplicative hash (the low bits are used).
  function automatic logic [63:0] signature_word(int unsigned k);
    logic [63:0] v;
    v = (64'(k) + 64'd1) * 64'hD1B5_4A32_D192_ED03;
    return v ^ (v >> 32);
  endfunction

  // Response token a healthy core returns for signature t: the result of the
  // predefined test routine, here a fixed mixing function of t.
  function automatic logic [63:0] reference_response(logic [63:0] t);
    logic [63:0] r;
    r = t * 64'h9E37_79B9_7F4A_7C15;
    return r ^ (r >> 29) ^ 64'h5A5A;
  endfunction

endpackage
