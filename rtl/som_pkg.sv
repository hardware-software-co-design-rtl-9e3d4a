// som_pkg: shared types and elaboration-time functions of the SOM distance
// accelerator.
//
// It holds the elementary-operation set of the processing units (add, sub,
// mul, div, cmp) with their durations in clock cycles (add 1, sub 1, mul 2,
// div 2, cmp 1), and a description of the elementary operation graph of the
// squared-distance computation for a vector length DIM:
//   * DIM subtractions  d_i = a_i - b_i
//   * DIM squarings     s_i = d_i * d_i
//   * DIM-1 additions   a pairwise reduction tree over s_1..s_DIM; at every
//     level adjacent pairs are added and an odd element left over is carried
//     to the end of the next level. For DIM = 9 this gives exactly
//     (s1+s2),(s3+s4),(s5+s6),(s7+s8), then two more levels, and finally
//     the carried s9 added last.
// Numbering: operation e = 0..DIM-1 are the subtractions, DIM..2*DIM-1 the
// squarings, 2*DIM..3*DIM-2 the additions; the last one is the result.
// Value ids used as operand sources: 0..DIM-1 are a_i, DIM..2*DIM-1 are b_i,
// 2*DIM+e is the result of operation e.
// The graph and the durations follow the document; the numbering, the
// encoding and the tree rule for other DIM values are this design's.
package som_pkg;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_MUL = 3'd2,
    OP_DIV = 3'd3,
    OP_CMP = 3'd4
  } alu_op_e;

  // Largest vector length the graph functions support.
  localparam int unsigned MAX_DIM = 64;

  // Duration of an elementary operation in clock cycles.
  function automatic int unsigned op_duration(alu_op_e op);
    case (op)
      OP_MUL, OP_DIV: return 2;
      default:        return 1;
    endcase
  endfunction

  function automatic int unsigned num_eo(int unsigned dim);
    return 3 * dim - 1;
  endfunction

  // Operation type of elementary operation e.
  function automatic alu_op_e eo_op(int unsigned dim, int unsigned e);
    if (e < dim)          return OP_SUB;
    else if (e < 2 * dim) return OP_MUL;
    else                  return OP_ADD;
  endfunction

  // Operand source (value id) number `which` (0 or 1) of operation e.
  function automatic int unsigned eo_src(int unsigned dim, int unsigned e,
                                         int unsigned which);
    int unsigned cur [MAX_DIM];
    int unsigned nxt [MAX_DIM];
    int unsigned n, m, next_add;
    if (e < dim) return (which == 0) ? e : dim + e;      // a_i - b_i
    if (e < 2 * dim) return 2 * dim + (e - dim);         // d_i * d_i
    // Addition tree: replay the reduction until operation e is produced.
    n = dim;
    for (int unsigned i = 0; i < MAX_DIM; i++) begin
      cur[i] = 0;
      nxt[i] = 0;
    end
    for (int unsigned i = 0; i < dim; i++) cur[i] = 2 * dim + dim + i;
    next_add = 2 * dim;
    while (n > 1) begin
      m = 0;
      for (int unsigned i = 0; i + 1 < n; i += 2) begin
        if (next_add == e) return (which == 0) ? cur[i] : cur[i+1];
        nxt[m] = 2 * dim + next_add;
        m++;
        next_add++;
      end
      if (n % 2 == 1) begin
        nxt[m] = cur[n-1];
        m++;
      end
      for (int unsigned i = 0; i < m; i++) cur[i] = nxt[i];
      n = m;
    end
    return 0;
  endfunction

endpackage
