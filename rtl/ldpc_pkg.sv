// ldpc_pkg: shared types and the code definition of the partially parallel
// LDPC decoder.
//
// The parity-check matrix H is an MS x NS base matrix in which every 1 at
// (u,v) is replaced by a P x P identity matrix cyclically shifted right by
// k(u,v) columns, and every 0 by a P x P zero matrix. The decoder hardware is
// built from that base matrix: one DMEM per base-matrix 1 ("edge"), one CNU
// per base row, one VNU per base column.
//
// Edges are numbered e = v*DV + j, j = 0..DV-1 being the j-th 1 of base
// column v. Two functions define the code:
//   base_row(v, j, ms)  row u of the j-th 1 in base column v
//   edge_shift(e, p)    shift k of edge e, 0..p-1
// The published codes come from an offline girth-driven search followed by a
// random choice of the shifts, and their matrices are not published. The
// defaults here are a fixed (3,6)-regular construction instead: for NS = 2*MS
// the first MS columns take rows v+{0,1,3} and the other MS columns rows
// v+{0,4,9} (mod MS). The two offset sets have disjoint difference sets, so
// for MS >= 19 no two base columns share two rows (base girth >= 6, hence no
// 4-cycles in H). The shifts are a fixed integer hash of the edge number,
// standing in for the random shifts. To decode another code, replace these
// two functions (and the CNU degree DC if it changes).
package ldpc_pkg;

  // Operating mode of the decoder.
  typedef enum logic [1:0] {
    MODE_LOAD  = 2'd0,  // channel messages stream in, P beats
    MODE_CHECK = 2'd1,  // check node processing, P cycles
    MODE_VAR   = 2'd2,  // variable node processing, P cycles
    MODE_OUT   = 2'd3   // hard decisions stream out, P beats
  } mode_e;

  // Row offsets of the default base matrix, [column half][j].
  function automatic int unsigned row_offset(int unsigned half, int unsigned j);
    int unsigned offs [2][3];
    offs = '{'{0, 1, 3}, '{0, 4, 9}};
    return offs[half % 2][j % 3];
  endfunction

  // Base-matrix row of the j-th 1 in base column v (MS rows).
  function automatic int unsigned base_row(int unsigned v, int unsigned j, int unsigned ms);
    return ((v % ms) + row_offset(v / ms, j)) % ms;
  endfunction

  // Cyclic shift k of edge e for expansion factor p.
  function automatic int unsigned edge_shift(int unsigned e, int unsigned p);
    int unsigned x;
    x = e * 32'h9E37_79B1 + 32'h7F4A_7C15;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    return x % p;
  endfunction

  // Edge number of the s-th 1 (in column order) of base row u.
  function automatic int unsigned cnu_edge(int unsigned u, int unsigned s,
                                           int unsigned ms, int unsigned ns,
                                           int unsigned dv);
    int unsigned n;
    n = 0;
    for (int unsigned v = 0; v < ns; v++)
      for (int unsigned j = 0; j < dv; j++)
        if (base_row(v, j, ms) == u) begin
          if (n == s) return v * dv + j;
          n++;
        end
    return 0;
  endfunction

  // Number of 1s in base row u (must equal the CNU degree).
  function automatic int unsigned row_weight(int unsigned u, int unsigned ms,
                                             int unsigned ns, int unsigned dv);
    int unsigned n;
    n = 0;
    for (int unsigned v = 0; v < ns; v++)
      for (int unsigned j = 0; j < dv; j++)
        if (base_row(v, j, ms) == u) n++;
    return n;
  endfunction

endpackage
