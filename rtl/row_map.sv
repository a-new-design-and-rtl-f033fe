// row_map: reorders one row of an 8x8 block for the direct 2-D transform.
//
// Forward (INVERSE = 0): din is row pmap(n1) of the pixel block in natural
// column order; dout[t] is the sample that the transform expects at position
// t of mapped row n1, i.e. din[pmap(tmap(n1, t))]. This combines the
// even/odd-reversed column permutation (0,2,4,6,7,5,3,1) with the per-row map
// 4*n2+1 = (4*t+1)*(4*n1+1) mod 32, both from the algorithm. The row select
// pmap(n1) is left to the caller.
// Inverse (INVERSE = 1): the exact opposite reordering, used at the IDCT
// output to put a reconstructed mapped row back into natural column order.
// Purely combinational: a 3-bit row index selects one of eight fixed
// permutations, held in a table computed at elaboration.
module row_map
  import dct_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [2:0] n1,
  input  word_t      din  [8],
  output word_t      dout [8]
);

  typedef logic [7:0][7:0][2:0] perm_tab_t;

  // FWD[n1][t] = natural column feeding mapped position t;
  // INV[n1][c] = mapped position that holds natural column c.
  function automatic perm_tab_t make_tab(bit inv);
    perm_tab_t tab;
    for (int unsigned r = 0; r < 8; r++) begin
      for (int unsigned t = 0; t < 8; t++) begin
        if (inv) tab[r][pmap(tmap(r, t))] = 3'(t);
        else     tab[r][t]                = 3'(pmap(tmap(r, t)));
      end
    end
    return tab;
  endfunction

  localparam perm_tab_t TAB = make_tab(INVERSE);

  always_comb begin
    for (int i = 0; i < 8; i++) dout[i] = din[TAB[n1][i]];
  end

endmodule
