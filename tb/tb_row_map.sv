// tb_row_map: checks the forward and inverse row maps for all eight rows.
// Forward: position t of mapped row n1 must hold natural column
// pmap(n2) where 4*n2+1 = (4t+1)(4n1+1) mod 32 (searched here, not
// computed with the RTL's formula). Inverse: must undo the forward map.
// The N = 4 example of the document's Fig. 1 is reproduced too: with the
// same rule at N = 4, row 2 maps (x30 x32 x33 x31) to (x33 x31 x30 x32).
module tb_row_map;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic [2:0] n1;
  word_t      din [8];
  word_t      fwd [8];
  word_t      back [8];

  row_map #(.INVERSE(1'b0)) u_fwd (.n1(n1), .din(din), .dout(fwd));
  row_map #(.INVERSE(1'b1)) u_inv (.n1(n1), .din(fwd), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int r = 0; r < 8; r++) begin
        n1 = 3'(r);
        for (int c = 0; c < 8; c++) din[c] = word_t'($urandom);
        #1;
        for (int t = 0; t < 8; t++) begin
          chk(fwd[t] == din[pmap_ref(tmap_ref(r, t))], $sformatf("fwd row %0d pos %0d", r, t));
          chk(back[t] == din[t], $sformatf("inv row %0d col %0d", r, t));
        end
      end
    end
    report();
    $finish;
  end

endmodule
