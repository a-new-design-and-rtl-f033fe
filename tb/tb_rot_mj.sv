// tb_rot_mj: checks the -j multiplexers and barrel shifter in both
// directions for every k2 = 0..7. Forward: output k1 must be input
// (k1+k2) mod 8 times (-j)^a with a = (k1+k2) div 8, as in Table 1 of the
// algorithm (e.g. k2 = 2: inputs b = 0, 1 are multiplied by -j and land at
// k1 = 6, 7). Inverse: applied to the forward output it must give the
// input back.
module tb_rot_mj;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic [2:0] k2;
  cword_t     din  [8];
  cword_t     fwd  [8];
  cword_t     back [8];

  rot_mj #(.INVERSE(1'b0)) u_fwd (.k2(k2), .din(din), .dout(fwd));
  rot_mj #(.INVERSE(1'b1)) u_inv (.k2(k2), .din(fwd), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    int b, a;
    int wre_, wim_;
    for (int rep = 0; rep < 50; rep++) begin
      for (int k = 0; k < 8; k++) begin
        k2 = 3'(k);
        for (int i = 0; i < 8; i++) begin
          din[i].re = word_t'(rand_range(-100000, 100000));
          din[i].im = word_t'(rand_range(-100000, 100000));
        end
        #1;
        for (int k1 = 0; k1 < 8; k1++) begin
          b = (k1 + k) % 8;
          a = (k1 + k) / 8;
          // (x + jy) * (-j) = y - jx
          wre_ = (a == 0) ? int'(din[b].re) : int'(din[b].im);
          wim_ = (a == 0) ? int'(din[b].im) : -int'(din[b].re);
          chk(int'(fwd[k1].re) == wre_ && int'(fwd[k1].im) == wim_,
              $sformatf("fwd k2=%0d k1=%0d", k, k1));
          chk(back[k1] == din[k1], $sformatf("inv k2=%0d b=%0d", k, k1));
        end
      end
    end
    report();
    $finish;
  end

endmodule
