// tb_ref_pkg: reference models the testbenches compare the RTL against. They
// are written from the definitions, not from the RTL:
//  * critical bits of the 50-bit flit: T = bit 0, QUAN = [4:1], DST = [40:37],
//    SRC = [44:41], H = bit 49, gathered in that order into a 14-bit vector;
//  * shuffle pattern p sends input bit (A_p*j + B_p) mod 14 to output j, with
//    (A,B) = (1,5) (3,1) (5,3) (9,7) (11,9) (13,11) (1,9) (3,13);
//  * the select is the XOR of the three 3-bit slices of the low payload byte;
//  * Hamming [19,14]: data bits fill the non-power-of-two positions 3..19 in
//    order, and the 5 parity bits are the XOR of the positions of all data
//    bits that are 1, so the XOR of the positions of all ones of a valid
//    codeword is zero and a single error shows as its own position.
package tb_ref_pkg;
  localparam int A_TAB [8] = '{1, 3, 5, 9, 11, 13, 1, 3};
  localparam int B_TAB [8] = '{5, 1, 3, 7, 9, 11, 9, 13};

  function automatic logic [2:0] ref_sel(logic [7:0] d);
    return d[2:0] ^ d[5:3] ^ {1'b0, d[7:6]};
  endfunction

  function automatic logic [13:0] ref_shuffle(logic [2:0] s, logic [13:0] c);
    logic [13:0] r;
    for (int j = 0; j < 14; j++) r[j] = c[(A_TAB[s] * j + B_TAB[s]) % 14];
    return r;
  endfunction

  function automatic logic [13:0] ref_deshuffle(logic [2:0] s, logic [13:0] c);
    logic [13:0] r;
    for (int j = 0; j < 14; j++) r[(A_TAB[s] * j + B_TAB[s]) % 14] = c[j];
    return r;
  endfunction

  // Codeword position of data bit i.
  function automatic int ref_dpos(int i);
    int tab [14] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19};
    return tab[i];
  endfunction

  function automatic logic [4:0] ref_parity(logic [13:0] d);
    logic [4:0] p = '0;
    for (int i = 0; i < 14; i++) if (d[i]) p ^= 5'(ref_dpos(i));
    return p;
  endfunction

  function automatic logic [13:0] ref_crit(logic [49:0] f);
    return {f[49], f[44:41], f[40:37], f[4:1], f[0]};
  endfunction

  function automatic logic [49:0] ref_put(logic [49:0] f, logic [13:0] c);
    logic [49:0] r = f;
    r[49] = c[13]; r[44:41] = c[12:9]; r[40:37] = c[8:5]; r[4:1] = c[4:1]; r[0] = c[0];
    return r;
  endfunction

  // Full router input encoding of a link flit into the 55-bit internal flit.
  function automatic logic [54:0] ref_encode(logic [49:0] f);
    logic [2:0]  s  = ref_sel(f[12:5]);
    logic [13:0] sh = ref_shuffle(s, ref_crit(f));
    return {ref_parity(sh), ref_put(f, sh)};
  endfunction

  function automatic logic [49:0] rand_flit();
    return {$urandom(), $urandom()};
  endfunction
endpackage
