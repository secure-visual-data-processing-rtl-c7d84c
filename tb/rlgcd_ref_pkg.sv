// rlgcd_ref_pkg: reference model of the image cipher for the testbenches.
// Written as flat Boolean equations, not from the gate modules, so that a
// wiring error in the RTL shows up as a mismatch. Decryption is modelled by
// searching all 256 pixels for the one that encrypts to the given value,
// which uses nothing of the inverse network.
package rlgcd_ref_pkg;

  localparam logic [7:0] REF_SEED = 8'hA5;

  // Next LFSR state: shift left, feedback x^8 + x^6 + x^5 + x^4 + 1.
  function automatic logic [7:0] ref_lfsr_next(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  // Gate network without the key.
  function automatic logic [7:0] ref_scramble(input logic [7:0] a);
    logic l0, l1, l2, l3, u0, u1, u2, u3;
    logic t0, t1, t2, h0, h1, h2;
    logic [2:0] fl, fh;
    logic p, q;
    // SCL gates: 4th output = D xor (A or B or C)
    l0 = a[0]; l1 = a[1]; l2 = a[2]; l3 = a[3] ^ (a[0] | a[1] | a[2]);
    u0 = a[4]; u1 = a[5]; u2 = a[6]; u3 = a[7] ^ (a[4] | a[5] | a[6]);
    // Toffoli gates
    t0 = l0; t1 = l1; t2 = l2 ^ (l0 & l1);
    h0 = u1; h1 = u2; h2 = u3 ^ (u1 & u2);
    // Fredkin gates: swap the data bits when the control is 1
    fl = t0 ? {t1, t2, t0} : {t2, t1, t0};
    fh = h0 ? {h1, h2, h0} : {h2, h1, h0};
    // Feynman gate
    p = l3; q = l3 ^ u0;
    return {fh, q, p, fl};
  endfunction

  function automatic logic [7:0] ref_encrypt(input logic [7:0] a, input logic [7:0] key);
    return ref_scramble(a) ^ key;
  endfunction

  function automatic logic [7:0] ref_decrypt(input logic [7:0] e, input logic [7:0] key);
    for (int v = 0; v < 256; v++)
      if (ref_encrypt(8'(v), key) == e) return 8'(v);
    return 8'h00;
  endfunction

endpackage
