// Reference model of the SafeTalk keystream for the testbenches, written
// from the cipher's definition rather than from the RTL: three Fibonacci
// LFSRs given by their polynomial exponents and keys, shifted right with
// the LSB as output bit, combined as a Geffe generator in which the 13-bit
// register chooses between the 8-bit (when 1) and the 11-bit register.
package keystream_model_pkg;

  function automatic int unsigned step(ref int unsigned st, input int n,
                                       input int e0, e1, e2, e3);
    int unsigned fb, o;
    o  = st & 1;
    fb = ((st >> (e0 - 1)) ^ (st >> (e1 - 1))) & 1;
    if (e2 > 0) fb ^= (st >> (e2 - 1)) & 1;
    if (e3 > 0) fb ^= (st >> (e3 - 1)) & 1;
    st = (st >> 1) | (fb << (n - 1));
    return o;
  endfunction

  // keystream bits 0 .. nbits-1 after reset
  function automatic void keystream(input int nbits, ref bit ks[$]);
    int unsigned s8 = 'h08, s11 = 'h00B, s13 = 'h000D;
    int unsigned a, b, c;
    ks.delete();
    for (int i = 0; i < nbits; i++) begin
      a = step(s8,  8, 8, 4, 3, 2);
      b = step(s11, 11, 11, 2, 0, 0);
      c = step(s13, 13, 13, 4, 3, 1);
      ks.push_back(c[0] ? a[0] : b[0]);
    end
  endfunction

  // n-th keystream byte (bits 8n..8n+7, first bit in the LSB)
  function automatic byte unsigned key_byte(input int n);
    bit ks[$];
    byte unsigned r = 0;
    keystream(8 * (n + 1), ks);
    for (int i = 0; i < 8; i++) r[i] = ks[8 * n + i];
    return r;
  endfunction

endpackage
