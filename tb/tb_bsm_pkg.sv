// tb_bsm_pkg: reference models shared by the matcher's testbenches.
//
// make_perm builds a random permutation of 0..255 (Fisher-Yates on
// $urandom). pearson_ref computes Pearson's hash of a window the way the
// hardware defines it: h = IHV, then h = T[h ^ byte] over the bytes from
// the oldest (window byte L, top bits) to the newest (byte 1, low bits).
package tb_bsm_pkg;

  typedef byte unsigned perm_t [256];

  function automatic void make_perm(output perm_t p);
    for (int i = 0; i < 256; i++) p[i] = byte'(i);
    for (int i = 255; i > 0; i--) begin
      int j;
      byte unsigned t;
      j = int'($urandom_range(i, 0));
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endfunction

  // win holds up to 64 bytes; only the low nbytes bytes are hashed.
  function automatic byte unsigned pearson_ref(input logic [511:0] win, input int nbytes,
                                               input perm_t p, input byte unsigned ihv);
    byte unsigned h;
    h = ihv;
    for (int i = nbytes - 1; i >= 0; i--) h = p[h ^ win[8*i +: 8]];
    return h;
  endfunction

endpackage
