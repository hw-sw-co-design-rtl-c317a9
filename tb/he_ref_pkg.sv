// he_ref_pkg: reference model of histogram equalization used by the
// testbenches. It computes the transformation table straight from the
// definition, independently of the hardware pipeline:
//   cum[i] = number of channel values <= i over all three channels
//   t[i]   = floor(255 * cum[i] / (3 * npix))
// and provides the byte packing of 24-bit pixels into 32-bit words.
package he_ref_pkg;

  // Channel k of pixel p is byte 3*p+k of the packed image.
  function automatic void ref_table(const ref bit [7:0] img [], input int npix,
                                    output bit [7:0] t [256]);
    longint cnt [256];
    longint c;
    foreach (cnt[i]) cnt[i] = 0;
    for (int b = 0; b < 3 * npix; b++) cnt[img[b]]++;
    c = 0;
    for (int i = 0; i < 256; i++) begin
      c += cnt[i];
      t[i] = 8'((255 * c) / (3 * longint'(npix)));
    end
  endfunction

  // Byte b of the image lives in word b/4, lane b%4.
  function automatic int words_for(input int npix);
    return (3 * npix + 3) / 4;
  endfunction

  // Image whose values crowd the bright end, like an over-exposed picture.
  function automatic void make_bright_image(ref bit [7:0] img [], input int npix, input int seed);
    int unsigned s;
    s = seed;
    img = new[3 * npix];
    for (int b = 0; b < 3 * npix; b++) begin
      s = s * 1103515245 + 12345;
      img[b] = 8'(150 + (s >> 16) % 106);
    end
  endfunction

endpackage
