// stego_ref_pkg: reference models used by the testbenches, written from the
// equations of the method rather than from the RTL.
//  - lfsr_ref_next: one step of an n-bit LFSR whose flip-flop FF_i takes
//    b_{i+1} and whose input b_n is the XOR of b_0 and every b_i with a
//    closed switch c_i.
//  - ycc_ref / rgb_ref: BT.601 colour conversion, coefficients times 256,
//    rounded to nearest with floor division, saturated to 0..255.
package stego_ref_pkg;

  function automatic logic [8:0] lfsr_ref_next(input logic [8:0] s, input logic [8:0] taps);
    logic fb;
    fb = s[0];
    for (int i = 1; i < 9; i++)
      if (taps[i]) fb = fb ^ s[i];
    return {fb, s[8:1]};
  endfunction

  function automatic int floor_div256(input int t);
    if (t >= 0) return t / 256;
    else        return -((-t + 255) / 256);
  endfunction

  function automatic int clip8(input int v);
    if (v < 0)   return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  // returns {Y, Cb, Cr}
  function automatic logic [23:0] ycc_ref(input int r, input int g, input int b);
    int y, cb, cr;
    y  = floor_div256( 66*r + 129*g +  25*b + 128) + 16;
    cb = floor_div256(-38*r -  74*g + 112*b + 128) + 128;
    cr = floor_div256(112*r -  94*g -  18*b + 128) + 128;
    return {8'(clip8(y)), 8'(clip8(cb)), 8'(clip8(cr))};
  endfunction

  // returns {R, G, B}
  function automatic logic [23:0] rgb_ref(input int y, input int cb, input int cr);
    int r, g, b;
    r = floor_div256(298*(y-16)                  + 409*(cr-128) + 128);
    g = floor_div256(298*(y-16) - 100*(cb-128)   - 208*(cr-128) + 128);
    b = floor_div256(298*(y-16) + 516*(cb-128)                  + 128);
    return {8'(clip8(r)), 8'(clip8(g)), 8'(clip8(b))};
  endfunction

endpackage
