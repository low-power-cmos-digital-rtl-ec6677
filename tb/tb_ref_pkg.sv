// tb_ref_pkg: reference arithmetic for the autocorrelator testbenches,
// written independently of the RTL.
//
// A product is worked out from the digitizer weights (sign/mag: 11 -> -3,
// 10 -> -1, 00 -> +1, 01 -> +3): the weight product w is one of +/-9, +/-3,
// +/-1; dividing by 3 and deleting the low x low terms gives +/-3, +/-1, 0,
// and adding the bias 3 gives the hardware product. The accumulator's
// readable count is floor(sum / 16) modulo 2^CNT_W.
package tb_ref_pkg;

  function automatic int weight(logic [1:0] s);   // s = {sign, mag}
    int w;
    w = s[0] ? 3 : 1;
    return s[1] ? -w : w;
  endfunction

  function automatic int ref_product(logic [1:0] d, logic [1:0] u);
    int w;
    w = weight(d) * weight(u);
    if (w == 1 || w == -1) return 3;
    return 3 + w / 3;
  endfunction

  function automatic logic [1:0] ref_digitize(int v, int vpos, int vneg, int v0);
    logic s, m;
    s = (v < v0);
    m = (v > vpos) || (v < vneg);
    return {s, m};
  endfunction

endpackage
