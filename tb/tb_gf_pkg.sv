// tb_gf_pkg: reference GF(2^10) arithmetic for the testbenches, written
// independently of the design (schoolbook product, then reduction by the
// primitive polynomial x^10 + x^3 + 1).
package tb_gf_pkg;
  function automatic logic [9:0] m10(logic [9:0] a, logic [9:0] b);
    logic [19:0] p = '0;
    for (int i = 0; i < 10; i++) if (b[i]) p ^= 20'(a) << i;
    for (int i = 19; i >= 10; i--) if (p[i]) p ^= 20'h409 << (i - 10);
    return p[9:0];
  endfunction
  function automatic logic [9:0] apow(int e);
    logic [9:0] p = 10'd1;
    e = ((e % 1023) + 1023) % 1023;
    for (int i = 0; i < e; i++) p = m10(p, 10'd2);
    return p;
  endfunction
endpackage
