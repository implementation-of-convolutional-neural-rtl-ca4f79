// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Works on plain signed integers instead of sign-magnitude bit fields, so the
// expected values are obtained independently of the RTL's datapath:
//   fx2i / i2fx     : 25-bit word <-> signed count of 2^-10 units, with
//                     saturation to +-(2^24 - 1)
//   ref_mul         : (a * b) / 2^10, integer division truncating toward zero
//   ref_add         : a + b, saturated
//   real2fx         : real -> fixed point by testing each bit weight from the
//                     top down (the comparison method of the number format)
//   sig_entry       : sigmoid table word i = sigmoid((i - 2048) / 256)
//   sig_index       : table index of a sum u: 2048 + u/4, clamped to 0..4095
//   ref_neuron_sum  : sum of products plus bias in the order the RTL adds them
package tb_ref_pkg;

  localparam longint MAXMAG = (64'sd1 <<< 24) - 1;

  function automatic longint fx2i(logic [24:0] v);
    return v[24] ? -longint'(v[23:0]) : longint'(v[23:0]);
  endfunction

  function automatic logic [24:0] i2fx(longint x);
    longint m;
    m = (x < 0) ? -x : x;
    if (m > MAXMAG) m = MAXMAG;
    return {(x < 0) && (m != 0), m[23:0]};
  endfunction

  function automatic bit mul_ovf(logic [24:0] a, logic [24:0] b);
    longint p;
    p = fx2i(a) * fx2i(b) / 1024;
    return (p > MAXMAG) || (p < -MAXMAG);
  endfunction

  function automatic logic [24:0] ref_mul(logic [24:0] a, logic [24:0] b);
    return i2fx(fx2i(a) * fx2i(b) / 1024);
  endfunction

  function automatic bit add_ovf(logic [24:0] a, logic [24:0] b);
    longint s;
    s = fx2i(a) + fx2i(b);
    return (s > MAXMAG) || (s < -MAXMAG);
  endfunction

  function automatic logic [24:0] ref_add(logic [24:0] a, logic [24:0] b);
    return i2fx(fx2i(a) + fx2i(b));
  endfunction

  function automatic logic [24:0] real2fx(real r);
    real         m, bitw;
    logic [23:0] mag;
    m    = (r < 0.0) ? -r : r;
    bitw = 8192.0;                       // weight of the top integer bit
    mag  = '0;
    for (int b = 23; b >= 0; b--) begin
      if (m >= bitw) begin
        mag[b] = 1'b1;
        m      = m - bitw;
      end
      bitw = bitw / 2.0;
    end
    return {(r < 0.0) && (mag != '0), mag};
  endfunction

  function automatic logic [24:0] sig_entry(int i);
    real u;
    u = real'(i - 2048) / 256.0;
    return real2fx(1.0 / (1.0 + $exp(-u)));
  endfunction

  function automatic int sig_index(logic [24:0] u);
    longint s;
    s = 2048 + fx2i(u) / 4;
    if (s < 0) s = 0;
    if (s > 4095) s = 4095;
    return int'(s);
  endfunction

  function automatic bit sig_clamps(logic [24:0] u);
    longint s;
    s = 2048 + fx2i(u) / 4;
    return (s < 0) || (s > 4095);
  endfunction

  // Random word with magnitude below lim (in 2^-10 units), random sign.
  function automatic logic [24:0] rand_fx(int unsigned lim);
    logic [23:0] m;
    m = 24'($urandom % lim);
    return {($urandom % 2 == 1) && (m != 0), m};
  endfunction

endpackage
