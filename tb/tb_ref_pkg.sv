// tb_ref_pkg: reference arithmetic for the testbenches, written separately
// from the design's package.
//
// ref_mul/ref_add model the Q4.12 format (16-bit, 12 fraction bits,
// products shifted right arithmetically by 12, results saturated to
// [-32768, 32767]) with plain integers; ref_sigmoid evaluates the three
// sigmoid polynomials and the held edge values in floating point.
package tb_ref_pkg;

  function automatic int ref_sat(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int ref_mul(input int a, input int b);
    longint p;
    p = longint'(a) * longint'(b);
    return ref_sat(p >>> 12);
  endfunction

  function automatic int ref_add(input int a, input int b);
    return ref_sat(longint'(a) + longint'(b));
  endfunction

  // Floating-point sigmoid approximation; region as in the design's select.
  function automatic real ref_sigmoid(input real v, output int region);
    if (v < -2.0)       begin region = 3; return 0.0467*4.0 + 0.1239*(-2.0) + 0.2969; end
    else if (v >= 2.0)  begin region = 3; return -0.0467*4.0 + 0.2896*2.0 + 0.4882; end
    else if (v <= -1.0) begin region = 0; return 0.0467*v*v + 0.1239*v + 0.2969; end
    else if (v < 1.0)   begin region = 1; return 0.2383*v + 0.5; end
    else                begin region = 2; return -0.0467*v*v + 0.2896*v + 0.4882; end
  endfunction

  // Neuron reference: Q4.12 weighted sum through the two-level adder tree.
  function automatic int ref_dot4(input int x0, x1, x2, x3, input int w0, w1, w2, w3);
    return ref_add(ref_add(ref_mul(x0, w0), ref_mul(x1, w1)),
                   ref_add(ref_mul(x2, w2), ref_mul(x3, w3)));
  endfunction

  function automatic int rand_fix(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

endpackage
