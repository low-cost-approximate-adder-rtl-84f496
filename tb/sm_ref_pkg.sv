// sm_ref_pkg: reference arithmetic for the testbenches, written from the
// rules of the approximate adder/subtractor rather than from its circuit.
//
// Numbers are held as a sign bit plus a magnitude (up to 63 bits). The
// reference adder works on integer values: equal signs add the magnitudes;
// different signs give d = P - N (P the positive, N the negative magnitude),
// and the result is d - 1 with the "carry dropped" flag when d > 0, or the
// exact -(N - P) otherwise (negative zero when P == N).
package sm_ref_pkg;

  typedef struct packed {
    logic        s;
    logic [62:0] m;
  } smv_t;

  function automatic longint smv_value(smv_t v);
    return v.s ? -longint'(v.m) : longint'(v.m);
  endfunction

  function automatic smv_t smv_from_int(longint x);
    smv_t v;
    v.s = (x < 0);
    v.m = 63'(x < 0 ? -x : x);
    return v;
  endfunction

  // Approximate add (sub = 0) or subtract (sub = 1) of a and b.
  function automatic smv_t approx_ref(smv_t a, smv_t b, logic sub, output logic drop);
    smv_t   r;
    logic   sb;
    longint d;
    sb   = b.s ^ sub;
    drop = 1'b0;
    if (a.s == sb) begin
      r.s = a.s;
      r.m = a.m + b.m;
    end else begin
      d = a.s ? (longint'(b.m) - longint'(a.m)) : (longint'(a.m) - longint'(b.m));
      if (d > 0) begin
        r.s  = 1'b0;
        r.m  = 63'(d - 1);
        drop = 1'b1;
      end else begin
        r.s = 1'b1;
        r.m = 63'(-d);
      end
    end
    return r;
  endfunction

  // Exact product of two sign-magnitude numbers.
  function automatic smv_t mul_ref(smv_t a, smv_t b);
    smv_t r;
    r.s = a.s ^ b.s;
    r.m = a.m * b.m;
    return r;
  endfunction

endpackage
