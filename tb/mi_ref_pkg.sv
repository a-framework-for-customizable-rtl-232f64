// Reference arithmetic for the testbenches: entropies and mutual
// information of two pixel arrays, computed in floating point directly from
// the definitions H = -sum p*log2(p), MI = H(ref) + H(flt) - H(ref,flt),
// independently of the fixed-point hardware formulation.
package mi_ref_pkg;

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  // Entropy (bits) of a histogram with total count n.
  function automatic real entropy(input int unsigned h[], input real n);
    real s = 0.0;
    foreach (h[i]) if (h[i] != 0) s -= (h[i] / n) * log2r(h[i] / n);
    return s;
  endfunction

  // Entropies of reference, floating and joint histograms and their MI.
  function automatic void mi_of(input int unsigned rp[], input int unsigned fp[],
                                input int unsigned hs,
                                output real hr, output real hf,
                                output real hj, output real mi);
    int unsigned jr[], rr[], ff[];
    real n = real'(rp.size());
    jr = new[hs * hs];
    rr = new[hs];
    ff = new[hs];
    foreach (jr[i]) jr[i] = 0;
    foreach (rr[i]) rr[i] = 0;
    foreach (ff[i]) ff[i] = 0;
    foreach (rp[i]) begin
      jr[rp[i] * hs + fp[i]]++;
      rr[rp[i]]++;
      ff[fp[i]]++;
    end
    hr = entropy(rr, n);
    hf = entropy(ff, n);
    hj = entropy(jr, n);
    mi = hr + hf - hj;
  endfunction

  // Fixed point (FRAC fraction bits, two's complement) to real.
  function automatic real fx2r(input longint v, input int frac);
    return real'(v) / real'(longint'(1) << frac);
  endfunction

  // Value of an IEEE 754 single given as bits (zero, normals, subnormals).
  function automatic real f2r(input logic [31:0] b);
    real m;
    int e;
    e = int'(b[30:23]);
    m = real'(b[22:0]) / real'(1 << 23);
    if (e == 0) m = m * (2.0 ** -126);
    else m = (1.0 + m) * (2.0 ** (e - 127));
    return b[31] ? -m : m;
  endfunction

  // Round a double to the nearest IEEE single, ties to even (normal range).
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [32:0] m;
    int e;
    if (x == 0.0) return 32'd0;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, 1'b1, d[51:29]} + 33'(d[28] && (d[27:0] != 0 || d[29]));
    if (m[24]) begin m = m >> 1; e++; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

endpackage
