// turbo_ref_pkg -- reference models for the turbo decoder testbenches:
// the 3GPP2 constituent encoder, the interleaver written straight from the
// standard's step list, and a Gaussian-noise source built from uniform
// random numbers.
package turbo_ref_pkg;
  import dmcd_pkg::*;

  // Interleaved address i of a block of n_len symbols (steps of the standard:
  // counter, n MSBs + 1, table lookup, multiply, bit-reverse, drop >= N).
  function automatic void il_sequence(input int n_len, ref int pi_seq[]);
    int n, cnt, out_i, msb, lsb, rev, t, prod, a;
    n = 4;
    while (n_len > (1 << (n + 5))) n++;
    pi_seq = new[n_len];
    cnt = 0; out_i = 0;
    while (out_i < n_len) begin
      msb = ((cnt >> 5) + 1) % (1 << n);
      lsb = cnt % 32;
      rev = 0;
      for (int b = 0; b < 5; b++) if (lsb & (1 << b)) rev |= 1 << (4 - b);
      t = int'(il_table(4'(n), 5'(lsb)));
      prod = (msb * t) % (1 << n);
      a = rev * (1 << n) + prod;
      if (a < n_len) begin pi_seq[out_i] = a; out_i++; end
      cnt++;
    end
  endfunction

  // Parities of the RSC encoder over a bit sequence (no tail).
  function automatic void rsc_encode(input bit u[], ref bit y0[], ref bit y1[]);
    bit s1, s2, s3, a;
    y0 = new[u.size()]; y1 = new[u.size()];
    s1 = 0; s2 = 0; s3 = 0;
    foreach (u[k]) begin
      a = u[k] ^ s2 ^ s3;
      y0[k] = a ^ s1 ^ s3;
      y1[k] = a ^ s1 ^ s2 ^ s3;
      s3 = s2; s2 = s1; s1 = a;
    end
  endfunction

  // Approximately Gaussian sample with standard deviation sigma_x8/8 (in
  // units of 1/8), from the sum of 12 uniform numbers.
  function automatic int gauss8(input int sigma_x8);
    int acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(0, 4095));
    acc -= 6 * 4096;
    return (acc * sigma_x8) / 4096;
  endfunction

  // Channel LLR in 3.3 format for bit b with amplitude amp_x8/8 and noise.
  function automatic llr_t chan(input bit b, input int amp_x8, input int sigma_x8);
    int v;
    v = (b ? amp_x8 : -amp_x8) + gauss8(sigma_x8);
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return llr_t'(v);
  endfunction
endpackage
