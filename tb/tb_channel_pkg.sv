// tb_channel_pkg: BPSK over AWGN for the decoder testbenches. Code bit 0 is
// sent as +1 and 1 as -1; the noise is Gaussian (Box-Muller from $urandom)
// with variance 1 / (2 * R * Eb/N0) for code rate R. Samples are quantized to
// the decoder's signed Q4.4 format with rounding and clipping.
package tb_channel_pkg;

  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = uniform01();
    u2 = uniform01();
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic real noise_sigma(real ebn0_db, real rate);
    return $sqrt(1.0 / (2.0 * rate * (10.0 ** (ebn0_db / 10.0))));
  endfunction

  // One received sample for code bit b, quantized to signed Q4.4.
  function automatic logic signed [7:0] channel_sample(bit b, real sigma);
    real y;
    int q;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    q = $rtoi(y * 16.0 + ((y >= 0.0) ? 0.5 : -0.5));
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return 8'(q);
  endfunction

endpackage
