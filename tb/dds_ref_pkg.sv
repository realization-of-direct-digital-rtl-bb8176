// dds_ref_pkg: reference models used by the DDS testbenches.
//
// The waveforms are computed here from their definition over the whole
// period (full-circle sine with $sin, ramp, square), not from the quarter
// table and folding that the RTL uses, so a testbench comparing against
// these functions checks the RTL independently.
package dds_ref_pkg;

  // Expected sine amplitude for an M-bit phase p and a P-bit signed output:
  // round((2^(P-1)-1) * sin(2*pi*(p+0.5)/2^M)), rounded half away from zero.
  function automatic int sine_ref(int unsigned p, int unsigned m, int unsigned pw);
    real v;
    v = real'((1 << (pw - 1)) - 1) * $sin(2.0 * 3.14159265358979323846 *
                                          (real'(p) + 0.5) / real'(1 << m));
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  // Ramp: top P bits of the phase, shifted to be centred on zero.
  function automatic int ramp_ref(longint unsigned phase, int unsigned n, int unsigned pw);
    return int'(phase >> (n - pw)) - (1 << (pw - 1));
  endfunction

  // Square: +max in the first half of the period, -2^(P-1) in the second.
  function automatic int square_ref(longint unsigned phase, int unsigned n, int unsigned pw);
    return ((phase >> (n - 1)) & 1) ? -(1 << (pw - 1)) : (1 << (pw - 1)) - 1;
  endfunction

  // Signed amplitude to offset-binary DAC code.
  function automatic int unsigned offset_code(int a, int unsigned pw);
    return 32'(a + (1 << (pw - 1)));
  endfunction

  // Model of the whole DDS core pipeline, advanced once per sample_en:
  // acc -> (phase_q, ramp, sqr) -> lut/sine -> sample.
  class core_model;
    int unsigned     n, m, pw;
    longint unsigned acc, phase_q_full;
    int              sine, ramp, sqr;
    int unsigned     sample;
    function new(int unsigned n_, int unsigned m_, int unsigned pw_);
      n = n_; m = m_; pw = pw_; reset();
    endfunction
    function void reset();
      acc = 0; phase_q_full = 0; sine = 0; ramp = 0; sqr = 0;
      sample = 1 << (pw - 1);
    endfunction
    // One enabled update with the given tuning word and waveform (0/1/2).
    function void step(longint unsigned ftw, int wave);
      int sel;
      longint unsigned mask;
      mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
      sel = (wave == 1) ? ramp : (wave == 2) ? sqr : sine;
      sample = offset_code(sel, pw);
      sine = sine_ref(32'(phase_q_full >> (n - m)), m, pw);
      phase_q_full = acc;
      ramp = ramp_ref(acc, n, pw);
      sqr = square_ref(acc, n, pw);
      acc = (acc + ftw) & mask;
    endfunction
  endclass

endpackage
