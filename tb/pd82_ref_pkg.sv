// pd82_ref_pkg: reference arithmetic for the PD82 testbenches.
//
// Plain integer models of the sine table, the operator and the channel, written from the
// specification (sine of the phase plus feedin, scaled by volume; operator 0 modulates
// operator 1; the top bits are panned) rather than from the RTL's structure. The sine
// quarter table is T[i] = floor(255 * sin(i * pi / 510)).
package pd82_ref_pkg;

  function automatic int sine_ref(input int addr, input logic [3:0] mode);
    int q, k, idx, s;
    q = (addr >> 8) & 3;
    k = addr & 255;
    if (!mode[3 - q]) return 0;
    // sin over a full period of 1024 steps, with the table's 510-step half period
    // stretched so the quarter peaks at index 255.
    idx = (q == 1 || q == 3) ? 255 - k : k;
    s = $rtoi($floor(255.0 * $sin(real'(idx) * 3.14159265358979323846 / 510.0)));
    return (q >= 2) ? -s : s;
  endfunction

  // One operator evaluation: returns the amplitude, updates phase.
  function automatic int op_ref(inout int phase, input int freq, input int vol,
                                input logic [3:0] mode, input int feedin);
    int a;
    phase = (phase + freq) & 'h3FFFF;
    a = ((phase + feedin * 128) & 'h3FFFF) >> 8;
    return sine_ref(a, mode) * vol;
  endfunction

  // Top nine bits of an 18-bit signed amplitude, as a signed integer.
  function automatic int top9(input int amp);
    return amp >>> 9;
  endfunction

  // Panned channel output: bits 18:8 of value * pan.
  function automatic int pan_ref(input int value, input int pan);
    return (value * pan) >>> 8;
  endfunction

endpackage
