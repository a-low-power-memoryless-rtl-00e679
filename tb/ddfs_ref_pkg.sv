// ddfs_ref_pkg: floating-point reference model of the synthesizer's
// amplitude path, for the testbenches.
//
// The sub-ROM words are computed here with $sin, independently of the logic
// equations in the design: sinA(a) = round(2047 sin(pi a/32)),
// sinB(b) = round(2047 sin(pi b/512)), sinC(c) = round(2047 sin(pi (c+1/2)/8192)),
// cosA(a) = sinA(15 - a). The quarter-wave magnitude is
// sinA + floor(cosA sinB / 2048) + floor(cosA sinC / 2048), and the output
// code folds it into offset binary by quadrant.
package ddfs_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(real v);
    return $rtoi(v + 0.5);
  endfunction

  function automatic int ref_sin_a(int a);
    return rnd(2047.0 * $sin(PI * real'(a) / 32.0));
  endfunction
  function automatic int ref_sin_b(int b);
    return rnd(2047.0 * $sin(PI * real'(b) / 512.0));
  endfunction
  function automatic int ref_sin_c(int c);
    return rnd(2047.0 * $sin(PI * (real'(c) + 0.5) / 8192.0));
  endfunction

  // quarter-wave magnitude for a 12-bit address
  function automatic int ref_mag(int addr);
    int a, b, c, ca;
    a  = (addr >> 8) & 15;
    b  = (addr >> 4) & 15;
    c  = addr & 15;
    ca = ref_sin_a(15 - a);
    return ref_sin_a(a) + ((ca * ref_sin_b(b)) >> 11) + ((ca * ref_sin_c(c)) >> 11);
  endfunction

  // 12-bit offset-binary output code for a 14-bit phase word
  function automatic int ref_code(int phase);
    int addr, m;
    addr = phase & 32'hFFF;
    if (((phase >> 12) & 1) != 0) addr = addr ^ 32'hFFF;
    m = ref_mag(addr);
    return (((phase >> 13) & 1) != 0) ? 2047 - m : 2048 + m;
  endfunction

  // ideal output for a 14-bit phase word, in the same code scale
  function automatic real ideal_code(int phase);
    return 2047.5 + 2047.0 * $sin(2.0 * PI * (real'(phase) + 0.5) / 16384.0);
  endfunction
endpackage
