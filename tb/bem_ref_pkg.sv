// bem_ref_pkg: reference model of the bus-encoding scheme for the testbenches,
// written independently of the RTL: count the 1s with a loop, invert when
// there are four or more, and list the positions of the remaining 1s from
// line 1 upwards as codes 1..7, padding with code 0.
package bem_ref_pkg;

  function automatic int ref_ones(int v);
    int n = 0;
    for (int k = 0; k < 7; k++) n += (v >> k) & 1;
    return n;
  endfunction

  function automatic bit ref_ed(int v);
    return ref_ones(v) >= 4;
  endfunction

  // code sent in slot s (0..2) for word v
  function automatic int ref_code(int v, int s);
    int w, n;
    w = ref_ed(v) ? (~v & 127) : (v & 127);
    n = 0;
    for (int b = 0; b < 7; b++)
      if (((w >> b) & 1) != 0) begin
        if (n == s) return b + 1;
        n++;
      end
    return 0;
  endfunction

endpackage
