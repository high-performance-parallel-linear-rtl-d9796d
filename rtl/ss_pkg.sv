// ss_pkg: shared constants of the shifter-sorter selector core.
//
// The defaults are the numbers of the reference configuration: a 64-bit system
// bus (W), pairs made of an 8-bit key and 8 bits of data, a 64-entry shifter
// sorter (N) and four parallel sorting units (b). With these numbers a bus word
// carries q = W / (l_k + l_d) = 4 pairs. The helper functions give the
// derived sizes so that every module computes them the same way.
package ss_pkg;

  parameter int unsigned DEF_KEY_W  = 8;   // l_k, key width in bits
  parameter int unsigned DEF_DATA_W = 8;   // l_d, data width in bits
  parameter int unsigned DEF_N      = 64;  // nodes per shifter sorter
  parameter int unsigned DEF_B      = 4;   // parallel sorting units
  parameter int unsigned DEF_BUS_W  = 64;  // system bus width W

  // Pairs carried by one bus word: q = W / (l_k + l_d).
  function automatic int unsigned pairs_per_word(int unsigned bus_w, int unsigned key_w,
                                                 int unsigned data_w);
    return bus_w / (key_w + data_w);
  endfunction

  // Effective parallelism of the core: min(q, b).
  function automatic int unsigned lanes(int unsigned q, int unsigned b);
    return (q < b) ? q : b;
  endfunction

  // Width of a counter that has to hold the value n (at least one bit).
  function automatic int unsigned cnt_w(int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

endpackage
