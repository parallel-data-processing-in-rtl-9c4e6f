// Behavioural model of the channel interpolators, for testbenches only.
//
// An interpolator divides the 2 ns reference period into 256 code bins of
// very unequal width; many codes are never produced. Each modelled channel
// gets its own bin widths, drawn from a seed: codes below 20, in 40..69,
// 105..139, 165..199 and above 245 are empty, the others get random weights.
// Bin edges are kept in units of T0/2^16. code_of() returns the code of a
// fine time, which is what the real converter does for an event that falls
// that far into the period.
package tb_interp_pkg;
  localparam int NBIN = 256;
  localparam int FULL = 65536;       // one period in model units

  int edges [3][NBIN];              // end of bin k, cumulative

  function automatic bit empty_bin(input int k);
    return (k < 20) || (k >= 40 && k < 70) || (k >= 105 && k < 140) ||
           (k >= 165 && k < 200) || (k > 245);
  endfunction

  function automatic void init_model(input int ch, input int seed);
    int w [NBIN];
    int total, acc;
    int unsigned s;
    s = seed;
    total = 0;
    for (int k = 0; k < NBIN; k++) begin
      s = s * 1103515245 + 12345;
      w[k] = empty_bin(k) ? 0 : 1 + int'((s >> 16) % 30);
      total += w[k];
    end
    acc = 0;
    for (int k = 0; k < NBIN; k++) begin
      acc += w[k];
      edges[ch][k] = int'((longint'(acc) * FULL) / total);
    end
  endfunction

  // fine: 0 .. FULL-1
  function automatic int code_of(input int ch, input int fine);
    for (int k = 0; k < NBIN; k++)
      if (fine < edges[ch][k]) return k;
    return NBIN - 1;
  endfunction
endpackage
