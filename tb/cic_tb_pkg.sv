// cic_tb_pkg: helpers shared by the testbenches.
//
// build_code() makes a frequency-ranked limited-weight code the way the
// design expects it to be computed off-line: symbols sorted by falling
// frequency are given codewords in order of rising weight (ties broken by
// the smaller codeword value). With cw_w = sym_w + 1 the codewords are all
// (sym_w+1)-bit words of weight <= sym_w/2; with cw_w = sym_w they are all
// sym_w-bit words (a frequency-based permutation).
package cic_tb_pkg;

  function automatic int weight(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  // enc[s] = codeword of symbol s; freq[s] = how often s occurs.
  function automatic void build_code(input int sym_w, input int cw_w,
                                     input int unsigned freq[],
                                     output int unsigned enc[]);
    int unsigned order[$];
    int unsigned cws[$];
    int nsym = 1 << sym_w;
    enc = new[nsym];
    // codewords, lightest first
    for (int w = 0; w <= cw_w; w++)
      for (int c = 0; c < (1 << cw_w); c++)
        if (weight(32'(c)) == w && (cw_w == sym_w || w <= sym_w / 2)) cws.push_back(c);
    // symbols, most frequent first (stable: smaller symbol first on ties)
    for (int s = 0; s < nsym; s++) order.push_back(s);
    for (int i = 1; i < nsym; i++)
      for (int j = i; j > 0 && freq[order[j]] > freq[order[j-1]]; j--) begin
        int unsigned t = order[j]; order[j] = order[j-1]; order[j-1] = t;
      end
    for (int r = 0; r < nsym; r++) enc[order[r]] = cws[r];
  endfunction

endpackage
