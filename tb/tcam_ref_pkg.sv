// tcam_ref_pkg: reference model for the TCAM testbenches.
//
// Computes what a ternary CAM and its RAM image should hold straight from
// the definitions, without the hardware's counters: a word matches a key
// when they agree on every bit whose mask bit is 0; a sub-word value is
// present in a column when some valid entry's slice matches it; its APT row
// is the rank of the value among present values in ascending order; a BPT
// row's Last Index is the number of present values below that row, minus 1.
// Sizes are bounded by MAXV (values per sub-word) and MAXK (words).
package tcam_ref_pkg;

  localparam int MAXV = 256;
  localparam int MAXK = 16;

  typedef struct {
    logic [31:0] value;
    logic [31:0] mask;   // 1 = don't care
    bit          valid;
  } entry_t;

  function automatic bit tmatch(entry_t e, logic [31:0] key, int width);
    for (int b = 0; b < width; b++)
      if (!e.mask[b] && e.value[b] != key[b]) return 0;
    return e.valid;
  endfunction

  // Match vector of value v against slice [lsb +: w] of entries first..first+n-1.
  function automatic logic [MAXK-1:0] slice_vec(entry_t t[MAXK], int first, int n,
                                                int lsb, int w, int v);
    logic [MAXK-1:0] r;
    r = '0;
    for (int j = 0; j < n; j++) begin
      bit ok;
      ok = t[first+j].valid;
      for (int b = 0; b < w; b++)
        if (!t[first+j].mask[lsb+b] && t[first+j].value[lsb+b] != v[b]) ok = 0;
      r[j] = ok;
    end
    return r;
  endfunction

  // Rank of v among present values (number of present values below v).
  function automatic int rank_of(logic [MAXV-1:0] present, int v);
    int r;
    r = 0;
    for (int u = 0; u < v; u++) if (present[u]) r++;
    return r;
  endfunction

  // Expected TCAM result: lowest matching address, or -1.
  function automatic int lowest_match(entry_t t[MAXK], int depth, logic [31:0] key, int width);
    for (int j = 0; j < depth; j++) if (tmatch(t[j], key, width)) return j;
    return -1;
  endfunction

  function automatic logic [MAXK-1:0] all_matches(entry_t t[MAXK], int depth, logic [31:0] key, int width);
    logic [MAXK-1:0] r;
    r = '0;
    for (int j = 0; j < depth; j++) r[j] = tmatch(t[j], key, width);
    return r;
  endfunction

  function automatic entry_t rand_entry(int width);
    entry_t e;
    logic [31:0] wm;
    wm = (width >= 32) ? '1 : ((32'd1 << width) - 1);
    e.value = $urandom() & wm;
    // about one bit in four is a don't care
    e.mask  = ($urandom() & $urandom()) & wm;
    e.valid = ($urandom_range(0, 7) != 0);
    return e;
  endfunction

endpackage
