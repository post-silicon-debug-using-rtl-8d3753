// pdbg_pkg: sizes and configuration layout shared by the post-silicon debug
// access network (hyper-concentrators, observe/control groups, address map).
//
// A hyper-concentrator with X inputs and M outputs is built from 2:1 muxes,
// each with its own routing flip-flop. Its configuration vector holds
//   * compaction bits: CS stages of CW muxes, bit index  s*CW + j
//   * rotation bits:   RS stages of M muxes,  bit index  CS*CW + s*M + j
// where CW is X rounded up to a power of two, CS = log2(CW), RS = ceil(log2(M)).
// The configuration bus is 32 bits wide; address = {space, group, word}.
package pdbg_pkg;

  localparam int unsigned CFG_DW = 32;  // configuration write data width

  // Address space selector in the top two address bits.
  typedef enum logic [1:0] {
    SP_OBSERVE = 2'd0,   // observe-group configuration words
    SP_CONTROL = 2'd1,   // control-group configuration words
    SP_GLOBAL  = 2'd2    // global registers (interface buffer ratio)
  } cfg_space_e;

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

  // Compaction width: X rounded up to a power of two (at least 2).
  function automatic int unsigned hc_cw(input int unsigned x);
    return 1 << clog2_min1(x);
  endfunction

  function automatic int unsigned hc_cs(input int unsigned x);
    return clog2_min1(x);
  endfunction

  function automatic int unsigned hc_rs(input int unsigned m);
    return clog2_min1(m);
  endfunction

  function automatic int unsigned hc_cfg_bits(input int unsigned x, input int unsigned m);
    return hc_cs(x) * hc_cw(x) + hc_rs(m) * m;
  endfunction

  // Observe group: hyper-concentrator bits, then M input-select bits.
  function automatic int unsigned obs_cfg_bits(input int unsigned x, input int unsigned m);
    return hc_cfg_bits(x, m) + m;
  endfunction

  // Control group: hyper-concentrator bits, M input-select bits, X target-mask bits.
  function automatic int unsigned ctrl_cfg_bits(input int unsigned x, input int unsigned m);
    return hc_cfg_bits(x, m) + m + x;
  endfunction

  function automatic int unsigned cfg_words(input int unsigned bits);
    return (bits + CFG_DW - 1) / CFG_DW;
  endfunction

  // Word-index field width: enough for the larger (control) group.
  function automatic int unsigned cfg_word_aw(input int unsigned x, input int unsigned m);
    return clog2_min1(cfg_words(ctrl_cfg_bits(x, m)));
  endfunction

  function automatic int unsigned cfg_aw(input int unsigned k, input int unsigned x,
                                         input int unsigned m);
    return 2 + clog2_min1(k) + cfg_word_aw(x, m);
  endfunction

endpackage
