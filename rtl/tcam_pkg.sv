// tcam_pkg: types and helper functions shared by the TCAM enhanced cache.
//
// The cache stores each tag as W bits, of which the N least significant are
// ternary (TCAM) cells. An entry whose aggregation count (AC) is k stores its
// k least significant tag bits as "don't care", so it stands for a
// super-block of 2^k consecutive lines. The helpers below turn an AC value
// into the don't-care mask and decide which data banks a super-block covers.
package tcam_pkg;

  // States of the Counter and Comparison Logic of the Dynamic Aggregator
  // Module (DAM).
  typedef enum logic [1:0] {
    DAM_IDLE   = 2'd0,  // DA = 0, waiting for a cache miss
    DAM_SEARCH = 2'd1,  // one aggregation round per cycle
    DAM_WAIT   = 2'd2   // decision made, waiting for the line from memory
  } dam_state_e;

  // Thermometer mask with the `ac` least significant bits set.
  function automatic logic [31:0] dc_mask(input int unsigned ac);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < 32; i++) if (i < ac) m[i] = 1'b1;
    return m;
  endfunction

  // True when data bank `bank` belongs to the super-block whose tag LSBs are
  // `tag_lsb` and whose AC is `ac`: the bank index must equal the tag LSBs in
  // every position that is not a don't care.
  function automatic logic bank_in_group(input int unsigned bank,
                                         input int unsigned tag_lsb,
                                         input int unsigned ac);
    return ((bank ^ tag_lsb) & ~dc_mask(ac)) == 0;
  endfunction

endpackage
