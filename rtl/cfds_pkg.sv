// cfds_pkg -- sizing functions shared by the conflict-free DRAM system (CFDS)
// packet buffer.
//
// The buffer keeps Q virtual output queues. Their heads live in a small SRAM
// (h-SRAM), their tails in a second SRAM (t-SRAM) and the body in an
// interleaved DRAM of M banks. One clock cycle is one slot, the time a cell
// takes on the line. B is the DRAM granularity a plain random-access design
// would need (and the number of slots a DRAM bank stays busy after an access);
// b (called BSMALL here) is the smaller granularity that the conflict-free bank
// organisation allows.
//
// The functions below give the sizes that follow from Q, M, B and b:
//   banks per group      B/b
//   groups               G = M/(B/b)
//   requests register    L = (2Q/G - 1)(B/b - 1) + 1
//   largest reordering   Rmax = (2Q/G - 1)(B/b - 1)
//   latency register     2b(2Q/G - 1)(B/b - 1) slots
//   ECQF lookahead       Q(b - 1) + 1
//   h-SRAM size          Q(b - 1) + b*Rmax cells (with the ECQF lookahead)
//   h-SRAM descriptors   (Q(b-1) + LA + LAT)/b + Q (this design's own bound)
// These are the formulas of the CFDS scheme.
package cfds_pkg;

  function automatic int banks_per_group(int B, int BSMALL);
    return B / BSMALL;
  endfunction

  function automatic int num_groups(int M, int B, int BSMALL);
    return M / (B / BSMALL);
  endfunction

  function automatic int rmax(int Q, int M, int B, int BSMALL);
    int g;
    g = num_groups(M, B, BSMALL);
    return (2 * (Q / g) - 1) * (B / BSMALL - 1);
  endfunction

  function automatic int rr_len(int Q, int M, int B, int BSMALL);
    return rmax(Q, M, B, BSMALL) + 1;
  endfunction

  function automatic int latency_len(int Q, int M, int B, int BSMALL);
    return 2 * BSMALL * rmax(Q, M, B, BSMALL);
  endfunction

  function automatic int ecqf_lookahead(int Q, int BSMALL);
    return Q * (BSMALL - 1) + 1;
  endfunction

  // h-SRAM cells with the full ECQF lookahead: Q(b-1) for the virtual
  // subsystem plus b*Rmax to absorb the DRAM reordering.
  function automatic int hsram_cells(int Q, int M, int B, int BSMALL);
    return Q * (BSMALL - 1) + BSMALL * rmax(Q, M, B, BSMALL);
  endfunction

  // h-SRAM block descriptors. A descriptor lives from the V-MMA decision
  // until the last cell of its block is read. The cells decided but not yet
  // read are at most Q(b-1) (counters left positive by ECQF) plus the
  // requests in the lookahead (LA) and in the latency register (LAT); each
  // queue adds at most one partly read block.
  function automatic int hsram_descs(int Q, int BSMALL, int LA, int LAT);
    return (Q * (BSMALL - 1) + LA + LAT + BSMALL - 1) / BSMALL + Q;
  endfunction

  function automatic int tsram_cells(int Q, int BSMALL);
    return Q * (BSMALL - 1) + 1;
  endfunction

endpackage
