// mem_pkg: organizations of the main memory behind a cache.
//
//   ORG_ONE_WORD     one-word-wide bus and one DRAM bank; every word of a
//                    block costs a full DRAM cycle
//   ORG_PAGE_MODE    one-word-wide bus, page-mode DRAM: the first word opens
//                    the row (full cycle), later words of the block come
//                    from the open row at the shorter page access time
//   ORG_INTERLEAVED  one-word-wide bus, one DRAM bank per word of the block;
//                    all banks are read in parallel and the words are then
//                    returned over the bus one per cycle
package mem_pkg;
  typedef enum logic [1:0] {
    ORG_ONE_WORD    = 2'd0,
    ORG_PAGE_MODE   = 2'd1,
    ORG_INTERLEAVED = 2'd2
  } mem_org_e;
endpackage
