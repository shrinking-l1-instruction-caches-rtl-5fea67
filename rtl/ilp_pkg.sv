// ilp_pkg: shared constants, types and topology of the iLP-NUCA instruction cache.
//
// iLP-NUCA replaces the L1-I/L2-I pair of an SMT embedded core with a root tile (RT,
// the L1-I) surrounded by two levels of small cache tiles: 5 tiles in level 2 (Le2) and
// 9 in level 3 (Le3), 14 x 32 KB = 448 KB. Three networks join them: a broadcast search
// network, a tree-shaped transport network that carries hit blocks back to the RT, and
// a replacement network that pushes victim blocks outwards.
//
// From the source design: 32-byte blocks, 4 hardware threads, 32 KB 2-way tiles, three
// levels, 5 Le2 tiles each linked straight to the RT (an RT multiplexer of 5 inputs),
// two input transport buffers per tile, two-entry buffers per link, 8 MSHR entries.
// Own choices: 32-bit physical addresses, block-wide links (one block per cycle per
// hop), and the exact Le3-to-Le2 attachment given in LE3_PARENT below.
package ilp_pkg;

  // ---- Sizes -----------------------------------------------------------------------
  parameter int unsigned ADDR_W     = 32;           // physical address bits (own choice)
  parameter int unsigned BLOCK_B    = 32;           // block size in bytes
  parameter int unsigned BLOCK_W    = BLOCK_B * 8;  // 256 data bits per block
  parameter int unsigned OFFS_W     = $clog2(BLOCK_B);
  parameter int unsigned BADDR_W    = ADDR_W - OFFS_W;  // block address bits
  parameter int unsigned NTHREADS   = 4;            // hardware threads
  parameter int unsigned TID_W      = $clog2(NTHREADS);
  parameter int unsigned MSHR_N     = 8;            // RT miss status holding registers
  parameter int unsigned MSHR_W     = $clog2(MSHR_N);
  parameter int unsigned N_LE2      = 5;            // tiles in level 2
  parameter int unsigned N_LE3      = 9;            // tiles in level 3
  parameter int unsigned T_IN       = 2;            // input transport buffers per tile
  parameter int unsigned TBF_DEPTH  = 2;            // entries per transport link buffer

  typedef logic [BADDR_W-1:0] baddr_t;   // block address (byte address without offset)
  typedef logic [BLOCK_W-1:0] bdata_t;   // one 32-byte block
  typedef logic [NTHREADS-1:0] tmask_t;  // one bit per thread

  // A cache block travelling on the transport or replacement network.
  typedef struct packed {
    baddr_t addr;
    bdata_t data;
  } blk_t;

  // A miss request travelling on the search network; id is the RT MSHR entry.
  typedef struct packed {
    logic              valid;
    logic [MSHR_W-1:0] id;
    baddr_t            addr;
  } search_t;

  // ---- Tree topology (transport, search and replacement) -------------------------
  // Le2 tiles 0..4: bottom-left, bottom-right, middle-left, middle-centre, middle-right
  // of the 5x3 floorplan around the RT. Each Le3 tile hangs off exactly one Le2 tile,
  // and no Le2 tile has more than T_IN children.
  parameter int unsigned LE3_PARENT [N_LE3] = '{0, 0, 2, 2, 3, 4, 4, 1, 1};

  // Position of an Le3 tile among the children of its parent (0 or 1).
  function automatic int unsigned le3_slot(int unsigned k);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j < N_LE3; j++)
      if (j < k && LE3_PARENT[j] == LE3_PARENT[k]) s++;
    return s;
  endfunction

  // Number of Le3 children of Le2 tile p.
  function automatic int unsigned le2_nchild(int unsigned p);
    int unsigned n;
    n = 0;
    for (int unsigned j = 0; j < N_LE3; j++)
      if (LE3_PARENT[j] == p) n++;
    return n;
  endfunction

  // Le3 index of child s of Le2 tile p (N_LE3 when there is none).
  function automatic int unsigned le2_child(int unsigned p, int unsigned s);
    int unsigned r;
    r = N_LE3;
    for (int unsigned j = 0; j < N_LE3; j++)
      if (LE3_PARENT[j] == p && le3_slot(j) == s) r = j;
    return r;
  endfunction

endpackage
