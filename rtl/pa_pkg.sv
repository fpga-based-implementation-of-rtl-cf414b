// Shared types and constants of the Toeplitz-hash privacy-amplification core.
//
// The core multiplies an L_k x L Toeplitz matrix with an L-bit corrected key
// over GF(2). The matrix is padded and cut into p x p rhomboid blocks (RBs);
// the controller issues one RB per clock as an rb_cmd_t record, which then
// travels down the four-stage datapath (read, hash reversal, PMAC, write-back).
//
// Word indices (row block, column block, group) are carried IDX_W bits wide,
// a width chosen here to be ample for any block length the memories can hold;
// each memory uses only the low bits it needs.
package pa_pkg;

  // Defaults of the main configuration: a 256 x 256 processing unit, a
  // 1,000,000-bit corrected key and a final key of up to 100,000 bits (10 %).
  localparam int unsigned P_DEFAULT      = 256;
  localparam int unsigned L_MAX_DEFAULT  = 1_000_000;
  localparam int unsigned LK_MAX_DEFAULT = 100_000;

  // Clock cycles from the issue of an RB to the write of its result
  // (read, reverse, PMAC, write-back), and from the issue of the last RB of a
  // block to the done pulse.
  localparam int unsigned PIPE_STAGES = 4;

  localparam int unsigned IDX_W = 24;
  typedef logic [IDX_W-1:0] idx_t;

  // One rhomboid-block operation as issued by the controller.
  typedef struct packed {
    logic valid;    // an RB is issued this cycle
    idx_t row;      // row block A: address of the intermediate key word
    idx_t col;      // column block J: data words J and J+1 are read
    idx_t grp;      // group (diagonal) index: hash word address
    logic hash_rd;  // first RB of its group: fetch the group's hash word
    logic rev;      // bottom-left group: hash bits are used in reverse order
    logic first;    // first RB of this row: the intermediate key starts at zero
    logic last;     // last RB of this row: the result is the final key word
  } rb_cmd_t;

  function automatic idx_t ceil_shift(input idx_t len, input int unsigned log2p);
    idx_t one;
    one = idx_t'(1);
    return (len + (one << log2p) - one) >> log2p;
  endfunction

endpackage
