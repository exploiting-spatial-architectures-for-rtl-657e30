// ed_pkg: types and constants shared by the edit-distance row-worker array.
//
// Scores are 32-bit, matching the 32-bit integer datapath of the processing
// elements the architecture is built from. Characters are 8 bits, one per
// memory word. All edit costs (insert, delete, substitute) are 1 and a match
// costs 0, the costs used throughout the design's evaluation.
package ed_pkg;

  localparam int unsigned SCORE_W = 32;
  localparam int unsigned CHAR_W  = 8;
  localparam int unsigned IDX_W   = 16;   // row / column index width (strings up to 65535)
  localparam int unsigned ADDR_W  = 32;   // word address of the external memory port

  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [CHAR_W-1:0]  char_t;
  typedef logic [IDX_W-1:0]   idx_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  localparam score_t COST_INS = 1;
  localparam score_t COST_DEL = 1;
  localparam score_t COST_SUB = 1;

  // Edit chosen for a cell (the path matrix entry).
  typedef enum logic [1:0] {
    P_MATCH = 2'd0,
    P_SUB   = 2'd1,
    P_INS   = 2'd2,
    P_DEL   = 2'd3
  } path_e;

  // Schedules the accelerator can run.
  typedef enum logic [1:0] {
    MODE_STRIP_MEM = 2'd0,   // strip mining, intermediate rows through memory
    MODE_STRIP_SP  = 2'd1,   // strip mining, intermediate rows in scratchpad
    MODE_TILED     = 2'd2    // column strips of W x D tiles
  } mode_e;

  // Token on the T channel. A header opens each row segment and carries the
  // worker's S[i], its row, the first column, and (tiling) the left and
  // diagonal seeds. A bypass header marks a padding row past the end of S.
  typedef struct packed {
    logic   hdr;      // 1: row header, 0: character T[j]
    logic   last;     // last character of the segment
    logic   seeded;   // header: left/diag given (tiling), else start at column 0
    logic   bypass;   // header: padding row, pass tops through unchanged
    char_t  ch;       // S[i] in a header, T[j] otherwise
    idx_t   row;      // header: row i
    idx_t   col;      // header: first column computed
    score_t left;     // header: M[i][col-1]
    score_t diag;     // header: M[i-1][col-1]
  } t_tok_t;

  // Token on a top/score channel.
  typedef struct packed {
    logic   last;
    score_t score;
  } s_tok_t;

  // Module 1 -> Module 2: a row-start control word, then one cost per column.
  typedef struct packed {
    logic   start;    // 1: row start word
    logic   seeded;
    logic   bypass;
    logic   last;     // cost word: last column of the segment
    logic   match;    // cost word: S[i] == T[j]
    idx_t   row;
    idx_t   col;
    score_t val;      // start word: left seed; cost word: match/substitute cost
  } ms_tok_t;

  // Per-cell output of a worker: the cell's score and the edit chosen. The
  // naive schedule stores the score of every cell from this stream; the other
  // schedules use it for the path matrix only.
  typedef struct packed {
    idx_t   row;
    idx_t   col;
    score_t score;
    path_e  path;
  } path_tok_t;

  // Last value of a worker's row in a tile (written to the column array).
  typedef struct packed {
    idx_t   row;
    score_t score;
  } edge_tok_t;


  // Where a feeder read goes.
  typedef enum logic [1:0] {SRC_NONE = 2'd0, SRC_MEM = 2'd1, SRC_SP = 2'd2} src_e;

  // What a feeder read is for.
  typedef enum logic [2:0] {
    K_LEFT = 3'd0,   // left seed of the next header
    K_DIAG = 3'd1,   // diagonal seed of the next header
    K_S    = 3'd2,   // S[i]: completes and sends a header
    K_BYP  = 3'd3,   // no read: send a bypass header
    K_T    = 3'd4,   // T[j]
    K_TOP  = 3'd5    // top value M[i0-1][j]
  } kind_e;

  // Read request from the controller to the feeder.
  typedef struct packed {
    src_e   src;
    kind_e  kind;
    logic   last;     // K_T / K_TOP: last of the segment
    logic   corner;   // K_TOP: also write this value to the corner word
    logic   seeded;   // K_S: header carries seeds
    idx_t   row;      // K_S / K_BYP
    idx_t   col;      // K_S / K_BYP
    addr_t  addr;     // word address in memory or scratchpad
  } feed_req_t;

  function automatic score_t min2(score_t a, score_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
