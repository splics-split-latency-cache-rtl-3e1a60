// splics_pkg: sizes and types shared by the split latency cache.
//
// The cache geometry follows the main configuration evaluated for this design:
// 128-byte lines in both caches, a 4 KB two-way cache A answering in one cycle,
// and a two-way cache B (64 KB here, one of the 32-256 KB sizes studied) answering
// in 3 cycles (5 is the other latency studied). The L1-L2 bus is 32 bytes wide, so a
// line moves in 4 bus beats. The 32-bit byte address and the 64-bit processor word
// are choices of this implementation; nothing else in the RTL depends on them
// beyond the widths derived here.
package splics_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width (own choice)
  localparam int unsigned WORD_BYTES = 8;    // processor word (own choice)
  localparam int unsigned WORD_W     = 8 * WORD_BYTES;
  localparam int unsigned LINE_BYTES = 128;  // both caches and L2
  localparam int unsigned LINE_W     = 8 * LINE_BYTES;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned LINE_ADDR_W = ADDR_W - OFF_W;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / WORD_BYTES;
  localparam int unsigned WIDX_W     = $clog2(WORDS_PER_LINE);
  localparam int unsigned BEAT_BYTES = 32;   // L1-L2 bus width
  localparam int unsigned BEAT_W     = 8 * BEAT_BYTES;
  localparam int unsigned BEATS      = LINE_BYTES / BEAT_BYTES;  // 4 bus cycles per line
  localparam int unsigned BEAT_IDX_W = $clog2(BEATS);
  localparam int unsigned WORDS_PER_BEAT = BEAT_BYTES / WORD_BYTES;
  localparam int unsigned ID_W       = 4;    // request tag returned with the response

  typedef logic [LINE_ADDR_W-1:0] line_addr_t;
  typedef logic [LINE_W-1:0]      line_t;
  typedef logic [LINE_BYTES-1:0]  line_be_t;
  typedef logic [WORD_W-1:0]      word_t;
  typedef logic [WORD_BYTES-1:0]  word_be_t;
  typedef logic [ID_W-1:0]        req_id_t;

  // How a processor reference was served (the cases of the access algorithm).
  typedef enum logic [2:0] {
    ACC_NONE     = 3'd0,
    ACC_HIT_A    = 3'd1,  // case 1: line in A (and B)
    ACC_HIT_B    = 3'd2,  // case 2: line in B only, promoted to A
    ACC_MISS     = 3'd3,  // case 3: line fetched from L2
    ACC_HIT_BUF  = 3'd4   // case 4: line in B and waiting in BtoAbuf
  } acc_kind_e;

  // Response delivered to the processor.
  typedef struct packed {
    logic    valid;
    req_id_t id;
    word_t   rdata;
  } rsp_t;

  // One-cycle event strobes, for performance counting.
  typedef struct packed {
    logic hit_a;          // case 1 served
    logic hit_b;          // case 2 served
    logic hit_buf;        // case 4 served
    logic miss;           // case 3 started
    logic stall_pending;  // case 5: reference to the pending miss line held off
    logic stall_other;    // request held off for another reason (miss unit busy, fill)
    logic promote;        // line entered BtoAbuf
    logic promote_drop;   // promotion lost because BtoAbuf was full
    logic promote_done;   // line moved from BtoAbuf into A
    logic squash;         // BtoAbuf entry removed because B cast the line out
    logic inval_a;        // line removed from A to keep inclusion
    logic writeback;      // dirty line cast out of B
  } events_t;

  // Word select / byte-enable helpers.
  function automatic word_t line_word(line_t l, logic [WIDX_W-1:0] w);
    return l[w*WORD_W +: WORD_W];
  endfunction

  // Merge a word store into a line.
  function automatic line_t line_merge(line_t l, logic [WIDX_W-1:0] w, word_t d, word_be_t be);
    line_t r;
    r = l;
    for (int b = 0; b < WORD_BYTES; b++)
      if (be[b]) r[(w*WORD_BYTES + b)*8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  // Place a word store in a line-wide write: data replicated, byte enables placed.
  function automatic line_be_t word_line_be(logic [WIDX_W-1:0] w, word_be_t be);
    line_be_t r;
    r = '0;
    r[w*WORD_BYTES +: WORD_BYTES] = be;
    return r;
  endfunction

  function automatic line_t word_line_data(word_t d);
    return {WORDS_PER_LINE{d}};
  endfunction

endpackage
