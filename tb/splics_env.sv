// splics_env: self-checking environment for the split latency cache.
//
// Drives a stream of loads and stores into splics (whose misses an L2 model
// serves, both instantiated by the caller), and checks every response against a reference memory kept here: a load
// must return the last value stored to that word (or the L2 pattern), a store
// returns zero. It also checks timing: a cache A hit answers 1 cycle after it is
// taken, a cache B hit (case 2 or 4) B_LAT cycles after, a miss no sooner than the
// L2 latency. The address stream mixes a hot set (hits in A), repeats of the
// previous line (spatial locality, references to a pending miss), a warm set and
// lines of the same cache B set as the previous one, and random lines over NLINES lines, so that B casts lines out and A is kept included.
// Each mechanism of the cache is counted; one that never happened is a failure.
// The caller provides the cache, the L2 model, the clock, reset and the watchdog; done rises when NREQ
// requests have been answered.
module splics_env
  import splics_pkg::*;
  import splics_tb_pkg::*;
#(
  parameter int unsigned B_LAT     = 3,
  parameter int unsigned B_SETS    = 256,   // to aim references at one set of cache B
  parameter int unsigned NLINES    = 2048,
  parameter int unsigned HOT       = 4,
  parameter int unsigned WARM      = 64,
  parameter int unsigned NREQ      = 20000,
  parameter int unsigned L2_LAT    = 10,
  parameter int unsigned SEED      = 1,
  parameter int unsigned IDLE_PCT  = 12,    // cycles with no request offered
  parameter int unsigned P_HOT     = 45,    // percent of references to the hot set
  parameter int unsigned P_PREV    = 20,    // ... to the previous line
  parameter int unsigned P_WARM    = 15,    // ... to the warm set
  parameter int unsigned P_CONF    = 10,    // ... to the previous line's B set
  parameter bit          NEED_SQUASH = 1'b1, // a BtoAbuf squash must have happened
  parameter bit          NEED_DROP = 1'b1,  // a promotion must have found BtoAbuf full
  parameter bit          DIRECTED  = 1'b0,  // run directed_squash after the random stream
  parameter int unsigned A_SETS_T  = 2      // sets of cache A, for directed_squash
) (
  input  logic        clk,
  input  logic        rst_n,
  // to and from the cache
  output logic        req_valid,
  input  logic        req_ready,
  output logic        req_we,
  output logic [ADDR_W-1:0] req_addr,
  output word_t       req_wdata,
  output word_be_t    req_be,
  output req_id_t     req_id,
  input  rsp_t        rsp_fast,
  input  rsp_t        rsp_slow,
  input  events_t     ev,
  // requests served by the L2 model
  input  int unsigned l2_reads,
  input  int unsigned l2_writes,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  // ------------------------------------------------------------------ reference
  word_t ref_mem [logic [ADDR_W-1:0]];   // by word address, only words stored to

  function automatic word_t ref_word(logic [ADDR_W-1:0] a);
    line_t l;
    logic [ADDR_W-1:0] wa;
    wa = {a[ADDR_W-1:$clog2(WORD_BYTES)], $clog2(WORD_BYTES)'(0)};
    if (ref_mem.exists(wa)) return ref_mem[wa];
    l = init_line(a[ADDR_W-1:OFF_W]);
    return line_word(l, a[OFF_W-1:$clog2(WORD_BYTES)]);
  endfunction

  typedef enum int {K_A, K_B, K_MISS} kind_e;

  logic        outst   [1 << ID_W];
  word_t       exp_d   [1 << ID_W];
  longint      t_issue [1 << ID_W];
  kind_e       kind_of [1 << ID_W];

  longint      cyc;
  int unsigned issued, answered, n_out;
  int unsigned c_hit_a, c_hit_b, c_hit_buf, c_miss, c_stall_pend, c_stall_other,
               c_promote, c_drop, c_done, c_squash, c_inval, c_wb;
  line_addr_t  prev_line;

  function automatic int free_id();
    for (int i = 0; i < (1 << ID_W); i++) if (!outst[i]) return i;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // pick the next reference
  task automatic new_request();
    int unsigned r;
    int          id;
    line_addr_t  l;
    id = free_id();
    if (id < 0 || issued >= NREQ || int'($urandom % 100) < int'(IDLE_PCT)) begin
      req_valid = 1'b0;
      return;
    end
    r = $urandom % 100;
    if (r < P_HOT)                              l = line_addr_t'($urandom % HOT);
    else if (r < P_HOT + P_PREV)                l = prev_line;
    else if (r < P_HOT + P_PREV + P_WARM)       l = line_addr_t'($urandom % WARM);
    else if (r < P_HOT + P_PREV + P_WARM + P_CONF) l = line_addr_t'((($urandom % (NLINES / B_SETS)) * B_SETS) + (32'(prev_line) % B_SETS));
    else             l = line_addr_t'($urandom % NLINES);
    prev_line = l;
    req_valid = 1'b1;
    req_we    = ($urandom % 100) < 30;
    req_addr  = {l, OFF_W'(($urandom % WORDS_PER_LINE) * WORD_BYTES)};
    req_wdata = {$urandom, $urandom};
    req_be    = (($urandom % 2) == 0) ? '1 : word_be_t'($urandom);
    req_id    = req_id_t'(id);
  endtask

  // One clock edge: check the responses, count events, record a request taken.
  task automatic edge_step(output bit taken);
    taken = 1'b0;
    @(posedge clk);
    cyc++;
    // responses (values seen just before this edge)
    if (rsp_fast.valid) begin
      check(outst[rsp_fast.id], "fast response with no request");
      check(rsp_fast.rdata == exp_d[rsp_fast.id], $sformatf("fast data id %0d got %h exp %h",
            rsp_fast.id, rsp_fast.rdata, exp_d[rsp_fast.id]));
      check(kind_of[rsp_fast.id] == K_A && cyc - t_issue[rsp_fast.id] == 1, "fast latency");
      outst[rsp_fast.id] = 1'b0; answered++; n_out--;
    end
    if (rsp_slow.valid) begin
      check(outst[rsp_slow.id], "slow response with no request");
      check(rsp_slow.rdata == exp_d[rsp_slow.id], $sformatf("slow data id %0d got %h exp %h",
            rsp_slow.id, rsp_slow.rdata, exp_d[rsp_slow.id]));
      if (kind_of[rsp_slow.id] == K_B)
        check(cyc - t_issue[rsp_slow.id] == longint'(B_LAT), "cache B latency");
      else
        check(kind_of[rsp_slow.id] == K_MISS && cyc - t_issue[rsp_slow.id] > longint'(L2_LAT),
              "miss latency");
      outst[rsp_slow.id] = 1'b0; answered++; n_out--;
    end
    // events
    c_hit_a       += 32'(ev.hit_a);
    c_hit_b       += 32'(ev.hit_b);
    c_hit_buf     += 32'(ev.hit_buf);
    c_miss        += 32'(ev.miss);
    c_stall_pend  += 32'(ev.stall_pending);
    c_stall_other += 32'(ev.stall_other);
    c_promote     += 32'(ev.promote);
    c_drop        += 32'(ev.promote_drop);
    c_done        += 32'(ev.promote_done);
    c_squash      += 32'(ev.squash);
    c_inval       += 32'(ev.inval_a);
    c_wb          += 32'(ev.writeback);
    // the request taken at this edge
    if (req_valid && req_ready) begin
      outst[req_id]   = 1'b1;
      t_issue[req_id] = cyc;
      kind_of[req_id] = ev.hit_a ? K_A : ((ev.hit_b || ev.hit_buf) ? K_B : K_MISS);
      check(32'(ev.hit_a) + 32'(ev.hit_b) + 32'(ev.hit_buf) + 32'(ev.miss) == 1, "one case per request");
      if (req_we) begin
        word_t o;
        logic [ADDR_W-1:0] wa;
        o = ref_word(req_addr);
        for (int b = 0; b < WORD_BYTES; b++) if (req_be[b]) o[b*8 +: 8] = req_wdata[b*8 +: 8];
        wa = {req_addr[ADDR_W-1:$clog2(WORD_BYTES)], $clog2(WORD_BYTES)'(0)};
        ref_mem[wa] = o;
        exp_d[req_id] = '0;
      end else begin
        exp_d[req_id] = ref_word(req_addr);
      end
      issued++; n_out++;
      taken = 1'b1;
    end
  endtask

  // Offer one request and wait until it is taken.
  task automatic issue(input line_addr_t l, input bit we, input int widx = -1);
    bit tk;
    int id;
    do begin
      id = free_id();
      if (id < 0) edge_step(tk);
    end while (id < 0);
    #1;
    req_valid = 1'b1;
    req_we    = we;
    req_addr  = {l, OFF_W'(((widx < 0) ? ($urandom % WORDS_PER_LINE) : widx) * WORD_BYTES)};
    req_wdata = {$urandom, $urandom};
    req_be    = '1;
    req_id    = req_id_t'(id);
    do edge_step(tk); while (!tk);
    #1 req_valid = 1'b0;
  endtask

  // Let every response arrive and BtoAbuf drain.
  task automatic quiesce();
    bit tk;
    #1 req_valid = 1'b0;
    do edge_step(tk); while (n_out != 0);
    repeat (4) edge_step(tk);
  endtask

  // Directed sequence for a cache B with one way: line X = 0 is brought into B and
  // pushed out of A by two lines of the same A set but another B set; then a miss
  // to line Z (same B set as X) is started and X is referenced back to back, so
  // that X sits in BtoAbuf (case 2, then case 4) when Z's fill casts X out of B.
  task automatic directed_squash();
    line_addr_t x, y0, y1, z;
    x  = '0;
    y0 = line_addr_t'(A_SETS_T * 1 + 0);
    y1 = line_addr_t'(A_SETS_T * 3 + 0);
    z  = line_addr_t'(B_SETS);
    for (int rep = 0; rep < 4; rep++) begin
      quiesce();
      issue(x, 1'b0);  quiesce();
      issue(y0, 1'b0); quiesce();
      issue(y1, 1'b0); quiesce();
      // the word sits in the last beat, so the miss is filled right after it is answered
      issue(z, 1'b0, WORDS_PER_LINE - 1);
      for (int i = 0; i < 3 * L2_LAT; i++) issue(x, ($urandom % 2) == 0);
      quiesce();
      x  = line_addr_t'(32'(x) + B_SETS * 2);
      z  = line_addr_t'(32'(z) + B_SETS * 2);
    end
  endtask

  initial begin
    req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0; req_be = '0; req_id = '0;
    for (int i = 0; i < (1 << ID_W); i++) begin
      outst[i] = 1'b0; exp_d[i] = '0; t_issue[i] = 0; kind_of[i] = K_A;
    end
    cyc = 0; issued = 0; answered = 0; n_out = 0; checks = 0; failures = 0; prev_line = '0;
    c_hit_a = 0; c_hit_b = 0; c_hit_buf = 0; c_miss = 0; c_stall_pend = 0; c_stall_other = 0;
    c_promote = 0; c_drop = 0; c_done = 0; c_squash = 0; c_inval = 0; c_wb = 0;
    done = 1'b0;
    process::self().srandom(SEED);
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    #1 new_request();
    forever begin
      bit tk;
      edge_step(tk);
      if (tk || !req_valid) #1 new_request();
      if (issued >= NREQ && n_out == 0) break;
    end
    if (DIRECTED) directed_squash();
    // let the last fill and its write-back reach L2 before counting
    begin
      bit tk;
      #1 req_valid = 1'b0;
      repeat (8 + 4 * L2_LAT) edge_step(tk);
    end
    // every mechanism must have happened
    $display("events: hitA=%0d hitB=%0d hitBuf=%0d miss=%0d stall_pending=%0d stall_other=%0d",
             c_hit_a, c_hit_b, c_hit_buf, c_miss, c_stall_pend, c_stall_other);
    $display("        promote=%0d dropped=%0d moved_to_A=%0d squash=%0d invalA=%0d writeback=%0d l2 rd=%0d wr=%0d cycles=%0d",
             c_promote, c_drop, c_done, c_squash, c_inval, c_wb, l2_reads, l2_writes, cyc);
    check(c_hit_a > 0, "case 1 never happened");
    check(c_hit_b > 0, "case 2 never happened");
    check(c_hit_buf > 0, "case 4 never happened");
    check(c_miss > 0, "case 3 never happened");
    check(c_stall_pend > 0, "case 5 never happened");
    check(c_promote > 0, "no promotion");
    if (NEED_DROP) check(c_drop > 0, "no promotion dropped on a full BtoAbuf");
    check(c_done > 0, "no promotion reached cache A");
    if (NEED_SQUASH) check(c_squash > 0, "no BtoAbuf squash");
    check(c_inval > 0, "no inclusion invalidation in A");
    check(c_wb > 0 && l2_writes == c_wb, "write-backs");
    check(l2_reads == c_miss, "one L2 read per miss");
    done = 1'b1;
  end

endmodule
