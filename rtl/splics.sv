// splics: split latency primary data cache.
//
// Two data stores form one primary cache: a small, fast cache A and a larger, slower
// cache B whose contents include everything in A. Both directories are probed in
// the cycle a reference arrives, so a reference that misses in A but hits in B is
// served with B's latency alone, not with A's plus B's. The reference is served by
// one of the cases of the access algorithm:
//   case 1  line in A (so also in B): the word is returned in 1 cycle; the line
//           becomes MRU in both A and B; a store writes both A and B.
//   case 2  line in B only: the word is returned after B_LAT cycles; the line
//           becomes MRU in B and is copied into the promotion buffer (BtoAbuf),
//           which moves it into A in a later cycle in which A is not accessed.
//   case 4  line in B and still waiting in BtoAbuf: as case 2 without a new
//           promotion; a store also updates the waiting copy.
//   case 3  line in neither: the miss unit fetches it from L2, forwards the word
//           when its beat arrives, then writes the line into B (MRU) and into A.
//           The line B casts out is removed from A and from BtoAbuf to keep A
//           included in B, and is written back to L2 if it is dirty.
//   case 5  line is the pending miss: the reference is held off (req_ready low)
//           until the miss has been filled.
// Cache B is write-back towards L2; cache A never holds dirty data of its own
// because every store that writes A also writes B.
//
// Processor port: req_* is a valid/ready handshake; req_ready depends on the
// address presented (it is low for case 5, for a second miss while one is pending,
// in the one-cycle fill of a miss, and for a B-served reference while a miss
// response is waiting for the slow response lane). Every request, load or store,
// gets one response carrying its req_id: hits in A on rsp_fast one cycle later,
// everything else on rsp_slow (B hits B_LAT cycles later; a miss when its word
// arrives from L2). Loads return the addressed 64-bit word; stores return zero.
// L2 port: see miss_unit. ev carries one-cycle event strobes for counting.
//
// Follows the text: the five cases, parallel probing of two directories, strict
// inclusion, stores written to both caches, write-back B, LRU everywhere, same
// 128-byte line in both caches, a one-line BtoAbuf, the 4 KB two-way A with one
// cycle latency, a two-way B with 3 (or 5) cycles, a 32-byte L1-L2 bus.
// This implementation's own choices: the two response lanes, one pending miss
// (hits proceed under it, a second miss waits), write-allocate for store misses,
// the moment a promotion is copied (the cycle of the B hit), and B at 64 KB.
module splics
  import splics_pkg::*;
#(
  parameter int unsigned A_SETS    = 16,   // 4 KB, 2-way, 128-byte lines
  parameter int unsigned A_WAYS    = 2,
  parameter int unsigned B_SETS    = 256,  // 64 KB, 2-way, 128-byte lines
  parameter int unsigned B_WAYS    = 2,
  parameter int unsigned B_LAT     = 3,    // cache B latency in cycles (3 or 5)
  parameter int unsigned BUF_DEPTH = 1     // BtoAbuf lines
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  word_t       req_wdata,
  input  word_be_t    req_be,
  input  req_id_t     req_id,
  output rsp_t        rsp_fast,
  output rsp_t        rsp_slow,
  // L2
  output logic        l2_req_valid,
  input  logic        l2_req_ready,
  output logic        l2_req_we,
  output line_addr_t  l2_req_line,
  output logic        l2_wvalid,
  output logic [BEAT_W-1:0] l2_wdata,
  input  logic        l2_rvalid,
  input  logic [BEAT_W-1:0] l2_rdata,
  // statistics
  output events_t     ev
);

  localparam int unsigned A_SET_W = $clog2(A_SETS);
  localparam int unsigned B_SET_W = $clog2(B_SETS);
  localparam int unsigned A_WAY_W = (A_WAYS > 1) ? $clog2(A_WAYS) : 1;
  localparam int unsigned B_WAY_W = (B_WAYS > 1) ? $clog2(B_WAYS) : 1;
  localparam int unsigned A_TAG_W = LINE_ADDR_W - A_SET_W;
  localparam int unsigned B_TAG_W = LINE_ADDR_W - B_SET_W;

  // ---------------------------------------------------------------- request fields
  line_addr_t        r_line;
  logic [WIDX_W-1:0] r_widx;
  assign r_line = req_addr[ADDR_W-1:OFF_W];
  assign r_widx = req_addr[OFF_W-1:$clog2(WORD_BYTES)];

  wire [A_SET_W-1:0] r_aset = r_line[A_SET_W-1:0];
  wire [A_TAG_W-1:0] r_atag = r_line[LINE_ADDR_W-1:A_SET_W];
  wire [B_SET_W-1:0] r_bset = r_line[B_SET_W-1:0];
  wire [B_TAG_W-1:0] r_btag = r_line[LINE_ADDR_W-1:B_SET_W];

  // ---------------------------------------------------------------- sub-blocks
  // directories
  logic               a_hit, b_hit;
  logic [A_WAY_W-1:0] a_way, a_vic_way;
  logic [B_WAY_W-1:0] b_way, b_vic_way;
  logic               a_vic_valid, a_vic_dirty;
  logic [A_TAG_W-1:0] a_vic_tag;
  logic               b_vic_valid, b_vic_dirty;
  logic [B_TAG_W-1:0] b_vic_tag;
  logic [A_SET_W-1:0] a_vic_set, a_ins_set, a_inv_set;
  logic [A_TAG_W-1:0] a_ins_tag, a_inv_tag;
  logic [B_SET_W-1:0] b_vic_set;
  logic               a_touch, b_touch, b_touch_dirty, a_ins, b_ins, a_inv, a_inv_hit;
  logic               b_inv_hit_unused;

  // data stores
  line_t              a_rd_line, b_rd_line, a_wr_data, b_wr_data;
  line_be_t           a_wr_be, b_wr_be;
  logic               a_wr, b_wr;
  logic [A_SET_W-1:0] a_wr_set;
  logic [A_WAY_W-1:0] a_wr_way;
  logic [B_SET_W-1:0] b_rd_set, b_wr_set;
  logic [B_WAY_W-1:0] b_rd_way, b_wr_way;

  // BtoAbuf
  logic       buf_push, buf_drop, buf_head_valid, buf_pop, buf_lk_hit, buf_sq, buf_sq_hit, buf_st;
  line_addr_t buf_head_line, buf_sq_line;
  line_t      buf_head_data, buf_push_data;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count_unused;

  // miss unit
  logic       mu_alloc, mu_busy, mu_pend, mu_rsp_take, mu_fill_valid, mu_fill_dirty, mu_fill_done;
  logic       mu_wb_push, mu_wb_full;
  line_addr_t mu_pend_line, mu_fill_line, mu_wb_line;
  line_t      mu_fill_data;
  rsp_t       mu_rsp;

  // response pipes
  rsp_t a_pipe_in, b_pipe_in, b_pipe_out;
  logic a_pipe_busy_unused, b_pipe_busy_unused;

  tag_dir #(.SETS(A_SETS), .WAYS(A_WAYS), .TAG_W(A_TAG_W)) u_dir_a (
    .clk, .rst_n,
    .lk_set(r_aset), .lk_tag(r_atag), .lk_hit(a_hit), .lk_way(a_way),
    .vic_set(a_vic_set), .vic_way(a_vic_way), .vic_valid(a_vic_valid),
    .vic_dirty(a_vic_dirty), .vic_tag(a_vic_tag),
    .touch_en(a_touch), .touch_set(r_aset), .touch_way(a_way), .touch_dirty(1'b0),
    .ins_en(a_ins), .ins_set(a_ins_set), .ins_way(a_vic_way), .ins_tag(a_ins_tag), .ins_dirty(1'b0),
    .inv_en(a_inv), .inv_set(a_inv_set), .inv_tag(a_inv_tag), .inv_hit(a_inv_hit)
  );

  tag_dir #(.SETS(B_SETS), .WAYS(B_WAYS), .TAG_W(B_TAG_W)) u_dir_b (
    .clk, .rst_n,
    .lk_set(r_bset), .lk_tag(r_btag), .lk_hit(b_hit), .lk_way(b_way),
    .vic_set(b_vic_set), .vic_way(b_vic_way), .vic_valid(b_vic_valid),
    .vic_dirty(b_vic_dirty), .vic_tag(b_vic_tag),
    .touch_en(b_touch), .touch_set(r_bset), .touch_way(b_way), .touch_dirty(b_touch_dirty),
    .ins_en(b_ins), .ins_set(b_vic_set), .ins_way(b_vic_way),
    .ins_tag(mu_fill_line[LINE_ADDR_W-1:B_SET_W]), .ins_dirty(mu_fill_dirty),
    .inv_en(1'b0), .inv_set('0), .inv_tag('0), .inv_hit(b_inv_hit_unused)
  );

  data_array #(.SETS(A_SETS), .WAYS(A_WAYS), .LINE_BYTES(LINE_BYTES)) u_data_a (
    .clk, .rd_set(r_aset), .rd_way(a_way), .rd_line(a_rd_line),
    .wr_en(a_wr), .wr_set(a_wr_set), .wr_way(a_wr_way), .wr_data(a_wr_data), .wr_be(a_wr_be)
  );

  data_array #(.SETS(B_SETS), .WAYS(B_WAYS), .LINE_BYTES(LINE_BYTES)) u_data_b (
    .clk, .rd_set(b_rd_set), .rd_way(b_rd_way), .rd_line(b_rd_line),
    .wr_en(b_wr), .wr_set(b_wr_set), .wr_way(b_wr_way), .wr_data(b_wr_data), .wr_be(b_wr_be)
  );

  btoa_buf #(.DEPTH(BUF_DEPTH)) u_btoa (
    .clk, .rst_n,
    .push(buf_push), .push_line(r_line), .push_data(buf_push_data), .push_drop(buf_drop),
    .head_valid(buf_head_valid), .head_line(buf_head_line), .head_data(buf_head_data), .pop(buf_pop),
    .lk_line(r_line), .lk_hit(buf_lk_hit),
    .sq_en(buf_sq), .sq_line(buf_sq_line), .sq_hit(buf_sq_hit),
    .st_en(buf_st), .st_line(r_line), .st_widx(r_widx), .st_data(req_wdata), .st_be(req_be),
    .count(buf_count_unused)
  );

  miss_unit u_miss (
    .clk, .rst_n,
    .alloc(mu_alloc), .alloc_line(r_line), .alloc_we(req_we), .alloc_widx(r_widx),
    .alloc_wdata(req_wdata), .alloc_be(req_be), .alloc_id(req_id),
    .busy(mu_busy), .pend_valid(mu_pend), .pend_line(mu_pend_line),
    .rsp(mu_rsp), .rsp_take(mu_rsp_take),
    .fill_valid(mu_fill_valid), .fill_line(mu_fill_line), .fill_data(mu_fill_data),
    .fill_dirty(mu_fill_dirty), .fill_done(mu_fill_done),
    .wb_push(mu_wb_push), .wb_line(mu_wb_line), .wb_data(b_rd_line), .wb_full(mu_wb_full),
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_line,
    .l2_wvalid, .l2_wdata, .l2_rvalid, .l2_rdata
  );

  lat_pipe #(.STAGES(1))     u_pipe_a (.clk, .rst_n, .in(a_pipe_in), .out(rsp_fast),   .busy(a_pipe_busy_unused));
  lat_pipe #(.STAGES(B_LAT)) u_pipe_b (.clk, .rst_n, .in(b_pipe_in), .out(b_pipe_out), .busy(b_pipe_busy_unused));

  // ---------------------------------------------------------------- classify
  acc_kind_e kind;
  logic      pend_hit, stall, stall_pending;
  logic      accept, fill_go, drain;

  assign pend_hit = mu_pend && (mu_pend_line == r_line);

  always_comb begin
    if (a_hit)           kind = ACC_HIT_A;
    else if (buf_lk_hit) kind = ACC_HIT_BUF;
    else if (b_hit)      kind = ACC_HIT_B;
    else                 kind = ACC_MISS;
  end

  always_comb begin
    stall_pending = pend_hit;
    stall = mu_fill_valid                                      // fill owns both caches
         || pend_hit                                           // case 5
         || (kind == ACC_MISS && mu_busy)                      // one miss at a time
         || (kind != ACC_HIT_A && mu_rsp.valid);               // slow lane reserved for the miss word
  end

  assign req_ready = !stall;
  assign accept    = req_valid && !stall;

  // fill of a miss: waits only for the write-back buffer if the cast-out is dirty
  assign fill_go = mu_fill_valid && !(b_vic_valid && b_vic_dirty && mu_wb_full);
  assign mu_fill_done = fill_go;

  // a cycle with no reference and no fill is a free cycle of cache A
  assign drain   = !accept && !mu_fill_valid && buf_head_valid;
  assign buf_pop = drain;

  // ---------------------------------------------------------------- actions
  wire [B_SET_W-1:0]  f_bset = mu_fill_line[B_SET_W-1:0];
  wire [A_SET_W-1:0]  f_aset = mu_fill_line[A_SET_W-1:0];
  wire [A_TAG_W-1:0]  f_atag = mu_fill_line[LINE_ADDR_W-1:A_SET_W];
  wire [A_SET_W-1:0]  h_aset = buf_head_line[A_SET_W-1:0];
  wire [A_TAG_W-1:0]  h_atag = buf_head_line[LINE_ADDR_W-1:A_SET_W];
  line_addr_t         victim_line;
  assign victim_line = {b_vic_tag, f_bset};

  wire is_hit_a  = accept && kind == ACC_HIT_A;
  wire is_hit_b  = accept && kind == ACC_HIT_B;
  wire is_hit_bf = accept && kind == ACC_HIT_BUF;
  wire b_served  = is_hit_b || is_hit_bf;

  word_t a_word, b_word;
  assign a_word = line_word(a_rd_line, r_widx);
  assign b_word = line_word(b_rd_line, r_widx);

  always_comb begin
    // directory A
    a_touch   = is_hit_a;
    a_vic_set = mu_fill_valid ? f_aset : h_aset;
    a_ins     = fill_go || drain;
    a_ins_set = a_vic_set;
    a_ins_tag = mu_fill_valid ? f_atag : h_atag;
    a_inv     = fill_go && b_vic_valid;
    a_inv_set = victim_line[A_SET_W-1:0];
    a_inv_tag = victim_line[LINE_ADDR_W-1:A_SET_W];

    // directory B
    b_vic_set     = f_bset;
    b_touch       = is_hit_a || b_served;
    b_touch_dirty = req_we;
    b_ins         = fill_go;

    // data A: store hit, promotion, or fill
    a_wr      = (is_hit_a && req_we) || drain || fill_go;
    a_wr_set  = r_aset;
    a_wr_way  = a_way;
    a_wr_data = word_line_data(req_wdata);
    a_wr_be   = word_line_be(r_widx, req_be);
    if (drain) begin
      a_wr_set  = h_aset;
      a_wr_way  = a_vic_way;
      a_wr_data = buf_head_data;
      a_wr_be   = '1;
    end else if (mu_fill_valid) begin
      a_wr_set  = f_aset;
      a_wr_way  = a_vic_way;
      a_wr_data = mu_fill_data;
      a_wr_be   = '1;
    end

    // data B: the read port serves the reference, or the cast-out in a fill
    b_rd_set  = mu_fill_valid ? f_bset : r_bset;
    b_rd_way  = mu_fill_valid ? b_vic_way : b_way;
    b_wr      = ((is_hit_a || b_served) && req_we) || fill_go;
    b_wr_set  = mu_fill_valid ? f_bset : r_bset;
    b_wr_way  = mu_fill_valid ? b_vic_way : b_way;
    b_wr_data = mu_fill_valid ? mu_fill_data : word_line_data(req_wdata);
    b_wr_be   = mu_fill_valid ? '1 : word_line_be(r_widx, req_be);

    // BtoAbuf
    buf_push      = is_hit_b;
    buf_push_data = req_we ? line_merge(b_rd_line, r_widx, req_wdata, req_be) : b_rd_line;
    buf_st        = is_hit_bf && req_we;
    buf_sq        = fill_go && b_vic_valid;
    buf_sq_line   = victim_line;

    // miss unit
    mu_alloc    = accept && kind == ACC_MISS;
    mu_wb_push  = fill_go && b_vic_valid && b_vic_dirty;
    mu_wb_line  = victim_line;
    mu_rsp_take = mu_rsp.valid && !b_pipe_out.valid;

    // responses
    a_pipe_in.valid = is_hit_a;
    a_pipe_in.id    = req_id;
    a_pipe_in.rdata = req_we ? '0 : a_word;
    b_pipe_in.valid = b_served;
    b_pipe_in.id    = req_id;
    b_pipe_in.rdata = req_we ? '0 : b_word;
  end

  assign rsp_slow = b_pipe_out.valid ? b_pipe_out : mu_rsp;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev               = '0;
    ev.hit_a         = is_hit_a;
    ev.hit_b         = is_hit_b;
    ev.hit_buf       = is_hit_bf;
    ev.miss          = mu_alloc;
    ev.stall_pending = req_valid && stall_pending && !mu_fill_valid;
    ev.stall_other   = req_valid && stall && !(stall_pending && !mu_fill_valid);
    ev.promote       = is_hit_b && !buf_drop;
    ev.promote_drop  = buf_drop;
    ev.promote_done  = drain;
    ev.squash        = buf_sq_hit;
    ev.inval_a       = a_inv && a_inv_hit;
    ev.writeback     = mu_wb_push;
  end

  // ---------------------------------------------------------------- rules
  // inclusion: a hit in A is always a hit in B
  a_inclusion: assert property (@(posedge clk) disable iff (!rst_n) req_valid && a_hit |-> b_hit)
    else $error("splics: line in A but not in B");
  // a line waiting in BtoAbuf is in B and not in A
  a_buf_in_b: assert property (@(posedge clk) disable iff (!rst_n) req_valid && buf_lk_hit |-> b_hit && !a_hit)
    else $error("splics: BtoAbuf line not in B, or already in A");
  // the pending miss line is in neither cache
  a_pend_absent: assert property (@(posedge clk) disable iff (!rst_n) req_valid && pend_hit |-> !b_hit)
    else $error("splics: pending miss line found in B");

endmodule
