// tag_dir: set-associative cache directory with LRU replacement.
//
// The split latency cache keeps one directory per data store (cache A and cache B)
// and probes both in the same cycle as the processor reference. Each entry holds a
// valid bit, a dirty bit and the tag; each set holds true-LRU ages (0 = most
// recently used, WAYS-1 = least recently used), which the whole hierarchy uses as
// its replacement policy.
//
// Interface (all operations take effect at the rising clock edge):
//   lookup  (combinational) lk_set/lk_tag -> lk_hit, lk_way
//   victim  (combinational) vic_set -> vic_way (first invalid way, else the LRU
//           way), with that way's valid, dirty and tag
//   touch   make (touch_set, touch_way) MRU; touch_dirty also marks it dirty
//   install write tag into (ins_set, ins_way), valid, MRU, dirty = ins_dirty
//   inval   remove the line (inv_set, inv_tag) if present
// touch and install must not be requested in the same cycle. inval may be combined
// with install; install wins if they name the same way.
// Reset clears every valid bit. The directory layout, the age encoding and the
// port set are this implementation's own choices; the text asks only for parallel
// probing, LRU replacement and a write-back (dirty) cache B.
module tag_dir #(
  parameter int unsigned SETS  = 16,
  parameter int unsigned WAYS  = 2,
  parameter int unsigned TAG_W = 21,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [SET_W-1:0] lk_set,
  input  logic [TAG_W-1:0] lk_tag,
  output logic             lk_hit,
  output logic [WAY_W-1:0] lk_way,
  // victim choice
  input  logic [SET_W-1:0] vic_set,
  output logic [WAY_W-1:0] vic_way,
  output logic             vic_valid,
  output logic             vic_dirty,
  output logic [TAG_W-1:0] vic_tag,
  // touch (MRU update, optional dirty)
  input  logic             touch_en,
  input  logic [SET_W-1:0] touch_set,
  input  logic [WAY_W-1:0] touch_way,
  input  logic             touch_dirty,
  // install
  input  logic             ins_en,
  input  logic [SET_W-1:0] ins_set,
  input  logic [WAY_W-1:0] ins_way,
  input  logic [TAG_W-1:0] ins_tag,
  input  logic             ins_dirty,
  // invalidate by address
  input  logic             inv_en,
  input  logic [SET_W-1:0] inv_set,
  input  logic [TAG_W-1:0] inv_tag,
  output logic             inv_hit
);

  logic [WAYS-1:0]             valid_q [SETS];
  logic [WAYS-1:0]             dirty_q [SETS];
  logic [TAG_W-1:0]            tag_q   [SETS][WAYS];
  logic [WAYS-1:0][WAY_W-1:0]  age_q   [SETS];

  // Ages after an access to way w: younger ways age by one, w becomes 0.
  function automatic logic [WAYS-1:0][WAY_W-1:0] age_after(
      logic [WAYS-1:0][WAY_W-1:0] a, logic [WAY_W-1:0] w);
    logic [WAYS-1:0][WAY_W-1:0] r;
    for (int i = 0; i < WAYS; i++)
      r[i] = (a[i] < a[w]) ? a[i] + 1'b1 : a[i];
    r[w] = '0;
    return r;
  endfunction

  // lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[lk_set][w] && tag_q[lk_set][w] == lk_tag) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
  end

  // victim: first invalid way, else the oldest one
  always_comb begin
    logic found;
    found   = 1'b0;
    vic_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[vic_set][w]) begin
        found   = 1'b1;
        vic_way = WAY_W'(w);
      end
    if (!found)
      for (int w = 0; w < WAYS; w++)
        if (age_q[vic_set][w] == WAY_W'(WAYS - 1)) vic_way = WAY_W'(w);
    vic_valid = valid_q[vic_set][vic_way];
    vic_dirty = dirty_q[vic_set][vic_way];
    vic_tag   = tag_q[vic_set][vic_way];
  end

  // invalidate match
  logic [WAY_W-1:0] inv_way;
  always_comb begin
    inv_hit = 1'b0;
    inv_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[inv_set][w] && tag_q[inv_set][w] == inv_tag) begin
        inv_hit = 1'b1;
        inv_way = WAY_W'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          age_q[s][w] <= WAY_W'(w);
          tag_q[s][w] <= '0;
        end
      end
    end else begin
      if (inv_en && inv_hit) begin
        valid_q[inv_set][inv_way] <= 1'b0;
        dirty_q[inv_set][inv_way] <= 1'b0;
      end
      if (touch_en) begin
        age_q[touch_set] <= age_after(age_q[touch_set], touch_way);
        if (touch_dirty) dirty_q[touch_set][touch_way] <= 1'b1;
      end
      if (ins_en) begin
        valid_q[ins_set][ins_way] <= 1'b1;
        dirty_q[ins_set][ins_way] <= ins_dirty;
        tag_q[ins_set][ins_way]   <= ins_tag;
        age_q[ins_set]            <= age_after(age_q[ins_set], ins_way);
      end
    end
  end

  a_touch_ins_excl: assert property (@(posedge clk) disable iff (!rst_n) !(touch_en && ins_en))
    else $error("tag_dir: touch and install in the same cycle");

endmodule
