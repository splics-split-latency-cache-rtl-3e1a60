// btoa_buf: first-in-first-out promotion buffer between cache B and cache A.
//
// When a reference hits in cache B but not in cache A, the line is copied into this
// buffer, and it is copied on into cache A in a later cycle in which cache A is not
// being accessed. The design requires that a line in the buffer never outlives its
// copy in cache B: when cache B casts a line out, a matching buffer entry is
// squashed, so the promotion is lost and cache A stays strictly included in B.
// A promotion that finds the buffer full is dropped (push_drop).
//
// Entries are kept packed, oldest at index 0. In one cycle the buffer can
//   - pop the head (pop, when head_valid),
//   - push a new line (push; dropped if the buffer is full after the pop),
//   - squash the entry holding sq_line (any position; younger entries move down),
//   - merge a processor store into the entry holding st_line, so that the copy that
//     reaches cache A carries the store, as cache A and cache B both do.
// lk_line is matched combinationally against all entries (lk_hit): a reference to a
// line already waiting here is served by cache B without a new promotion.
// Squash and merge act on the entries present before this cycle's pop and push.
// DEPTH defaults to one line, the size the text gives; the squash, merge and drop
// mechanics beyond what the text states are this implementation's choices.
module btoa_buf
  import splics_pkg::*;
#(
  parameter int unsigned DEPTH = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // push from cache B
  input  logic       push,
  input  line_addr_t push_line,
  input  line_t      push_data,
  output logic       push_drop,
  // head, drained into cache A
  output logic       head_valid,
  output line_addr_t head_line,
  output line_t      head_data,
  input  logic       pop,
  // lookup (case 4)
  input  line_addr_t lk_line,
  output logic       lk_hit,
  // squash on cast-out from cache B
  input  logic       sq_en,
  input  line_addr_t sq_line,
  output logic       sq_hit,
  // store merge
  input  logic       st_en,
  input  line_addr_t st_line,
  input  logic [WIDX_W-1:0] st_widx,
  input  word_t      st_data,
  input  word_be_t   st_be,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count
);

  typedef struct packed {
    logic       valid;
    line_addr_t line;
    line_t      data;
  } entry_t;

  entry_t q [DEPTH];
  entry_t n [DEPTH];

  always_comb begin
    lk_hit = 1'b0;
    sq_hit = 1'b0;
    count  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (q[i].valid && q[i].line == lk_line) lk_hit = 1'b1;
      if (q[i].valid && q[i].line == sq_line) sq_hit = sq_en;
      if (q[i].valid) count = count + 1'b1;
    end
  end

  assign head_valid = q[0].valid;
  assign head_line  = q[0].line;
  assign head_data  = q[0].data;

  always_comb begin
    int unsigned k;
    entry_t t [DEPTH];
    // merge stores and clear squashed entries in place
    for (int i = 0; i < DEPTH; i++) begin
      t[i] = q[i];
      if (st_en && q[i].valid && q[i].line == st_line)
        t[i].data = line_merge(q[i].data, st_widx, st_data, st_be);
      if (sq_en && q[i].valid && q[i].line == sq_line)
        t[i].valid = 1'b0;
    end
    if (pop && q[0].valid) t[0].valid = 1'b0;
    // compact the survivors, oldest first
    for (int i = 0; i < DEPTH; i++) n[i] = '0;
    k = 0;
    for (int i = 0; i < DEPTH; i++)
      if (t[i].valid) begin
        n[k] = t[i];
        k = k + 1;
      end
    // append the new line
    push_drop = 1'b0;
    if (push) begin
      if (k < DEPTH) begin
        n[k].valid = 1'b1;
        n[k].line  = push_line;
        n[k].data  = push_data;
      end else begin
        push_drop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= n[i];
    end
  end

  a_no_dup_push: assert property (@(posedge clk) disable iff (!rst_n) push |-> !(lk_hit && lk_line == push_line))
    else $error("btoa_buf: line pushed twice");

endmodule
