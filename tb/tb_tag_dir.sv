// tb_tag_dir: random test of the cache directory against a list-based LRU model.
//
// A 4-set, 4-way directory (so that LRU order, not just one bit, is checked) gets
// random touches, installs, invalidations and invalidate-plus-install cycles. Every
// cycle the lookup of a random tag, the victim of a random set and the invalidate
// match are compared with a model that keeps each set's ways in recency order.
module tb_tag_dir;
  localparam int unsigned SETS = 4, WAYS = 4, TAG_W = 3;
  localparam int unsigned SET_W = 2, WAY_W = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SET_W-1:0] lk_set, vic_set, touch_set, ins_set, inv_set;
  logic [TAG_W-1:0] lk_tag, ins_tag, inv_tag, vic_tag;
  logic [WAY_W-1:0] lk_way, vic_way, touch_way, ins_way;
  logic lk_hit, vic_valid, vic_dirty, touch_en, touch_dirty, ins_en, ins_dirty, inv_en, inv_hit;

  tag_dir #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.*);

  // model
  bit              m_valid [SETS][WAYS];
  bit              m_dirty [SETS][WAYS];
  bit [TAG_W-1:0]  m_tag   [SETS][WAYS];
  int              m_order [SETS][$];   // ways, most recent first

  int unsigned checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic void m_use(int s, int w);
    foreach (m_order[s][i]) if (m_order[s][i] == w) begin m_order[s].delete(i); break; end
    m_order[s].push_front(w);
  endfunction

  initial begin
    for (int s = 0; s < SETS; s++) begin
      m_order[s] = {};
      for (int w = 0; w < WAYS; w++) begin
        m_valid[s][w] = 0; m_dirty[s][w] = 0; m_tag[s][w] = 0;
        m_order[s].push_back(w);
      end
    end
    {touch_en, ins_en, inv_en, touch_dirty, ins_dirty} = '0;
    {lk_set, vic_set, touch_set, ins_set, inv_set, lk_tag, ins_tag, inv_tag, touch_way, ins_way} = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 20000; n++) begin
      int op;
      #1;
      {touch_en, ins_en, inv_en} = '0;
      lk_set  = SET_W'($urandom); lk_tag = TAG_W'($urandom % 4);
      vic_set = SET_W'($urandom);
      op = $urandom % 4;
      touch_set = SET_W'($urandom); touch_way = WAY_W'($urandom); touch_dirty = 1'($urandom);
      ins_set = vic_set; ins_way = WAY_W'($urandom); ins_tag = TAG_W'($urandom % 4); ins_dirty = 1'($urandom);
      inv_set = SET_W'($urandom); inv_tag = TAG_W'($urandom % 4);
      case (op)
        0: touch_en = 1'b1;
        1: ins_en = 1'b1;
        2: inv_en = 1'b1;
        default: begin ins_en = 1'b1; inv_en = 1'b1; end
      endcase
      // a directory never holds one line twice: skip an install that would
      for (int w = 0; w < WAYS; w++)
        if (w != int'(ins_way) && m_valid[ins_set][w] && m_tag[ins_set][w] == ins_tag) ins_en = 1'b0;
      #1;
      // compare combinational outputs with the model
      begin
        bit hit; int hw; bit found; int vw; bit ih;
        hit = 0; hw = 0;
        for (int w = 0; w < WAYS; w++)
          if (m_valid[lk_set][w] && m_tag[lk_set][w] == lk_tag) begin hit = 1; hw = w; end
        chk(lk_hit == hit && (!hit || lk_way == WAY_W'(hw)), "lookup");
        found = 0; vw = 0;
        for (int w = 0; w < WAYS; w++) if (!found && !m_valid[vic_set][w]) begin found = 1; vw = w; end
        if (!found) vw = m_order[vic_set][WAYS-1];
        chk(vic_way == WAY_W'(vw), $sformatf("victim way %0d exp %0d", vic_way, vw));
        chk(vic_valid == m_valid[vic_set][vw] && vic_dirty == m_dirty[vic_set][vw] &&
            (!vic_valid || vic_tag == m_tag[vic_set][vw]), "victim state");
        ih = 0;
        for (int w = 0; w < WAYS; w++) if (m_valid[inv_set][w] && m_tag[inv_set][w] == inv_tag) ih = 1;
        chk(inv_hit == ih, "invalidate match");
      end
      @(posedge clk);
      // update the model as the directory does at this edge
      if (inv_en)
        for (int w = 0; w < WAYS; w++)
          if (m_valid[inv_set][w] && m_tag[inv_set][w] == inv_tag) begin
            m_valid[inv_set][w] = 0; m_dirty[inv_set][w] = 0;
          end
      if (touch_en) begin
        m_use(int'(touch_set), int'(touch_way));
        if (touch_dirty) m_dirty[touch_set][touch_way] = 1;
      end
      if (ins_en) begin
        m_valid[ins_set][ins_way] = 1; m_dirty[ins_set][ins_way] = ins_dirty;
        m_tag[ins_set][ins_way] = ins_tag; m_use(int'(ins_set), int'(ins_way));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
