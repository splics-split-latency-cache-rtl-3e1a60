// tb_btoa_buf: random test of the promotion buffer against a queue model.
//
// A 3-line buffer gets random pushes (of lines not already in it), pops, squashes
// and store merges over a handful of line addresses, in any combination within one
// cycle. Every cycle the head, the lookup and squash matches, the drop flag and the
// count are compared with the model; a popped line must carry every store merged
// into it while it waited.
module tb_btoa_buf;
  import splics_pkg::*;
  localparam int unsigned DEPTH = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       push, push_drop, head_valid, pop, lk_hit, sq_en, sq_hit, st_en;
  line_addr_t push_line, head_line, lk_line, sq_line, st_line;
  line_t      push_data, head_data;
  logic [WIDX_W-1:0] st_widx;
  word_t      st_data;
  word_be_t   st_be;
  logic [$clog2(DEPTH+1)-1:0] count;

  btoa_buf #(.DEPTH(DEPTH)) dut (.*);

  typedef struct { line_addr_t line; line_t data; } ent_t;
  ent_t q [$];
  int unsigned checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic line_t rnd_line();
    line_t r;
    for (int i = 0; i < LINE_W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  function automatic bit in_q(line_addr_t l);
    foreach (q[i]) if (q[i].line == l) return 1;
    return 0;
  endfunction

  initial begin
    {push, pop, sq_en, st_en} = '0;
    push_line = '0; lk_line = '0; sq_line = '0; st_line = '0; push_data = '0;
    st_widx = '0; st_data = '0; st_be = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 5000; n++) begin
      #1;
      push_line = line_addr_t'($urandom % 6);
      push_data = rnd_line();
      lk_line   = push_line;
      push      = (($urandom % 2) == 0) && !in_q(push_line);
      pop       = ($urandom % 3) == 0;
      sq_en     = ($urandom % 4) == 0;
      sq_line   = line_addr_t'($urandom % 6);
      st_en     = ($urandom % 3) == 0;
      st_line   = line_addr_t'($urandom % 6);
      st_widx   = WIDX_W'($urandom);
      st_data   = {$urandom, $urandom};
      st_be     = word_be_t'($urandom);
      #1;
      chk(head_valid == (q.size() > 0), "head valid");
      if (q.size() > 0) chk(head_line == q[0].line && head_data == q[0].data, "head line and data");
      chk(lk_hit == in_q(lk_line), "lookup");
      chk(sq_hit == (sq_en && in_q(sq_line)), "squash match");
      chk(count == ($clog2(DEPTH+1))'(q.size()), "count");
      begin
        bit keep;
        ent_t t [$];
        bit popped;
        popped = 0;
        t = {};
        foreach (q[i]) begin
          ent_t e;
          e = q[i];
          if (st_en && e.line == st_line) e.data = line_merge(e.data, st_widx, st_data, st_be);
          keep = !(sq_en && e.line == sq_line) && !(pop && i == 0);
          if (keep) t.push_back(e);
        end
        chk(push_drop == (push && t.size() >= DEPTH), "drop");
        if (push && t.size() < DEPTH) t.push_back('{push_line, push_data});
        @(posedge clk);
        q = t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
