// tb_miss_unit: directed test of the miss unit with the L2 model.
//
//   1. A load miss: one read request to L2 for the line, four beats back, the
//      requested word forwarded one cycle after the beat that carries it, then the
//      whole line offered for the fill; pend_valid/busy until the fill is done.
//   2. A store miss in the last beat: its bytes are merged into the fill line,
//      which is marked dirty; the response carries no data.
//   3. A dirty cast-out handed over together with a miss to the same line: L2 must
//      see the write-back (request plus four consecutive beats) before the read,
//      so the line read back is the one written.
// The expected values come from the L2 pattern (splics_tb_pkg::init_line) and the
// data the test wrote, not from the unit.
module tb_miss_unit;
  import splics_pkg::*;
  import splics_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        alloc, alloc_we, busy, pend_valid, rsp_take, fill_valid, fill_dirty, fill_done;
  line_addr_t  alloc_line, pend_line, fill_line, wb_line, l2_req_line;
  logic [WIDX_W-1:0] alloc_widx;
  word_t       alloc_wdata;
  word_be_t    alloc_be;
  req_id_t     alloc_id;
  rsp_t        rsp;
  line_t       fill_data, wb_data;
  logic        wb_push, wb_full;
  logic        l2_req_valid, l2_req_ready, l2_req_we, l2_wvalid, l2_rvalid;
  logic [BEAT_W-1:0] l2_wdata, l2_rdata;
  int unsigned l2_reads, l2_writes;

  miss_unit dut (.*);

  l2_model #(.LAT(10)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_line(l2_req_line), .wvalid(l2_wvalid), .wdata(l2_wdata), .rvalid(l2_rvalid),
    .rdata(l2_rdata), .reads(l2_reads), .writes(l2_writes));

  int unsigned checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  // L2 request log
  int unsigned  nreq = 0;
  bit           req_we_log [8];
  line_addr_t   req_line_log [8];
  int unsigned  rbeats = 0, wbeats = 0, rsp_seen = 0;
  int           last_rbeat_cyc = -1, rsp_cyc = -1, cyc = 0;
  bit           wrun_ok = 1;
  int           wfirst = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (l2_req_valid && l2_req_ready) begin
      if (nreq < 8) begin req_we_log[nreq] = l2_req_we; req_line_log[nreq] = l2_req_line; end
      nreq++;
    end
    if (l2_rvalid) begin rbeats++; last_rbeat_cyc = cyc; end
    if (l2_wvalid) begin
      if (wfirst < 0) wfirst = cyc;
      else if (cyc != wfirst + int'(wbeats)) wrun_ok = 0;
      wbeats++;
    end
    if (rsp.valid && rsp_take) begin rsp_seen++; rsp_cyc = cyc; end
  end

  task automatic do_alloc(line_addr_t l, bit we, int widx, word_t d, word_be_t be, req_id_t id);
    #1;
    alloc = 1'b1; alloc_line = l; alloc_we = we; alloc_widx = WIDX_W'(widx);
    alloc_wdata = d; alloc_be = be; alloc_id = id;
    chk(!busy, "idle before allocation");
    @(posedge clk);
    #1 alloc = 1'b0;
  endtask

  task automatic finish_fill(output line_t data, output bit dirty);
    int n;
    n = 0;
    while (!fill_valid && n < 100) begin @(posedge clk); n++; end
    #1;
    chk(fill_valid, "fill offered");
    chk(pend_valid && busy, "pending while filling");
    data = fill_data; dirty = fill_dirty;
    fill_done = 1'b1;
    @(posedge clk);
    #1 fill_done = 1'b0;
    chk(!pend_valid, "pending cleared after the fill");
  endtask

  initial begin
    line_t d, e;
    bit dirty;
    word_t sw;
    alloc = 0; alloc_we = 0; alloc_line = '0; alloc_widx = '0; alloc_wdata = '0; alloc_be = '0;
    alloc_id = '0; rsp_take = 1'b1; fill_done = 0; wb_push = 0; wb_line = '0; wb_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. load miss, word 5 (beat 1)
    do_alloc(line_addr_t'('h40), 1'b0, 5, '0, '0, req_id_t'(3));
    chk(pend_valid && pend_line == line_addr_t'('h40), "pending line");
    finish_fill(d, dirty);
    e = init_line(line_addr_t'('h40));
    chk(d == e && !dirty, "load fill data");
    chk(rsp_seen == 1, "one response");
    chk(rbeats == BEATS && nreq == 1 && !req_we_log[0] && req_line_log[0] == line_addr_t'('h40),
        "one read of four beats");
    chk(rsp_cyc == last_rbeat_cyc - 2 + 1, "word forwarded one cycle after its beat");

    // 2. store miss, word 15 (last beat)
    sw = {$urandom, $urandom};
    do_alloc(line_addr_t'('h41), 1'b1, 15, sw, 8'h0F, req_id_t'(5));
    finish_fill(d, dirty);
    e = line_merge(init_line(line_addr_t'('h41)), 4'd15, sw, 8'h0F);
    chk(d == e && dirty, "store fill merged and dirty");
    chk(rsp_seen == 2, "store response");

    // 3. write-back of line 0x41 and a miss to it in the same cycle
    for (int i = 0; i < LINE_W / 32; i++) wb_data[i*32 +: 32] = $urandom;
    #1;
    wb_push = 1'b1; wb_line = line_addr_t'('h41);
    alloc = 1'b1; alloc_line = line_addr_t'('h41); alloc_we = 1'b0; alloc_widx = 4'd0; alloc_id = req_id_t'(7);
    @(posedge clk);
    #1 wb_push = 1'b0; alloc = 1'b0;
    chk(wb_full, "write-back buffer in use");
    finish_fill(d, dirty);
    chk(nreq == 4 && req_we_log[2] && req_line_log[2] == line_addr_t'('h41) && !req_we_log[3],
        "write-back before the read");
    chk(wbeats == BEATS && wrun_ok, "four consecutive write beats");
    chk(d == wb_data, "line read back is the one written back");
    chk(!wb_full, "write-back buffer free");
    chk(l2_reads == 3 && l2_writes == 1, "L2 request count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rsp.valid) begin
    // responses carry the allocated id and, for loads, the requested word
    checks++;
    if (!((rsp.id == 3 && rsp.rdata == line_word(init_line(line_addr_t'('h40)), 4'd5)) ||
          (rsp.id == 5 && rsp.rdata == '0) ||
          (rsp.id == 7 && rsp.rdata == line_word(wb_data, 4'd0)))) begin
      failures++;
      $display("FAIL %0t: response id %0d data %h", $time, rsp.id, rsp.rdata);
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
