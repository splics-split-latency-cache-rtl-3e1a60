// tb_splics_full: the split latency cache at its full size, end to end.
//
// splics with every parameter at its default: 4 KB two-way cache A, 64 KB two-way
// cache B with a 3-cycle latency, one-line BtoAbuf. A stream of 40000 loads and
// stores over 2048 lines (256 KB, four times cache B) with a hot set, spatial
// repeats and a 64-line warm set is checked by splics_env word by word and cycle
// by cycle; misses are served by l2_model (10-cycle latency).
module tb_splics_full;
  import splics_pkg::*;
  localparam int unsigned WATCHDOG = 2000000;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done;
  int unsigned checks, failures;

  logic        req_valid, req_ready, req_we;
  logic [ADDR_W-1:0] req_addr;
  word_t       req_wdata;
  word_be_t    req_be;
  req_id_t     req_id;
  rsp_t        rsp_fast, rsp_slow;
  logic        l2_req_valid, l2_req_ready, l2_req_we, l2_wvalid, l2_rvalid;
  line_addr_t  l2_req_line;
  logic [BEAT_W-1:0] l2_wdata, l2_rdata;
  events_t     ev;
  int unsigned l2_reads, l2_writes;

  always #5 clk = ~clk;

  splics dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_be, .req_id,
    .rsp_fast, .rsp_slow,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_line,
    .l2_wvalid, .l2_wdata, .l2_rvalid, .l2_rdata,
    .ev
  );

  l2_model u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_line(l2_req_line), .wvalid(l2_wvalid), .wdata(l2_wdata),
    .rvalid(l2_rvalid), .rdata(l2_rdata), .reads(l2_reads), .writes(l2_writes)
  );

  splics_env #(.B_LAT(3), .B_SETS(256), .NLINES(2048), .HOT(8), .WARM(64), .NREQ(40000), .SEED(3), .IDLE_PCT(0), .P_HOT(40), .P_PREV(10), .P_WARM(10), .P_CONF(30), .NEED_SQUASH(1'b0)) env (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_be, .req_id,
    .rsp_fast, .rsp_slow, .ev, .l2_reads, .l2_writes,
    .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
