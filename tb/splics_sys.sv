// splics_sys: one split latency cache with its L2 model and checking environment.
//
// Used by tb_splics to run the cache in more than one configuration side by side.
// The parameters are those of splics and of splics_env; done, checks and failures
// come from the environment.
module splics_sys
  import splics_pkg::*;
#(
  parameter int unsigned A_SETS    = 16,
  parameter int unsigned A_WAYS    = 2,
  parameter int unsigned B_SETS    = 256,
  parameter int unsigned B_WAYS    = 2,
  parameter int unsigned B_LAT     = 3,
  parameter int unsigned BUF_DEPTH = 1,
  parameter int unsigned NLINES    = 2048,
  parameter int unsigned HOT       = 4,
  parameter int unsigned WARM      = 64,
  parameter int unsigned NREQ      = 20000,
  parameter int unsigned SEED      = 1,
  parameter int unsigned IDLE_PCT  = 12,
  parameter int unsigned P_HOT     = 45,
  parameter int unsigned P_PREV    = 20,
  parameter int unsigned P_WARM    = 15,
  parameter int unsigned P_CONF    = 10,
  parameter bit          NEED_SQUASH = 1'b1,
  parameter bit          NEED_DROP = 1'b1,
  parameter bit          DIRECTED  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
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


  splics #(.A_SETS(A_SETS), .A_WAYS(A_WAYS), .B_SETS(B_SETS), .B_WAYS(B_WAYS), .B_LAT(B_LAT), .BUF_DEPTH(BUF_DEPTH)) dut (
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

  splics_env #(.B_LAT(B_LAT), .B_SETS(B_SETS), .NLINES(NLINES), .HOT(HOT), .WARM(WARM), .NREQ(NREQ), .SEED(SEED),
               .IDLE_PCT(IDLE_PCT), .P_HOT(P_HOT), .P_PREV(P_PREV), .P_WARM(P_WARM), .P_CONF(P_CONF),
               .NEED_SQUASH(NEED_SQUASH), .NEED_DROP(NEED_DROP), .DIRECTED(DIRECTED), .A_SETS_T(A_SETS)) env (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_be, .req_id,
    .rsp_fast, .rsp_slow, .ev, .l2_reads, .l2_writes,
    .done, .checks, .failures
  );

endmodule
