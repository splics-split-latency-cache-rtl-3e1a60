// l2_model: behavioural model of the L2 cache seen by the split latency L1.
//
// Not synthesizable and not part of the design: a testbench stand-in for the next
// level. It always hits. A read request is answered LAT cycles after it is taken
// (10 by default, the leading-edge latency of the L2 the design was evaluated
// with) by the line's 4 beats of 32 bytes on consecutive cycles. A write request is
// followed by 4 beats, which it stores. Requests are served one at a time, in
// order. A line never written holds init_line(address) from splics_tb_pkg, so a
// testbench can predict any read. reads/writes count the requests served.
module l2_model
  import splics_pkg::*;
  import splics_tb_pkg::*;
#(
  parameter int unsigned LAT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  line_addr_t  req_line,
  input  logic        wvalid,
  input  logic [BEAT_W-1:0] wdata,
  output logic        rvalid,
  output logic [BEAT_W-1:0] rdata,
  output int unsigned reads,
  output int unsigned writes
);

  line_t mem [line_addr_t];

  function automatic line_t peek(line_addr_t l);
    return mem.exists(l) ? mem[l] : init_line(l);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RD_WAIT, S_RD_DATA, S_WR_DATA} st_e;
  st_e         st;
  line_addr_t  cur;
  int unsigned cnt;
  line_t       wbuf;

  assign req_ready = (st == S_IDLE);
  assign rvalid    = (st == S_RD_DATA);
  always_comb begin
    line_t l;
    l = peek(cur);
    rdata = l[cnt*BEAT_W +: BEAT_W];
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; cnt <= 0; reads <= 0; writes <= 0; wbuf <= '0;
    end else begin
      case (st)
        S_IDLE: if (req_valid) begin
          cur <= req_line;
          cnt <= 0;
          if (req_we) begin st <= S_WR_DATA; writes <= writes + 1; end
          else begin st <= (LAT > 1) ? S_RD_WAIT : S_RD_DATA; reads <= reads + 1; end
        end
        S_RD_WAIT: begin
          cnt <= cnt + 1;
          if (cnt + 2 >= LAT) begin st <= S_RD_DATA; cnt <= 0; end
        end
        S_RD_DATA: begin
          cnt <= cnt + 1;
          if (cnt == BEATS - 1) begin st <= S_IDLE; cnt <= 0; end
        end
        S_WR_DATA: if (wvalid) begin
          line_t t;
          t = wbuf;
          t[cnt*BEAT_W +: BEAT_W] = wdata;
          wbuf <= t;
          cnt <= cnt + 1;
          if (cnt == BEATS - 1) begin
            mem[cur] = t;
            st <= S_IDLE;
            cnt <= 0;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
