// miss_unit: pending-miss register, line fetch from L2 and write-back of cast-outs.
//
// A reference that misses in both caches (case 3 of the access algorithm) is handed
// here. The unit asks L2 for the line, collects its four 32-byte bus beats, forwards
// the requested word to the processor as soon as its beat arrives (critical word
// bypass, kept in rsp until rsp_take), and then presents the whole line, with a
// missing store already merged in (write-allocate), for the fill of caches B and A
// (fill_valid until fill_done). While the miss is pending, pend_valid/pend_line let
// the cache hold back any reference to the same line (case 5).
// Cache B is write-back: a dirty line it casts out is handed over with wb_push and
// written to L2 as one write request followed by four beats on consecutive cycles.
// The write-back buffer holds one line (wb_full while it is in use).
//
// L2 interface: l2_req_valid/ready/we/line is a request handshake. A write request
// is followed, from the next cycle, by BEATS beats on l2_w*, which L2 always takes.
// A read is answered some cycles later by BEATS beats on l2_r*, in address order.
// A write-back is always sent before a read, and a read is not sent while a
// write-back is still moving, so L2 sees them in a safe order.
// Line size, bus width and beat count follow the text; one pending miss, one
// write-back line, in-order beats and the handshake are this implementation's choices.
module miss_unit
  import splics_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // allocation on a miss
  input  logic        alloc,
  input  line_addr_t  alloc_line,
  input  logic        alloc_we,
  input  logic [WIDX_W-1:0] alloc_widx,
  input  word_t       alloc_wdata,
  input  word_be_t    alloc_be,
  input  req_id_t     alloc_id,
  output logic        busy,        // cannot take a new miss
  output logic        pend_valid,  // a miss is outstanding for pend_line
  output line_addr_t  pend_line,
  // critical word to the processor
  output rsp_t        rsp,
  input  logic        rsp_take,
  // fill of the caches
  output logic        fill_valid,
  output line_addr_t  fill_line,
  output line_t       fill_data,
  output logic        fill_dirty,
  input  logic        fill_done,
  // write-back of a dirty cast-out
  input  logic        wb_push,
  input  line_addr_t  wb_line,
  input  line_t       wb_data,
  output logic        wb_full,
  // L2 request channel
  output logic        l2_req_valid,
  input  logic        l2_req_ready,
  output logic        l2_req_we,
  output line_addr_t  l2_req_line,
  // write beats
  output logic        l2_wvalid,
  output logic [BEAT_W-1:0] l2_wdata,
  // read beats
  input  logic        l2_rvalid,
  input  logic [BEAT_W-1:0] l2_rdata
);

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WAIT, M_FILL} mstate_e;
  typedef enum logic [1:0] {W_IDLE, W_REQ, W_DATA} wstate_e;

  mstate_e     m_q;
  line_addr_t  m_line_q;
  logic        m_we_q;
  logic [WIDX_W-1:0] m_widx_q;
  word_t       m_wdata_q;
  word_be_t    m_be_q;
  req_id_t     m_id_q;
  line_t       m_buf_q;
  logic [BEAT_IDX_W-1:0] m_beat_q;
  rsp_t        rsp_q;

  wstate_e     w_q;
  line_addr_t  w_line_q;
  line_t       w_buf_q;
  logic [BEAT_IDX_W-1:0] w_beat_q;

  // beat that carries the requested word
  wire [BEAT_IDX_W-1:0] crit_beat = BEAT_IDX_W'(m_widx_q / WIDX_W'(WORDS_PER_BEAT));
  wire [$clog2(WORDS_PER_BEAT)-1:0] crit_word = m_widx_q[$clog2(WORDS_PER_BEAT)-1:0];

  assign busy       = (m_q != M_IDLE) || rsp_q.valid;
  assign pend_valid = (m_q != M_IDLE);
  assign pend_line  = m_line_q;
  assign rsp        = rsp_q;

  assign fill_valid = (m_q == M_FILL);
  assign fill_line  = m_line_q;
  assign fill_data  = m_we_q ? line_merge(m_buf_q, m_widx_q, m_wdata_q, m_be_q) : m_buf_q;
  assign fill_dirty = m_we_q;

  assign wb_full    = (w_q != W_IDLE);

  // request channel: write-back first; a read waits until the write-back is out
  logic rd_req, wr_req;
  assign wr_req       = (w_q == W_REQ);
  assign rd_req       = (m_q == M_REQ) && (w_q == W_IDLE);
  assign l2_req_valid = wr_req || rd_req;
  assign l2_req_we    = wr_req;
  assign l2_req_line  = wr_req ? w_line_q : m_line_q;

  assign l2_wvalid = (w_q == W_DATA);
  assign l2_wdata  = w_buf_q[w_beat_q*BEAT_W +: BEAT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q       <= M_IDLE;
      m_line_q  <= '0;
      m_we_q    <= 1'b0;
      m_widx_q  <= '0;
      m_wdata_q <= '0;
      m_be_q    <= '0;
      m_id_q    <= '0;
      m_buf_q   <= '0;
      m_beat_q  <= '0;
      rsp_q     <= '0;
    end else begin
      if (rsp_take) rsp_q.valid <= 1'b0;
      unique case (m_q)
        M_IDLE: if (alloc) begin
          m_q       <= M_REQ;
          m_line_q  <= alloc_line;
          m_we_q    <= alloc_we;
          m_widx_q  <= alloc_widx;
          m_wdata_q <= alloc_wdata;
          m_be_q    <= alloc_be;
          m_id_q    <= alloc_id;
          m_beat_q  <= '0;
        end
        M_REQ: if (rd_req && l2_req_ready) m_q <= M_WAIT;
        M_WAIT: if (l2_rvalid) begin
          m_buf_q[m_beat_q*BEAT_W +: BEAT_W] <= l2_rdata;
          if (m_beat_q == crit_beat) begin
            rsp_q.valid <= 1'b1;
            rsp_q.id    <= m_id_q;
            rsp_q.rdata <= m_we_q ? '0 : l2_rdata[crit_word*WORD_W +: WORD_W];
          end
          m_beat_q <= m_beat_q + 1'b1;
          if (m_beat_q == BEAT_IDX_W'(BEATS - 1)) m_q <= M_FILL;
        end
        M_FILL: if (fill_done) m_q <= M_IDLE;
        default: m_q <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q      <= W_IDLE;
      w_line_q <= '0;
      w_buf_q  <= '0;
      w_beat_q <= '0;
    end else begin
      unique case (w_q)
        W_IDLE: if (wb_push) begin
          w_q      <= W_REQ;
          w_line_q <= wb_line;
          w_buf_q  <= wb_data;
          w_beat_q <= '0;
        end
        W_REQ: if (l2_req_ready) w_q <= W_DATA;
        W_DATA: begin
          w_beat_q <= w_beat_q + 1'b1;
          if (w_beat_q == BEAT_IDX_W'(BEATS - 1)) w_q <= W_IDLE;
        end
        default: w_q <= W_IDLE;
      endcase
    end
  end

  a_alloc_idle: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !busy)
    else $error("miss_unit: allocation while busy");
  a_wb_free: assert property (@(posedge clk) disable iff (!rst_n) wb_push |-> !wb_full)
    else $error("miss_unit: write-back buffer overrun");
  a_rbeat_expected: assert property (@(posedge clk) disable iff (!rst_n) l2_rvalid |-> m_q == M_WAIT)
    else $error("miss_unit: unexpected L2 read beat");

endmodule
