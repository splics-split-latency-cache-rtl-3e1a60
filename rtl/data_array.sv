// data_array: line-wide data store of one cache (cache A or cache B).
//
// SETS x WAYS lines of LINE_W bits. One read port returns a whole line
// combinationally, so the owner can forward the critical word and copy the line
// into the promotion buffer in the same cycle; the access latency of the cache is
// modelled by the response pipeline that follows, not here. One write port writes
// any subset of the line's bytes at the clock edge: a processor store writes its
// bytes only, a line fill or a promotion writes all of them.
// Both caches use the same line size (128 bytes), as the design requires for
// simple inclusion; the array organisation itself is this implementation's choice.
// Contents are not reset: a line is only read after the directory marks it valid,
// and a valid line has always been written in full first.
module data_array #(
  parameter int unsigned SETS       = 16,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 128,
  localparam int unsigned LINE_W = 8 * LINE_BYTES,
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic [SET_W-1:0]      rd_set,
  input  logic [WAY_W-1:0]      rd_way,
  output logic [LINE_W-1:0]     rd_line,
  input  logic                  wr_en,
  input  logic [SET_W-1:0]      wr_set,
  input  logic [WAY_W-1:0]      wr_way,
  input  logic [LINE_W-1:0]     wr_data,
  input  logic [LINE_BYTES-1:0] wr_be
);

  localparam int unsigned ENTRIES = SETS * WAYS;

  logic [LINE_W-1:0] mem [ENTRIES];

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  wire [IDX_W-1:0] rd_idx = IDX_W'(rd_set * WAYS + rd_way);
  wire [IDX_W-1:0] wr_idx = IDX_W'(wr_set * WAYS + wr_way);

  assign rd_line = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int b = 0; b < LINE_BYTES; b++)
        if (wr_be[b]) mem[wr_idx][b*8 +: 8] <= wr_data[b*8 +: 8];
  end

endmodule
