// lat_pipe: fixed-latency response pipeline.
//
// A response entered in cycle t leaves in cycle t+STAGES. The split latency cache
// uses one with STAGES = 1 for cache A, whose hits reach the processor in one
// cycle, and one with STAGES = the latency of cache B (3 by default; 5 is the
// other latency studied) for hits served by cache B. One response can enter per
// cycle and nothing can stall the pipe, so the owner must be able to accept one
// response per cycle at the output. busy tells whether any stage holds a response.
// Valid bits are reset; the payload of an empty stage is don't-care.
module lat_pipe
  import splics_pkg::*;
#(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  rsp_t in,
  output rsp_t out,
  output logic busy
);

  rsp_t st [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) st[i] <= '0;
    end else begin
      st[0] <= in;
      for (int i = 1; i < STAGES; i++) st[i] <= st[i-1];
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < STAGES; i++) busy |= st[i].valid;
  end

  assign out = st[STAGES-1];

  initial assert (STAGES >= 1) else $error("lat_pipe: STAGES must be at least 1");

endmodule
