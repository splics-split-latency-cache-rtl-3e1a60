// tb_data_array: random test of the line data store against a byte-array model.
//
// A 4-set, 2-way store of 16-byte lines gets random writes with random byte
// enables (including full-line writes) and is read at a random set and way every
// cycle; the read must equal the model, which is updated byte by byte. All lines
// are written in full first, since the store is not reset.
module tb_data_array;
  localparam int unsigned SETS = 4, WAYS = 2, LB = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] rd_set, wr_set;
  logic [0:0] rd_way, wr_way;
  logic [8*LB-1:0] rd_line, wr_data;
  logic [LB-1:0] wr_be;
  logic wr_en;

  data_array #(.SETS(SETS), .WAYS(WAYS), .LINE_BYTES(LB)) dut (.*);

  logic [7:0] m [SETS*WAYS][LB];
  int unsigned checks = 0, failures = 0;

  initial begin
    wr_en = 0; rd_set = 0; rd_way = 0; wr_set = 0; wr_way = 0; wr_data = '0; wr_be = '0;
    for (int n = 0; n < 3000; n++) begin
      #1;
      wr_en   = 1'b1;
      wr_set  = 2'($urandom); wr_way = 1'($urandom);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      wr_be   = (n < SETS * WAYS) ? '1 : (($urandom % 4 == 0) ? '1 : LB'($urandom));
      if (n < SETS * WAYS) begin wr_set = 2'(n / WAYS); wr_way = 1'(n % WAYS); end
      rd_set  = 2'($urandom); rd_way = 1'($urandom);
      #1;
      if (n >= SETS * WAYS) begin
        logic [8*LB-1:0] e;
        for (int b = 0; b < LB; b++) e[b*8 +: 8] = m[rd_set*WAYS + rd_way][b];
        checks++;
        if (rd_line !== e) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d/%0d got %h exp %h", rd_set, rd_way, rd_line, e);
        end
      end
      @(posedge clk);
      for (int b = 0; b < LB; b++) if (wr_be[b]) m[wr_set*WAYS + wr_way][b] = wr_data[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
