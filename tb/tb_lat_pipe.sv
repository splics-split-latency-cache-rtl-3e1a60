// tb_lat_pipe: the response pipelines must delay every response by exactly their
// number of stages. Random responses (valid or not, every cycle) go into a 3-stage
// and a 1-stage pipe; each output is compared with what went in 3 (or 1) cycles
// before, and busy with whether any of those inputs was valid.
module tb_lat_pipe;
  import splics_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rsp_t in, out3, out1;
  logic busy3, busy1;

  lat_pipe #(.STAGES(3)) dut3 (.clk, .rst_n, .in, .out(out3), .busy(busy3));
  lat_pipe #(.STAGES(1)) dut1 (.clk, .rst_n, .in, .out(out1), .busy(busy1));

  rsp_t hist [$];
  int unsigned checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3; i++) hist.push_front('0);
    for (int n = 0; n < 2000; n++) begin
      #1;
      in.valid = 1'($urandom);
      in.id    = req_id_t'($urandom);
      in.rdata = {$urandom, $urandom};
      #1;
      // hist[0..2] hold the inputs of the last three cycles, newest first
      chk(out1.valid == hist[0].valid && (!out1.valid || out1 == hist[0]), "1-stage output");
      chk(out3.valid == hist[2].valid && (!out3.valid || out3 == hist[2]), "3-stage output");
      chk(busy3 == (hist[0].valid || hist[1].valid || hist[2].valid), "busy");
      chk(busy1 == hist[0].valid, "busy 1-stage");
      @(posedge clk);
      hist.push_front(in);
      void'(hist.pop_back());
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
