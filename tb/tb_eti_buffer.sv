// tb_eti_buffer: a random bit stream must come out of the buffer exactly DEPTH
// cycles later, for the encoder depth (8) and the decoder depth (7).
module tb_eti_buffer;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic dout8, dout7;
  logic hist[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eti_buffer #(.DEPTH(8)) dut8 (.clk, .rst, .din, .dout(dout8));
  eti_buffer #(.DEPTH(7)) dut7 (.clk, .rst, .din, .dout(dout7));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 500; c++) begin
      // hist[c] is the bit driven in cycle c
      din = 1'($urandom);
      hist.push_back(din);
      check(dout8 == ((c >= 8) ? hist[c-8] : 1'b0), "depth 8");
      check(dout7 == ((c >= 7) ? hist[c-7] : 1'b0), "depth 7");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
