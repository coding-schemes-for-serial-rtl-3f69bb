// tb_deserializer: random bits with `last` every WL cycles; each word must appear
// MSB first on data_out with valid for one cycle after its last bit, except the
// first SKIP words after reset.
module tb_deserializer;
  localparam int WL = 8;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0, last = 1'b0;
  logic [WL-1:0] data_out;
  logic valid;
  int checks = 0, failures = 0, n_valid = 0;

  always #5 clk = ~clk;

  deserializer #(.WL(WL), .SKIP(2)) dut (.clk, .rst, .din, .last, .data_out, .valid);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [WL-1:0] cur, done;
    int words = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 200 * WL; c++) begin
      automatic int k = c % WL;
      if (k == 0) cur = WL'($urandom);
      din  = cur[WL-1-k];
      last = (k == WL - 1);
      if (c > 0) begin
        automatic bit exp_valid = ((c - 1) % WL == WL - 1) && words > 2;
        check(valid == exp_valid, "valid");
        if (valid) begin check(data_out == done, "word"); n_valid++; end
      end
      if (k == WL - 1) begin done = cur; words++; end
      @(posedge clk); #1;
    end
    check(n_valid == 197, "number of words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
