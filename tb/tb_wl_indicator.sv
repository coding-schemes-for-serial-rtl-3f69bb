// tb_wl_indicator: checks the word-length indicator counter.
// Two instances (reset positions WL-1 and 3) must count modulo WL from their
// reset value, with `first` at position 0 and `last` at WL-1.
module tb_wl_indicator;
  localparam int unsigned WL = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] idx_a, idx_b;
  logic first_a, last_a, first_b, last_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wl_indicator #(.WL(WL))             dut_a (.clk, .rst, .idx(idx_a), .first(first_a), .last(last_a));
  wl_indicator #(.WL(WL), .RST_IDX(3)) dut_b (.clk, .rst, .idx(idx_b), .first(first_b), .last(last_b));

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
    for (int n = 0; n < 40; n++) begin
      // n rising edges after the reset was released
      check(idx_a == 3'((WL - 1 + n) % WL), "idx_a");
      check(idx_b == 3'((3 + n) % WL), "idx_b");
      check(first_a == (idx_a == 0) && last_a == (idx_a == WL - 1), "flags_a");
      check(first_b == ((3 + n) % WL == 0) && last_b == ((3 + n) % WL == WL - 1), "flags_b");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
