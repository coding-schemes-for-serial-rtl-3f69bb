// tb_serializer: checks the parallel-to-serial converter.
// Random words are offered whenever ld is high; the serial stream must carry
// each word MSB first in the WL cycles after its ld cycle, with ser_first on the
// first bit, and ld must recur exactly every WL cycles.
module tb_serializer;
  localparam int unsigned WL = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [WL-1:0] data_in = '0;
  logic ld, ser_bit, ser_first;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serializer #(.WL(WL)) dut (.clk, .rst, .data_in, .ld, .ser_bit, .ser_first);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [WL-1:0] cur;
    int last_ld, pos;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(ld == 1'b1, "ld right after reset");
    last_ld = 0;
    pos = -1;
    for (int c = 0; c < 400; c++) begin
      // now 1 ns after the c-th rising edge since reset release
      if (pos >= 0) begin
        check(ser_bit == cur[WL-1-pos], "serial bit");
        check(ser_first == (pos == 0), "ser_first");
        pos++;
      end
      if (ld) begin
        if (c != 0) check(c - last_ld == WL, "ld period");
        last_ld = c;
        check(pos == -1 || pos == WL, "ld at word end");
        data_in = WL'($urandom);
        if (c == 0) data_in = 8'b1111_0000;
      end
      @(posedge clk);
      if (ld) begin cur = data_in; pos = 0; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
