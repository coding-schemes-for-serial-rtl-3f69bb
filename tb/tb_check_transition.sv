// tb_check_transition: checks the transition counter and decision bit.
// The published examples are checked first (8-bit 11110000 -> 1 transition,
// not encoded; 10101010 -> 7, encoded; 4-bit 1000 -> 1, not encoded; 1101 -> 2,
// equal to the threshold, encoded), then every word value of the 8-bit block.
// The decision of word w must be present during all WL cycles of word w+1.
module tb_check_transition;
  logic clk = 1'b0, rst = 1'b1;
  logic din8 = 1'b0, din4 = 1'b0;
  logic dec8, dec4;
  logic [3:0] nt8;
  logic [2:0] nt4;
  logic [2:0] idx8;
  logic [1:0] idx4;
  int checks = 0, failures = 0;
  int n_enc = 0, n_plain = 0;

  always #5 clk = ~clk;

  check_transition #(.WL(8)) dut8 (.clk, .rst, .din(din8), .decision(dec8), .nt(nt8), .idx(idx8));
  check_transition #(.WL(4)) dut4 (.clk, .rst, .din(din4), .decision(dec4), .nt(nt4), .idx(idx4));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int count_tr(input logic [7:0] w, input int wl);
    int n = 0;
    for (int i = 1; i < wl; i++) if (w[wl-1-i] != w[wl-i]) n++;
    return n;
  endfunction

  // words streamed back to back; index 0 is sent in cycle 1 after reset
  logic [7:0] words8[$];
  logic [3:0] words4[$];

  initial begin
    int expect8, expect4;
    words8 = '{8'b1111_0000, 8'b1010_1010};
    for (int v = 0; v < 256; v++) words8.push_back(8'(v));
    for (int r = 0; r < 2 * (words8.size()) - 2; r++) words4.push_back(4'($urandom));
    words4[0] = 4'b1000;
    words4[1] = 4'b1101;
    check(count_tr(8'b1111_0000, 8) == 1 && count_tr(8'b1010_1010, 8) == 7, "reference counts");
    check(count_tr(8'b0000_1000, 4) == 1 && count_tr(8'b0000_1101, 4) == 2, "reference counts 4");
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;                      // cycle 0
    @(posedge clk); #1;                 // cycle 1: first bit of word 0
    for (int c = 0; c < 8 * (words8.size() + 1); c++) begin
      automatic int w8 = c / 8, k8 = c % 8, w4 = c / 4, k4 = c % 4;
      din8 = (w8 < words8.size()) ? words8[w8][7-k8] : 1'b0;
      din4 = (w4 < words4.size()) ? words4[w4][3-k4] : 1'b0;
      check(idx8 == 3'(k8) && idx4 == 2'(k4), "word position");
      if (w8 >= 1) begin
        expect8 = (count_tr(words8[w8-1], 8) >= 4);
        check(dec8 == expect8[0], $sformatf("decision8 word %0d", w8 - 1));
        if (k8 == 0) begin if (dec8) n_enc++; else n_plain++; end
      end
      if (w4 >= 1 && w4 - 1 < words4.size()) begin
        expect4 = (count_tr(8'(words4[w4-1]), 4) >= 2);
        check(dec4 == expect4[0], $sformatf("decision4 word %0d", w4 - 1));
      end
      @(posedge clk); #1;
    end
    check(n_enc > 0 && n_plain > 0, "both decisions seen");
    $display("encoded words %0d, plain words %0d", n_enc, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
