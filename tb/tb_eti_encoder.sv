// tb_eti_encoder: streams words bit-serially into the encoder (first bit of word
// w in cycle 1 + w*WL after reset, as the serializer delivers them) and compares
// the line in both halves of every cycle with the reference model: plain words
// aligned with the rising edge, inverted words half a cycle late. Words: the
// published examples (11110000, 10101010), all 256 values, then random ones.
module tb_eti_encoder;
  import eti_ref_pkg::*;
  localparam int WL = 8;
  localparam int T0 = 2 + WL;   // cycle in which word 0 starts on the line
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic dout, decision;
  int checks = 0, failures = 0;
  int n_enc = 0, n_plain = 0;

  always #5 clk = ~clk;

  eti_encoder #(.WL(WL)) dut (.clk, .rst, .din, .dout, .decision);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [31:0] words[$];
    word_t info[$];
    bit line[$];
    int last_cycle;
    words.push_back(32'b1111_0000);
    words.push_back(32'b1010_1010);
    for (int v = 0; v < 256; v++) words.push_back(32'(v));
    for (int r = 0; r < 300; r++) words.push_back(32'($urandom % 256));
    build_link(words, WL, WL / 2, T0, info, line);
    check(info[0].dec == 1'b0 && info[1].dec == 1'b1 && info[1].coded == 32'hFF, "examples in model");
    last_cycle = T0 + WL * words.size();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < last_cycle; c++) begin
      // cycle c after reset release; 1 ns after its rising edge
      automatic int w = (c - 1) / WL, k = (c - 1) % WL;
      din = (c >= 1 && w < words.size()) ? words[w][WL-1-k] : 1'b0;
      check(dout == line[2*c], $sformatf("line first half, cycle %0d", c));
      if (c >= T0 && (c - T0) % WL == 0) begin
        automatic int wl_idx = (c - T0) / WL;
        check(decision == info[wl_idx].dec, "decision");
        if (decision) n_enc++; else n_plain++;
      end
      #5;
      check(dout == line[2*c+1], $sformatf("line second half, cycle %0d", c));
      @(posedge clk); #1;
    end
    check(n_enc > 0 && n_plain > 0, "both kinds of word");
    $display("encoded words %0d, plain words %0d", n_enc, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
