// tb_eti_decoder: feeds the decoder a line built by the reference model (plain
// words changing at the rising edge, encoded words half a cycle late) and checks
// the decoded bit stream, the last-bit flag and the recovered decision of every
// word. Besides random words it sends runs that leave windows without any
// transition: repeated 10101010 (encoded as 11111111, decision carried over
// correctly) and a constant word after an encoded one (decision carried over
// wrongly, the documented limit of the code), and checks both against the model.
module tb_eti_decoder;
  import eti_ref_pkg::*;
  localparam int WL = 8;
  localparam int T0 = 2 + WL;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic dout, dout_last, decision, held, conflict, pd_down;
  bit line[$];
  int n = 0;
  bit run = 1'b0;
  int checks = 0, failures = 0;
  int n_plain = 0, n_enc = 0, n_held_ok = 0, n_held_bad = 0;

  always #5 clk = ~clk;

  eti_decoder #(.WL(WL)) dut (.clk, .rst, .din, .dout, .dout_last, .decision, .held, .conflict, .pd_down);

  always @(posedge clk) if (run) din <= line[2*n];
  always @(negedge clk) if (run) begin din <= line[2*n+1]; n <= n + 1; end

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
    int end_cycle;
    words = '{32'hAA, 32'hAA, 32'hAA, 32'h0F, 32'hAA, 32'hFF, 32'h00, 32'h55, 32'h55, 32'h00, 32'hF0};
    for (int r = 0; r < 600; r++) words.push_back(32'($urandom % 256));
    build_link(words, WL, WL / 2, T0, info, line);
    end_cycle = T0 + WL * (words.size() + 1);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    din = line[0]; n = 0; run = 1'b1;
    for (int c = 1; c < end_cycle; c++) begin
      @(posedge clk); #1;
      // decoded bit k of word w leaves in cycle T0 + (w + 1) * WL + k
      if (c >= T0 + WL) begin
        automatic int w = (c - T0 - WL) / WL, k = (c - T0 - WL) % WL;
        check(dout == info[w].rx_word[WL-1-k], $sformatf("bit %0d of word %0d", k, w));
        check(dout_last == (k == WL - 1), "last flag");
        check(conflict == 1'b0, "no conflict");
        if (k == 0) begin
          check(decision == info[w].rx_dec && held == info[w].held, "decision");
          if (info[w].held && info[w].rx_dec == info[w].dec) n_held_ok++;
          else if (info[w].held) n_held_bad++;
          else if (info[w].dec) n_enc++;
          else n_plain++;
        end
      end
    end
    check(n_plain > 0 && n_enc > 0 && n_held_ok > 0 && n_held_bad > 0, "every case seen");
    $display("plain %0d encoded %0d carried-over right %0d carried-over wrong %0d",
             n_plain, n_enc, n_held_ok, n_held_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
