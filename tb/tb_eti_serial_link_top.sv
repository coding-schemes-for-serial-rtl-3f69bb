// tb_eti_serial_link_top: end-to-end test of the link at its default size
// (8 parallel bits, one 8-bit serial line). A word is offered at every ld; the
// test checks the serial line in both halves of every cycle, the encoder's and
// the receiver's decision bits, and every delivered word and its latency
// (3*WL+2 cycles from ld) against the reference model. The word list starts
// with 11110000 (1 transition, sent plain) and 10101010 (7 transitions, sent
// inverted as 11111111 half a cycle late), adds runs that leave receive windows
// without transitions, then random words. Mechanisms counted (each must occur):
// plain word, encoded word, switch plain->encoded and encoded->plain on the
// line, a window without transitions whose carried-over decision is right, one
// where it is wrong (the code's known limit; the delivered word must then match
// the model), and Hogge reference pulses. Finally the transitions on the line
// are counted and compared with those of the same words serialized uncoded.
module tb_eti_serial_link_top;
  import eti_ref_pkg::*;
  localparam int WL = 8;
  localparam int NW = 1500;
  localparam int T0 = 2 + WL;            // cycle in which word 0 starts on the line
  localparam int LATENCY = 3 * WL + 2;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] data_in = '0, data_out;
  logic ld, out_valid;
  logic [0:0] line, enc_decision, pd_down, rx_decision, rx_held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eti_serial_link_top dut (
    .clk, .rst, .data_in, .ld, .line, .enc_decision, .pd_down,
    .rx_decision, .rx_held, .data_out, .out_valid
  );

  initial begin
    repeat (NW * WL + 200) @(posedge clk);
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
    bit lm[$];
    int ld_cycle[$];
    int n_in = 0, n_out = 0, last_ld = -1;
    int n_plain = 0, n_enc = 0, n_p2e = 0, n_e2p = 0, n_held_ok = 0, n_held_bad = 0, n_down = 0;
    int n_exact = 0;
    int tr_line = 0, tr_raw = 0, tr_model = 0;
    bit prev_half = 1'b0;
    words = '{32'hF0, 32'hAA, 32'hAA, 32'hAA, 32'h0F, 32'hAA, 32'hFF, 32'h00, 32'h55, 32'h55, 32'h00};
    while (words.size() < NW) words.push_back(32'($urandom % 256));
    build_link(words, WL, WL / 2, T0, info, lm);
    check(info[0].dec == 1'b0 && info[1].dec == 1'b1 && info[1].coded == 32'hFF, "published examples in model");

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c <= WL * (NW - 1) + LATENCY; c++) begin
      // 1 ns after the c-th rising edge since reset release: cycle c
      if (c < T0 + WL * NW) check(line[0] == lm[2*c], $sformatf("line cycle %0d first half", c));
      if (c >= T0 && (c - T0) % WL == 0 && (c - T0) / WL < NW) begin
        automatic int w = (c - T0) / WL;
        check(enc_decision[0] == info[w].dec, "encoder decision");
        if (info[w].dec) n_enc++; else n_plain++;
        if (w > 0 && info[w].dec && !info[w-1].dec) n_p2e++;
        if (w > 0 && !info[w].dec && info[w-1].dec) n_e2p++;
      end
      if (c >= T0 + WL && (c - T0) % WL == 0 && (c - T0) / WL - 1 < NW) begin
        automatic int w = (c - T0) / WL - 1;
        check(rx_decision[0] == info[w].rx_dec && rx_held[0] == info[w].held, "receiver decision");
        if (info[w].held && info[w].rx_dec == info[w].dec) n_held_ok++;
        else if (info[w].held) n_held_bad++;
      end
      if (pd_down[0]) n_down++;
      if (out_valid) begin
        check(n_out < n_in, "no extra output word");
        if (n_out < n_in) begin
          check(data_out == info[n_out].rx_word[7:0], $sformatf("word %0d", n_out));
          check(c - ld_cycle[n_out] == LATENCY, "latency");
          if (data_out == info[n_out].word[7:0]) n_exact++;
        end
        n_out++;
      end
      if (ld) begin
        if (last_ld >= 0) check(c - last_ld == WL, "ld period");
        last_ld = c;
        data_in = (n_in < NW) ? words[n_in][7:0] : 8'h00;
        if (n_in < NW) begin ld_cycle.push_back(c); n_in++; end
      end
      if (c >= T0 && c < T0 + WL * NW) begin
        if (line[0] != prev_half) tr_line++;
        prev_half = line[0];
      end
      #5;
      if (c < T0 + WL * NW) check(line[0] == lm[2*c+1], $sformatf("line cycle %0d second half", c));
      if (c >= T0 && c < T0 + WL * NW) begin
        if (line[0] != prev_half) tr_line++;
        prev_half = line[0];
      end
      @(posedge clk); #1;
    end
    check(n_out >= NW, "all words delivered");
    // switching activity: the same words serialized without coding, against
    // the line (both counted from a line at 0 before the first word)
    begin
      bit pb = 1'b0, pl = 1'b0;
      for (int w = 0; w < NW; w++)
        for (int k = 0; k < WL; k++) begin
          if (words[w][WL-1-k] != pb) tr_raw++;
          pb = words[w][WL-1-k];
          if (info[w].coded[WL-1-k] != pl) tr_model++;
          pl = info[w].coded[WL-1-k];
        end
    end
    check(tr_line == tr_model, "line transitions match the model");
    check(tr_line < tr_raw, "coding lowers the number of transitions");
    $display("transitions: uncoded %0d, ETI line %0d (%0d%% of uncoded)", tr_raw, tr_line, 100 * tr_line / tr_raw);
    check(n_plain > 0, "mechanism: plain word");
    check(n_enc > 0, "mechanism: encoded word");
    check(n_p2e > 0 && n_e2p > 0, "mechanism: phase switch both ways");
    check(n_held_ok > 0, "mechanism: window without transition, decision right");
    check(n_held_bad > 0, "mechanism: window without transition, decision wrong");
    check(n_down > 0, "mechanism: Hogge reference pulse");
    $display("words %0d delivered %0d exact %0d | plain %0d encoded %0d p->e %0d e->p %0d held-right %0d held-wrong %0d",
             NW, n_out, n_exact, n_plain, n_enc, n_p2e, n_e2p, n_held_ok, n_held_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
