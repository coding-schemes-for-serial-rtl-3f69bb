// tb_eti_link_sizes: the link at two other sizes.
//  * One 4-bit link (NBITS = WL = 4), threshold 2: the first words are the
//    published examples 1000 (1 transition, sent as is, changes at the rising edge) and
//    1101 (2 transitions, sent inverted as 1000 half a cycle late); the line is
//    compared with the reference model in both halves of every cycle.
//  * Two 8-bit links side by side (NBITS = 16): each half of data_in travels on
//    its own line and must come back in the same half of data_out.
// Every delivered word is compared with the model and its latency (3*WL+2).
module tb_eti_link_sizes;
  import eti_ref_pkg::*;
  localparam int NW = 600;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0]  din4 = '0, dout4;
  logic [15:0] din16 = '0, dout16;
  logic ld4, ld16, v4, v16;
  logic [0:0] line4, dec4, down4, rxd4, rxh4;
  logic [1:0] line16, dec16, down16, rxd16, rxh16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eti_serial_link_top #(.NBITS(4), .WL(4)) dut4 (
    .clk, .rst, .data_in(din4), .ld(ld4), .line(line4), .enc_decision(dec4), .pd_down(down4),
    .rx_decision(rxd4), .rx_held(rxh4), .data_out(dout4), .out_valid(v4)
  );
  eti_serial_link_top #(.NBITS(16), .WL(8)) dut16 (
    .clk, .rst, .data_in(din16), .ld(ld16), .line(line16), .enc_decision(dec16), .pd_down(down16),
    .rx_decision(rxd16), .rx_held(rxh16), .data_out(dout16), .out_valid(v16)
  );

  initial begin
    repeat (NW * 8 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [31:0] w4[$], wa[$], wb[$];
    word_t i4[$], ia[$], ib[$];
    bit l4[$], la[$], lb[$];
    int in4 = 0, out4 = 0, in16 = 0, out16 = 0, ld4_c[$], ld16_c[$];
    int n_enc4 = 0;
    w4 = '{32'b1000, 32'b1101};
    while (w4.size() < NW) w4.push_back(32'($urandom % 16));
    while (wa.size() < NW) begin wa.push_back(32'($urandom % 256)); wb.push_back(32'($urandom % 256)); end
    build_link(w4, 4, 2, 2 + 4, i4, l4);
    build_link(wa, 8, 4, 2 + 8, ia, la);
    build_link(wb, 8, 4, 2 + 8, ib, lb);
    check(i4[0].dec == 1'b0 && i4[1].dec == 1'b1 && i4[1].coded == 32'b1000, "published examples in model");

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c <= 8 * (NW - 1) + 26; c++) begin
      if (c < 6 + 4 * NW) check(line4[0] == l4[2*c], "4-bit line first half");
      if (c < 10 + 8 * NW) check(line16 == {la[2*c], lb[2*c]}, "16-bit lines first half");
      if (c >= 6 && (c - 6) % 4 == 0 && (c - 6) / 4 < NW) if (dec4[0]) n_enc4++;
      if (v4 && out4 < in4) begin
        check(dout4 == i4[out4].rx_word[3:0], $sformatf("4-bit word %0d", out4));
        check(c - ld4_c[out4] == 14, "4-bit latency");
        out4++;
      end
      if (v16 && out16 < in16) begin
        check(dout16 == {ia[out16].rx_word[7:0], ib[out16].rx_word[7:0]}, $sformatf("16-bit word %0d", out16));
        check(c - ld16_c[out16] == 26, "16-bit latency");
        out16++;
      end
      if (ld4) begin
        din4 = (in4 < NW) ? w4[in4][3:0] : 4'h0;
        if (in4 < NW) begin ld4_c.push_back(c); in4++; end
      end
      if (ld16) begin
        din16 = (in16 < NW) ? {wa[in16][7:0], wb[in16][7:0]} : 16'h0;
        if (in16 < NW) begin ld16_c.push_back(c); in16++; end
      end
      #5;
      if (c < 6 + 4 * NW) check(line4[0] == l4[2*c+1], "4-bit line second half");
      if (c < 10 + 8 * NW) check(line16 == {la[2*c+1], lb[2*c+1]}, "16-bit lines second half");
      @(posedge clk); #1;
    end
    check(out4 == NW && out16 == NW, "all words delivered");
    check(n_enc4 > 0, "4-bit encoded words");
    $display("4-bit: %0d words, %0d encoded; 16-bit: %0d words", out4, n_enc4, out16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
