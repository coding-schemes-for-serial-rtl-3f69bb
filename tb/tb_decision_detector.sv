// tb_decision_detector: drives the detector's `up` input the way a Hogge
// detector produces it (high for a whole cycle after a change at the rising
// edge, for the second half only after a change at the falling edge) over
// windows of WL cycles. Windows are plain, encoded, without any transition, or
// (rarely) mixed. After each window the decision, held and conflict outputs are
// compared with the rule: any late pulse -> encoded; only full pulses -> plain;
// none -> keep the previous decision.
module tb_decision_detector;
  localparam int WL = 8;
  logic clk = 1'b0, rst = 1'b1, up = 1'b0, last = 1'b0;
  logic decision, held, conflict;
  int checks = 0, failures = 0;
  int n_plain = 0, n_enc = 0, n_held = 0, n_conf = 0;
  bit up_h[$];      // up per half cycle, index 2*cycle+half
  bit last_c[$];
  int n = 0;
  bit run = 1'b0;

  always #5 clk = ~clk;

  decision_detector dut (.clk, .rst, .up, .last, .decision, .held, .conflict);

  // n counts cycles; it advances at the falling edge, ready for the next cycle
  always @(posedge clk) if (run) begin up <= up_h[2*n]; last <= last_c[n]; end
  always @(negedge clk) if (run) begin up <= up_h[2*n+1]; n <= n + 1; end

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

  initial begin
    localparam int NW = 400;
    bit exp_dec[NW], exp_held[NW], exp_conf[NW];
    bit prev_dec = 1'b0;
    for (int w = 0; w < NW; w++) begin
      automatic int mode = $urandom % 10;   // 0-3 plain, 4-7 encoded, 8 none, 9 mixed
      automatic bit early = 1'b0, late = 1'b0;
      for (int k = 0; k < WL; k++) begin
        automatic int kind = ($urandom % 3 == 0) ? 0 : 1;  // 0 none, 1 transition
        automatic bit h0 = 1'b0, h1 = 1'b0;
        if (mode == 8) kind = 0;
        if (kind == 1) begin
          automatic bit is_late = (mode >= 4 && mode <= 7) || (mode == 9 && k % 2 == 1);
          if (is_late) begin h1 = 1'b1; late = 1'b1; end
          else begin h0 = 1'b1; h1 = 1'b1; early = 1'b1; end
        end
        up_h.push_back(h0); up_h.push_back(h1);
        last_c.push_back(k == WL - 1);
      end
      exp_held[w] = !(early || late);
      exp_conf[w] = early && late;
      exp_dec[w]  = exp_held[w] ? prev_dec : late;
      prev_dec    = exp_dec[w];
    end
    for (int i = 0; i < 2 * WL; i++) begin up_h.push_back(1'b0); last_c.push_back(1'b0); end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // cycle 0 is driven here, the following cycles by the two drivers above
    up = up_h[0]; last = last_c[0]; n = 0; run = 1'b1;
    for (int c = 1; c <= NW * WL; c++) begin
      @(posedge clk); #1;
      // cycle c: its window started at cycle c - (c % WL)
      if (c % WL == 0) begin
        automatic int w = c / WL - 1;   // window that just ended
        check(decision == exp_dec[w], $sformatf("decision window %0d", w));
        check(held == exp_held[w], "held");
        check(conflict == exp_conf[w], "conflict");
        if (exp_held[w]) n_held++;
        else if (exp_conf[w]) n_conf++;
        else if (exp_dec[w]) n_enc++;
        else n_plain++;
      end
    end
    check(n_plain > 0 && n_enc > 0 && n_held > 0 && n_conf > 0, "every case seen");
    $display("plain %0d encoded %0d held %0d mixed %0d", n_plain, n_enc, n_held, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
