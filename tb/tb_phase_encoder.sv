// tb_phase_encoder: the line must follow the input one cycle later and change at
// the rising edge while the decision is 0, and change half a cycle later (at the
// falling edge) while the decision is 1. Random bits and decisions that switch
// every few cycles; the line is sampled in both halves of every cycle.
module tb_phase_encoder;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0, decision = 1'b0;
  logic dout, sel;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0;

  always #5 clk = ~clk;

  phase_encoder dut (.clk, .rst, .din, .decision, .dout, .sel);

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
    bit d_hist[$], s_hist[$];
    bit prev_line = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      // values driven in cycle c are registered at the end of cycle c
      din = 1'($urandom);
      if (c % 5 == 0) decision = 1'($urandom);
      d_hist.push_back(din);
      s_hist.push_back(decision);
      if (c >= 1) begin
        bit exp_first, exp_second;
        exp_second = d_hist[c-1];
        exp_first  = s_hist[c-1] ? prev_line : d_hist[c-1];
        check(sel == s_hist[c-1], "sel");
        check(dout == exp_first, "first half");
        #5;
        check(dout == exp_second, "second half");
        if (exp_second != prev_line) begin
          if (s_hist[c-1]) n_late++; else n_early++;
        end
        prev_line = exp_second;
      end
      @(posedge clk); #1;
    end
    check(n_early > 0 && n_late > 0, "both phases seen");
    $display("transitions at rising edge %0d, at falling edge %0d", n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
