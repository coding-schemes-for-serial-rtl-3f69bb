// tb_hogge_pd: drives the detector with a line that changes at random at rising
// and falling edges and checks q1 (line sampled at the rising edge), up
// (line xor q1) and down (q1 xor its falling-edge copy) in both halves of every
// cycle: up must last a whole cycle after a rising-edge change and half a cycle
// after a falling-edge change.
module tb_hogge_pd;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic q1, up, down;
  bit line[$];
  int n = 0;                // current cycle
  int checks = 0, failures = 0;
  int n_full = 0, n_half = 0;
  bit run = 1'b0;

  always #5 clk = ~clk;

  hogge_pd dut (.clk, .rst, .din, .q1, .up, .down);

  // the line behaves like a flop output on either clock edge
  always @(posedge clk) if (run) din <= line[2*n];
  always @(negedge clk) if (run) din <= line[2*n+1];

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
    bit q1_prev;
    line.push_back(1'b0); line.push_back(1'b0);
    for (int i = 1; i < 1100; i++) begin
      automatic bit h0 = 1'($urandom), h1 = 1'($urandom);
      if (i % 7 == 0) begin h0 = line[2*i-1]; h1 = line[2*i-1]; end
      line.push_back(h0); line.push_back(h1);
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    @(negedge clk); run = 1'b1;           // drive from here on
    q1_prev = 1'b0;
    for (int c = 1; c < 1000; c++) begin
      automatic bit q1_exp;
      @(posedge clk); n = c; #1;
      // cycle c, first half
      q1_exp = line[2*(c-1)+1];
      if (c >= 2) begin
        check(q1 == q1_exp, "q1");
        check(up == (line[2*c] ^ q1_exp), "up first half");
        check(down == (q1_exp ^ q1_prev), "down first half");
        if (up) n_full++;
      end
      #5;
      if (c >= 2) begin
        check(up == (line[2*c+1] ^ q1_exp), "up second half");
        check(down == 1'b0, "down second half");
        if (up && !(line[2*c] ^ q1_exp)) n_half++;
      end
      q1_prev = q1_exp;
    end
    check(n_full > 0 && n_half > 0, "both pulse widths seen");
    $display("full-cycle up pulses %0d, half-cycle up pulses %0d", n_full, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
