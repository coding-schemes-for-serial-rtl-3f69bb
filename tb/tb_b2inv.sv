// tb_b2inv: exhaustive check of the bit-two inverter and of the two-bit base
// mapping 01->00, 10->11, 00->01, 11->10 when the decision bit is set.
module tb_b2inv;
  logic din, second, inv, dout;
  int checks = 0, failures = 0;

  b2inv dut (.din, .second, .inv, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pair(input logic [1:0] b, input logic d, input logic [1:0] exp, input string what);
    logic [1:0] r;
    din = b[1]; second = 1'b0; inv = d; #1 r[1] = dout;
    din = b[0]; second = 1'b1; inv = d; #1 r[0] = dout;
    check(r == exp, what);
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {din, second, inv} = 3'(v);
      #1 check(dout == (v[2] ^ (v[1] & v[0])), "truth table");
    end
    pair(2'b01, 1'b1, 2'b00, "01->00");
    pair(2'b10, 1'b1, 2'b11, "10->11");
    pair(2'b00, 1'b1, 2'b01, "00->01");
    pair(2'b11, 1'b1, 2'b10, "11->10");
    for (int v = 0; v < 4; v++) pair(2'(v), 1'b0, 2'(v), "no inversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
