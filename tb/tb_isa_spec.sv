// tb_isa_spec: self-checking test of the carry speculator.
//
// Three instances: an empty window (carry is the guess), a 2-bit window with
// guess 0 (the worked example's speculation, checked exhaustively) and a
// 7-bit window with guess 1 (random). The expected carry is the carry out of
// the window computed arithmetically as (a + b + guess) >> SPEC_BITS.
module tb_isa_spec;
  int checks = 0, failures = 0;

  logic       a0, b0, c0;
  logic [1:0] a2, b2;
  logic       c2;
  logic [6:0] a7, b7;
  logic       c7;

  isa_spec #(.SPEC_BITS(0), .GUESS(1'b0)) u_s0 (.a(a0), .b(b0), .c_spec(c0));
  isa_spec #(.SPEC_BITS(2), .GUESS(1'b0)) u_s2 (.a(a2), .b(b2), .c_spec(c2));
  isa_spec #(.SPEC_BITS(7), .GUESS(1'b1)) u_s7 (.a(a7), .b(b7), .c_spec(c7));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned seen_guess7 = 0;
    for (int i = 0; i < 4; i++) begin
      {a0, b0} = 2'(i);
      #1 check(c0, 1'b0, "empty window");
    end
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a2 = 2'(x); b2 = 2'(y);
        #1 check(c2, 1'((x + y) >> 2), $sformatf("2-bit window %0d+%0d", x, y));
      end
    // P G from the worked example: generate decides the carry.
    a2 = 2'b11; b2 = 2'b01; #1 check(c2, 1'b1, "example P G");
    a2 = 2'b11; b2 = 2'b00; #1 check(c2, 1'b0, "example P P guessed 0");
    for (int n = 0; n < 5000; n++) begin
      a7 = 7'($urandom); b7 = 7'($urandom);
      if (n % 4 == 0) b7 = ~a7;  // full propagate chain: guessed carry
      #1 check(c7, 1'((int'(a7) + int'(b7) + 1) >> 7), "7-bit window guess 1");
      if ((a7 ^ b7) == 7'h7f) seen_guess7++;
    end
    checks++;
    if (seen_guess7 == 0) begin failures++; $display("FAIL no full-propagate window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
