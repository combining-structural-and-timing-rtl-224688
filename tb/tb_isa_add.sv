// tb_isa_add: self-checking test of the path sub-adder at 8 and 16 bits,
// random and corner operands, against integer addition.
module tb_isa_add;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        ci8, co8, ci16, co16;

  isa_add #(.BLOCK(8))  u_a8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  isa_add #(.BLOCK(16)) u_a16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e8, e16;
    for (int n = 0; n < 5000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); ci8 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      if (n == 0) begin a8 = 8'hff; b8 = 8'h00; ci8 = 1'b1; a16 = 16'hffff; b16 = 16'hffff; ci16 = 1'b1; end
      #1;
      e8  = int'(a8) + int'(b8) + int'(ci8);
      e16 = int'(a16) + int'(b16) + int'(ci16);
      checks += 2;
      if ({co8, s8} !== 9'(e8)) begin
        failures++; $display("FAIL 8-bit %h+%h+%0b = %h", a8, b8, ci8, {co8, s8});
      end
      if ({co16, s16} !== 17'(e16)) begin
        failures++; $display("FAIL 16-bit %h+%h+%0b = %h", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
