// tb_isa_top_full: the clocked adder with every parameter at its default
// (32 bits, ISA (8,0,0,4)), fed one random operand pair per cycle for
// N_OPS cycles. Each result must equal the arithmetic reference model and
// arrive right after the edge following the one that sampled its operands.
module tb_isa_top_full;
  import tb_isa_ref_pkg::*;

  localparam int N_OPS = 20000;

  int checks = 0, failures = 0, n_out = 0, n_inexact = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, cin = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        out_valid, cout;
  logic [31:0] sum;
  logic [3:0]  fault, corrected, balanced;

  always #5 clk = ~clk;

  isa_top u_dut (.clk, .rst_n, .in_valid, .a, .b, .cin,
                 .out_valid, .sum, .cout, .fault, .corrected, .balanced);

  typedef struct { logic [31:0] a, b; logic cin; } op_t;
  op_t sampled, pending;
  bit  s_v = 0, p_v = 0;

  initial begin : watchdog
    repeat (N_OPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One-deep model of the register pipeline.
  always @(posedge clk) begin
    pending = sampled; p_v = s_v;
    sampled = '{a, b, cin}; s_v = rst_n && in_valid;
    #1;
    checks++;
    if (out_valid !== p_v) begin
      failures++; $display("FAIL out_valid %0b expected %0b", out_valid, p_v);
    end else if (p_v) begin
      isa_ref_t r;
      r = isa_ref(64'(pending.a), 64'(pending.b), pending.cin, 32, 8, 0, 0, 4, 1'b0);
      checks++;
      n_out++;
      if (64'({cout, sum}) != r.value) begin
        failures++;
        if (failures < 20) $display("FAIL %h+%h: got %h expected %h", pending.a, pending.b, {cout, sum}, r.value);
      end
      if (r.value != 64'(pending.a) + 64'(pending.b) + 64'(pending.cin)) n_inexact++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_OPS; n++) begin
      @(negedge clk);
      in_valid = 1'b1; a = $urandom; b = $urandom; cin = 1'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != N_OPS || n_inexact == 0) begin
      failures++; $display("FAIL delivered %0d of %0d, inexact %0d", n_out, N_OPS, n_inexact);
    end
    $display("results=%0d inexact=%0d", n_out, n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
