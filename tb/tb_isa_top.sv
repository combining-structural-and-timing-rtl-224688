// tb_isa_top: end-to-end test of the clocked inexact speculative adder.
//
// Streams random operand pairs, with idle cycles mixed in, through three
// copies of the clocked adder: the default (8,0,0,4), (16,2,1,6) and
// (8,2,2,4) with a speculation guess of 1. Each result is compared with the
// arithmetic reference model and must appear right after the clock edge
// that follows the one at which its operands were sampled. The run counts how often each mechanism
// happened: speculation fault, upward and downward correction, upward and
// downward balancing, exact and inexact result, idle cycle, back-to-back
// results, reset; a mechanism that never happens is a failure.
module tb_isa_top;
  import tb_isa_ref_pkg::*;

  localparam int N_OPS = 4000;

  int checks = 0, failures = 0;
  int n_fault = 0, n_cu = 0, n_cd = 0, n_bu = 0, n_bd = 0;
  int n_exact = 0, n_inexact = 0, n_idle = 0, n_b2b = 0, n_out = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid;
  logic [31:0] a, b;
  logic        cin;

  logic        v0, v1, v2;
  logic [31:0] s0, s1, s2;
  logic        co0, co1, co2;
  logic [3:0]  f0, c0, b0, f2, c2, b2;
  logic [1:0]  f1, c1, b1;

  always #5 clk = ~clk;

  isa_top u_dut (.clk, .rst_n, .in_valid, .a, .b, .cin,
                 .out_valid(v0), .sum(s0), .cout(co0), .fault(f0), .corrected(c0), .balanced(b0));
  isa_top #(.BLOCK(16), .SPEC(2), .CORR(1), .RED(6)) u_hi (.clk, .rst_n, .in_valid, .a, .b, .cin,
                 .out_valid(v1), .sum(s1), .cout(co1), .fault(f1), .corrected(c1), .balanced(b1));
  isa_top #(.BLOCK(8), .SPEC(2), .CORR(2), .RED(4), .GUESS(1'b1)) u_g1 (.clk, .rst_n, .in_valid,
                 .a, .b, .cin,
                 .out_valid(v2), .sum(s2), .cout(co2), .fault(f2), .corrected(c2), .balanced(b2));

  // Operands sampled at each edge, kept with their cycle number.
  typedef struct { int cyc; logic [31:0] a, b; logic cin; } op_t;
  op_t q[$];
  int  cyc = 0;
  int  last_out_cyc = -10;

  task automatic chk(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d: got %h expected %h", what, cyc, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (N_OPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: runs on every edge, after the design's registers update.
  always @(posedge clk) begin
    cyc++;  // number of this rising edge
    if (rst_n && in_valid) q.push_back('{cyc, a, b, cin});
    #1;
    if (rst_n) begin
      if (v0 !== v1 || v0 !== v2) begin checks++; failures++; $display("FAIL valid mismatch"); end
      if (v0) begin
        op_t o;
        isa_ref_t r;
        longint unsigned exact;
        checks++;
        if (q.size() == 0) begin
          failures++; $display("FAIL result with no operands @%0d", cyc);
        end else begin
          o = q.pop_front();
          chk(longint'(cyc - o.cyc), 1, "latency: result one edge after sampling");
          exact = 64'(o.a) + 64'(o.b) + 64'(o.cin);
          r = isa_ref(o.a, o.b, o.cin, 32, 8, 0, 0, 4, 1'b0);
          chk({co0, s0}, r.value, "(8,0,0,4) sum");
          chk(longint'($countones(f0)), longint'(r.faults), "(8,0,0,4) faults");
          chk(longint'($countones(b0)), longint'(r.bal_up + r.bal_down), "(8,0,0,4) balancing");
          n_fault += r.faults; n_bu += r.bal_up;
          if (r.value == exact) n_exact++; else n_inexact++;
          r = isa_ref(o.a, o.b, o.cin, 32, 16, 2, 1, 6, 1'b0);
          chk({co1, s1}, r.value, "(16,2,1,6) sum");
          chk(longint'($countones(c1)), longint'(r.corr_up + r.corr_down), "(16,2,1,6) corrections");
          n_cu += r.corr_up;
          r = isa_ref(o.a, o.b, o.cin, 32, 8, 2, 2, 4, 1'b1);
          chk({co2, s2}, r.value, "(8,2,2,4,g1) sum");
          chk(longint'($countones(c2)), longint'(r.corr_up + r.corr_down), "(8,2,2,4,g1) corrections");
          n_cd += r.corr_down; n_bd += r.bal_down;
          if (last_out_cyc == cyc - 1) n_b2b++;
          last_out_cyc = cyc;
          n_out++;
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(negedge clk);
    // Outputs must be cleared by reset.
    checks++;
    if (v0 || s0 != 0 || co0) begin failures++; $display("FAIL outputs not reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < N_OPS; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0; n_idle++;
        a = $urandom; b = $urandom;
        n--;
        continue;
      end
      in_valid = 1'b1;
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 16 == 3) b = ~a;
      if (n % 16 == 5) b = 32'h0101_0100 - (a & 32'h00ff_ffff);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
    chk(longint'(n_out), longint'(N_OPS), "results delivered");
    chk(longint'(q.size()), 0, "no result left behind");
    $display("coverage: faults=%0d corr_up=%0d corr_down=%0d bal_up=%0d bal_down=%0d exact=%0d inexact=%0d idle=%0d back_to_back=%0d",
             n_fault, n_cu, n_cd, n_bu, n_bd, n_exact, n_inexact, n_idle, n_b2b);
    checks++;
    if (n_fault == 0 || n_cu == 0 || n_cd == 0 || n_bu == 0 || n_bd == 0 || n_exact == 0 ||
        n_inexact == 0 || n_idle == 0 || n_b2b == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
