// tb_isa_adder: self-checking test of the complete inexact speculative adder.
//
// Instances:
//  * u_ref  - defaults: 32 bits, ISA (8,0,0,4);
//  * u_ex   - the 16-bit worked example: 4-bit paths, 2-bit speculation,
//             1-bit correction, 1-bit reduction;
//  * u_hi   - ISA (16,2,1,6), speculation window and correction;
//  * u_g1   - (8,2,2,4) with a speculation guess of 1 (decrementing faults);
//  * u_ex32 - one 32-bit path, which must be an exact adder.
// Every output is compared with the arithmetic model of tb_isa_ref_pkg, and
// with plain addition for the exact instance. The worked example is checked
// against its printed result: 0x1DFF + 0x8522 gives 0x0A319 (exact 0x0A321).
module tb_isa_adder;
  import tb_isa_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_fault = 0, n_cu = 0, n_cd = 0, n_bu = 0, n_bd = 0;

  logic [31:0] a, b;
  logic        cin;
  logic [15:0] a16, b16;
  logic        cin16;

  logic [31:0] s_ref, s_hi, s_g1, s_x;
  logic [15:0] s_ex;
  logic        co_ref, co_hi, co_g1, co_x, co_ex;
  logic [3:0]  f_ref, c_ref, b_ref, f_ex, c_ex, b_ex, f_g1, c_g1, b_g1;
  logic [1:0]  f_hi, c_hi, b_hi;
  logic [0:0]  f_x, c_x, b_x;

  isa_adder u_ref (.a(a), .b(b), .cin(cin), .sum(s_ref), .cout(co_ref),
                   .fault(f_ref), .corrected(c_ref), .balanced(b_ref));
  isa_adder #(.WIDTH(16), .BLOCK(4), .SPEC(2), .CORR(1), .RED(1)) u_ex (
    .a(a16), .b(b16), .cin(cin16), .sum(s_ex), .cout(co_ex),
    .fault(f_ex), .corrected(c_ex), .balanced(b_ex));
  isa_adder #(.BLOCK(16), .SPEC(2), .CORR(1), .RED(6)) u_hi (
    .a(a), .b(b), .cin(cin), .sum(s_hi), .cout(co_hi),
    .fault(f_hi), .corrected(c_hi), .balanced(b_hi));
  isa_adder #(.BLOCK(8), .SPEC(2), .CORR(2), .RED(4), .GUESS(1'b1)) u_g1 (
    .a(a), .b(b), .cin(cin), .sum(s_g1), .cout(co_g1),
    .fault(f_g1), .corrected(c_g1), .balanced(b_g1));
  isa_adder #(.BLOCK(32), .SPEC(0), .CORR(0), .RED(0)) u_ex32 (
    .a(a), .b(b), .cin(cin), .sum(s_x), .cout(co_x),
    .fault(f_x), .corrected(c_x), .balanced(b_x));

  task automatic chk(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (a=%h b=%h cin=%0b)", what, got, exp, a, b, cin);
    end
  endtask

  task automatic chk_flags(input isa_ref_t r, input int nf, input int nc, input int nb, input string what);
    chk(longint'(nf), longint'(r.faults), {what, " faults"});
    chk(longint'(nc), longint'(r.corr_up + r.corr_down), {what, " corrections"});
    chk(longint'(nb), longint'(r.bal_up + r.bal_down), {what, " balancings"});
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_ref_t r;
    // Worked example.
    a16 = 16'h1DFF; b16 = 16'h8522; cin16 = 1'b0;
    a = '0; b = '0; cin = 1'b0;
    #1;
    chk({co_ex, s_ex}, 17'h0A319, "worked example");
    chk(f_ex, 4'b0110, "worked example faults");
    chk(c_ex, 4'b0100, "worked example correction");
    chk(b_ex, 4'b0010, "worked example balancing");

    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      if (n % 8 == 1) b = ~a;                       // long propagate chains
      if (n % 8 == 2) b = 32'h0000_0100 - a[7:0];   // carry out of path 0 only
      #1;
      r = isa_ref(a, b, cin, 32, 8, 0, 0, 4, 1'b0);
      chk({co_ref, s_ref}, r.value, "(8,0,0,4)");
      chk_flags(r, $countones(f_ref), $countones(c_ref), $countones(b_ref), "(8,0,0,4)");
      n_fault += r.faults; n_bu += r.bal_up;
      r = isa_ref(a, b, cin, 32, 16, 2, 1, 6, 1'b0);
      chk({co_hi, s_hi}, r.value, "(16,2,1,6)");
      chk_flags(r, $countones(f_hi), $countones(c_hi), $countones(b_hi), "(16,2,1,6)");
      n_cu += r.corr_up;
      r = isa_ref(a, b, cin, 32, 8, 2, 2, 4, 1'b1);
      chk({co_g1, s_g1}, r.value, "(8,2,2,4) guess 1");
      chk_flags(r, $countones(f_g1), $countones(c_g1), $countones(b_g1), "(8,2,2,4) guess 1");
      n_cd += r.corr_down; n_bd += r.bal_down;
      r = isa_ref(64'(a16), 64'(b16), cin16, 16, 4, 2, 1, 1, 1'b0);
      chk({co_ex, s_ex}, r.value, "(4,2,1,1) 16-bit");
      chk({co_x, s_x}, 64'(a) + 64'(b) + 64'(cin), "exact");
      chk(f_x, 0, "exact has no faults");
    end
    $display("coverage: faults=%0d corr_up=%0d corr_down=%0d bal_up=%0d bal_down=%0d",
             n_fault, n_cu, n_cd, n_bu, n_bd);
    checks++;
    if (n_fault == 0 || n_cu == 0 || n_cd == 0 || n_bu == 0 || n_bd == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
