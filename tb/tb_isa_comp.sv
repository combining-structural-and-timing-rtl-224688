// tb_isa_comp: self-checking test of the compensation block.
//
// Instances: (CORR 1, RED 1) as in the worked example, (CORR 0, RED 4) as in
// the reference configuration and (CORR 2, RED 3). All input combinations of
// the first two and random ones of the third are compared with an
// independently written expectation: the value of the corrected field must
// differ from the input by exactly the lost carry when that is representable,
// otherwise the preceding MSBs must saturate towards the lost carry.
module tb_isa_comp;
  int checks = 0, failures = 0;
  int n_corr = 0, n_bal = 0, n_fault = 0;

  // CORR 1, RED 1
  logic       s1, p1, f1, c1, b1;
  logic [0:0] l1, m1, lo1, mo1;
  // CORR 0, RED 4
  logic       s2, p2, f2, c2, b2;
  logic [0:0] l2, lo2;
  logic [3:0] m2, mo2;
  // CORR 2, RED 3
  logic       s3, p3, f3, c3, b3;
  logic [1:0] l3, lo3;
  logic [2:0] m3, mo3;

  isa_comp #(.CORR(1), .RED(1)) u_c1 (.c_spec(s1), .c_prev(p1), .local_lsb(l1), .prev_msb(m1),
    .local_lsb_o(lo1), .prev_msb_o(mo1), .fault(f1), .corrected(c1), .balanced(b1));
  isa_comp #(.CORR(0), .RED(4)) u_c2 (.c_spec(s2), .c_prev(p2), .local_lsb(l2), .prev_msb(m2),
    .local_lsb_o(lo2), .prev_msb_o(mo2), .fault(f2), .corrected(c2), .balanced(b2));
  isa_comp #(.CORR(2), .RED(3)) u_c3 (.c_spec(s3), .c_prev(p3), .local_lsb(l3), .prev_msb(m3),
    .local_lsb_o(lo3), .prev_msb_o(mo3), .fault(f3), .corrected(c3), .balanced(b3));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected behaviour for corr bits C and red bits R.
  task automatic expect_comp(input int C, input int R, input bit spec, input bit prev,
                             input int lsb, input int msb,
                             output int e_lsb, output int e_msb, output bit e_f,
                             output bit e_c, output bit e_b);
    int delta;
    delta = int'(prev) - int'(spec);  // what the local sum lacks, in LSB units
    e_f = (delta != 0);
    e_lsb = lsb; e_msb = msb; e_c = 0; e_b = 0;
    if (e_f && C > 0 && lsb + delta >= 0 && lsb + delta < (1 << C)) begin
      e_lsb = lsb + delta; e_c = 1;
    end else if (e_f && R > 0) begin
      e_msb = (delta > 0) ? (1 << R) - 1 : 0; e_b = 1;
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
    int el, em; bit ef, ec, eb;
    // Example configuration, exhaustive.
    for (int v = 0; v < 16; v++) begin
      {s1, p1, l1, m1} = 4'(v);
      #1 expect_comp(1, 1, s1, p1, int'(l1), int'(m1), el, em, ef, ec, eb);
      chk(int'(lo1), el, "c1 lsb"); chk(int'(mo1), em, "c1 msb");
      chk(int'(f1), int'(ef), "c1 fault"); chk(int'(c1), int'(ec), "c1 corr");
      chk(int'(b1), int'(eb), "c1 bal");
    end
    // Worked example: fault, LSB 0 -> corrected to 1; LSB 1 -> preceding MSB set.
    s1 = 0; p1 = 1; l1 = 0; m1 = 0;
    #1 chk(int'(lo1), 1, "example correcting"); chk(int'(mo1), 0, "example correcting msb");
    l1 = 1;
    #1 chk(int'(lo1), 1, "example balancing lsb"); chk(int'(mo1), 1, "example balancing");
    // Reference configuration, exhaustive.
    for (int v = 0; v < 128; v++) begin
      {s2, p2, l2, m2} = 7'(v);
      #1 expect_comp(0, 4, s2, p2, int'(l2), int'(m2), el, em, ef, ec, eb);
      chk(int'(lo2), int'(l2), "c2 lsb passes"); chk(int'(mo2), em, "c2 msb");
      chk(int'(f2), int'(ef), "c2 fault"); chk(int'(c2), int'(ec), "c2 corr");
      chk(int'(b2), int'(eb), "c2 bal");
    end
    // CORR 2 / RED 3, random.
    for (int n = 0; n < 2000; n++) begin
      {s3, p3, l3, m3} = 7'($urandom);
      #1 expect_comp(2, 3, s3, p3, int'(l3), int'(m3), el, em, ef, ec, eb);
      chk(int'(lo3), el, "c3 lsb"); chk(int'(mo3), em, "c3 msb");
      chk(int'(f3), int'(ef), "c3 fault"); chk(int'(c3), int'(ec), "c3 corr");
      chk(int'(b3), int'(eb), "c3 bal");
      n_fault += int'(ef); n_corr += int'(ec); n_bal += int'(eb);
    end
    checks++;
    if (n_fault == 0 || n_corr == 0 || n_bal == 0) begin
      failures++; $display("FAIL coverage faults=%0d corr=%0d bal=%0d", n_fault, n_corr, n_bal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
