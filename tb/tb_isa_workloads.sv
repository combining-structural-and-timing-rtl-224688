// tb_isa_workloads: structural-error characterisation of the eleven 32-bit
// ISA configurations of isa_pkg::ISA_CONFIGS and of an exact 32-bit adder.
//
// All twelve adders get the same uniformly random unsigned operands (carry-in
// 0). For each, the output ("golden" value, structural errors only) is
// checked against the arithmetic reference model, and the signed structural
// relative error RE = (gold - exact) / exact is accumulated to report its
// RMS in percent, its error rate and its mean, as in the characterisation of
// the design. Checks beyond equality with the model: the exact adder has no
// error; (16,7,0,8) is more accurate than (8,0,0,0); the errors of a design
// without correction are never positive (a lost carry is only partly
// restored by the balancing bits). For (8,0,0,4), which has no correction,
// the output may differ from the carry-less per-path sums only in the 4-bit
// balancing fields (bits 4-7, 12-15, 20-23); how often each bit is changed
// there is printed as the bit-level distribution of structural errors.
module tb_isa_workloads;
  import isa_pkg::*;
  import tb_isa_ref_pkg::*;

  localparam int N_SAMPLES = 10_000_000;
  localparam int NC = ISA_NUM_CONFIGS;

  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [32:0] gold [NC + 1];

  for (genvar g = 0; g < NC; g++) begin : g_isa
    localparam int unsigned NBG = ISA_WIDTH / ISA_CONFIGS[g].block;
    logic [NBG-1:0] f, c, bl;
    isa_adder #(
      .WIDTH(ISA_WIDTH), .BLOCK(ISA_CONFIGS[g].block), .SPEC(ISA_CONFIGS[g].spec),
      .CORR(ISA_CONFIGS[g].corr), .RED(ISA_CONFIGS[g].red)
    ) u_isa (
      .a, .b, .cin(1'b0), .sum(gold[g][31:0]), .cout(gold[g][32]),
      .fault(f), .corrected(c), .balanced(bl)
    );
  end

  // Exact adder: one path spanning the full width.
  logic [0:0] xf, xc, xb;
  isa_adder #(.WIDTH(ISA_WIDTH), .BLOCK(ISA_WIDTH), .SPEC(0), .CORR(0), .RED(0)) u_exact (
    .a, .b, .cin(1'b0), .sum(gold[NC][31:0]), .cout(gold[NC][32]),
    .fault(xf), .corrected(xc), .balanced(xb));

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    sq   [NC + 1];
    real    sm   [NC + 1];
    int     nerr [NC + 1];
    int     npos [NC + 1];
    real    rms  [NC + 1];
    int     model_fail [NC + 1];
    longint unsigned diamond;
    real    re;
    isa_ref_t r;
    int     bal_hits [32];
    int     outside = 0;
    logic [32:0] split;
    for (int i = 0; i < 32; i++) bal_hits[i] = 0;
    for (int k = 0; k <= NC; k++) begin
      sq[k] = 0.0; sm[k] = 0.0; nerr[k] = 0; npos[k] = 0; model_fail[k] = 0;
    end
    for (int n = 0; n < N_SAMPLES; n++) begin
      a = $urandom; b = $urandom;
      if (a == 0 && b == 0) a = 1;  // relative error needs a non-zero exact sum
      #1;
      diamond = 64'(a) + 64'(b);
      // Per-path sums with no carry between 8-bit paths: (8,0,0,4) before balancing.
      for (int p = 0; p < 4; p++) split[p*8 +: 8] = a[p*8 +: 8] + b[p*8 +: 8];
      split[32] = ((33'(a[31:24]) + 33'(b[31:24])) >> 8) != 0;
      for (int i = 0; i < 32; i++) if (gold[2][i] != split[i]) bal_hits[i]++;
      if (((gold[2] ^ split) & ~33'h0_00F0_F0F0) != 0) outside++;
      for (int k = 0; k <= NC; k++) begin
        if (k < NC) begin
          r = isa_ref(64'(a), 64'(b), 1'b0, int'(ISA_WIDTH), int'(ISA_CONFIGS[k].block),
                      int'(ISA_CONFIGS[k].spec), int'(ISA_CONFIGS[k].corr),
                      int'(ISA_CONFIGS[k].red), 1'b0);
        end else begin
          r.value = diamond;
        end
        if (64'(gold[k]) != r.value) model_fail[k]++;
        if (64'(gold[k]) != diamond) begin
          nerr[k]++;
          re = (real'(64'(gold[k])) - real'(diamond)) / real'(diamond);
          if (re > 0.0) npos[k]++;
          sq[k] += re * re;
          sm[k] += re;
        end
      end
    end
    $display("config            RE_struct RMS [%%]   error rate   mean RE");
    for (int k = 0; k <= NC; k++) begin
      rms[k] = $sqrt(sq[k] / N_SAMPLES) * 100.0;
      if (k < NC)
        $display("(%0d,%0d,%0d,%0d)%s %e   %f   %e", ISA_CONFIGS[k].block, ISA_CONFIGS[k].spec,
                 ISA_CONFIGS[k].corr, ISA_CONFIGS[k].red,
                 (ISA_CONFIGS[k].block < 10) ? "        " : "       ",
                 rms[k], real'(nerr[k]) / N_SAMPLES, sm[k] / N_SAMPLES);
      else
        $display("exact              %e   %f   %e", rms[k], real'(nerr[k]) / N_SAMPLES, sm[k] / N_SAMPLES);
      checks++;
      if (model_fail[k] != 0) begin
        failures++; $display("FAIL config %0d differs from the model %0d times", k, model_fail[k]);
      end
      if (k < NC && ISA_CONFIGS[k].corr == 0) begin
        checks++;
        if (npos[k] != 0) begin failures++; $display("FAIL config %0d positive errors", k); end
      end
    end
    $display("(8,0,0,4) rate at which balancing changed each bit, bit 0 first:");
    for (int i = 0; i < 32; i += 8)
      $display("  bits %2d-%2d: %f %f %f %f %f %f %f %f", i, i + 7,
               real'(bal_hits[i]) / N_SAMPLES, real'(bal_hits[i+1]) / N_SAMPLES,
               real'(bal_hits[i+2]) / N_SAMPLES, real'(bal_hits[i+3]) / N_SAMPLES,
               real'(bal_hits[i+4]) / N_SAMPLES, real'(bal_hits[i+5]) / N_SAMPLES,
               real'(bal_hits[i+6]) / N_SAMPLES, real'(bal_hits[i+7]) / N_SAMPLES);
    checks++;
    if (outside != 0) begin failures++; $display("FAIL (8,0,0,4) changed bits outside its balancing fields %0d times", outside); end
    checks++;
    if (bal_hits[4] == 0 || bal_hits[12] == 0 || bal_hits[20] == 0) begin
      failures++; $display("FAIL (8,0,0,4) balancing never happened on some path");
    end
    checks++;
    if (nerr[NC] != 0) begin failures++; $display("FAIL exact adder has errors"); end
    checks++;
    if (!(rms[10] < rms[0])) begin failures++; $display("FAIL (16,7,0,8) not more accurate than (8,0,0,0)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
