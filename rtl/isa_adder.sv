// isa_adder: inexact speculative adder (ISA).
//
// The WIDTH-bit carry chain is cut into NB = WIDTH/BLOCK paths of equal width
// that work concurrently. Path 0 (the LSB path) adds with the adder carry-in
// and is exact. Every higher path i has
//   * a carry speculator (isa_spec) that guesses the carry into the path from
//     the SPEC highest operand bits of path i-1,
//   * a sub-adder (isa_add) that adds the path's operand slices with that
//     speculated carry,
//   * a compensation block (isa_comp) that compares the speculated carry with
//     the carry-out of sub-adder i-1 and, on a mismatch, corrects the CORR
//     LSBs of sum i or, if that would overflow, forces the RED MSBs of sum
//     i-1 towards the lost carry.
// The result therefore carries deterministic "structural" errors whose rate
// and size are set by (BLOCK, SPEC, CORR, RED), while the longest carry path
// is about one path long instead of WIDTH bits. The carry-out is that of the
// top sub-adder. The defaults (32 bits, 8-bit paths, no speculation window,
// no correction, 4-bit reduction) are the document's ISA (8,0,0,4); the
// structure, the four parameters and the speculator/compensator roles follow
// the document, and the per-path status outputs are this implementation's
// addition for observation.
//
// Interface: a, b, cin -> sum, cout. fault[i], corrected[i], balanced[i]
// report the compensation of path i (bit 0 is always 0, and corrected is
// constant 0 when CORR = 0, as in the default configuration). Combinational:
// the critical path is one speculator or one sub-adder plus the compensation
// field, not the full carry chain.
module isa_adder #(
  parameter  int unsigned WIDTH = isa_pkg::ISA_WIDTH,
  parameter  int unsigned BLOCK = isa_pkg::ISA_DEFAULT_CFG.block,
  parameter  int unsigned SPEC  = isa_pkg::ISA_DEFAULT_CFG.spec,
  parameter  int unsigned CORR  = isa_pkg::ISA_DEFAULT_CFG.corr,
  parameter  int unsigned RED   = isa_pkg::ISA_DEFAULT_CFG.red,
  parameter  bit          GUESS = 1'b0,
  localparam int unsigned NB    = WIDTH / BLOCK
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [NB-1:0]    fault,
  output logic [NB-1:0]    corrected,
  output logic [NB-1:0]    balanced
);

  localparam int unsigned SW = (SPEC > 0) ? SPEC : 1;
  localparam int unsigned CW = (CORR > 0) ? CORR : 1;
  localparam int unsigned RW = (RED > 0) ? RED : 1;

  if (WIDTH % BLOCK != 0) begin : g_bad_width
    $error("isa_adder: WIDTH must be a multiple of BLOCK");
  end
  if (SPEC > BLOCK || CORR + RED > BLOCK) begin : g_bad_sizes
    $error("isa_adder: SPEC and CORR + RED must not exceed BLOCK");
  end

  logic [BLOCK-1:0] raw   [NB];  // sub-adder sums
  logic [BLOCK-1:0] fin   [NB];  // compensated sums
  logic [CW-1:0]    lsb_o [NB];  // corrected LSBs of path i
  logic [RW-1:0]    msb_o [NB];  // balanced MSBs of path i-1, from COMP i
  logic [NB-1:0]    c_in, c_out;

  for (genvar i = 0; i < NB; i++) begin : g_path
    isa_add #(.BLOCK(BLOCK)) u_add (
      .a   (a[i*BLOCK +: BLOCK]),
      .b   (b[i*BLOCK +: BLOCK]),
      .cin (c_in[i]),
      .sum (raw[i]),
      .cout(c_out[i])
    );

    if (i == 0) begin : g_lsb_path
      assign c_in[0]      = cin;
      assign lsb_o[0]     = raw[0][CW-1:0];
      assign msb_o[0]     = '0;
      assign fault[0]     = 1'b0;
      assign corrected[0] = 1'b0;
      assign balanced[0]  = 1'b0;
    end else begin : g_spec_path
      isa_spec #(.SPEC_BITS(SPEC), .GUESS(GUESS)) u_spec (
        .a     (a[i*BLOCK-1 -: SW]),
        .b     (b[i*BLOCK-1 -: SW]),
        .c_spec(c_in[i])
      );

      isa_comp #(.CORR(CORR), .RED(RED)) u_comp (
        .c_spec     (c_in[i]),
        .c_prev     (c_out[i-1]),
        .local_lsb  (raw[i][CW-1:0]),
        .prev_msb   (raw[i-1][BLOCK-1 -: RW]),
        .local_lsb_o(lsb_o[i]),
        .prev_msb_o (msb_o[i]),
        .fault      (fault[i]),
        .corrected  (corrected[i]),
        .balanced   (balanced[i])
      );
    end

    // Compensated path sum: own LSBs from COMP i, own MSBs from COMP i+1.
    always_comb begin
      fin[i] = raw[i];
      if (CORR > 0 && i > 0) fin[i][CW-1:0] = lsb_o[i];
      if (RED > 0 && i < NB - 1) fin[i][BLOCK-1 -: RW] = msb_o[(i < NB - 1) ? i + 1 : i];
    end

    assign sum[i*BLOCK +: BLOCK] = fin[i];
  end

  assign cout = c_out[NB-1];

endmodule
