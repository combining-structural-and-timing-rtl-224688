// isa_top: clocked inexact speculative adder, the circuit that is overclocked.
//
// Operands are captured in input registers, added by the combinational ISA
// (isa_adder) and the result is captured in output registers, so the only
// timing path that a shortened clock period can violate is the ISA itself.
// A new operand pair may be applied every cycle; in_valid travels alongside
// as out_valid. With a safe clock the output equals the ISA's "golden" value
// (structural errors only); when overclocked, late-arriving bits give the
// additional timing errors. The register boundary is this implementation's
// reading of the cycle-by-cycle simulation the document describes; reset
// (asynchronous, active low, clearing all registers) is its own choice.
//
// Interface: in_valid, a, b, cin sampled at a rising clk edge appear as
// out_valid, sum, cout (and the per-path compensation flags) right after the
// next rising edge: one clock cycle from input register to output register,
// which is the single-cycle ISA path, and one addition per cycle.
module isa_top #(
  parameter  int unsigned WIDTH = isa_pkg::ISA_WIDTH,
  parameter  int unsigned BLOCK = isa_pkg::ISA_DEFAULT_CFG.block,
  parameter  int unsigned SPEC  = isa_pkg::ISA_DEFAULT_CFG.spec,
  parameter  int unsigned CORR  = isa_pkg::ISA_DEFAULT_CFG.corr,
  parameter  int unsigned RED   = isa_pkg::ISA_DEFAULT_CFG.red,
  parameter  bit          GUESS = 1'b0,
  localparam int unsigned NB    = WIDTH / BLOCK
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [NB-1:0]    fault,
  output logic [NB-1:0]    corrected,
  output logic [NB-1:0]    balanced
);

  logic             v_q;
  logic [WIDTH-1:0] a_q, b_q;
  logic             cin_q;

  logic [WIDTH-1:0] s_d;
  logic             co_d;
  logic [NB-1:0]    f_d, c_d, b_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else begin
      v_q   <= in_valid;
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  isa_adder #(
    .WIDTH(WIDTH), .BLOCK(BLOCK), .SPEC(SPEC), .CORR(CORR), .RED(RED), .GUESS(GUESS)
  ) u_isa (
    .a        (a_q),
    .b        (b_q),
    .cin      (cin_q),
    .sum      (s_d),
    .cout     (co_d),
    .fault    (f_d),
    .corrected(c_d),
    .balanced (b_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
      fault     <= '0;
      corrected <= '0;
      balanced  <= '0;
    end else begin
      out_valid <= v_q;
      sum       <= s_d;
      cout      <= co_d;
      fault     <= f_d;
      corrected <= c_d;
      balanced  <= b_d;
    end
  end

endmodule
