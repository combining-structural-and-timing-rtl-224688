// isa_spec: carry speculator (SPEC) of one speculative path.
//
// The speculator sees only the SPEC_BITS operand bits just below the path it
// feeds (the top bits of the preceding path's operand slice). It forms the
// group generate and group propagate of that window by carry look-ahead and
// outputs G | (P & GUESS): a generate or a kill inside the window decides the
// carry exactly, and when a propagate chain covers the whole window the carry
// is guessed. With SPEC_BITS = 0 the window is empty and the carry is always
// the guess. The defaults (2-bit window, guess 0) are those of the worked
// example of the design; making the guess a parameter is this
// implementation's choice. The reference adder (8,0,0,4) instantiates it with
// an empty window.
//
// Interface: a, b are the window operand bits (bit 0 is the lowest; with
// SPEC_BITS = 0 a one-bit port is kept and ignored); c_spec is the speculated
// carry. Purely combinational.
module isa_spec #(
  parameter  int unsigned SPEC_BITS = 2,
  parameter  bit          GUESS     = 1'b0,
  localparam int unsigned SW        = (SPEC_BITS > 0) ? SPEC_BITS : 1
) (
  input  logic [SW-1:0] a,
  input  logic [SW-1:0] b,
  output logic          c_spec
);

  if (SPEC_BITS == 0) begin : g_guess_only
    logic unused;
    assign unused = ^{a, b};
    assign c_spec = GUESS;
  end else begin : g_lookahead
    logic [SW-1:0] g, p;
    logic          grp_g, grp_p;

    assign g = a & b;
    assign p = a ^ b;

    // Group generate/propagate, combined from the LSB upwards:
    // (G,P) o (g,p) = (g | p & G, p & P).
    always_comb begin
      grp_g = 1'b0;
      grp_p = 1'b1;
      for (int i = 0; i < SPEC_BITS; i++) begin
        grp_g = g[i] | (p[i] & grp_g);
        grp_p = p[i] & grp_p;
      end
    end

    assign c_spec = grp_g | (grp_p & GUESS);
  end

endmodule
