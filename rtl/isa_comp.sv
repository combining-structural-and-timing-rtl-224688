// isa_comp: error compensation block (COMP) of one speculative path.
//
// A speculation fault is a mismatch between the carry the path's speculator
// guessed (c_spec) and the carry-out actually produced by the preceding
// sub-adder (c_prev). The fault direction tells the sign of the error in the
// local sum: c_prev = 1, c_spec = 0 leaves the local sum one unit (at the
// path's LSB) too low; c_prev = 0, c_spec = 1 leaves it one unit too high.
//
//  * Correction: the CORR LSBs of the local sum are incremented (decremented)
//    by one, unless they are all ones (all zeros), in which case the change
//    would overflow out of the field and correction is impossible.
//  * Balancing (error reduction): when a fault is not corrected, the RED MSBs
//    of the preceding path's sum are forced to all ones (too-low local sum)
//    or all zeros (too-high local sum). This shrinks the residual error,
//    whose weight is the local LSB, by up to 2^RED - 1 preceding-path units.
//
// The fault test, the correction and the balancing follow the document. The
// exact "all ones / all zeros" overflow test, forcing (rather than inverting)
// the preceding MSBs and the decrement direction, which only occurs with a
// guess of 1, are this implementation's reading. The defaults (1-bit
// correction, 1-bit reduction) are those of the worked example; the
// reference adder (8,0,0,4) instantiates it without correction.
//
// Interface: local_lsb/local_lsb_o are the CORR lowest local-sum bits before
// and after correction; prev_msb/prev_msb_o the RED highest bits of the
// preceding sum before and after balancing. Zero-sized fields keep a one-bit
// port that passes through unchanged. fault, corrected and balanced report
// what happened. Purely combinational, in parallel with the local addition.
module isa_comp #(
  parameter  int unsigned CORR = 1,
  parameter  int unsigned RED  = 1,
  localparam int unsigned CW   = (CORR > 0) ? CORR : 1,
  localparam int unsigned RW   = (RED > 0) ? RED : 1
) (
  input  logic          c_spec,
  input  logic          c_prev,
  input  logic [CW-1:0] local_lsb,
  input  logic [RW-1:0] prev_msb,
  output logic [CW-1:0] local_lsb_o,
  output logic [RW-1:0] prev_msb_o,
  output logic          fault,
  output logic          corrected,
  output logic          balanced
);

  logic too_low, too_high;  // local sum one unit too low / too high

  assign too_low  = c_prev & ~c_spec;
  assign too_high = ~c_prev & c_spec;
  assign fault    = too_low | too_high;

  if (CORR > 0) begin : g_corr
    logic can_inc, can_dec;
    assign can_inc   = ~(&local_lsb);
    assign can_dec   = |local_lsb;
    assign corrected = (too_low & can_inc) | (too_high & can_dec);
    always_comb begin
      local_lsb_o = local_lsb;
      if (too_low && can_inc)        local_lsb_o = local_lsb + CW'(1);
      else if (too_high && can_dec)  local_lsb_o = local_lsb - CW'(1);
    end
  end else begin : g_no_corr
    assign corrected   = 1'b0;
    assign local_lsb_o = local_lsb;
  end

  if (RED > 0) begin : g_red
    assign balanced   = fault & ~corrected;
    assign prev_msb_o = !balanced ? prev_msb : (too_low ? '1 : '0);
  end else begin : g_no_red
    assign balanced   = 1'b0;
    assign prev_msb_o = prev_msb;
  end

  // A fault is handled by at most one of the two mechanisms.
  always_comb begin
    assert (!(corrected && balanced)) else $error("isa_comp: fault both corrected and balanced");
  end

endmodule
