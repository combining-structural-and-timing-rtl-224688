// isa_pkg: shared types and constants of the inexact speculative adder (ISA).
//
// An ISA configuration is the quadruple (block size, SPEC size, correction,
// reduction), all in bits: the width of each speculative path, the number of
// operand bits below a path that its carry speculator looks at, the number of
// local-sum LSBs the compensation block may increment or decrement, and the
// number of preceding-sum MSBs it may force to reduce the error when
// correction is impossible. ISA_CONFIGS lists the eleven speculative 32-bit
// configurations that were characterised against an exact adder under
// overclocking; the reference design (isa_top defaults) is (8,0,0,4).
// The package holds no logic.
package isa_pkg;

  // Operand width of every characterised adder.
  localparam int unsigned ISA_WIDTH = 32;

  typedef struct packed {
    int unsigned block;  // path (sub-adder) width
    int unsigned spec;   // carry-speculator window
    int unsigned corr;   // correctable local LSBs
    int unsigned red;    // balanced preceding MSBs
  } isa_cfg_t;

  localparam int unsigned ISA_NUM_CONFIGS = 11;

  localparam isa_cfg_t ISA_CONFIGS [ISA_NUM_CONFIGS] = '{
    '{block: 8,  spec: 0, corr: 0, red: 0},
    '{block: 8,  spec: 0, corr: 0, red: 2},
    '{block: 8,  spec: 0, corr: 0, red: 4},
    '{block: 8,  spec: 0, corr: 1, red: 4},
    '{block: 8,  spec: 0, corr: 1, red: 6},
    '{block: 16, spec: 0, corr: 0, red: 0},
    '{block: 16, spec: 1, corr: 0, red: 0},
    '{block: 16, spec: 1, corr: 0, red: 2},
    '{block: 16, spec: 2, corr: 0, red: 4},
    '{block: 16, spec: 2, corr: 1, red: 6},
    '{block: 16, spec: 7, corr: 0, red: 8}
  };

  // Reference configuration.
  localparam isa_cfg_t ISA_DEFAULT_CFG = '{block: 8, spec: 0, corr: 0, red: 4};

endpackage
