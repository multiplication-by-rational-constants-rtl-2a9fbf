// const_int_mult -- multiplier of an unsigned input by a small integer
// constant, built from shifts and additions.
//
// The product y = x * C is accumulated over the set bits of C: each set bit
// k contributes x << k, so the chain holds popcount(C) - 1 effective adders
// (the first term is added to zero and reduces to a wire).  This is the
// plain binary shift-and-add method; it serves for the small sub-constants
// of the periodic multiplier (the trimmed period p and the header h), for
// which the adder counts it gives match the published ones.  A CSD or
// exhaustive-search decomposition could replace it without changing the
// interface.
//
// Interface: x is N bits, y is N + bitlen(C) bits, both unsigned.
// Timing: purely combinational.
module const_int_mult
  import rational_const_pkg::*;
#(
  parameter int unsigned     N = 24,
  parameter longint unsigned C = 3,
  localparam int unsigned    CW = bitlen(longint'(C)),
  localparam int unsigned    W  = N + CW
) (
  input  logic [N-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] acc [CW+1];

  assign acc[0] = '0;
  for (genvar k = 0; k < CW; k++) begin : g_bit
    if (C[k]) begin : g_add
      assign acc[k+1] = acc[k] + (W'(x) << k);
    end else begin : g_skip
      assign acc[k+1] = acc[k];
    end
  end

  assign y = acc[CW];

endmodule
