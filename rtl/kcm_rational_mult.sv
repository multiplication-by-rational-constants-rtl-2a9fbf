// kcm_rational_mult -- table-based (KCM) multiplication of an unsigned
// integer x by a rational constant.
//
// x is cut into NCH = ceil(N/ALPHA) chunks of ALPHA bits, X_0 being the most
// significant.  For each chunk a table T_i indexed by X_i returns the
// product X_i * K, pre-shifted to the weight of its chunk and truncated to
// F fraction bits: T_i[v] = floor(v * c * 2^(ALPHA*(NCH-1-i) + F) / d), where
// K = c/d is the odd part of the constant (the power of two is left to the
// caller).  The partial products are summed by a chain of NCH-1 adders of
// increasing width, starting from the least significant table (TREE = 0),
// or by a balanced tree of as many adders, shallower but with wider adders
// (TREE = 1).  Each table truncates by less than one LSB, so r lies below
// x*K*2^F by less than NCH LSBs; F is chosen so that this bound (rounded up to a power of two and
// doubled) fits the exclusion zone of cr_round.
//
// The tables are computed at elaboration from a and b.  Since every row
// v*K has the same odd denominator, its expansion is eventually periodic and
// so are the table columns; synthesis merges the identical columns, so no
// explicit sharing is written.
//
// The chunking, the tables indexed by chunks, and the choice between the
// minimal-cost sequential chain and a lower-latency tree follow the KCM
// method; the sizing of F from the rounding bound and the
// zero-extension of x to a whole number of chunks (the top chunk is the
// short one) are this implementation's choices.
//
// Interface: x (N bits, unsigned) -> r (WR bits, F fraction bits).
// Timing: purely combinational.
module kcm_rational_mult
  import rational_const_pkg::*;
#(
  parameter int unsigned     N     = 24,
  parameter int unsigned     Q     = 24,
  parameter longint unsigned A     = 7,
  parameter longint unsigned B     = 5,
  parameter int unsigned     ALPHA = 4,   // table address bits (LUT inputs)
  parameter bit              TREE  = 1'b0, // 0: sequential chain, 1: balanced adder tree
  localparam periodic_rep_t  REP = periodic_rep(longint'(A), longint'(B)),
  localparam int             NCH = (int'(N) + int'(ALPHA) - 1) / int'(ALPHA),
  localparam int             L_K = floor_log2_frac(REP.c, REP.d),
  localparam int             F   = kcm_frac_bits(longint'(A), longint'(B), int'(N), int'(Q), NCH),
  localparam int             WR  = int'(N) + L_K + 1 + F
) (
  input  logic [N-1:0]  x,
  output logic [WR-1:0] r
);

  localparam int     WXE     = NCH * int'(ALPHA);
  localparam longint C_K     = REP.c;
  localparam longint D_K     = REP.d;

  logic [WXE-1:0] xe;
  logic [WR-1:0]  term [NCH];

  assign xe = WXE'(x);

  for (genvar i = 0; i < NCH; i++) begin : g_tab
    localparam int SH  = int'(ALPHA) * (NCH - 1 - i) + F;
    localparam int TW0 = int'(ALPHA) + L_K + 1 + SH;
    localparam int TW  = (TW0 < 1) ? 1 : ((TW0 > WR) ? WR : TW0);
    logic [TW-1:0]    rom [2**ALPHA];
    logic [ALPHA-1:0] idx;
    for (genvar v = 0; v < 2**ALPHA; v++) begin : g_word
      assign rom[v] = TW'(kcm_entry(longint'(v), C_K, D_K, SH));
    end
    assign idx     = xe[WXE-1-i*int'(ALPHA) -: ALPHA];
    assign term[i] = WR'(rom[idx]);
  end

  if (!TREE) begin : g_chain
    // sequential sum, smallest partial products first
    logic [WR-1:0] acc [NCH];
    assign acc[NCH-1] = term[NCH-1];
    for (genvar i = NCH - 2; i >= 0; i--) begin : g_add
      assign acc[i] = acc[i+1] + term[i];
    end
    assign r = acc[0];
  end else begin : g_tree
    // balanced tree: level l holds ceil(NCH / 2^l) partial sums
    localparam int LEVELS = clog2l(longint'(NCH));
    for (genvar l = 0; l <= LEVELS; l++) begin : g_level
      localparam int NCUR = (NCH + (1 << l) - 1) >> l;
      logic [WR-1:0] node [NCUR];
      if (l == 0) begin : g_leaves
        for (genvar i = 0; i < NCH; i++) begin : g_leaf
          assign node[i] = term[i];
        end
      end else begin : g_sums
        localparam int NPREV = (NCH + (1 << (l - 1)) - 1) >> (l - 1);
        for (genvar k = 0; k < NCUR; k++) begin : g_node
          if (2 * k + 1 < NPREV) begin : g_add
            assign node[k] = g_level[l-1].node[2*k] + g_level[l-1].node[2*k+1];
          end else begin : g_pass
            assign node[k] = g_level[l-1].node[2*k];
          end
        end
      end
    end
    assign r = g_level[LEVELS].node[0];
  end

endmodule
