// atu: address translation unit placed between a core and the data crossbar.
//
// Splits the 2^AW-word data address space into a shared section and a private
// section per core. Each core sees its private window of 2^priv_bits words at
// the top of its logical address space (all address bits from priv_bits
// upward set). For an access there, the translation is a multiplexer: the
// ID_W address bits just above the window offset are replaced by the core's
// identifier, so the window of core c lands in physical words
// 2^AW - 2^(priv_bits+ID_W) + c*2^priv_bits ... + 2^priv_bits - 1. Any other
// address is shared and passes unchanged. Software keeps shared data below
// 2^AW - 2^(priv_bits+ID_W), the threshold between the two sections. The low
// address bits are never changed, so with an interleaved crossbar both the
// shared section and every private window are spread over all banks.
// Purely combinational, no clock. priv_bits must not exceed AW - ID_W.
//
// The multiplexer that inserts a per-core tag for private accesses follows the
// design; the position of the tag and the configurable window size are this
// implementation's choices.
module atu #(
  parameter int unsigned AW   = 15,
  parameter int unsigned ID_W = 3,
  localparam int unsigned PBW = $clog2(AW + 1)
) (
  input  logic [ID_W-1:0] core_id,
  input  logic [PBW-1:0]  priv_bits,
  input  logic [AW-1:0]   laddr,
  output logic [AW-1:0]   paddr,
  output logic            is_private
);

  logic [AW-1:0] win_mask;   // ones from bit priv_bits upward
  logic [AW-1:0] tag_mask;   // ones at bits priv_bits .. priv_bits+ID_W-1
  logic [AW-1:0] tag;

  always_comb begin
    win_mask   = {AW{1'b1}} << priv_bits;
    tag_mask   = AW'({ID_W{1'b1}}) << priv_bits;
    tag        = AW'(core_id) << priv_bits;
    is_private = ((laddr & win_mask) == win_mask);
    paddr      = is_private ? ((laddr & ~tag_mask) | tag) : laddr;
  end

endmodule
