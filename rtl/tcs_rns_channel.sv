// tcs_rns_channel: one residue channel of the TCS/RNS converter, |X|_M.
//
// Preprocessing stage: the W-bit two's complement input x is split into its
// sign bit x[W-1] and NSEG segments of the W-1 value bits, five bits each
// from the least significant end (the top segment may be shorter). Each
// segment and the sign bit address their own seg_rom, which returns that
// segment's share of |X|_M for positive and for negative X alike.
// Second stage: a mo_mod_adder (tree of TOMAs) sums the NSEG ROM outputs
// modulo M.
//
// Timing: two register stages. The ROM outputs are registered (stage 1) and
// the adder tree output is registered (stage 2), so r holds |x|_M two clock
// edges after x was presented; a new x may be presented every cycle. The
// registers load on every edge and carry no reset: validity is tracked by
// the caller. The segmentation, the ROMs and the TOMA tree follow the
// document; the placement of the two register stages is this design's
// choice.
module tcs_rns_channel #(
  parameter int unsigned W  = 16,
  parameter int unsigned M  = 29,
  parameter int unsigned RW = tcs_rns_pkg::RES_BITS
) (
  input  logic          clk,
  input  logic [W-1:0]  x,
  output logic [RW-1:0] r
);

  import tcs_rns_pkg::*;

  localparam int unsigned NSEG = num_segments(W);

  logic                     sign;
  logic [NSEG-1:0][RW-1:0]  rom_out;
  logic [NSEG-1:0][RW-1:0]  rom_q;
  logic [RW-1:0]            tree_sum;

  assign sign = x[W-1];

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    localparam int unsigned SW = segment_width(W, k);
    logic [SEG_BITS-1:0] seg;

    assign seg = SEG_BITS'(x[k*SEG_BITS +: SW]);

    seg_rom #(.M(M), .SEG_IDX(k), .SEG_W(SW), .RW(RW)) u_rom (
      .sign    (sign),
      .seg     (seg),
      .residue (rom_out[k])
    );
  end

  always_ff @(posedge clk) rom_q <= rom_out;

  mo_mod_adder #(.M(M), .N(NSEG), .RW(RW)) u_sum (
    .ops (rom_q),
    .sum (tree_sum)
  );

  always_ff @(posedge clk) r <= tree_sum;

endmodule
