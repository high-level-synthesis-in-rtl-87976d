// seg_rom: modulo generator for one segment of a two's complement word.
//
// A 2^(SEG_BITS+1)-word ROM addressed by {sign, segment}. It returns the
// residue modulo M of the segment's share of the word: for a positive word
// |v * 2^(SEG_BITS*SEG_IDX)|_M, for a negative word the additive inverse of
// the complemented segment's weight (plus one in segment 0), so that the ROM
// outputs of all segments sum, modulo M, to the residue of the signed word.
// The table is held as an array of constants computed at elaboration by
// tcs_rns_pkg::rom_entry(); address bits above SEG_W (a short top segment)
// are ignored by the contents. The read is combinational; the channel
// registers the ROM outputs, like a registered distributed ROM on an FPGA.
// The 6-bit address and the use of one ROM per segment follow the document;
// computing the contents in the RTL rather than storing them is this
// design's choice.
module seg_rom #(
  parameter int unsigned M       = 29,
  parameter int unsigned SEG_IDX = 0,
  parameter int unsigned SEG_W   = tcs_rns_pkg::SEG_BITS,
  parameter int unsigned RW      = tcs_rns_pkg::RES_BITS
) (
  input  logic                              sign,
  input  logic [tcs_rns_pkg::SEG_BITS-1:0]  seg,
  output logic [RW-1:0]                     residue
);

  localparam int unsigned DEPTH = 1 << (tcs_rns_pkg::SEG_BITS + 1);
  localparam int unsigned HALF  = DEPTH / 2;

  logic [RW-1:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    assign rom[a] = RW'(tcs_rns_pkg::rom_entry(M, SEG_IDX, SEG_W,
                                               (a >= HALF), a % HALF));
  end

  assign residue = rom[{sign, seg}];

endmodule
