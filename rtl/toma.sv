// toma: two-operand modular adder (TOMA).
//
// Adds two residues a, b in [0, M-1] and reduces the sum modulo M with one
// comparison and one subtraction: the sum is RW+1 bits wide, and if it is at
// least M the result is sum - M, otherwise the sum itself. This is the
// compare-and-subtract form of reduction that the document found cheapest
// (no divider). Purely combinational; inputs of M or more are outside its
// contract and give an unspecified residue. The residue width RW is this
// design's parameter, with the document's 5 bits as default.
module toma #(
  parameter int unsigned M  = 29,
  parameter int unsigned RW = tcs_rns_pkg::RES_BITS
) (
  input  logic [RW-1:0] a,
  input  logic [RW-1:0] b,
  output logic [RW-1:0] s
);

  localparam logic [RW:0] MOD = (RW+1)'(M);

  logic [RW:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    if (sum < MOD) s = sum[RW-1:0];
    else           s = RW'(sum - MOD);
  end

endmodule
