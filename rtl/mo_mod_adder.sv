// mo_mod_adder: multi-operand modulo M adder.
//
// Sums N residues modulo M with a binary tree of two-operand modular adders
// (toma). Level 0 holds the N operands; each further level adds neighbouring
// pairs (2j, 2j+1) of the level below in one toma, and an odd last entry is
// carried up unchanged, until one value is left after ceil(log2 N) levels.
// For four operands this is the two-level tree of three TOMAs of the
// document's converter figure; for three, two TOMAs in two levels. Every
// intermediate value stays in [0, M-1], so all adders are RW bits wide.
// Purely combinational.
module mo_mod_adder #(
  parameter int unsigned M  = 29,
  parameter int unsigned N  = 4,
  parameter int unsigned RW = tcs_rns_pkg::RES_BITS
) (
  input  logic [N-1:0][RW-1:0] ops,
  output logic [RW-1:0]        sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of values on tree level l.
  function automatic int unsigned level_size(input int unsigned l);
    int unsigned n;
    n = N;
    for (int unsigned i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [LEVELS:0][N-1:0][RW-1:0] node;

  assign node[0] = ops;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = level_size(l);
    localparam int unsigned NOUT = level_size(l + 1);

    for (genvar j = 0; j < N; j++) begin : g_node
      if (j < NIN / 2) begin : g_add
        toma #(.M(M), .RW(RW)) u_toma (
          .a (node[l][2*j]),
          .b (node[l][2*j+1]),
          .s (node[l+1][j])
        );
      end else if (j < NOUT) begin : g_pass
        assign node[l+1][j] = node[l][2*j];
      end else begin : g_unused
        assign node[l+1][j] = '0;
      end
    end
  end

  assign sum = node[LEVELS][0];

endmodule
