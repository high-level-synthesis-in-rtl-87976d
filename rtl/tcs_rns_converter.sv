// tcs_rns_converter: two's complement to residue number system converter.
//
// Converts a W-bit two's complement word X into its residues
// (|X|_m1, ..., |X|_mN) for the RNS base MODULI, one independent
// tcs_rns_channel per modulus. Residue i of a negative X is the residue of
// M + X (M the product of the moduli), which is the usual signed RNS
// encoding; the residues are the same as |X|_mi taken as a mathematical
// (non-negative) remainder.
//
// Interface: in_valid/in_x present a word; out_valid/out_res return its
// residues exactly two clock cycles later, out_res[i] belonging to
// MODULI[i]. A word may be presented on every cycle (no back-pressure).
// rst (synchronous, active high) clears only the valid pipeline.
//
// The 16-bit input, the 5-bit segments with the sign bit, the ROM modulo
// generators and the tree of 5-bit TOMAs follow the document. The document
// works its examples with modulus 29 but does not fix a full RNS base; the
// default base {25, 27, 29, 31} (five-bit, pairwise coprime, product
// 606825 > 2^16 so every 16-bit word has its own residue vector), the
// valid handshake and the two-cycle latency are this design's choices.
module tcs_rns_converter #(
  parameter int unsigned W       = 16,
  parameter int unsigned N_MOD   = 4,
  parameter int unsigned MODULI [N_MOD] = '{25, 27, 29, 31},
  parameter int unsigned RW      = tcs_rns_pkg::RES_BITS
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [W-1:0]                in_x,
  output logic                        out_valid,
  output logic [N_MOD-1:0][RW-1:0]    out_res
);

  // Product of the moduli, the RNS dynamic range.
  function automatic longint unsigned range_of();
    longint unsigned p;
    p = 1;
    for (int i = 0; i < N_MOD; i++) p = p * MODULI[i];
    return p;
  endfunction

  if (range_of() < (64'd1 << W)) begin : g_range_check
    $error("RNS range is smaller than 2^W: residue vectors would not be unique");
  end

  for (genvar i = 0; i < N_MOD; i++) begin : g_ch
    if (MODULI[i] < 2 || MODULI[i] > (1 << RW)) begin : g_mod_check
      $error("modulus out of range for the residue width");
    end

    tcs_rns_channel #(.W(W), .M(MODULI[i]), .RW(RW)) u_ch (
      .clk (clk),
      .x   (in_x),
      .r   (out_res[i])
    );

    // A delivered residue always lies in [0, MODULI[i] - 1].
    a_residue_range: assert property (
      @(posedge clk) disable iff (rst) out_valid |-> ({1'b0, out_res[i]} < (RW+1)'(MODULI[i]))
    );
  end

  // Valid pipeline matching the channel's two register stages.
  logic [1:0] valid_q;

  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else     valid_q <= {valid_q[0], in_valid};
  end

  assign out_valid = valid_q[1];

endmodule
