// seg_rom_tb: self-check of the segment modulo generator ROM.
//
// Instances cover segment indices 0 to 3, a full 5-bit and a short 4-bit
// segment and the moduli 29, 31 and 25. Every address {s, v} that the
// segment width allows is read, and the word is compared with a reference
// worked out here directly from the segment's weight in the word:
//   s = 0: (v * 2^(5k)) mod m
//   s = 1: (-(((2^sw - 1) - v) * 2^(5k) + [k == 0])) mod m
// using 64-bit arithmetic. One address is applied per clock cycle; a
// watchdog ends a run that does not finish.
module seg_rom_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  localparam int NI = 5;
  localparam int unsigned MODS [NI] = '{29, 29, 31, 25, 29};
  localparam int unsigned IDX  [NI] = '{0,  1,  2,  3,  3};
  localparam int unsigned SW   [NI] = '{5,  5,  5,  4,  1};

  logic       sign;
  logic [4:0] seg;
  logic [4:0] res [NI];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    seg_rom #(.M(MODS[i]), .SEG_IDX(IDX[i]), .SEG_W(SW[i]), .RW(5)) dut (
      .sign    (sign),
      .seg     (seg),
      .residue (res[i])
    );
  end

  function automatic int unsigned ref_word(input int unsigned m,
                                           input int unsigned k,
                                           input int unsigned sw,
                                           input bit s,
                                           input int unsigned v);
    longint signed weight, part, r;
    weight = longint'(1) << (5 * k);
    if (!s) part = longint'(v) * weight;
    else    part = -((longint'((1 << sw) - 1 - v) * weight) + ((k == 0) ? 1 : 0));
    r = part % longint'(m);
    if (r < 0) r += longint'(m);
    return int'(r);
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int s = 0; s < 2; s++) begin
      for (int unsigned v = 0; v < 32; v++) begin
        @(negedge clk);
        sign = s[0];
        seg  = 5'(v);
        @(posedge clk);
        for (int i = 0; i < NI; i++) begin
          if (v < (1 << SW[i])) begin
            int unsigned exp;
            exp = ref_word(MODS[i], IDX[i], SW[i], s[0], v);
            checks++;
            if (res[i] != 5'(exp)) begin
              failures++;
              $display("FAIL inst=%0d s=%0d v=%0d got=%0d exp=%0d", i, s, v, res[i], exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
