// mo_mod_adder_tb: self-check of the multi-operand modulo adder tree.
//
// Instances with 1, 3, 4 and 5 operands (moduli 29, 29, 31 and 27) are fed
// random residues, one set per clock cycle, and the tree output is compared
// with the operand sum modulo m computed in the testbench. The first sets
// are the all-zero and all-(m-1) corner cases. A watchdog ends a run that
// does not finish.
module mo_mod_adder_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  localparam int NI = 4;
  localparam int unsigned MODS [NI] = '{29, 29, 31, 27};
  localparam int unsigned NOPS [NI] = '{1, 3, 4, 5};
  localparam int NVEC = 4000;

  logic [4:0] op [NI][5];
  logic [4:0] sum [NI];

  logic [0:0][4:0] ops1;
  logic [2:0][4:0] ops3;
  logic [3:0][4:0] ops4;
  logic [4:0][4:0] ops5;

  always_comb begin
    ops1[0] = op[0][0];
    for (int j = 0; j < 3; j++) ops3[j] = op[1][j];
    for (int j = 0; j < 4; j++) ops4[j] = op[2][j];
    for (int j = 0; j < 5; j++) ops5[j] = op[3][j];
  end

  mo_mod_adder #(.M(29), .N(1), .RW(5)) dut1 (.ops(ops1), .sum(sum[0]));
  mo_mod_adder #(.M(29), .N(3), .RW(5)) dut3 (.ops(ops3), .sum(sum[1]));
  mo_mod_adder #(.M(31), .N(4), .RW(5)) dut4 (.ops(ops4), .sum(sum[2]));
  mo_mod_adder #(.M(27), .N(5), .RW(5)) dut5 (.ops(ops5), .sum(sum[3]));

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int t = 0; t < NVEC; t++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++)
        for (int j = 0; j < 5; j++)
          case (t)
            0:       op[i][j] = 5'd0;
            1:       op[i][j] = 5'(MODS[i] - 1);
            default: op[i][j] = 5'($urandom % MODS[i]);
          endcase
      @(posedge clk);
      for (int i = 0; i < NI; i++) begin
        int unsigned exp;
        exp = 0;
        for (int j = 0; j < int'(NOPS[i]); j++) exp += op[i][j];
        exp = exp % MODS[i];
        checks++;
        if (sum[i] != 5'(exp)) begin
          failures++;
          if (failures < 10)
            $display("FAIL inst=%0d t=%0d got=%0d exp=%0d", i, t, sum[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
