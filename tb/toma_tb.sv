// toma_tb: exhaustive self-check of the two-operand modular adder.
//
// Four instances (moduli 29, 31, 32 with 5-bit residues and 7 with 3-bit
// residues) are driven with every pair of operands in [0, M-1]; each result
// is compared with (a + b) % M computed in the testbench. One operand pair
// is applied per clock cycle. A watchdog ends the run with a failure if it
// has not finished after a fixed number of cycles.
module toma_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned NI = 4;
  localparam int unsigned MODS [NI] = '{29, 31, 32, 7};

  logic [4:0] a5 [3];
  logic [4:0] b5 [3];
  logic [4:0] s5 [3];
  logic [2:0] a3, b3, s3;

  for (genvar i = 0; i < 3; i++) begin : g_dut5
    toma #(.M(MODS[i]), .RW(5)) dut (.a(a5[i]), .b(b5[i]), .s(s5[i]));
  end
  toma #(.M(7), .RW(3)) dut3 (.a(a3), .b(b3), .s(s3));

  task automatic check(input int unsigned got, input int unsigned exp,
                       input int unsigned m, input int unsigned a,
                       input int unsigned b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL m=%0d a=%0d b=%0d got=%0d exp=%0d", m, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int unsigned a = 0; a < 32; a++) begin
      for (int unsigned b = 0; b < 32; b++) begin
        @(negedge clk);
        for (int i = 0; i < 3; i++) begin
          a5[i] = 5'(a % MODS[i]);
          b5[i] = 5'(b % MODS[i]);
        end
        a3 = 3'(a % 7);
        b3 = 3'(b % 7);
        @(posedge clk);
        for (int i = 0; i < 3; i++)
          if (a < MODS[i] && b < MODS[i])
            check(s5[i], (a + b) % MODS[i], MODS[i], a, b);
        if (a < 7 && b < 7) check(s3, (a + b) % 7, 7, a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
