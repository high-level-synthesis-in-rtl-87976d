// tcs_rns_channel_tb: self-check of one TCS/RNS channel, including latency.
//
// Three channels run side by side: a 16-bit word modulo 29 and a 10-bit
// word modulo 29 (both driven through every input value), and a 20-bit word
// modulo 31 (four segments, the full tree of three TOMAs) driven with the
// extreme words followed by random ones. A new word enters on every cycle
// and the residue is expected exactly two cycles later; the reference is
// the mathematical remainder of the signed word, computed in 64-bit
// arithmetic. Negative and non-negative inputs are counted and must both
// occur. A watchdog ends a run that does not finish.
module tcs_rns_channel_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_neg    = 0;
  int n_pos    = 0;

  localparam int NCYC    = 1 << 16;
  localparam int LATENCY = 2;

  logic [15:0] x16;
  logic [9:0]  x10;
  logic [19:0] x20;
  logic [4:0]  r16, r10, r20;

  tcs_rns_channel #(.W(16), .M(29), .RW(5)) dut16 (.clk(clk), .x(x16), .r(r16));
  tcs_rns_channel #(.W(10), .M(29), .RW(5)) dut10 (.clk(clk), .x(x10), .r(r10));
  tcs_rns_channel #(.W(20), .M(31), .RW(5)) dut20 (.clk(clk), .x(x20), .r(r20));

  // Residue of the W-bit two's complement word x modulo m.
  function automatic int unsigned ref_res(input longint unsigned x,
                                          input int w, input int m);
    longint signed v, r;
    v = longint'(x);
    if (x[w-1]) v -= (longint'(1) << w);
    r = v % longint'(m);
    if (r < 0) r += longint'(m);
    return int'(r);
  endfunction

  int unsigned exp16 [$];
  int unsigned exp10 [$];
  int unsigned exp20 [$];

  task automatic check(input string name, input int unsigned got,
                       input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int t = 0; t < NCYC + LATENCY; t++) begin
      @(negedge clk);
      if (t < NCYC) begin
        x16 = 16'(t);
        x10 = 10'(t);
        case (t)
          0:       x20 = 20'h80000;
          1:       x20 = 20'h7FFFF;
          2:       x20 = 20'hFFFFF;
          3:       x20 = 20'h00000;
          default: x20 = 20'($urandom);
        endcase
        if (x16[15]) n_neg++; else n_pos++;
        exp16.push_back(ref_res(x16, 16, 29));
        exp10.push_back(ref_res(x10, 10, 29));
        exp20.push_back(ref_res(x20, 20, 31));
      end
      @(posedge clk);
      #1;
      // The word driven before edge t has passed one register stage;
      // after this edge the output holds the word driven before edge t-1.
      if (t >= LATENCY - 1 && (t - (LATENCY - 1)) < NCYC) begin
        check("w16", r16, exp16.pop_front());
        check("w10", r10, exp10.pop_front());
        check("w20", r20, exp20.pop_front());
      end
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("inputs: %0d negative, %0d non-negative", n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
