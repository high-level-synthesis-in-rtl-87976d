// tcs_rns_converter_w20_tb: the converter at a 20-bit input word, the word
// width of the four-segment, three-TOMA channel structure.
//
// Four 5-bit moduli cannot cover 2^20 signed words, so this run uses the
// five-modulus base {23, 25, 27, 29, 31} (product 13956975). The extreme
// words and then random words are presented back to back with in_valid
// held high; every result must appear exactly two cycles later, match the
// remainder of the signed word for each modulus, and reconstruct the word
// through the Chinese remainder theorem. A watchdog ends a run that does
// not finish.
module tcs_rns_converter_w20_tb;

  localparam int W       = 20;
  localparam int N_MOD   = 5;
  localparam int unsigned MODS [N_MOD] = '{23, 25, 27, 29, 31};
  localparam int LATENCY = 2;
  localparam int NWORDS  = 100000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst;
  logic                    in_valid;
  logic [W-1:0]            in_x;
  logic                    out_valid;
  logic [N_MOD-1:0][4:0]   out_res;

  tcs_rns_converter #(.W(W), .N_MOD(N_MOD), .MODULI(MODS)) dut (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_x      (in_x),
    .out_valid (out_valid),
    .out_res   (out_res)
  );

  int checks   = 0;
  int failures = 0;
  int n_neg    = 0;

  function automatic longint signed signed_word(input logic [W-1:0] x);
    longint signed v;
    v = longint'(x);
    if (x[W-1]) v -= (longint'(1) << W);
    return v;
  endfunction

  function automatic int unsigned ref_res(input logic [W-1:0] x, input int m);
    longint signed r;
    r = signed_word(x) % longint'(m);
    if (r < 0) r += longint'(m);
    return int'(r);
  endfunction

  function automatic longint signed crt(input logic [N_MOD-1:0][4:0] res);
    longint signed mm, acc, mi, inv;
    mm = 1;
    for (int i = 0; i < N_MOD; i++) mm *= longint'(MODS[i]);
    acc = 0;
    for (int i = 0; i < N_MOD; i++) begin
      mi  = mm / longint'(MODS[i]);
      inv = 0;
      for (longint signed c = 1; c < longint'(MODS[i]); c++)
        if (((mi % longint'(MODS[i])) * c) % longint'(MODS[i]) == 1) inv = c;
      acc = (acc + longint'(res[i]) * mi % mm * inv) % mm;
    end
    if (acc >= mm / 2) acc -= mm;
    return acc;
  endfunction

  logic [W-1:0] sent [$];

  initial begin : watchdog
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    rst      = 1'b1;
    in_valid = 1'b0;
    in_x     = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < NWORDS + LATENCY; t++) begin
      in_valid = (t < NWORDS);
      case (t)
        0:       in_x = 20'h80000;
        1:       in_x = 20'h7FFFF;
        2:       in_x = 20'hFFFFF;
        3:       in_x = 20'h00000;
        default: in_x = W'($urandom);
      endcase
      if (in_valid) begin
        sent.push_back(in_x);
        if (in_x[W-1]) n_neg++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== (t >= LATENCY - 1 && t - (LATENCY - 1) < NWORDS)) begin
        failures++;
        $display("FAIL out_valid=%0b at t=%0d", out_valid, t);
      end
      if (out_valid) begin
        logic [W-1:0] x;
        x = sent.pop_front();
        for (int i = 0; i < N_MOD; i++) begin
          checks++;
          if (out_res[i] != 5'(ref_res(x, MODS[i]))) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%0d m=%0d got=%0d", signed_word(x), MODS[i], out_res[i]);
          end
        end
        checks++;
        if (crt(out_res) != signed_word(x)) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_neg == 0 || sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
