// tcs_rns_converter_tb: end-to-end check of the converter at its default
// parameters (16-bit input, base {25, 27, 29, 31}).
//
// Every 16-bit word is converted once. Words are presented with in_valid,
// with an idle cycle inserted at pseudo-random points, and a reset pulse is
// applied once while words are in flight. For each word the testbench
// checks that out_valid rises exactly two cycles later, that each residue
// equals the mathematical remainder of the signed word, and that the
// Chinese-remainder reconstruction of the residue vector, taken in the
// signed range of the RNS, gives back the word. out_valid must stay low
// for idle cycles and for the words dropped by the reset.
//
// Mechanisms counted (each must occur): negative words (sign path of the
// segment ROMs), non-negative words, words whose segment residues add up to
// m or more in some channel (a TOMA has to subtract m), words whose channel
// sum wraps to 0, idle cycles, and the reset flush. A watchdog ends a run
// that does not finish.
module tcs_rns_converter_tb;

  localparam int W       = 16;
  localparam int N_MOD   = 4;
  localparam int unsigned MODS [N_MOD] = '{25, 27, 29, 31};
  localparam int LATENCY = 2;
  localparam int NWORDS  = 1 << W;
  localparam int RESET_AT = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst;
  logic                    in_valid;
  logic [W-1:0]            in_x;
  logic                    out_valid;
  logic [N_MOD-1:0][4:0]   out_res;

  tcs_rns_converter dut (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_x      (in_x),
    .out_valid (out_valid),
    .out_res   (out_res)
  );

  int checks   = 0;
  int failures = 0;
  int n_neg = 0, n_pos = 0, n_reduce = 0, n_zero = 0, n_idle = 0, n_flush = 0;

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

  // Sum, without reduction, of the segment shares of x modulo m (5-bit
  // segments of the value bits, negative words through their complement).
  function automatic int unsigned raw_segment_sum(input logic [W-1:0] x,
                                                  input int m);
    int unsigned total;
    longint signed part, r, weight;
    int nseg, sw, v;
    nseg  = (W - 1 + 4) / 5;
    total = 0;
    for (int k = 0; k < nseg; k++) begin
      sw     = ((W - 1) - 5 * k < 5) ? (W - 1) - 5 * k : 5;
      v      = int'((x >> (5 * k)) & ((1 << sw) - 1));
      weight = longint'(1) << (5 * k);
      if (!x[W-1]) part = longint'(v) * weight;
      else         part = -((longint'((1 << sw) - 1 - v) * weight) + ((k == 0) ? 1 : 0));
      r = part % longint'(m);
      if (r < 0) r += longint'(m);
      total += int'(r);
    end
    return total;
  endfunction

  // Chinese-remainder reconstruction in the signed range [-M/2, M/2).
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

  // Words in flight: value and whether a result is expected for it.
  logic [W-1:0] pipe_x [LATENCY];
  logic         pipe_v [LATENCY];

  task automatic check_output();
    logic [W-1:0] x;
    x = pipe_x[LATENCY-1];
    checks++;
    if (out_valid !== pipe_v[LATENCY-1]) begin
      failures++;
      if (failures < 10) $display("FAIL out_valid=%0b exp=%0b", out_valid, pipe_v[LATENCY-1]);
    end
    if (pipe_v[LATENCY-1]) begin
      for (int i = 0; i < N_MOD; i++) begin
        checks++;
        if (out_res[i] != 5'(ref_res(x, MODS[i]))) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d m=%0d got=%0d exp=%0d", signed_word(x), MODS[i],
                     out_res[i], ref_res(x, MODS[i]));
        end
      end
      checks++;
      if (crt(out_res) != signed_word(x)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d CRT gives %0d", signed_word(x), crt(out_res));
      end
    end
  endtask

  initial begin : watchdog
    repeat (2 * NWORDS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int word;
    int cycle;
    rst      = 1'b1;
    in_valid = 1'b0;
    in_x     = '0;
    for (int i = 0; i < LATENCY; i++) begin
      pipe_x[i] = '0;
      pipe_v[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    word  = 0;
    cycle = 0;
    while (word < NWORDS || pipe_v[0] || pipe_v[LATENCY-1]) begin
      logic drive;
      // Drive the next word, or an idle cycle.
      drive = (word < NWORDS) && (($urandom % 16) != 0);
      in_valid = drive;
      in_x     = drive ? W'(word) : W'($urandom);
      rst      = (cycle == RESET_AT);
      if (!drive && word < NWORDS) n_idle++;
      @(posedge clk);
      // Model the pipeline, then check what left it.
      for (int i = LATENCY - 1; i > 0; i--) begin
        pipe_x[i] = pipe_x[i-1];
        pipe_v[i] = pipe_v[i-1];
      end
      pipe_x[0] = in_x;
      pipe_v[0] = drive;
      if (rst) begin
        for (int i = 0; i < LATENCY; i++) begin
          if (pipe_v[i]) n_flush++;
          pipe_v[i] = 1'b0;
        end
      end
      #1;
      check_output();
      if (drive) begin
        if (in_x[W-1]) n_neg++; else n_pos++;
        for (int i = 0; i < N_MOD; i++) begin
          if (raw_segment_sum(in_x, MODS[i]) >= MODS[i]) begin
            n_reduce++;
            break;
          end
        end
        for (int i = 0; i < N_MOD; i++)
          if (ref_res(in_x, MODS[i]) == 0 && raw_segment_sum(in_x, MODS[i]) != 0) begin
            n_zero++;
            break;
          end
        // A word caught by the reset is presented again.
        if (!rst) word++;
      end
      @(negedge clk);
      cycle++;
    end
    in_valid = 1'b0;

    $display("negative=%0d non-negative=%0d reduced=%0d wrapped-to-zero=%0d idle=%0d flushed=%0d",
             n_neg, n_pos, n_reduce, n_zero, n_idle, n_flush);
    checks++; if (n_neg    == 0) failures++;
    checks++; if (n_pos    == 0) failures++;
    checks++; if (n_reduce == 0) failures++;
    checks++; if (n_zero   == 0) failures++;
    checks++; if (n_idle   == 0) failures++;
    checks++; if (n_flush  == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
