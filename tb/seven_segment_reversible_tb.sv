// seven_segment_reversible_tb: end-to-end test of the reversible BCD to
// seven-segment decoder at its default (and only) configuration.
//
// Part 1 replays a counting sequence like the one a bench waveform would
// show: the input steps through 0..9, one digit per microsecond, and each
// output pattern a..g is compared with a hand-drawn glyph table (1 = lit,
// common cathode). Part 2 applies the six non-BCD codes 10..15 and checks
// them against the values the decoder's sum-of-products equations give for
// those don't-care inputs, so a change in the network shows up there too.
// Part 3 checks backward recovery: every digit glyph is different, so the
// digit can be read back from the segments; a reverse lookup of each output
// pattern must return the input. The test counts how often each digit was
// shown, each segment was lit and dark, and each digit was recovered, and
// counts a failure for any of these that never happened.
module seven_segment_reversible_tb;

  logic A, B, C, D;
  logic a, b, c, d, e, f, g;
  int   checks = 0, failures = 0;

  seven_segment_reversible dut (
    .A(A), .B(B), .C(C), .D(D),
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g)
  );

  // Glyphs as {a,b,c,d,e,f,g}, indexed by the input code.
  localparam logic [6:0] GLYPH [16] = '{
    7'b1111110,  // 0
    7'b0110000,  // 1
    7'b1101101,  // 2
    7'b1111001,  // 3
    7'b0110011,  // 4
    7'b1011011,  // 5
    7'b1011111,  // 6 (with tail)
    7'b1110000,  // 7
    7'b1111111,  // 8
    7'b1111011,  // 9 (with tail)
    7'b1101111,  // 10..15: don't-care codes, values of the equations
    7'b1111011,
    7'b1111011,
    7'b1011011,
    7'b1011111,
    7'b1111011
  };

  int shown     [10];
  int recovered [10];
  int lit       [7];
  int dark      [7];

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int code);
    logic [6:0] seg;
    {A, B, C, D} = 4'(code);
    #1us;
    seg = {a, b, c, d, e, f, g};
    checks++;
    if (seg !== GLYPH[code]) begin
      failures++;
      $display("FAIL code %0d: segments %07b, expected %07b", code, seg, GLYPH[code]);
    end
    for (int s = 0; s < 7; s++) begin
      if (seg[6-s]) lit[s]++;
      else          dark[s]++;
    end
    if (code < 10 && seg === GLYPH[code]) shown[code]++;
  endtask

  // Reverse lookup: the digit whose glyph matches, or -1.
  function automatic int digit_of(logic [6:0] seg);
    int hit = -1;
    for (int k = 0; k < 10; k++)
      if (GLYPH[k] == seg) hit = (hit == -1) ? k : -2;
    return hit;
  endfunction

  initial begin
    foreach (shown[i])     shown[i] = 0;
    foreach (recovered[i]) recovered[i] = 0;
    foreach (lit[i])       begin lit[i] = 0; dark[i] = 0; end

    // Part 1: count through the ten BCD digits.
    for (int code = 0; code < 10; code++) apply(code);

    // Part 2: the don't-care codes.
    for (int code = 10; code < 16; code++) apply(code);

    // Part 3: read each digit back from the decoder's own output.
    for (int code = 0; code < 10; code++) begin
      {A, B, C, D} = 4'(code);
      #1us;
      checks++;
      if (digit_of({a, b, c, d, e, f, g}) != code) begin
        failures++;
        $display("FAIL code %0d not recoverable from %07b", code, {a, b, c, d, e, f, g});
      end else begin
        recovered[code]++;
      end
    end

    // Every mechanism must have happened at least once.
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (shown[k] == 0)     begin failures++; $display("FAIL digit %0d never shown", k); end
      checks++;
      if (recovered[k] == 0) begin failures++; $display("FAIL digit %0d never recovered", k); end
    end
    for (int s = 0; s < 7; s++) begin
      checks++;
      if (lit[s] == 0 || dark[s] == 0) begin
        failures++;
        $display("FAIL segment %0d lit %0d times, dark %0d times", s, lit[s], dark[s]);
      end
    end
    $display("digits shown: %p", shown);
    $display("segments lit: %p  dark: %p", lit, dark);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : seven_segment_reversible_tb
