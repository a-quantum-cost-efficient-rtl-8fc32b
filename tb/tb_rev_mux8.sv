// tb_rev_mux8 - end-to-end testbench for the 8x1 reversible multiplexer.
//
// The design has no parameters, so this runs the full-size circuit. It
//   1. sweeps the select lines from 0 (s0=s1=s2=0) to 7 (all ones) with a
//      single data input high, as in a waveform test of a multiplexer, and
//      checks that y is high exactly for the input the sum of products
//      selects;
//   2. applies all 2048 patterns of (i, s) and checks y against the sum of
//      products, s_out against s, and that no 11-bit output pattern occurs
//      twice (the circuit is reversible);
//   3. recovers the inputs of every pattern from its outputs through the
//      table built in step 2 and checks that every output pattern occurred.
// It counts how often each select value, each half (2x1 gate picking the
// upper or the lower 4x1) and each data value on y occurred, and counts a
// failure for any that never did.
module tb_rev_mux8;

  logic [7:0] i;
  logic [2:0] s;
  logic       y;
  logic [2:0] s_out;
  logic [6:0] g;
  int         checks = 0;
  int         failures = 0;

  rev_mux8 dut (.i(i), .s(s), .y(y), .s_out(s_out), .g(g));

  // The published output expression, term by term.
  function automatic logic sop(input logic [7:0] in, input logic [2:0] sel);
    logic s0, s1, s2;
    {s2, s1, s0} = sel;
    return (!s0 && !s1 && !s2 && in[0]) || (!s0 && !s1 && s2 && in[4]) ||
           (!s0 &&  s1 && !s2 && in[1]) || (!s0 &&  s1 && s2 && in[5]) ||
           ( s0 && !s1 && !s2 && in[2]) || ( s0 && !s1 && s2 && in[6]) ||
           ( s0 &&  s1 && !s2 && in[3]) || ( s0 &&  s1 && s2 && in[7]);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int          sel_hits [8];
    int          half_hits [2];
    int          y_hits [2];
    logic [10:0] inverse [2048];
    bit          seen [2048];
    logic [10:0] outp;
    int          recovered;

    foreach (sel_hits[k]) sel_hits[k] = 0;
    foreach (half_hits[k]) half_hits[k] = 0;
    foreach (y_hits[k]) y_hits[k] = 0;
    foreach (seen[k]) seen[k] = 1'b0;
    foreach (inverse[k]) inverse[k] = '0;

    // 1. select sweep with one-hot data
    for (int hot = 0; hot < 8; hot++) begin
      i = 8'(1 << hot);
      for (int v = 0; v < 8; v++) begin
        s = 3'(v);
        #1;
        checks++;
        if (y !== sop(i, s)) begin
          failures++;
          $display("FAIL sweep i=%08b s=%03b: y=%b expected %b", i, s, y, sop(i, s));
        end
      end
    end

    // 2. exhaustive forward check
    for (int v = 0; v < 2048; v++) begin
      {s, i} = 11'(v);
      #1;
      checks++;
      if (y !== sop(i, s)) begin
        failures++;
        $display("FAIL i=%08b s=%03b: y=%b expected %b", i, s, y, sop(i, s));
      end
      checks++;
      if (s_out !== s) begin
        failures++;
        $display("FAIL s=%03b: s_out=%03b", s, s_out);
      end
      outp = {y, s_out, g};
      checks++;
      if (seen[outp]) begin
        failures++;
        $display("FAIL input %011b: output %011b repeats", 11'(v), outp);
      end
      seen[outp] = 1'b1;
      inverse[outp] = 11'(v);
      sel_hits[s]++;
      half_hits[s[2]]++;
      y_hits[y]++;
    end

    // 3. every output pattern occurs and maps back to its input
    recovered = 0;
    for (int v = 0; v < 2048; v++) begin
      {s, i} = 11'(v);
      #1;
      outp = {y, s_out, g};
      if (seen[outp] && inverse[outp] == 11'(v)) recovered++;
    end
    checks++;
    if (recovered != 2048) begin
      failures++;
      $display("FAIL only %0d of 2048 inputs recovered from the outputs", recovered);
    end

    foreach (sel_hits[k]) begin
      checks++;
      if (sel_hits[k] == 0) begin
        failures++;
        $display("FAIL select value %0d never applied", k);
      end
    end
    foreach (half_hits[k]) begin
      checks++;
      if (half_hits[k] == 0) begin
        failures++;
        $display("FAIL 2x1 gate never picked the %s half", (k != 0) ? "upper" : "lower");
      end
    end
    foreach (y_hits[k]) begin
      checks++;
      if (y_hits[k] == 0) begin
        failures++;
        $display("FAIL y never %0d", k);
      end
    end
    $display("select values: %0d %0d %0d %0d %0d %0d %0d %0d; lower/upper: %0d/%0d; recovered %0d",
             sel_hits[0], sel_hits[1], sel_hits[2], sel_hits[3], sel_hits[4],
             sel_hits[5], sel_hits[6], sel_hits[7], half_hits[0], half_hits[1], recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
