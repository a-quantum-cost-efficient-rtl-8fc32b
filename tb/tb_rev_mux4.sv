// tb_rev_mux4 - self-checking testbench for the 4x1 reversible multiplexer.
//
// Applies all 64 patterns of (s1, s0, d). For each it checks
//   - y against the sum of products s0's1'd0 + s0's1 d1 + s0 s1'd2 + s0 s1 d3,
//   - that s1_out and s0_out return the select lines,
//   - the garbage outputs against a model built from the COG truth table,
//   - that the 6-bit output pattern has not been seen before (reversible).
// Finally it checks that every one of the 64 output patterns occurred.
module tb_rev_mux4;

  logic [3:0] d;
  logic       s1, s0;
  logic       y, s1_out, s0_out;
  logic [2:0] g;
  int         checks = 0;
  int         failures = 0;

  // COG gate truth table: {p, q, r} for {a, b, c} = index.
  localparam logic [2:0] COG [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b100, 3'b101, 3'b111
  };

  rev_mux4 dut (.d(d), .s1(s1), .s0(s0), .y(y), .s1_out(s1_out),
                .s0_out(s0_out), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit         seen [64];
    logic       exp_y;
    logic [2:0] t1, t2, t3;
    int         distinct;
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 64; v++) begin
      {s1, s0, d} = 6'(v);
      #1;
      exp_y = (!s0 && !s1 && d[0]) || (!s0 && s1 && d[1]) ||
              ( s0 && !s1 && d[2]) || ( s0 && s1 && d[3]);
      t1 = COG[{s1, d[1], d[0]}];
      t2 = COG[{t1[2], d[3], d[2]}];
      t3 = COG[{s0, t2[0], t1[0]}];
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s1=%b s0=%b d=%04b: y=%b expected %b", s1, s0, d, y, exp_y);
      end
      checks++;
      if (s1_out !== s1 || s0_out !== s0) begin
        failures++;
        $display("FAIL s1=%b s0=%b: select outputs %b%b", s1, s0, s1_out, s0_out);
      end
      checks++;
      if (g !== {t3[1], t2[1], t1[1]}) begin
        failures++;
        $display("FAIL s1=%b s0=%b d=%04b: g=%03b expected %03b", s1, s0, d, g,
                 {t3[1], t2[1], t1[1]});
      end
      checks++;
      if (seen[{y, s1_out, s0_out, g}]) begin
        failures++;
        $display("FAIL input %06b: output pattern repeats", 6'(v));
      end
      seen[{y, s1_out, s0_out, g}] = 1'b1;
    end
    distinct = 0;
    foreach (seen[k]) if (seen[k]) distinct++;
    checks++;
    if (distinct != 64) begin
      failures++;
      $display("FAIL only %0d distinct output patterns", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
