// tb_cog_gate - self-checking testbench for the COG gate.
//
// Applies all eight input patterns and compares (p, q, r) with the gate's
// truth table, written out below as constants. It also checks that no two
// inputs give the same output (the gate is reversible) and that r acts as a
// 2x1 multiplexer with select a (a = 1 picks b, a = 0 picks c).
module tb_cog_gate;

  logic a, b, c;
  logic p, q, r;
  int   checks = 0;
  int   failures = 0;

  // Expected {p, q, r} for input {a, b, c} = index.
  localparam logic [2:0] TRUTH [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b100, 3'b101, 3'b111
  };

  cog_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit seen [8];
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TRUTH[v]) begin
        failures++;
        $display("FAIL abc=%03b: pqr=%b%b%b expected %03b", 3'(v), p, q, r, TRUTH[v]);
      end
      checks++;
      if (r !== (a ? b : c)) begin
        failures++;
        $display("FAIL abc=%03b: r=%b is not the selected input", 3'(v), r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%03b: output %b%b%b repeats", 3'(v), p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
