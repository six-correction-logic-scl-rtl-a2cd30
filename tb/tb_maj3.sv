// tb_maj3: exhaustive self-checking test of the majority voter.
//
// Drives all eight input combinations and compares y with "at least two of
// the three inputs are 1", counted bit by bit. Then uses the voter as it is
// used in the SCL gate, with one input fixed to 0 (AND) and to 1 (OR), and
// checks it against the two-input AND and OR truth tables.
module tb_maj3;

  logic a, b, c, y;
  int checks = 0;
  int failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic expect_y;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      expect_y = (ones >= 2);
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("MV(%b,%b,%b) = %b, expected %b", a, b, c, y, expect_y);
      end
    end
    // Programmed as 2-input AND (c fixed to p = -1) and OR (c fixed to p = +1).
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      c = 1'b0;
      #1;
      checks++;
      if (y !== (v == 3)) begin
        failures++;
        $display("AND(%b,%b) = %b", a, b, y);
      end
      c = 1'b1;
      #1;
      checks++;
      if (y !== (v != 0)) begin
        failures++;
        $display("OR(%b,%b) = %b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
