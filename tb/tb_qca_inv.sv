// tb_qca_inv: self-checking test of the QCA inverter.
//
// Drives both polarizations several times in alternation and checks that
// the output is always the reverse of the input.
module tb_qca_inv;

  logic a, y;
  int checks = 0;
  int failures = 0;

  qca_inv dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? 1'b0 : 1'b1)) begin
        failures++;
        $display("inv(%b) = %b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
