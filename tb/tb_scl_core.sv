// tb_scl_core: exhaustive self-checking test of the combinational SCL gate.
//
// Applies all sixteen (A, B, C, D) vectors. The expected S column is the
// gate's worked truth table written out as a constant (bit A*8+B*4+C*2+D of
// S_TABLE is S), so it does not share code with the design; P, Q and R must
// copy A, B and C.
module tb_scl_core;
  import scl_pkg::*;

  // S for ABCD = 0000 .. 1111: 0101 0101 0110 1010, read from bit 0 upward.
  localparam logic [15:0] S_TABLE = 16'h56AA;

  scl_in_t  in;
  scl_out_t out;
  int checks = 0;
  int failures = 0;

  scl_core dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      in = scl_in_t'(v);
      #1;
      checks++;
      if (out.p !== in.a || out.q !== in.b || out.r !== in.c) begin
        failures++;
        $display("ABCD=%04b: PQR=%b%b%b", v[3:0], out.p, out.q, out.r);
      end
      checks++;
      if (out.s !== S_TABLE[v]) begin
        failures++;
        $display("ABCD=%04b: S=%b expected %b", v[3:0], out.s, S_TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
