// tb_scl_gate: end-to-end test of the complete SCL gate at its default size.
//
// The gate is used with all its defaults (three clock zones). Three phases:
//   1. all sixteen (A, B, C, D) vectors, one per QCA clock cycle (every
//      PHASES_PER_CYCLE ticks), as a QCA circuit is fed;
//   2. 64 random vectors back to back, one per tick, with random gaps;
//   3. a reset while vectors are still in the zones, which must drop them.
// Every accepted vector is queued with its tick number. The output is
// sampled on the falling edge, i.e. the value the next rising edge would
// hand on; every valid output must match the oldest queued vector, and it
// must come exactly three ticks (0.75 QCA clock cycle) after that vector
// was taken. Expected outputs come from the gate's worked truth table
// (S_TABLE), not from the design's own code.
// Counted mechanisms (each must occur): outputs delivered with the expected
// delay, S set through the ~X & D branch, S set through the X & ~D branch,
// and vectors flushed by reset.
module tb_scl_gate;
  import scl_pkg::*;

  localparam logic [15:0] S_TABLE = 16'h56AA;
  localparam int unsigned EXP_DELAY = 3;  // 0.75 cycle of four phases

  typedef struct {
    int       tick;
    scl_out_t out;
  } expect_t;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     in_valid;
  scl_in_t  in;
  logic     out_valid;
  scl_out_t out;

  expect_t pending[$];
  int tick = 0;
  int checks = 0;
  int failures = 0;
  int n_delivered = 0;
  int n_branch_nx_d = 0;
  int n_branch_x_nd = 0;
  int n_flushed = 0;

  scl_gate dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(in),
    .out_valid(out_valid), .out(out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic scl_out_t table_out(scl_in_t v);
    scl_out_t o;
    o.p = v.a;
    o.q = v.b;
    o.r = v.c;
    o.s = S_TABLE[4'(v)];
    return o;
  endfunction

  // Record each vector the gate takes in on this edge.
  always @(posedge clk) begin
    tick <= tick + 1;
    if (rst_n && in_valid) begin
      automatic logic x;
      pending.push_back('{tick: tick, out: table_out(in)});
      x = in.a & (in.b | in.c);
      if (!x && in.d) n_branch_nx_d++;
      if (x && !in.d) n_branch_x_nd++;
    end
  end

  // Check what the next edge would see at the output.
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (pending.size() == 0) begin
          failures++;
          $display("tick %0d: output with nothing pending", tick);
        end else begin
          automatic expect_t e = pending.pop_front();
          if (out !== e.out) begin
            failures++;
            $display("tick %0d: PQRS=%04b expected %04b", tick, out, e.out);
          end
          checks++;
          if (tick - e.tick != int'(EXP_DELAY)) begin
            failures++;
            $display("tick %0d: delay %0d ticks, expected %0d", tick, tick - e.tick, EXP_DELAY);
          end else begin
            n_delivered++;
          end
        end
      end else if (pending.size() != 0 && tick - pending[0].tick >= int'(EXP_DELAY)) begin
        checks++;
        failures++;
        $display("tick %0d: output of tick %0d missing", tick, pending[0].tick);
        void'(pending.pop_front());
      end
    end
  end

  task automatic present(scl_in_t v);
    in_valid = 1'b1;
    in = v;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. One vector per QCA clock cycle.
    for (int v = 0; v < 16; v++) begin
      present(scl_in_t'(v));
      repeat (PHASES_PER_CYCLE - 1) @(posedge clk);
      #1;
    end

    // 2. Back to back, with occasional gaps.
    for (int i = 0; i < 64; i++) begin
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk);
        #1;
      end
      present(scl_in_t'($urandom_range(0, 15)));
    end
    repeat (EXP_DELAY + 2) @(posedge clk);
    #1;

    // 3. Reset with vectors still inside the zones.
    present(scl_in_t'(4'b1010));
    present(scl_in_t'(4'b1101));
    rst_n = 1'b0;
    n_flushed = pending.size();
    pending.delete();
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("out_valid high during reset");
    end
    rst_n = 1'b1;
    repeat (EXP_DELAY + 2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("flushed vector reappeared after reset");
    end
    // The gate works again after the reset.
    present(scl_in_t'(4'b1110));
    repeat (EXP_DELAY + 2) @(posedge clk);
    #1;

    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("%0d vectors never came out", pending.size());
    end
    $display("delivered=%0d branch_nx_d=%0d branch_x_nd=%0d flushed=%0d",
             n_delivered, n_branch_nx_d, n_branch_x_nd, n_flushed);
    checks += 4;
    if (n_delivered == 0)   begin failures++; $display("no output delivered"); end
    if (n_branch_nx_d == 0) begin failures++; $display("~X&D branch never used"); end
    if (n_branch_x_nd == 0) begin failures++; $display("X&~D branch never used"); end
    if (n_flushed == 0)     begin failures++; $display("reset flushed nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
