// tb_qca_zone_pipe: self-checking test of the clock-zone chain.
//
// Two chains are driven with the same random stream, one new (valid, data)
// pair on every tick: one with the default three zones and one with four.
// Every input is recorded by tick number, and on each tick the outputs must
// equal the input recorded ZONES ticks earlier, which checks both the data
// and the delay. A reset in the middle of the stream must clear every zone:
// out_valid stays low until fresh data has crossed the whole chain.
module tb_qca_zone_pipe;

  localparam int unsigned W = 4;
  localparam int NTICKS = 200;
  localparam int RESET_TICK = 100;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [W-1:0] in_data;
  logic out_valid3, out_valid4;
  logic [W-1:0] out_data3, out_data4;

  logic         hist_valid [NTICKS];
  logic [W-1:0] hist_data  [NTICKS];
  int last_reset;

  int checks = 0;
  int failures = 0;

  qca_zone_pipe dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid3), .out_data(out_data3)
  );

  qca_zone_pipe #(.WIDTH(W), .ZONES(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid4), .out_data(out_data4)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NTICKS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(int t, int zones, logic v, logic [W-1:0] d);
    logic ev;
    logic [W-1:0] ed;
    if (t - zones < last_reset) begin
      ev = 1'b0;
      ed = '0;
    end else begin
      ev = hist_valid[t - zones];
      ed = hist_data[t - zones];
    end
    checks++;
    if (v !== ev || d !== ed) begin
      failures++;
      $display("tick %0d zones %0d: got %b/%h expected %b/%h", t, zones, v, d, ev, ed);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_data = '0;
    last_reset = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NTICKS; t++) begin
      // Drive the input sampled at the coming edge t.
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_data  = W'($urandom());
      hist_valid[t] = in_valid;
      hist_data[t]  = in_data;
      if (t == RESET_TICK) begin
        rst_n = 1'b0;
        #1 rst_n = 1'b1;
        last_reset = t;
      end
      @(posedge clk);
      #1;
      // After edge t the chains hold inputs up to t.
      check_out(t + 1, 3, out_valid3, out_data3);
      check_out(t + 1, 4, out_valid4, out_data4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
