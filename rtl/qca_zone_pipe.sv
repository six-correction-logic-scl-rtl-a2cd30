// qca_zone_pipe: a chain of QCA clock zones.
//
// A QCA layout is split into clock zones that are switched one after another
// by a four-phase clock; each zone latches what the zone before it holds and
// passes it on one phase later. Here one clock tick is one phase and each
// zone is one register stage, so data leaves the chain ZONES ticks after it
// enters. A new vector may enter on every tick. A valid bit travels with the
// data so a user can see which output ticks carry a result.
//
// Interface: clk (one tick per clock phase), rst_n (asynchronous, active
// low, clears the valid bits and data), in_valid/in_data, out_valid/out_data.
// Timing: out_* on tick n+ZONES equals in_* sampled at tick n.
// The zone-by-zone delay follows the QCA clocking scheme; the reset and the
// valid bit are this design's own additions, since a QCA circuit has neither.
module qca_zone_pipe #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned ZONES = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [ZONES-1:0]            zone_valid;
  logic [ZONES-1:0][WIDTH-1:0] zone_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zone_valid <= '0;
      zone_data  <= '0;
    end else begin
      zone_valid[0] <= in_valid;
      zone_data[0]  <= in_data;
      for (int unsigned z = 1; z < ZONES; z++) begin
        zone_valid[z] <= zone_valid[z-1];
        zone_data[z]  <= zone_data[z-1];
      end
    end
  end

  always_comb begin
    out_valid = zone_valid[ZONES-1];
    out_data  = zone_data[ZONES-1];
  end

  initial begin
    assert (ZONES >= 1) else $error("qca_zone_pipe: ZONES must be at least 1");
  end

endmodule
