// stic_precision_sel: charging-rate check of the STIC controller.
//
// Compares the harvester's charging rate with NLEV-1 thresholds
// (th[0] = Th1 ... th[NLEV-2] = Th(NLEV-1)) and returns the precision level:
// the highest i+1 for which rate > th[i], checked from the top threshold
// down, or 0 when the rate exceeds none of them. With the default five levels
// the result 4..0 selects 256-, 128-, 64-, 32- or 16-bit streams. Level 0
// means that even the shortest streams cannot be paid for by the harvester
// alone and the battery makes up the difference. Combinational.
//
// The strict comparisons and the top-down order follow the design's
// charging-rate procedure; the rate's width and the thresholds being inputs
// (rather than constants) are this implementation's choices.
module stic_precision_sel #(
  parameter int unsigned RATE_W = 16,
  parameter int unsigned NLEV   = 5,
  localparam int unsigned LW    = $clog2(NLEV)
) (
  input  logic [RATE_W-1:0]             rate,
  input  logic [NLEV-2:0][RATE_W-1:0]   th,
  output logic [LW-1:0]                 level
);

  always_comb begin
    level = '0;
    for (int i = 0; i < NLEV - 1; i++) begin
      if (rate > th[i]) level = LW'(i + 1);
    end
  end

endmodule
