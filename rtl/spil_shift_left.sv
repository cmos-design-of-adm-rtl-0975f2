// spil_shift_left: left-shift-by-one computational unit.
//
// An input latch (destination _SHFL_IN) loads the data bus; the unit's output
// (source _SHFL_OUT) is the latched word shifted left by one bit with a 0
// shifted into bit 0. The bit shifted out of the top is dropped.
// Timing: latch loads at the clock edge, output valid in the next state.
module spil_shift_left #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              load,
  input  logic [DATA_W-1:0] bus_in,
  output logic [DATA_W-1:0] q
);
  logic [DATA_W-2:0] in_q;   // the top bit is shifted out, so it is not kept
  always_ff @(posedge clk)
    if (load) in_q <= bus_in[DATA_W-2:0];
  assign q = {in_q, 1'b0};
endmodule
