// spil_complementer: ones-complement computational unit.
//
// An input latch (destination _COMPL_IN) loads the data bus; the output
// (source _COMPL_OUT) is its bitwise inverse. Programs form a two's
// complement negation as the complement plus one through the adder.
// Timing: latch loads at the clock edge, output valid in the next state.
module spil_complementer #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              load,
  input  logic [DATA_W-1:0] bus_in,
  output logic [DATA_W-1:0] q
);
  logic [DATA_W-1:0] in_q;
  always_ff @(posedge clk)
    if (load) in_q <= bus_in;
  assign q = ~in_q;
endmodule
