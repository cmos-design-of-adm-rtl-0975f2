// spil_shift_right: right-shift-by-one computational unit with sign
// extension.
//
// An input latch (destination _SHFR_IN) loads the data bus; the output
// (source _SHFR_OUT) is the latched word shifted right by one bit with the
// sign bit copied into the top bit, an arithmetic divide by two rounding
// toward minus infinity. It belongs to the minimum unit set of the
// architecture; the fabricated codec left it out because neither program uses
// it (spil_datapath HAS_SHIFT_RIGHT).
// Timing: latch loads at the clock edge, output valid in the next state.
module spil_shift_right #(
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
  assign q = {in_q[DATA_W-1], in_q[DATA_W-1:1]};
endmodule
