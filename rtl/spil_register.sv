// spil_register: a data-path storage register (a program variable) or an
// off-chip output register.
//
// It loads the data bus at the clock edge of a state whose destination
// address selects it, and holds its value otherwise. Its output feeds the
// source side of the bus (for storage registers) or the chip pins (for output
// registers). The registers have no reset of their own: the controller's
// reset procedure clears them by bus transfers, as in the original design.
//
// Timing: q changes one clock after the state that names the register as
// destination.
module spil_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              load,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk)
    if (load) q <= d;
endmodule
