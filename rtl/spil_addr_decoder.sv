// spil_addr_decoder: one-hot decoder for a source or destination address.
//
// The controller sends one source and one destination address per state; a
// decoder of this kind on each address bus raises the select line of exactly
// one data-path unit. Select line 0 belongs to the bus precharge column, which
// neither drives nor loads, so address 0 is the "no transfer" address.
// Purely combinational. In the original circuit each select line is gated with
// a clock phase (source selects during the discharge phase, destination
// selects during the load phase); here that gating is replaced by the single
// clock of the data path, which samples the selected destination at its edge.
module spil_addr_decoder #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic [ADDR_W-1:0]        addr,
  output logic [(1<<ADDR_W)-1:0]   sel
);
  always_comb begin
    for (int unsigned i = 0; i < (1 << ADDR_W); i++)
      sel[i] = (addr == ADDR_W'(i));
  end
endmodule
