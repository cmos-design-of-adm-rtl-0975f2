// spil_data_bus: the precharged single data bus.
//
// Every bus line is precharged high, then the selected source unit pulls low
// each line whose data bit is 0. With no source selected the bus reads all
// ones. Written as a wired AND: a line stays 1 unless some selected source
// has a 0 on it. If two sources were ever selected together their values
// would be ANDed, as the precharged bus would do; the address decoder never
// selects two. Combinational.
//
// Ports: src_sel (one select line per source address), src_data (the value
// each source would discharge onto the bus), bus.
module spil_data_bus #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_SRC  = 16
) (
  input  logic [N_SRC-1:0]             src_sel,
  input  logic [N_SRC-1:0][DATA_W-1:0] src_data,
  output logic [DATA_W-1:0]            bus
);
  always_comb begin
    bus = '1;                                  // precharge
    for (int unsigned i = 0; i < N_SRC; i++)
      if (src_sel[i]) bus &= src_data[i];      // conditional discharge
  end
endmodule
