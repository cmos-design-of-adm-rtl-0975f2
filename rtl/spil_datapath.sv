// spil_datapath: the single-bus data path of the codec.
//
// Units hang off one precharged data bus at the addresses of the published
// bus map (codec_pkg): the adder with its two input latches, the left
// shifter, the ones-complementer, an optional right shifter, the chip input
// port, the chip output register, the three program variables X_of_k,
// Sx_of_k and Ex, and the constants 0, 1 and -1. Each clock the source
// address picks the unit that discharges the bus and the destination address
// picks the unit that loads it at the clock edge.
//
// Chip input port: read straight from the pins when it is the source. Only
// the bits set in IN_MASK are wired to pins; an unwired bit never discharges
// the bus and so reads 1. The receiver wires bit 0 only, the transmitter all
// eight. Chip output register: all DATA_W bits are kept; the wrapper decides
// which leave the chip.
//
// HAS_SHIFT_RIGHT = 0 builds the codec as fabricated, without the right
// shifter (its addresses then read as an empty slot).
module spil_datapath
  import spil_pkg::*;
#(
  parameter int unsigned       DATA_W          = codec_pkg::DATA_W,
  parameter logic [DATA_W-1:0] IN_MASK         = '1,
  parameter bit                HAS_SHIFT_RIGHT = 1'b0
) (
  input  logic              clk,
  input  addr_t             src_addr,
  input  addr_t             dst_addr,
  input  logic [DATA_W-1:0] chip_in,
  output logic [DATA_W-1:0] chip_out,
  output logic [DATA_W-1:0] bus
);
  logic [N_UNITS-1:0]             src_sel, dst_sel;
  logic [N_UNITS-1:0][DATA_W-1:0] src_data;
  logic [DATA_W-1:0] add_out, shfl_out, shfr_out, compl_out;
  logic [DATA_W-1:0] x_q, sx_q, ex_q;

  spil_addr_decoder #(.ADDR_W(ADDR_W)) u_src_dec (.addr(src_addr), .sel(src_sel));
  spil_addr_decoder #(.ADDR_W(ADDR_W)) u_dst_dec (.addr(dst_addr), .sel(dst_sel));

  spil_adder #(.DATA_W(DATA_W)) u_adder (
    .clk, .load_a(dst_sel[codec_pkg::DST_ADD_A]), .load_b(dst_sel[codec_pkg::DST_ADD_B]),
    .bus_in(bus), .sum(add_out));

  spil_shift_left #(.DATA_W(DATA_W)) u_shfl (
    .clk, .load(dst_sel[codec_pkg::DST_SHFL_IN]), .bus_in(bus), .q(shfl_out));

  if (HAS_SHIFT_RIGHT) begin : g_shfr
    spil_shift_right #(.DATA_W(DATA_W)) u_shfr (
      .clk, .load(dst_sel[codec_pkg::DST_SHFR_IN]), .bus_in(bus), .q(shfr_out));
  end else begin : g_no_shfr
    assign shfr_out = '1;            // empty slot: never discharges
  end

  spil_complementer #(.DATA_W(DATA_W)) u_compl (
    .clk, .load(dst_sel[codec_pkg::DST_COMPL_IN]), .bus_in(bus), .q(compl_out));

  spil_register #(.DATA_W(DATA_W)) u_out_port (
    .clk, .load(dst_sel[codec_pkg::DST_OUT_PORT]), .d(bus), .q(chip_out));
  spil_register #(.DATA_W(DATA_W)) u_x (
    .clk, .load(dst_sel[codec_pkg::DST_X]),  .d(bus), .q(x_q));
  spil_register #(.DATA_W(DATA_W)) u_sx (
    .clk, .load(dst_sel[codec_pkg::DST_SX]), .d(bus), .q(sx_q));
  spil_register #(.DATA_W(DATA_W)) u_ex (
    .clk, .load(dst_sel[codec_pkg::DST_EX]), .d(bus), .q(ex_q));

  // Source side: what each address would discharge onto the bus.
  always_comb begin
    for (int unsigned i = 0; i < N_UNITS; i++) src_data[i] = '1;
    src_data[codec_pkg::SRC_ADD_OUT]  = add_out;
    src_data[codec_pkg::SRC_SHFL_OUT] = shfl_out;
    src_data[codec_pkg::SRC_SHFR_OUT] = shfr_out;
    src_data[codec_pkg::SRC_COMPL]    = compl_out;
    src_data[codec_pkg::SRC_IN_PORT]  = chip_in | ~IN_MASK;
    src_data[codec_pkg::SRC_X]        = x_q;
    src_data[codec_pkg::SRC_SX]       = sx_q;
    src_data[codec_pkg::SRC_EX]       = ex_q;
    src_data[codec_pkg::SRC_C0]       = DATA_W'(codec_pkg::CONST_0);
    src_data[codec_pkg::SRC_C1]       = DATA_W'(codec_pkg::CONST_1);
    src_data[codec_pkg::SRC_CM1]      = DATA_W'(codec_pkg::CONST_M1);
  end

  spil_data_bus #(.DATA_W(DATA_W), .N_SRC(N_UNITS)) u_bus (
    .src_sel, .src_data, .bus);
endmodule
