// codec_pkg: the bus map and the two controller programs of the ADM-PCM codec.
//
// Both halves of the codec use the same data-path layout (the bus map below):
// an 8-bit bus, 4-bit source and destination addresses, three storage
// registers, constants 0, 1 and -1, an adder with two input latches, a
// left shifter, a ones-complementer, one chip input port and one chip output
// register. The address numbers are those of the published bus map; address 0
// on either side means "no unit" (the bus stays precharged, nothing loads).
// A right shifter is part of the architecture's unit library and has address
// 4, but the fabricated codec was built without it.
//
// RX_PROGRAM and TX_PROGRAM are the state tables of the two controllers,
// transcribed state by state from the published controller listings: the
// Moore masks are copied as printed (see spil_pkg for the bit order) and the
// branch conditions name the tested signal. States 0-2 are the reset
// procedure (Ex, X_of_k, Sx_of_k := 0), state 3 is the wait state that drives
// READY and waits for GO, and the rest is the conversion loop.
//
// Receiver (ADM to PCM), one iteration k:
//   4-9    if Sx < 0 then Sx := ~Sx + 1                (|Sx(k-1)|)
//   10-15  if Ex[0] = 0 then Sx := ~Sx + 1             (times e(k-1))
//   16-21  Sx := Sx + (Ex[1] ? 1 : -1)                 (plus Smin*e(k-2))
//   22-24  X := X + Sx
//   25-26  Ex := Ex << 1
//   27-31  if ADM_input[0] = 1 then Ex := Ex + 1
//   32     PCM_output := X
// Transmitter (PCM to ADM): identical up to state 26, then
//   27-33  bus := X + ~(PCM_input - 1) = X - PCM_input, test its sign bit
//   34-36  if the difference was negative (PCM_input > X) then Ex := Ex + 1
//   37     ADM_output := Ex   (bit 0 leaves the chip)
// Each two-state test block (4-5, 10-11, 17-18, 27-28, 32-33) puts the tested
// value on the bus in both states, because the controller decides on the bus
// value it latched during the previous state.
package codec_pkg;
  import spil_pkg::*;

  localparam int unsigned DATA_W = 8;   // _data_width of both programs

  // Source addresses
  // Address 0 on either side is the idle column: no source discharges the
  // bus (it stays all ones) and no destination loads.
  localparam addr_t SRC_ADD_OUT  = 4'd2;
  localparam addr_t SRC_SHFL_OUT = 4'd3;
  localparam addr_t SRC_SHFR_OUT = 4'd4;   // absent in the fabricated codec
  localparam addr_t SRC_COMPL    = 4'd5;
  localparam addr_t SRC_IN_PORT  = 4'd6;   // ADM_input (rx) / PCM_input (tx)
  localparam addr_t SRC_X        = 4'd8;   // X_of_k
  localparam addr_t SRC_SX       = 4'd9;   // Sx_of_k
  localparam addr_t SRC_EX       = 4'd10;  // Ex
  localparam addr_t SRC_C0       = 4'd11;  // constant 0
  localparam addr_t SRC_C1       = 4'd12;  // constant 1
  localparam addr_t SRC_CM1      = 4'd13;  // constant -1

  // Destination addresses
  localparam addr_t DST_ADD_A    = 4'd1;   // _ADD_IN_1
  localparam addr_t DST_ADD_B    = 4'd2;   // _ADD_IN_2
  localparam addr_t DST_SHFL_IN  = 4'd3;
  localparam addr_t DST_SHFR_IN  = 4'd4;   // absent in the fabricated codec
  localparam addr_t DST_COMPL_IN = 4'd5;
  localparam addr_t DST_OUT_PORT = 4'd7;   // PCM_output (rx) / ADM_output (tx)
  localparam addr_t DST_X        = 4'd8;
  localparam addr_t DST_SX       = 4'd9;
  localparam addr_t DST_EX       = 4'd10;

  localparam int unsigned RX_STATES = 33;
  localparam int unsigned TX_STATES = 38;

  localparam logic [DATA_W-1:0] CONST_0  = 8'h00;
  localparam logic [DATA_W-1:0] CONST_1  = 8'h01;
  localparam logic [DATA_W-1:0] CONST_M1 = 8'hFF;

  localparam state_entry_t [0:RX_STATES-1] RX_PROGRAM = '{
    st(9'b001110011, BR_NONE, 0, 1'b0,  0,  1),  //  0 Ex := 0
    st(9'b001010011, BR_NONE, 0, 1'b0,  0,  2),  //  1 X_of_k := 0
    st(9'b011010011, BR_NONE, 0, 1'b0,  0,  3),  //  2 Sx_of_k := 0
    st(9'b100000000, BR_GO,   0, 1'b1,  4,  3),  //  3 wait, READY
    st(9'b001000001, BR_NONE, 0, 1'b0,  0,  5),  //  4 bus := Sx
    st(9'b001000001, BR_BUS,  7, 1'b1,  6, 10),  //  5 bus := Sx, Sx < 0 ?
    st(9'b011001001, BR_NONE, 0, 1'b0,  0,  7),  //  6 compl_in := Sx
    st(9'b010000101, BR_NONE, 0, 1'b0,  0,  8),  //  7 add_a := 1
    st(9'b001100100, BR_NONE, 0, 1'b0,  0,  9),  //  8 add_b := compl_out
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 10),  //  9 Sx := add_out
    st(9'b000010001, BR_NONE, 0, 1'b0,  0, 11),  // 10 bus := Ex
    st(9'b000010001, BR_BUS,  0, 1'b0, 12, 16),  // 11 bus := Ex, Ex[0] = 0 ?
    st(9'b011001001, BR_NONE, 0, 1'b0,  0, 13),  // 12 compl_in := Sx
    st(9'b010000101, BR_NONE, 0, 1'b0,  0, 14),  // 13 add_a := 1
    st(9'b001100100, BR_NONE, 0, 1'b0,  0, 15),  // 14 add_b := compl_out
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 16),  // 15 Sx := add_out
    st(9'b011000001, BR_NONE, 0, 1'b0,  0, 17),  // 16 add_a := Sx
    st(9'b000010001, BR_NONE, 0, 1'b0,  0, 18),  // 17 bus := Ex
    st(9'b000010001, BR_BUS,  1, 1'b1, 19, 20),  // 18 bus := Ex, Ex[1] = 1 ?
    st(9'b000100101, BR_NONE, 0, 1'b0,  0, 21),  // 19 add_b := 1
    st(9'b001100101, BR_NONE, 0, 1'b0,  0, 21),  // 20 add_b := -1
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 22),  // 21 Sx := add_out
    st(9'b010000001, BR_NONE, 0, 1'b0,  0, 23),  // 22 add_a := X
    st(9'b001100001, BR_NONE, 0, 1'b0,  0, 24),  // 23 add_b := Sx
    st(9'b000010010, BR_NONE, 0, 1'b0,  0, 25),  // 24 X := add_out
    st(9'b010110001, BR_NONE, 0, 1'b0,  0, 26),  // 25 shfl_in := Ex
    st(9'b001110010, BR_NONE, 0, 1'b0,  0, 27),  // 26 Ex := shfl_out
    st(9'b000010100, BR_NONE, 0, 1'b0,  0, 28),  // 27 bus := ADM_input
    st(9'b000010100, BR_BUS,  0, 1'b1, 29, 32),  // 28 bus := ADM_input, bit 0 = 1 ?
    st(9'b010010001, BR_NONE, 0, 1'b0,  0, 30),  // 29 add_a := Ex
    st(9'b000100101, BR_NONE, 0, 1'b0,  0, 31),  // 30 add_b := 1
    st(9'b000110010, BR_NONE, 0, 1'b0,  0, 32),  // 31 Ex := add_out
    st(9'b010101001, BR_NONE, 0, 1'b0,  0,  3)   // 32 PCM_output := X
  };

  localparam state_entry_t [0:TX_STATES-1] TX_PROGRAM = '{
    st(9'b001110011, BR_NONE, 0, 1'b0,  0,  1),  //  0 Ex := 0
    st(9'b001010011, BR_NONE, 0, 1'b0,  0,  2),  //  1 X_of_k := 0
    st(9'b011010011, BR_NONE, 0, 1'b0,  0,  3),  //  2 Sx_of_k := 0
    st(9'b100000000, BR_GO,   0, 1'b1,  4,  3),  //  3 wait, READY
    st(9'b001000001, BR_NONE, 0, 1'b0,  0,  5),  //  4 bus := Sx
    st(9'b001000001, BR_BUS,  7, 1'b1,  6, 10),  //  5 bus := Sx, Sx < 0 ?
    st(9'b011001001, BR_NONE, 0, 1'b0,  0,  7),  //  6 compl_in := Sx
    st(9'b010000101, BR_NONE, 0, 1'b0,  0,  8),  //  7 add_a := 1
    st(9'b001100100, BR_NONE, 0, 1'b0,  0,  9),  //  8 add_b := compl_out
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 10),  //  9 Sx := add_out
    st(9'b000010001, BR_NONE, 0, 1'b0,  0, 11),  // 10 bus := Ex
    st(9'b000010001, BR_BUS,  0, 1'b0, 12, 16),  // 11 bus := Ex, Ex[0] = 0 ?
    st(9'b011001001, BR_NONE, 0, 1'b0,  0, 13),  // 12 compl_in := Sx
    st(9'b010000101, BR_NONE, 0, 1'b0,  0, 14),  // 13 add_a := 1
    st(9'b001100100, BR_NONE, 0, 1'b0,  0, 15),  // 14 add_b := compl_out
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 16),  // 15 Sx := add_out
    st(9'b011000001, BR_NONE, 0, 1'b0,  0, 17),  // 16 add_a := Sx
    st(9'b000010001, BR_NONE, 0, 1'b0,  0, 18),  // 17 bus := Ex
    st(9'b000010001, BR_BUS,  1, 1'b1, 19, 20),  // 18 bus := Ex, Ex[1] = 1 ?
    st(9'b000100101, BR_NONE, 0, 1'b0,  0, 21),  // 19 add_b := 1
    st(9'b001100101, BR_NONE, 0, 1'b0,  0, 21),  // 20 add_b := -1
    st(9'b010010010, BR_NONE, 0, 1'b0,  0, 22),  // 21 Sx := add_out
    st(9'b010000001, BR_NONE, 0, 1'b0,  0, 23),  // 22 add_a := X
    st(9'b001100001, BR_NONE, 0, 1'b0,  0, 24),  // 23 add_b := Sx
    st(9'b000010010, BR_NONE, 0, 1'b0,  0, 25),  // 24 X := add_out
    st(9'b010110001, BR_NONE, 0, 1'b0,  0, 26),  // 25 shfl_in := Ex
    st(9'b001110010, BR_NONE, 0, 1'b0,  0, 27),  // 26 Ex := shfl_out
    st(9'b011000101, BR_NONE, 0, 1'b0,  0, 28),  // 27 add_a := -1
    st(9'b000110100, BR_NONE, 0, 1'b0,  0, 29),  // 28 add_b := PCM_input
    st(9'b010011000, BR_NONE, 0, 1'b0,  0, 30),  // 29 compl_in := add_out
    st(9'b010000001, BR_NONE, 0, 1'b0,  0, 31),  // 30 add_a := X
    st(9'b001100100, BR_NONE, 0, 1'b0,  0, 32),  // 31 add_b := compl_out
    st(9'b000010000, BR_NONE, 0, 1'b0,  0, 33),  // 32 bus := X - PCM_input
    st(9'b000010000, BR_BUS,  7, 1'b1, 34, 37),  // 33 same, negative ?
    st(9'b010010001, BR_NONE, 0, 1'b0,  0, 35),  // 34 add_a := Ex
    st(9'b000100101, BR_NONE, 0, 1'b0,  0, 36),  // 35 add_b := 1
    st(9'b000110010, BR_NONE, 0, 1'b0,  0, 37),  // 36 Ex := add_out
    st(9'b010111001, BR_NONE, 0, 1'b0,  0,  3)   // 37 ADM_output := Ex
  };

endpackage
