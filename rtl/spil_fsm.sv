// spil_fsm: the controller of the register-transfer architecture, a
// programmable-logic-array state machine with latched inputs and outputs.
//
// The program is a table with one row per state (spil_pkg::state_entry_t).
// Each state drives a Moore word: READY and the source and destination
// addresses of the one bus transfer made in that state. Each state has a
// default successor and at most one conditional arc, which tests either GO or
// one bit of the data bus. RESET forces state 0.
//
// Input latch: RESET, GO and the whole data bus are sampled at every clock
// edge, and the next state is computed from these latched values, not from
// the live inputs. A branch therefore tests the bus value of the state before
// the branching state; the programs in codec_pkg put the tested value on the
// bus in two consecutive states for this reason. This is the two-stage
// pipeline of the original controller (input latches, PLA, output latches).
// Output latch: the state register. The Moore word is decoded from it, so
// outputs change one clock after the state's predecessor.
//
// A state code with no row in the table behaves as an unprogrammed PLA row:
// all outputs low and next state 0.
//
// One clock here is one full two-phase clock cycle of the original circuit
// (one state per cycle). The default program is the receiver's.
module spil_fsm
  import spil_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned N_STATES = codec_pkg::RX_STATES,
  parameter state_entry_t [0:N_STATES-1] PROGRAM = codec_pkg::RX_PROGRAM
) (
  input  logic              clk,
  input  logic              reset,      // RESET pin, active high
  input  logic              go,         // GO pin
  input  logic [DATA_W-1:0] bus,        // data bus feedback
  output logic              ready,      // READY pin (wait state)
  output addr_t             dst_addr,
  output addr_t             src_addr,
  output state_t            state
);
  // FSM input latch
  logic              reset_l, go_l;
  logic [DATA_W-1:0] bus_l;

  always_ff @(posedge clk) begin
    reset_l <= reset;
    go_l    <= go;
    bus_l   <= bus;
  end

  // PLA: current row lookup
  state_entry_t cur;
  ctrl_t        ctl;
  logic         taken;
  state_t       state_next;

  always_comb begin
    if (int'(state) < int'(N_STATES)) cur = PROGRAM[int'(state)];
    else                              cur = '0;
    ctl = decode_moore(cur.moore);
    unique case (cur.br_kind)
      BR_GO:   taken = (go_l == cur.br_pol);
      BR_BUS:  taken = (bus_l[cur.br_bit] == cur.br_pol);
      default: taken = 1'b0;
    endcase
    if (reset_l)    state_next = '0;
    else if (taken) state_next = cur.next_br;
    else            state_next = cur.next_def;
  end

  // FSM output latch (state lines)
  always_ff @(posedge clk)
    state <= state_next;

  assign ready    = ctl.ready;
  assign dst_addr = ctl.dst;
  assign src_addr = ctl.src;

  // A latched RESET always lands in state 0.
  a_reset_to_s0: assert property (@(posedge clk) reset_l |=> (state == '0));
endmodule
