// pcm_transmitter: PCM-to-ADM converter (the codec's transmitter half).
//
// Runs the same Song predictor and summer as the receiver on its own ADM
// output, and produces each new ADM bit by comparing the 8-bit PCM input with
// the current estimate x(k) (after the estimate has been updated):
//   e(k) = +1 (bit 1) if pcm_in > x(k), else -1 (bit 0).
// The comparison is done as the sign of x(k) - pcm_in, computed with the
// adder as x + ~(pcm_in - 1) in 8-bit wrap-around arithmetic, so, as in the
// original program, it gives the wrong answer when that difference overflows.
//
// A spil_fsm controller runs codec_pkg::TX_PROGRAM over a spil_datapath whose
// input port has all eight bits wired (pcm_in) and whose output register
// drives one pin, adm_out (bit 0 of Ex).
//
// Handshake and timing as in adm_receiver: hold reset for two clocks, READY
// rises four clocks after reset is last high; with READY high the controller
// waits for GO. With GO held high one conversion, wait state included, takes
// 23 clocks + 4 if S(k-1) < 0, + 4 if e(k-1) = -1, + 3 if the new bit is 1,
// so 23 to 34 clocks; the worst case is 34 states per ADM bit. pcm_in is read
// in program state 28 and must be stable during the conversion. adm_out
// changes at the end of the conversion, on the same clock edge at which READY
// rises.
module pcm_transmitter
  import spil_pkg::*;
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              go,
  input  logic [DATA_W-1:0] pcm_in,
  output logic              ready,
  output logic              adm_out
);
  addr_t src_addr, dst_addr;
  logic [DATA_W-1:0] bus, out_reg;

  spil_fsm #(.DATA_W(DATA_W), .N_STATES(TX_STATES), .PROGRAM(TX_PROGRAM)) u_fsm (
    .clk, .reset, .go, .bus, .ready, .dst_addr, .src_addr, .state());

  spil_datapath #(.DATA_W(DATA_W), .IN_MASK(8'hFF), .HAS_SHIFT_RIGHT(1'b0)) u_dp (
    .clk, .src_addr, .dst_addr, .chip_in(pcm_in), .chip_out(out_reg), .bus);

  assign adm_out = out_reg[0];   // only bit 0 of the output register is wired
endmodule
