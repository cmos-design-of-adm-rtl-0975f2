// adm_receiver: ADM-to-PCM converter (the codec's receiver half).
//
// Converts a bit-serial adaptive delta modulation stream into 8-bit
// two's-complement PCM with the Song step-size predictor, one PCM estimate per
// ADM bit:
//   S(k) = |S(k-1)| * e(k-1) + Smin * e(k-2),   Smin = 1, e in {+1, -1}
//   x(k) = x(k-1) + S(k)
// with no overflow checks (8-bit wrap-around). An ADM bit 1 means +1, 0 means
// -1.
//
// It is a spil_fsm controller running codec_pkg::RX_PROGRAM over a
// spil_datapath whose input port has only bit 0 wired (adm_in) and whose
// output register drives all eight pcm_out pins.
//
// Handshake: hold reset high for at least two clocks; the reset procedure
// then clears the registers and READY rises four clocks after the cycle in
// which reset was last high. While READY is high the controller waits for GO
// (sampled through the input latch). With GO held high conversions run back
// to back, and one conversion, wait state included, takes 18 clocks + 4 if
// S(k-1) < 0, + 4 if e(k-1) = -1, + 3 if the new bit is 1: 18 to 29 clocks.
// pcm_out changes at the end of the conversion, on the same clock edge at which READY
// rises.
// adm_in must be stable for the whole conversion; it is read in program
// states 27 and 28.
//
// bus is the data bus, brought out for observation.
module adm_receiver
  import spil_pkg::*;
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              go,
  input  logic              adm_in,
  output logic              ready,
  output logic [DATA_W-1:0] pcm_out,
  output logic [DATA_W-1:0] bus
);
  addr_t src_addr, dst_addr;

  spil_fsm #(.DATA_W(DATA_W), .N_STATES(RX_STATES), .PROGRAM(RX_PROGRAM)) u_fsm (
    .clk, .reset, .go, .bus, .ready, .dst_addr, .src_addr, .state());

  spil_datapath #(.DATA_W(DATA_W), .IN_MASK(8'h01), .HAS_SHIFT_RIGHT(1'b0)) u_dp (
    .clk, .src_addr, .dst_addr,
    .chip_in({{(DATA_W-1){1'b0}}, adm_in}),
    .chip_out(pcm_out), .bus);
endmodule
