// adm_pcm_codec: the ADM-PCM coder-decoder chip.
//
// Two independent converters share only the supply: a receiver (ADM in, 8-bit
// PCM out) and a transmitter (8-bit PCM in, ADM out), each with its own
// clock, RESET, GO and READY. Two codecs at the ends of a channel give
// full-duplex speech transmission: 8 kHz 8-bit PCM against a 32 kHz ADM bit
// stream. See adm_receiver and pcm_transmitter for the algorithm and timing.
//
// Test structures kept at the logic level:
//  - rx_bus_probe_n: the receiver's data bus seen through open-drain probe
//    transistors, one per line; a probe pulls its pad low while its bus line
//    is high, so with a pull-up the pad shows the inverted bus.
//  - pad_test_out: an input pad wired straight to an output pad, used to
//    check the I/O cells.
// The process test insert (poly lines, contact chains, single transistors
// and an inverter) and the pad cells themselves have no logic function and
// are not modelled.
//
// With the 30 converter and pad-test signals and the two supply pins the chip
// has 32 pins.
module adm_pcm_codec
  import codec_pkg::*;
(
  // receiver
  input  logic              rx_clk,
  input  logic              rx_reset,
  input  logic              rx_go,
  input  logic              rx_adm_in,
  output logic              rx_ready,
  output logic [DATA_W-1:0] rx_pcm_out,
  output logic [DATA_W-1:0] rx_bus_probe_n,
  // transmitter
  input  logic              tx_clk,
  input  logic              tx_reset,
  input  logic              tx_go,
  input  logic [DATA_W-1:0] tx_pcm_in,
  output logic              tx_ready,
  output logic              tx_adm_out,
  // pad test path
  input  logic              pad_test_in,
  output logic              pad_test_out
);
  logic [DATA_W-1:0] rx_bus;

  adm_receiver u_rx (
    .clk(rx_clk), .reset(rx_reset), .go(rx_go), .adm_in(rx_adm_in),
    .ready(rx_ready), .pcm_out(rx_pcm_out), .bus(rx_bus));

  pcm_transmitter u_tx (
    .clk(tx_clk), .reset(tx_reset), .go(tx_go), .pcm_in(tx_pcm_in),
    .ready(tx_ready), .adm_out(tx_adm_out));

  assign rx_bus_probe_n = ~rx_bus;
  assign pad_test_out   = pad_test_in;
endmodule
