// spil_adder: the adder computational unit.
//
// Two input latches, add_latch_a (destination _ADD_IN_1) and add_latch_b
// (destination _ADD_IN_2), each load the data bus when selected. A
// ripple-carry adder, built from one full adder per bit, sums them
// continuously; its result is the source _ADD_OUT. The sum wraps modulo
// 2^DATA_W: there is no carry out and no overflow flag, as in the original
// architecture, which has no status bits.
//
// Timing: latches load at the clock edge; sum is valid in the state after
// the second operand was loaded.
module spil_adder #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              load_a,
  input  logic              load_b,
  input  logic [DATA_W-1:0] bus_in,
  output logic [DATA_W-1:0] sum
);
  logic [DATA_W-1:0] a_q, b_q;
  logic [DATA_W-1:0] carry;   // carry into each bit; no carry out

  always_ff @(posedge clk) begin
    if (load_a) a_q <= bus_in;
    if (load_b) b_q <= bus_in;
  end

  // ripple-carry chain
  assign carry[0] = 1'b0;
  for (genvar i = 0; i < DATA_W; i++) begin : g_fa
    assign sum[i] = a_q[i] ^ b_q[i] ^ carry[i];
    if (i < DATA_W-1) begin : g_c
      assign carry[i+1] = (a_q[i] & b_q[i]) | (carry[i] & (a_q[i] ^ b_q[i]));
    end
  end
endmodule
