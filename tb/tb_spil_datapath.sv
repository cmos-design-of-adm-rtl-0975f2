// tb_spil_datapath: random bus transfers through the data path.
//
// Each clock a random source and destination address are applied directly
// (no controller). A reference model of every unit written from the bus map
// (registers, adder latches and sum, shifters, complementer, constants, input
// port with only its low nibble wired, output register) predicts the bus
// value in every cycle and the output register. The right shifter is built
// (HAS_SHIFT_RIGHT = 1) so that its address is exercised too.
module tb_spil_datapath;
  logic       clk = 1'b0;
  logic [3:0] src_addr, dst_addr;
  logic [7:0] chip_in, chip_out, bus;
  int checks = 0, failures = 0;

  spil_datapath #(.DATA_W(8), .IN_MASK(8'h0F), .HAS_SHIFT_RIGHT(1'b1)) dut (
    .clk, .src_addr, .dst_addr, .chip_in, .chip_out, .bus);

  always #5 clk = ~clk;

  // reference state, indexed by destination address (1..5, 7..10)
  logic [7:0] m [16];
  bit         known [16];

  function automatic logic [7:0] src_value(int s);
    case (s)
      2:  return 8'(m[1] + m[2]);
      3:  return {m[3][6:0], 1'b0};
      4:  return {m[4][7], m[4][7:1]};
      5:  return ~m[5];
      6:  return chip_in | 8'hF0;
      8:  return m[8];
      9:  return m[9];
      10: return m[10];
      11: return 8'h00;
      12: return 8'h01;
      13: return 8'hFF;
      default: return 8'hFF;          // precharged, nothing discharges
    endcase
  endfunction

  function automatic bit src_known(int s);
    case (s)
      2:  return known[1] && known[2];
      3, 4, 5, 8, 9, 10: return known[s];
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [16];
    foreach (known[i]) known[i] = 1'b0;
    src_addr = 0; dst_addr = 0; chip_in = 0;
    for (int t = 0; t < 20000; t++) begin
      int s, d;
      logic [7:0] e;
      @(negedge clk);
      s = $urandom_range(0, 15);
      d = $urandom_range(0, 15);
      src_addr = 4'(s); dst_addr = 4'(d); chip_in = 8'($urandom);
      #1;
      e = src_value(s);
      if (src_known(s)) begin
        hits[s]++;
        checks++;
        if (bus !== e) begin
          failures++;
          $display("t=%0d src %0d: bus %h expected %h", t, s, bus, e);
        end
      end
      @(posedge clk);
      if (d inside {[1:5], [7:10]}) begin
        m[d] = bus;                      // the reference loads the DUT bus only
        known[d] = src_known(s);          // once that bus value was checked
      end
      #1;
      if (known[7]) begin
        checks++;
        if (chip_out !== m[7]) begin
          failures++;
          $display("t=%0d chip_out %h expected %h", t, chip_out, m[7]);
        end
      end
    end
    for (int s = 0; s < 16; s++)
      if (hits[s] == 0) begin
        failures++;
        $display("source %0d never checked", s);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
