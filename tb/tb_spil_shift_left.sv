// tb_spil_shift_left: loads random words into the unit's input latch and checks
// its output, left shift by one with 0 into bit 0. An idle clock after each load checks that the latch
// holds while not selected.
module tb_spil_shift_left;
  logic       clk = 1'b0;
  logic       load;
  logic [7:0] bus_in, q;
  int checks = 0, failures = 0;

  spil_shift_left #(.DATA_W(8)) dut (.clk, .load, .bus_in, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, exp;
    load = 1'b0; bus_in = '0;
    for (int t = 0; t < 300; t++) begin
      v = 8'($urandom);
      if (t == 0) v = 8'h80;
      if (t == 1) v = 8'h01;
      @(negedge clk); load = 1'b1; bus_in = v;
      @(negedge clk); load = 1'b0; bus_in = 8'($urandom);
      @(posedge clk); #1;
      exp = {v[6:0], 1'b0};
      checks++;
      if (q !== exp) begin
        failures++;
        $display("in %h: out %h expected %h", v, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
