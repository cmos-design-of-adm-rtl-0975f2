// tb_spil_register: random loads into a data-path register; the register
// must take the bus value at a clock edge with load high and hold otherwise.
module tb_spil_register;
  logic       clk = 1'b0;
  logic       load;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  spil_register #(.DATA_W(8)) dut (.clk, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b1; d = 8'h5A;
    @(posedge clk); #1;
    model = 8'h5A;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("t=%0d q %h expected %h", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
