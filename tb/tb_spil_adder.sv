// tb_spil_adder: loads random operands through the two input latches, one
// per clock as a program does, and checks the sum modulo 256. Latches must
// hold while not selected, so the operands are loaded in random order with
// idle clocks in between.
module tb_spil_adder;
  logic       clk = 1'b0;
  logic       load_a, load_b;
  logic [7:0] bus_in, sum;
  int checks = 0, failures = 0;

  spil_adder #(.DATA_W(8)) dut (.clk, .load_a, .load_b, .bus_in, .sum);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic la, logic lb, logic [7:0] v);
    @(negedge clk);
    load_a = la; load_b = lb; bus_in = v;
    @(posedge clk); #1;
    load_a = 1'b0; load_b = 1'b0;
  endtask

  initial begin
    logic [7:0] a, b;
    int unsigned s;
    load_a = 0; load_b = 0; bus_in = 0;
    for (int t = 0; t < 400; t++) begin
      a = 8'($urandom); b = 8'($urandom);
      if (t == 0) begin a = 8'hFF; b = 8'h01; end     // full carry ripple
      if (t == 1) begin a = 8'h7F; b = 8'h01; end     // signed overflow wraps
      if ($urandom_range(0, 1)) begin put(1, 0, a); put(0, 1, b); end
      else                      begin put(0, 1, b); put(1, 0, a); end
      put(0, 0, 8'($urandom));                        // idle cycle: latches hold
      s = (32'(a) + 32'(b)) % 256;
      checks++;
      if (sum !== 8'(s)) begin
        failures++;
        $display("%h + %h = %h, got %h", a, b, 8'(s), sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
