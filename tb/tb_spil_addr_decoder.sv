// tb_spil_addr_decoder: exhaustive check of the one-hot address decoder.
// Every address must raise exactly its own select line.
module tb_spil_addr_decoder;
  logic [3:0]  addr;
  logic [15:0] sel;
  int checks = 0, failures = 0;

  spil_addr_decoder #(.ADDR_W(4)) dut (.addr, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (sel != (16'h1 << a)) begin
        failures++;
        $display("addr %0d: sel %b", a, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
