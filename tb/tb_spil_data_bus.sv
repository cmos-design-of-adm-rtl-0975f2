// tb_spil_data_bus: checks the precharged, wired-AND data bus.
// With no source selected the bus must read all ones; with one source it must
// carry that source's value; with two (never done by the decoder, checked for
// the electrical behaviour) the AND of both.
module tb_spil_data_bus;
  logic [15:0]      src_sel;
  logic [15:0][7:0] src_data;
  logic [7:0]       bus;
  int checks = 0, failures = 0;

  spil_data_bus #(.DATA_W(8), .N_SRC(16)) dut (.src_sel, .src_data, .bus);

  task automatic expect_bus(logic [7:0] exp, string what);
    #1;
    checks++;
    if (bus !== exp) begin
      failures++;
      $display("%s: bus %h expected %h", what, bus, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int a, b;
      for (int i = 0; i < 16; i++) src_data[i] = 8'($urandom);
      src_sel = '0;
      expect_bus(8'hFF, "precharge only");
      a = $urandom_range(0, 15);
      src_sel = 16'h1 << a;
      expect_bus(src_data[a], "one source");
      b = (a + 1 + $urandom_range(0, 14)) % 16;
      src_sel[b] = 1'b1;
      expect_bus(src_data[a] & src_data[b], "two sources");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
