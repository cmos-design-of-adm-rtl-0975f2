// tb_spil_fsm: checks the controller with its default (receiver) program.
//
// The expected source/destination address of every state and the expected
// arcs are written out here from the receiver's state listing, independently
// of the Moore-mask table the controller uses. The test
//  1. holds RESET and checks the reset procedure 0 -> 1 -> 2 -> 3 and READY,
//  2. holds GO low and checks the controller stays in the wait state,
//  3. checks that a branch tests the bus value latched in the state before
//     (the bus is given opposite values in states 4 and 5),
//  4. runs thousands of cycles with random GO and bus values against a
//     reference next-state function, checking state, READY and addresses
//     every cycle and that every conditional arc went both ways.
module tb_spil_fsm;
  import spil_pkg::*;

  logic       clk = 1'b0;
  logic       reset, go;
  logic [7:0] bus;
  logic       ready;
  addr_t      dst_addr, src_addr;
  state_t     state;
  int checks = 0, failures = 0;

  localparam int EXP_DST [33] = '{10, 8, 9, 0, 0, 0, 5, 1, 2, 9, 0, 0, 5, 1, 2, 9, 1,
                                   0, 0, 2, 2, 9, 1, 2, 8, 3,10, 0, 0, 1, 2,10, 7};
  localparam int EXP_SRC [33] = '{11,11,11, 0, 9, 9, 9,12, 5, 2,10,10, 9,12, 5, 2, 9,
                                  10,10,12,13, 2, 8, 9, 2,10, 3, 6, 6,10,12, 2, 8};

  spil_fsm dut (.clk, .reset, .go, .bus, .ready, .dst_addr, .src_addr, .state);

  always #5 clk = ~clk;

  // reference next state, from the listing's arcs
  function automatic int ref_next(int s, logic g, logic [7:0] b);
    case (s)
      3:       return g ? 4 : 3;
      5:       return b[7] ? 6 : 10;
      11:      return !b[0] ? 12 : 16;
      18:      return b[1] ? 19 : 20;
      28:      return b[0] ? 29 : 32;
      19, 20:  return 21;
      32:      return 3;
      default: return s + 1;
    endcase
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s (state %0d)", $time, what, state);
    end
  endtask

  task automatic chk_outputs(int s);
    chk(int'(state) == s, $sformatf("state expected %0d", s));
    chk(ready == (s == 3), "READY only in the wait state");
    chk(int'(dst_addr) == EXP_DST[s], $sformatf("dst %0d expected %0d", dst_addr, EXP_DST[s]));
    chk(int'(src_addr) == EXP_SRC[s], $sformatf("src %0d expected %0d", src_addr, EXP_SRC[s]));
  endtask

  task automatic cyc(logic r, logic g, logic [7:0] b);
    @(negedge clk);
    reset = r; go = g; bus = b;
    @(posedge clk); #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, br_true[int], br_false[int];
    logic lg;
    logic [7:0] lb;
    // 1. reset procedure
    cyc(1, 0, 8'h00); cyc(1, 0, 8'h00); cyc(0, 0, 8'h00);
    chk_outputs(0);
    cyc(0, 0, 8'h00); chk_outputs(1);
    cyc(0, 0, 8'h00); chk_outputs(2);
    cyc(0, 0, 8'h00); chk_outputs(3);
    // 2. wait for GO
    repeat (5) begin cyc(0, 0, 8'hFF); chk_outputs(3); end
    cyc(0, 1, 8'hFF); chk_outputs(3);      // GO latched at this edge
    cyc(0, 0, 8'hFF); chk_outputs(4);      // decision taken one clock later
    // 3. branch on the previous state's bus value
    cyc(0, 0, 8'h80); chk_outputs(5);      // bus during state 4: negative
    cyc(0, 0, 8'h00); chk_outputs(6);      // bus during state 5 ignored
    // run back to the wait state
    s = 6;
    lg = 0; lb = 8'h00;
    while (s != 3) begin
      s = ref_next(s, lg, lb);
      cyc(0, 0, 8'h00); lg = 0; lb = 8'h00;
    end
    chk_outputs(3);
    cyc(0, 1, 8'h00); cyc(0, 0, 8'h00); chk_outputs(4);
    cyc(0, 0, 8'h00); chk_outputs(5);      // state 4 drove a positive value
    cyc(0, 0, 8'h80); chk_outputs(10);     // so state 5 goes to 10
    // 4. random run against the reference
    s = 10; lg = 0; lb = 8'h80;
    for (int t = 0; t < 5000; t++) begin
      logic g;
      logic [7:0] b;
      int n;
      g = ($urandom_range(0, 3) != 0);
      b = 8'($urandom);
      n = ref_next(s, lg, lb);
      if (s inside {3, 5, 11, 18, 28}) begin
        if (n == s + 1 || (s == 11 && n == 12)) br_true[s]++;
        else br_false[s]++;
      end
      cyc(0, g, b);
      s = n; lg = g; lb = b;
      chk_outputs(s);
    end
    for (int k = 0; k < 33; k++)
      if (k inside {3, 5, 11, 18, 28}) begin
        chk(br_true.exists(k) && br_false.exists(k), $sformatf("arc of state %0d not exercised both ways", k));
      end
    // reset from the middle of the loop
    cyc(1, 1, 8'h00); cyc(0, 1, 8'h00); chk_outputs(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
