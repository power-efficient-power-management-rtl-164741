// tb_psm_state_logic: checks the clock-gated PSM state register.
//
// Drives random data and a random enable (changed in the low clock phase,
// as the comparator does) and checks after every rising edge that the
// register loaded d exactly when the enable was 1 and held otherwise. Also
// raises the enable only during the high clock phase (it must not create a
// clock edge) and checks the asynchronous reset value OFF = 3'b100.
module tb_psm_state_logic;
  import psm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, clk_en = 1'b0;
  psm_ctrl_t d, q;
  logic [2:0] exp_q;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  psm_state_logic dut (.clk(clk), .rst_n(rst_n), .clk_en(clk_en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = psm_ctrl_t'(3'b011);
    #1 rst_n = 1'b0;
    #12;
    check(3'(q) == 3'b100, "reset value");
    @(negedge clk);
    rst_n = 1'b1;
    exp_q = 3'b100;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d      = psm_ctrl_t'($urandom_range(7, 0));
      clk_en = ($urandom_range(1, 0) == 1);
      @(posedge clk);
      if (clk_en) begin
        exp_q = 3'(d);
        loads++;
      end else begin
        holds++;
      end
      #1;
      check(3'(q) == exp_q, $sformatf("q=%03b exp=%03b", 3'(q), exp_q));
      // Enable pulse confined to the high phase: no clock edge may result.
      if (i % 7 == 0) begin
        clk_en = 1'b0;
        d = psm_ctrl_t'(~exp_q);
        #1 clk_en = 1'b1;
        #1 clk_en = 1'b0;
        @(negedge clk);
        check(3'(q) == exp_q, "enable raised in high phase clocked the register");
      end
    end
    // Asynchronous reset in the middle of operation.
    #2 rst_n = 1'b0;
    #1 check(3'(q) == 3'b100, "asynchronous reset");
    check(loads > 100 && holds > 100, "both loads and holds exercised");
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
