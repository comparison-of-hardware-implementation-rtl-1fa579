// tb_phase_ring: checks the control-signal generator for 6 and 10 signals
// (the improved Katti and Lowy schedules of 1 + x^2 + x^5): reset to T1,
// one step per clock, wrap from the last signal to T1, restart to T1.
module tb_phase_ring;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic restart = 1'b0;
  logic [5:0] t6;
  logic [9:0] t10;
  int checks = 0, failures = 0;
  int exp_idx6, exp_idx10;

  phase_ring #(.NPHASE(6))  u6  (.clk, .rst_n, .restart, .t(t6));
  phase_ring #(.NPHASE(10)) u10 (.clk, .rst_n, .restart, .t(t10));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: t6=%b t10=%b", what, $time, t6, t10);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check("reset T1", t6 == 6'b000001 && t10 == 10'b1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_idx6 = 0;
    exp_idx10 = 0;
    for (int k = 0; k < 45; k++) begin
      @(posedge clk);
      #1;
      exp_idx6  = (exp_idx6 + 1) % 6;
      exp_idx10 = (exp_idx10 + 1) % 10;
      check("ring 6",  t6  == (6'b1 << exp_idx6));
      check("ring 10", t10 == (10'b1 << exp_idx10));
    end
    restart = 1'b1;
    @(posedge clk);
    #1 restart = 1'b0;
    check("restart T1", t6 == 6'b1 && t10 == 10'b1);
    @(posedge clk);
    #1 check("after restart T2", t6 == 6'b10 && t10 == 10'b10);
    rst_n = 1'b0;
    #1 check("async reset T1", t6 == 6'b1 && t10 == 10'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
