// tb_mca_trigger_gen: checks the dual-monostable model: the trigger starts
// 500 ns after the discriminator edge and lasts 100 ns, the first pulse lasts
// 500 ns, and an edge during the first pulse does not start a second one.
`timescale 1ns/1ps
module tb_mca_trigger_gen;
  logic disc = 0, delay_q, trig;
  int checks = 0, failures = 0, trigs = 0;
  realtime t_disc, t_rise, t_fall;

  mca_trigger_gen dut (.disc, .delay_q, .trig);

  always @(posedge trig) begin trigs++; t_rise = $realtime; end
  always @(negedge trig) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    for (int k = 0; k < 10; k++) begin
      int w;
      w = 20 + $urandom_range(0, 300);
      t_disc = $realtime;
      disc = 1; repeat (w) #1; disc = 0;
      #10 check(delay_q == 1'b1, "first monostable running");
      #1000;
      check(t_rise - t_disc > 499.0 && t_rise - t_disc < 501.0,
            $sformatf("trigger %0t after the edge", t_rise - t_disc));
      check(t_fall - t_rise > 99.0 && t_fall - t_rise < 101.0,
            $sformatf("trigger width %0t", t_fall - t_rise));
    end
    // a second edge inside the 500 ns pulse is ignored
    trigs = 0;
    disc = 1; #50 disc = 0; #100 disc = 1; #50 disc = 0;
    #1500;
    check(trigs == 1, $sformatf("%0d triggers for two close edges", trigs));
    check(trig == 1'b0 && delay_q == 1'b0, "outputs idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
