// tb_logic_unit: checks the coincidence of gate and delayed clock.
//
// All four input combinations, then random inputs; the trigger must be high
// exactly when both the gate and the delayed clock are high.
module tb_logic_unit;

  logic gate, dclk, trig;
  int   checks = 0, failures = 0;

  logic_unit dut (.gate(gate), .delayed_clk(dclk), .trig(trig));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      if (i < 4) {gate, dclk} = 2'(i);
      else       {gate, dclk} = 2'($urandom);
      #1;
      checks++;
      if (trig !== (gate && dclk)) begin
        failures++;
        $display("FAIL: gate=%0b dclk=%0b trig=%0b", gate, dclk, trig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
