// tb_sc_lpf: DC gain 1 (step settles), a fast pulse train is averaged to its
// duty cycle, a tone at 10x the cut-off frequency is attenuated by ~40 dB.
`timescale 1ps/1fs
module tb_sc_lpf;
  logic clk = 0;
  real vin = 0.0, vout;
  real vmin, vmax;
  int checks = 0, failures = 0;

  sc_lpf dut (.*);

  always #5000 clk = ~clk;   // 100 MHz switched-capacitor clock

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s vout=%f", msg, vout); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 1.0;
    #1000000;                              // 1 us: still rising (tau ~ 1.9 us)
    chk(vout > 0.05 && vout < 0.9, "step response is not instantaneous");
    #29000000;
    chk(vout > 0.99 && vout < 1.01, "DC gain 1");
    // 250 MHz pulse train with 30 % duty cycle, far above the clock rate
    repeat (7500) begin vin = 1.0; #1200; vin = 0.0; #2800; end
    chk(vout > 0.29 && vout < 0.31, "pulse train averaged to duty cycle");
    // 1.2 MHz square wave +/-0.5 around 0.5: ripple small
    repeat (20) begin vin = 1.0; #416667; vin = 0.0; #416666; end
    vmin = 2.0; vmax = -2.0;
    repeat (10) begin
      vin = 1.0;
      repeat (40) begin #10417; if (vout < vmin) vmin = vout; if (vout > vmax) vmax = vout; end
      vin = 0.0;
      repeat (40) begin #10417; if (vout < vmin) vmin = vout; if (vout > vmax) vmax = vout; end
    end
    chk(vmax - vmin < 0.03, $sformatf("10x fc ripple %f", vmax - vmin));
    chk((vmax + vmin) / 2.0 > 0.45 && (vmax + vmin) / 2.0 < 0.55, "10x fc mean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
