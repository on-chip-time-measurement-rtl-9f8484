// tb_htdc: homodyne TDC end to end. Two 1 GHz clocks with a delay dt between
// them; after the 120 kHz filter has settled, the decimated count must be
//   32 * v_dc / 1.2,  v_dc = 0.6 + 0.36 * (1 - 4 * dt / 1000 ps)
// (square-wave mixer, 1.2 V / 0 V modulator references), and must fall as
// dt grows.
`timescale 1ps/1fs
module tb_htdc;
  logic clk_master = 0, rst_n = 0, clk_in = 0, clk_ref = 0;
  logic [7:0] count;
  logic strobe, bitstream;
  real v_dc;
  real dt = 0.0;
  int checks = 0, failures = 0;
  int strobes = 0;

  htdc dut (.*);

  always #625 clk_master = ~clk_master;       // 800 MHz -> 100 MHz sampling
  always #500 clk_ref = ~clk_ref;             // 1 GHz reference
  always @(clk_ref) clk_in <= #(dt) clk_ref;  // delayed input clock
  always @(posedge strobe) strobes++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real prev = 100.0;
    #5000 rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      automatic real exp_v, exp_c, mean = 0.0;
      dt = 125.0 * k;
      exp_v = 0.6 + 0.36 * (1.0 - 4.0 * dt / 1000.0);
      exp_c = 32.0 * exp_v / 1.2;
      #20000000;                               // 20 us settling
      repeat (16) begin
        @(posedge strobe); #1;
        mean += real'(count) / 16.0;
      end
      $display("dt %4.0f ps  v_dc %f (exp %f)  mean count %f (exp %f)", dt, v_dc, exp_v, mean, exp_c);
      chk(v_dc > exp_v - 0.005 && v_dc < exp_v + 0.005, $sformatf("v_dc for dt=%0.0f", dt));
      chk(mean > exp_c - 0.6 && mean < exp_c + 0.6, $sformatf("count for dt=%0.0f", dt));
      chk(mean < prev, "count falls with delay");
      prev = mean;
    end
    chk(strobes > 100, "decimation strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
