// tb_ptma_core: end-to-end PTMA core in all four modes and in calibration
// mode. For every measurement the result must match
//   (a) the width of the PIB pulse actually produced: data = width*Ich/Idis/Tclk
//       (-1 .. +2 counts for the clock-edge quantisation at both ends), and
//   (b) the applied interval to within one comparator period plus one count.
`timescale 1ps/1fs
module tb_ptma_core;
  import ptma_pkg::*;

  localparam real PS_PER_COUNT = 500.0 * 5.0 / 60.0;   // Tclk * Idis / Ich

  meas_mode_e mode = MODE_RISE;
  logic pwrup = 0, start = 0, cal_en = 0;
  real vin1 = 0.0, vin2 = 0.0;
  real vref_h = VREFH, vref_m = VREFM, vref_l = VREFL;
  logic [7:0] data;
  logic valid, pib_out_n, comp, pib_done, dp_cmp, tvc_dis;
  sw_bus_t sw;
  real vc;
  int checks = 0, failures = 0;
  realtime tf, tr;

  ptma_core dut (.*);

  always @(negedge pib_out_n) tf = $realtime;
  always @(posedge pib_out_n) tr = $realtime;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic ramp1(real a, real b, int t);
    for (int s = 0; s <= t / 5; s++) begin
      vin1 = a + (b - a) * s * 5.0 / t;
      #5;
    end
    vin1 = b;
  endtask

  task automatic check_result(int t_int, string what);
    real w, exp_w;
    w     = (tr - tf);
    exp_w = w / PS_PER_COUNT;
    chk(valid, {what, ": valid"});
    chk(real'(data) >= exp_w - 1.0 && real'(data) <= exp_w + 2.0,
        $sformatf("%s: data %0d vs pulse %0.0f ps (%0.1f counts)", what, data, w, exp_w));
    chk(real'(data) * PS_PER_COUNT > t_int - 450.0 && real'(data) * PS_PER_COUNT < t_int + 500.0,
        $sformatf("%s: data %0d = %0.0f ps vs %0d ps", what, data, real'(data) * PS_PER_COUNT, t_int));
    $display("%-12s interval %5d ps  pulse %6.0f ps  data %3d  -> %6.0f ps", what, t_int, w, data,
             real'(data) * PS_PER_COUNT);
  endtask

  task automatic measure(meas_mode_e m, int t_int, string what);
    mode = m;
    vin1 = (m == MODE_FALL) ? 1.2 : 0.0;
    vin2 = 0.0;
    #3000 start = 1;
    #(1111 + $urandom_range(0, 399));
    case (m)
      MODE_RISE:  ramp1(0.0, 1.2, int'(t_int / 0.8));
      MODE_FALL:  ramp1(1.2, 0.0, int'(t_int / 0.8));
      MODE_PULSE: begin ramp1(0.0, 1.2, 40); #(t_int - 40); ramp1(1.2, 0.0, 40); end
      default:    begin ramp1(0.0, 1.2, 40); #(t_int - 45); vin2 = 0.6; #5 vin2 = 1.2; end
    endcase
    wait (valid);
    #1000;
    check_result(t_int, what);
    start = 0;
    #2000;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 pwrup = 1;
    #3000;
    measure(MODE_PROP,  800,  "prop");
    measure(MODE_PROP,  3000, "prop");
    measure(MODE_RISE,  2000, "rise");
    measure(MODE_RISE,  3300, "rise");
    measure(MODE_FALL,  2100, "fall");
    measure(MODE_PULSE, 1500, "pulse");
    measure(MODE_PULSE, 3400, "pulse");
    // calibration: the on-chip 1 ns pulse, pulse-width mode
    cal_en = 1;
    mode   = MODE_PULSE;
    #3000 start = 1;
    wait (valid);
    #1000;
    check_result(1000, "calibration");
    start = 0; cal_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
