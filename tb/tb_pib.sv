// tb_pib: in each of the four modes the PIB turns the selected interval of
// the input waveform(s) into exactly one active-low pulse whose width equals
// the interval to within one comparator clock period (400 ps).
`timescale 1ps/1fs
module tb_pib;
  import ptma_pkg::*;

  logic clk_cmp = 0, pwrup = 0, start = 0;
  meas_mode_e mode = MODE_RISE;
  real vin1 = 0.0, vin2 = 0.0;
  real vref_h = VREFH, vref_m = VREFM, vref_l = VREFL;
  logic pib_out_n, comp, done;
  sw_bus_t sw;
  logic [2:1] sc;
  int checks = 0, failures = 0;
  int pulses = 0;
  realtime tf, tr;

  pib dut (.*);

  always #200 clk_cmp = ~clk_cmp;
  always @(negedge pib_out_n) begin tf = $realtime; pulses++; end
  always @(posedge pib_out_n) tr = $realtime;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // linear ramp of vin1 from a to b in t ps
  task automatic ramp1(real a, real b, int t);
    for (int s = 0; s <= t / 5; s++) begin
      vin1 = a + (b - a) * s * 5.0 / t;
      #5;
    end
    vin1 = b;
  endtask

  task automatic measure(meas_mode_e m, int t_int, string what);
    realtime w;
    pulses = 0;
    mode   = m;
    case (m)
      MODE_RISE: begin vin1 = 0.0; end
      MODE_FALL: begin vin1 = 1.2; end
      default:   begin vin1 = 0.0; vin2 = 0.0; end
    endcase
    #3000 start = 1;
    #1234;
    case (m)
      // 10 %-90 % time t_int: full-swing ramp of t_int / 0.8
      MODE_RISE:  ramp1(0.0, 1.2, int'(t_int / 0.8));
      MODE_FALL:  ramp1(1.2, 0.0, int'(t_int / 0.8));
      MODE_PULSE: begin ramp1(0.0, 1.2, 40); #(t_int - 40); ramp1(1.2, 0.0, 40); end
      MODE_PROP:  begin
        ramp1(0.0, 1.2, 40);
        #(t_int - 45);
        vin2 = 0.6; #5 vin2 = 1.2;
      end
    endcase
    #8000;
    w = tr - tf;
    chk(pulses == 1, $sformatf("%s: one pulse (%0d)", what, pulses));
    chk(w > t_int - 450 && w < t_int + 450, $sformatf("%s: width %0t for %0d", what, w, t_int));
    chk(done, $sformatf("%s: control logic done", what));
    start = 0;
    vin1 = 0.0; vin2 = 0.0;
    #2000;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 pwrup = 1;
    measure(MODE_PROP,  800,  "prop 800");
    measure(MODE_PROP,  2400, "prop 2400");
    measure(MODE_RISE,  2000, "rise 2000");
    measure(MODE_FALL,  3000, "fall 3000");
    measure(MODE_PULSE, 1500, "pulse 1500");
    // no start, no pulse
    mode = MODE_PULSE; pulses = 0;
    ramp1(0.0, 1.2, 40); #2000; ramp1(1.2, 0.0, 40); #2000;
    chk(pulses == 0, "no pulse without start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
