// tb_otm_top: both time measurement architectures, at their default sizes,
// running side by side.
//
// PTMA: sweeps the 14 input intervals of the design's characterisation
// (400 ps .. 3 ns) in each of the four modes, the 16 silicon measurements
// (2.1 .. 3.5 ns) and a 9 ns rise time, then calibration, on-chip and
// external references, and the disabled I/O buffers. Each result must agree
// with the applied interval to within one comparator clock period plus one
// count. Counted mechanisms: each mode, calibration, comparator pulses
// blocked after the first one, external references, I/O isolation.
// HTDC (in parallel): 1 GHz clock pair at three delays; decimated counts
// must match 32 * v_dc / 1.2 and fall with the delay.
`timescale 1ps/1fs
module tb_otm_top;
  localparam real PS_PER_COUNT = 500.0 * 5.0 / 60.0;

  logic io_en = 1, int_ref_en = 1, pwrup = 0, start = 0, cal_en = 0;
  logic [1:0] mode = 2'b11;
  real vin1 = 0.0, vin2 = 0.0;
  real ext_vref_h = 1.08, ext_vref_m = 0.6, ext_vref_l = 0.12;
  logic [7:0] data;
  logic valid, data_oe;
  logic htdc_clk_master = 0, htdc_rst_n = 0, htdc_clk_in = 0, htdc_clk_ref = 0;
  logic [7:0] htdc_count;
  logic htdc_strobe, htdc_bitstream;
  real htdc_v_dc;
  real dt = 0.0;

  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_silicon = 0, n_long = 0;
  bit last_valid = 0;
  logic [7:0] last_data = '0;
  int n_cal = 0, n_blocked = 0, n_ext = 0, n_iso = 0, n_htdc = 0;
  bit ptma_done = 0, htdc_done = 0;

  otm_top dut (.*);

  always #625 htdc_clk_master = ~htdc_clk_master;
  always #500 htdc_clk_ref = ~htdc_clk_ref;
  always @(htdc_clk_ref) htdc_clk_in <= #(dt) htdc_clk_ref;

  // comparator toggles that the control logic keeps away from the TVC
  always @(posedge dut.u_ptma.u_core.comp)
    if (dut.u_ptma.u_core.pib_done) n_blocked++;

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

  task automatic measure(logic [1:0] m, int t_int);
    mode = m;
    vin1 = (m == 2'b01) ? 1.2 : 0.0;
    vin2 = 0.0;
    #3000 start = 1;
    #(1111 + $urandom_range(0, 399));
    case (m)
      2'b00: ramp1(0.0, 1.2, int'(t_int / 0.8));
      2'b01: ramp1(1.2, 0.0, int'(t_int / 0.8));
      2'b10: begin ramp1(0.0, 1.2, 40); #(t_int - 40); ramp1(1.2, 0.0, 40); end
      default: begin ramp1(0.0, 1.2, 40); #(t_int - 45); vin2 = 0.6; #5 vin2 = 1.2; end
    endcase
    fork
      wait (valid);
      #(t_int * 14 + 5000);
    join_any
    disable fork;
    chk(valid && data_oe, $sformatf("mode %0d %0d ps: valid", m, t_int));
    chk(real'(data) * PS_PER_COUNT > t_int - 450.0 && real'(data) * PS_PER_COUNT < t_int + 500.0,
        $sformatf("mode %0d %0d ps: data %0d", m, t_int, data));
    if (valid && int_ref_en) n_mode[m]++;
    if (valid && !int_ref_en) n_ext++;
    last_valid = valid;
    last_data  = data;
    start = 0;
    #1000;
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- PTMA
  initial begin
    automatic int intervals[14] = '{400, 800, 900, 1000, 1200, 1300, 1500, 1700, 1900, 2000, 2400, 2800, 2900, 3000};
    automatic logic [1:0] silicon_m[16] = '{0, 0, 0, 0, 1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 3};
    automatic int silicon_t[16] = '{2100, 2200, 3300, 3500, 2100, 2200, 3300, 3500,
                                    2200, 3300, 3400, 3500, 2200, 3200, 3400, 3500};
    #1000 pwrup = 1;
    for (int m = 0; m < 4; m++)
      foreach (intervals[i]) measure(2'(m), intervals[i]);
    // the silicon measurement set (2.1 .. 3.5 ns per mode) and a 9 ns rise
    // time, the longest conversion of the characterisation (216 counts)
    foreach (silicon_m[i]) begin
      measure(silicon_m[i], silicon_t[i]);
      if (last_valid) n_silicon++;
    end
    measure(2'b00, 9000);
    if (last_valid && real'(last_data) * PS_PER_COUNT > 8550.0) n_long++;
    // calibration with the on-chip 1 ns pulse
    mode = 2'b10; cal_en = 1;
    #3000 start = 1;
    #20000;
    chk(valid && real'(data) * PS_PER_COUNT > 550 && real'(data) * PS_PER_COUNT < 1500,
        $sformatf("calibration %0d", data));
    if (valid) n_cal++;
    start = 0; cal_en = 0;
    // external references
    int_ref_en = 0;
    measure(2'b11, 2000);
    int_ref_en = 1;
    // isolation
    io_en = 0;
    #3000 start = 1;
    #2000 vin1 = 1.2; #1000 vin2 = 1.2;
    #20000;
    chk(!data_oe && !valid, "isolated with io_en low");
    if (!data_oe && !valid) n_iso++;
    start = 0; io_en = 1;
    ptma_done = 1;
  end

  // ---------------- HTDC
  initial begin
    static real prev = 100.0;
    #5000 htdc_rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      automatic real exp_c, mean = 0.0;
      dt = 125.0 * k;
      exp_c = 32.0 * (0.6 + 0.36 * (1.0 - 4.0 * dt / 1000.0)) / 1.2;
      #20000000;
      repeat (16) begin
        @(posedge htdc_strobe); #1;
        mean += real'(htdc_count) / 16.0;
        n_htdc++;
      end
      chk(mean > exp_c - 0.6 && mean < exp_c + 0.6, $sformatf("htdc dt=%0.0f mean %f exp %f", dt, mean, exp_c));
      chk(mean < prev, "htdc count falls with delay");
      prev = mean;
    end
    htdc_done = 1;
  end

  initial begin
    wait (ptma_done && htdc_done);
    $display("mechanisms: rise %0d fall %0d pulse %0d prop %0d silicon_set %0d long_rise %0d cal %0d blocked %0d ext_ref %0d isolated %0d htdc_samples %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_silicon, n_long, n_cal, n_blocked, n_ext, n_iso, n_htdc);
    foreach (n_mode[i]) chk(n_mode[i] > 0, $sformatf("mode %0d exercised", i));
    chk(n_silicon == 16, "silicon measurement set completed");
    chk(n_long > 0, "9 ns rise time converted");
    chk(n_cal > 0, "calibration exercised");
    chk(n_blocked > 0, "first-pulse blocking exercised");
    chk(n_ext > 0, "external references exercised");
    chk(n_iso > 0, "I/O isolation exercised");
    chk(n_htdc > 0, "HTDC decimation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
