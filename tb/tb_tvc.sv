// tb_tvc: charge for T1, check the peak voltage Ich*T1/C and that the
// discharge lasts (Ich/Idis)*T1.
`timescale 1ps/1fs
module tb_tvc;
  logic vin_n = 1;
  real  vc;
  logic discharging;
  int checks = 0, failures = 0;
  realtime t_dis_start, t_dis_end;

  tvc dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t vc=%f", msg, $time, vc); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    chk(vc == 0.0 && !discharging, "idle at 0 V");
    for (int k = 0; k < 2; k++) begin
      automatic int t1 = (k == 0) ? 1000 : 2500;
      automatic real vpk = 60.0e-6 * t1 * 1.0e-12 / 1.0e-12;   // I*T/C
      vin_n = 0;
      #(t1);
      vin_n = 1;
      #1;
      chk(vc > vpk - 0.001 && vc < vpk + 0.001, $sformatf("peak for %0d ps", t1));
      t_dis_start = $realtime;
      @(negedge discharging);
      t_dis_end = $realtime;
      chk((t_dis_end - t_dis_start) > 12.0 * t1 - 30 && (t_dis_end - t_dis_start) < 12.0 * t1 + 30,
          $sformatf("discharge time %0t for %0d ps", t_dis_end - t_dis_start, t1));
      chk(vc == 0.0, "empty after discharge");
      #5000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
