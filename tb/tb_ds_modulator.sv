// tb_ds_modulator: the density of ones equals (vin - VREFM)/(VREFP - VREFM)
// for several DC inputs, to within 2/N over N cycles.
`timescale 1ps/1fs
module tb_ds_modulator;
  logic phi1 = 0, phi2 = 0, rst_n = 0;
  real vin = 0.6, v_int;
  logic bit_out;
  int checks = 0, failures = 0;

  ds_modulator dut (.*);

  task automatic cycle();
    #1250 phi1 = 1; #2500 phi1 = 0;
    #1250 phi2 = 1; #2500 phi2 = 0;
    #2500;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) cycle();
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      automatic real v = 0.1 + 0.25 * k;
      automatic int ones = 0;
      vin = v;
      repeat (64) cycle();
      repeat (1024) begin cycle(); ones += int'(bit_out); end
      checks++;
      if (real'(ones) / 1024.0 < v / 1.2 - 2.0 / 1024.0 || real'(ones) / 1024.0 > v / 1.2 + 2.0 / 1024.0) begin
        failures++; $display("FAIL vin=%f density=%f", v, real'(ones) / 1024.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
