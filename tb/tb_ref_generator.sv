// tb_ref_generator: internal taps 90/50/10 % of 1.2 V, or the pins.
`timescale 1ps/1fs
module tb_ref_generator;
  logic int_ref_en = 1;
  real ext_h = 1.0, ext_m = 0.5, ext_l = 0.2;
  real vref_h, vref_m, vref_l;
  int checks = 0, failures = 0;

  ref_generator dut (.*);

  task automatic chk(real got, real exp, string msg);
    checks++;
    if (got < exp - 1e-9 || got > exp + 1e-9) begin failures++; $display("FAIL %s got %f", msg, got); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    chk(vref_h, 1.08, "VrefH"); chk(vref_m, 0.6, "VrefM"); chk(vref_l, 0.12, "VrefL");
    int_ref_en = 0;
    #10;
    chk(vref_h, 1.0, "ext H"); chk(vref_m, 0.5, "ext M"); chk(vref_l, 0.2, "ext L");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
