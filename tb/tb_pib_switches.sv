// tb_pib_switches: each switch routes its source to its node; an open node
// holds its voltage.
`timescale 1ps/1fs
module tb_pib_switches;
  import ptma_pkg::*;
  sw_bus_t sw;
  real vin1 = 0.31, vin2 = 0.77, vref_h = 1.08, vref_m = 0.6, vref_l = 0.12;
  real vinp, vinn;
  int checks = 0, failures = 0;

  pib_switches dut (.*);

  task automatic chk(real got, real exp, string msg);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %f exp %f", msg, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw = 7'b0001001; #20; chk(vinp, vin1, "sw0 vinp"); chk(vinn, vref_l, "sw3 vinn");
    sw = 7'b0000110; #20; chk(vinp, vref_h, "sw2 vinp"); chk(vinn, vin1, "sw1 vinn");
    sw = 7'b1000001; #20; chk(vinp, vin1, "sw0 vinp"); chk(vinn, vref_m, "sw6 vinn");
    sw = 7'b0110000; #20; chk(vinp, vref_m, "sw5 vinp"); chk(vinn, vin2, "sw4 vinn");
    vin2 = 0.9;      #20; chk(vinn, 0.9, "vinn tracks vin2");
    sw = 7'b0000000; vin2 = 0.1; #20; chk(vinp, vref_m, "vinp holds"); chk(vinn, 0.9, "vinn holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
