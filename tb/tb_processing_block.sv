// tb_processing_block: a capacitor voltage that decays linearly to 0 V in a
// known time gives a count of about that time / 500 ps.
`timescale 1ps/1fs
module tb_processing_block;
  logic clk_cmp = 0, clk_cnt = 0, start = 0, pib_out_n = 1;
  real  vc = 0.0;
  logic cmp_out, valid;
  logic [7:0] data;
  int checks = 0, failures = 0;

  processing_block dut (.*);

  always #200 clk_cmp = ~clk_cmp;
  always #250 clk_cnt = ~clk_cnt;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s data=%0d", msg, data); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      automatic int tdis = 2000 + t * 9000;     // discharge time, ps
      automatic real v0 = 0.001 + tdis * 5.0e-6; // reaches 1 mV at tdis
      automatic int exp_cnt = tdis / 500;
      #3000 start = 1;
      // charging phase (pib pulse low): no counting
      pib_out_n = 0;
      vc = v0;
      #2000;
      chk(!valid, "no result while charging");
      pib_out_n = 1;
      for (int s = 0; s < tdis / 10 + 100; s++) begin
        #10 vc = (vc - 0.00005 < 0.0) ? 0.0 : vc - 0.00005;
      end
      #2000;
      chk(valid, "valid after discharge");
      chk(int'(data) >= exp_cnt - 1 && int'(data) <= exp_cnt + 2,
          $sformatf("count for %0d ps exp ~%0d", tdis, exp_cnt));
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
