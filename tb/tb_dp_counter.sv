// tb_dp_counter: counts the clock edges of the enable window, latches once,
// clears with clr, wraps at 2^N.
`timescale 1ps/1fs
module tb_dp_counter;
  localparam int N = 8;
  logic clk = 0, clr = 1, en = 0;
  logic [N-1:0] data;
  logic valid;
  int checks = 0, failures = 0;

  dp_counter #(.N(N)) dut (.*);

  always #250 clk = ~clk;   // 2 GHz

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t data=%0d valid=%0d", msg, $time, data, valid); end
  endtask

  task automatic window(int k);
    @(negedge clk) en = 1;
    repeat (k) @(negedge clk);
    en = 0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) clr = 0;
    for (int t = 0; t < 6; t++) begin
      automatic int k = (t < 5) ? 1 + $urandom_range(0, 200) : 300;
      window(k);
      @(posedge clk);            // register loads one clock after en falls
      #1 chk(valid && data == N'(k), $sformatf("count %0d", k));
      window(5);                  // a second window is ignored
      repeat (2) @(posedge clk);
      #1 chk(data == N'(k), "second window ignored");
      @(negedge clk) clr = 1;
      @(negedge clk);
      chk(!valid && data == 0, "cleared");
      clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
