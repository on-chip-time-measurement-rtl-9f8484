// tb_clock_generator: 7 stages x 17.85 ps -> 4 GHz ring -> 2 GHz output;
// 14.2857 ps -> 2.5 GHz; no clock while disabled.
`timescale 1ps/1fs
module tb_clock_generator;
  logic en = 0;
  logic c2g, c25g;
  int checks = 0, failures = 0;
  int edges2 = 0, edges25 = 0;

  clock_generator                                 u2  (.clk_enable(en), .clk_out(c2g));
  clock_generator #(.STAGES(7), .TAU_PS(14.2857)) u25 (.clk_enable(en), .clk_out(c25g));

  always @(posedge c2g)  edges2++;
  always @(posedge c25g) edges25++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (%0d %0d)", msg, edges2, edges25); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    edges2 = 0; edges25 = 0;
    #5000;
    chk(edges2 == 0 && edges25 == 0, "stopped while disabled");
    en = 1;
    #2000;                      // start-up
    edges2 = 0; edges25 = 0;
    #100000;                    // 100 ns
    chk(edges2 >= 199 && edges2 <= 201, "2 GHz: 200 edges in 100 ns");
    chk(edges25 >= 249 && edges25 <= 251, "2.5 GHz: 250 edges in 100 ns");
    en = 0;
    #2000;
    edges2 = 0; edges25 = 0;
    #5000;
    chk(edges2 == 0 && edges25 == 0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
