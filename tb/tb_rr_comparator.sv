// tb_rr_comparator: decision taken at the rising clock edge, visible after
// the propagation delay, held until the next edge.
`timescale 1ps/1fs
module tb_rr_comparator;
  logic clk = 0;
  real vinp = 0.0, vinn = 0.6;
  logic out;
  int checks = 0, failures = 0;

  rr_comparator dut (.*);

  always #200 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #170 chk(out == 1'b0, "low");
    // input goes above between edges: no change until the next edge + delay
    vinp = 0.61;
    @(posedge clk);
    #170 chk(out == 1'b0, "before propagation delay");
    #10  chk(out == 1'b1, "after propagation delay");
    vinp = 0.59;                        // mid-period change is ignored
    #100 chk(out == 1'b1, "held between edges");
    @(posedge clk);
    #180 chk(out == 1'b0, "falls after next edge");
    // rail-to-rail: both inputs near the supply
    vinp = 1.19; vinn = 1.18;
    @(posedge clk);
    #180 chk(out == 1'b1, "near VDD");
    vinp = 0.01; vinn = 0.02;
    @(posedge clk);
    #180 chk(out == 1'b0, "near VSS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
