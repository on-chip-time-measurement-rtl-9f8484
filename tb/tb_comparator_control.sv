// tb_comparator_control: the first comparator pulse passes (inverted), later
// pulses are blocked, release of start re-arms, pwrup low blocks everything.
`timescale 1ps/1fs
module tb_comparator_control;
  logic clk_cmp = 0, pwrup = 0, start = 0, comp = 0;
  logic [2:1] sc;
  logic pib_out_n, done;
  int checks = 0, failures = 0;
  int low_edges = 0;

  comparator_control dut (.*);

  always #200 clk_cmp = ~clk_cmp;   // 2.5 GHz
  always @(negedge pib_out_n) low_edges++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // comparator output changes 175 ps after a clock edge
  task automatic comp_at(int edge_n, logic v);
    repeat (edge_n) @(posedge clk_cmp);
    #175 comp = v;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    pwrup = 1;
    comp_at(2, 1'b1);                      // pulse while not started
    #10 chk(pib_out_n == 1'b1, "blocked before start");
    comp_at(2, 1'b0);
    start = 1;
    #10 chk(sc == 2'b01 && !done, "armed: sc<2>=0 sc<1>=1");
    comp_at(2, 1'b1);
    #10 chk(pib_out_n == 1'b0, "first pulse passes");
    comp_at(5, 1'b0);
    #10 chk(pib_out_n == 1'b1, "first pulse ends");
    comp_at(1, 1'b1);                      // comparator toggles again
    #10 chk(pib_out_n == 1'b1, "second pulse blocked");
    chk(done && sc == 2'b10, "done: sc<2>=1 sc<1>=0");
    comp_at(3, 1'b0);
    comp_at(2, 1'b1);
    comp_at(2, 1'b0);
    chk(low_edges == 1, "exactly one output pulse");
    // re-arm
    start = 0;
    #10 chk(!done, "start low clears");
    #1000 start = 1;
    comp_at(2, 1'b1);
    #10 chk(pib_out_n == 1'b0, "pulse after re-arm");
    comp_at(3, 1'b0);
    #10 chk(low_edges == 2, "two pulses in two measurements");
    // pwrup low blocks
    start = 0; pwrup = 0;
    #10 start = 1;
    comp_at(2, 1'b1);
    #10 chk(pib_out_n == 1'b1, "blocked when powered down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
