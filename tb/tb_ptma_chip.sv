// tb_ptma_chip: the PTMA with its reference generator and I/O buffers.
// Buffers disabled -> nothing happens and outputs are not driven; enabled ->
// a propagation-delay measurement with on-chip references and one with the
// same voltages on the external reference pins agree with the input delay;
// calibration gives about 24 counts for the 1 ns pulse.
`timescale 1ps/1fs
module tb_ptma_chip;
  localparam real PS_PER_COUNT = 500.0 * 5.0 / 60.0;

  logic io_en = 0, int_ref_en = 1, pwrup = 0, start = 0, cal_en = 0;
  logic [1:0] mode = 2'b11;
  real vin1 = 0.0, vin2 = 0.0;
  real ext_vref_h = 1.08, ext_vref_m = 0.6, ext_vref_l = 0.12;
  logic [7:0] data;
  logic valid, data_oe;
  int checks = 0, failures = 0;

  ptma_chip dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (data %0d valid %0d oe %0d)", msg, data, valid, data_oe); end
  endtask

  task automatic prop(int t_int);
    vin1 = 0.0; vin2 = 0.0;
    #3000 start = 1;
    #(1500 + $urandom_range(0, 399));
    vin1 = 0.6; #5 vin1 = 1.2;
    #(t_int - 5);
    vin2 = 0.6; #5 vin2 = 1.2;
    #(t_int * 14 + 3000);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwrup = 1;
    // buffers disabled: core powered down
    prop(2000);
    chk(!data_oe && !valid && data == 0, "isolated while io_en low");
    start = 0;
    io_en = 1;
    #3000;
    prop(2000);
    chk(data_oe && valid, "result with on-chip references");
    chk(real'(data) * PS_PER_COUNT > 1550 && real'(data) * PS_PER_COUNT < 2500, $sformatf("2 ns on-chip refs: %0d", data));
    start = 0;
    int_ref_en = 0;
    prop(2000);
    chk(valid && real'(data) * PS_PER_COUNT > 1550 && real'(data) * PS_PER_COUNT < 2500, "2 ns external refs");
    start = 0;
    // wrong external references: VrefM above the input swing -> no pulse
    ext_vref_m = 1.5;
    prop(2000);
    chk(!valid, "no result when the input never crosses the external VrefM");
    start = 0;
    ext_vref_m = 0.6;
    int_ref_en = 1;
    // calibration
    mode = 2'b10; cal_en = 1;
    #3000 start = 1;
    #20000;
    chk(valid && data >= 14 && data <= 34, $sformatf("calibration %0d", data));
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
