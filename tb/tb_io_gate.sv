// tb_io_gate: enabled buffers pass data, disabled ones drive nothing.
`timescale 1ps/1fs
module tb_io_gate;
  logic en;
  logic [7:0] a, y;
  logic oe;
  int checks = 0, failures = 0;

  io_gate #(.W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) begin
      a  = 8'($urandom);
      en = i[0];
      #10;
      checks++;
      if (y !== (en ? a : 8'h00) || oe !== en) begin
        failures++; $display("FAIL en=%0d a=%h y=%h", en, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
