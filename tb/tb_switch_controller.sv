// tb_switch_controller: exhaustive check of the switch controller against
// the truth table (all modes, comparator low and high).
`timescale 1ps/1fs
module tb_switch_controller;
  import ptma_pkg::*;

  meas_mode_e mode;
  logic       comp_in;
  sw_bus_t    sw;
  int checks = 0, failures = 0;

  switch_controller dut (.mode(mode), .comp_in(comp_in), .sw(sw));

  // expected codes sw<6:0>, index {comp_in, mode1, mode0}
  function automatic logic [6:0] expect_sw(logic [2:0] idx);
    case (idx)
      3'b000: return 7'b0001001;
      3'b001: return 7'b0000110;
      3'b010: return 7'b1000001;
      3'b011: return 7'b1000001;
      3'b100: return 7'b0000110;
      3'b101: return 7'b0001001;
      3'b110: return 7'b1000001;
      default: return 7'b0110000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      comp_in = i[2];
      mode    = meas_mode_e'(i[1:0]);
      #10;
      checks++;
      if (sw !== expect_sw(i[2:0])) begin
        failures++;
        $display("FAIL comp=%0d mode=%0d sw=%b exp=%b", comp_in, mode, sw, expect_sw(i[2:0]));
      end
      // never two switches on one comparator node
      checks++;
      if ($countones({sw[0], sw[2], sw[5]}) != 1 || $countones({sw[1], sw[3], sw[4], sw[6]}) != 1) begin
        failures++;
        $display("FAIL node conflict sw=%b", sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
