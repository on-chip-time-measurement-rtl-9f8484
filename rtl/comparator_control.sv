// comparator_control: lets exactly one comparator pulse through to the PIB
// output per measurement.
//
// While the measurement runs the PIB comparator keeps re-evaluating on every
// clock, and once the switch controller falls back to the first comparison it
// toggles again. This block therefore remembers that the first pulse has
// ended and then opens the switch between comparator and PIB output.
//
// As in the design's schematic, the block is armed only while both pwrup and
// start are high, and a single flag (Q) drives the complementary switch
// controls sc<2> = Q and sc<1> = not Q. Following the design description,
// the flag is set by the high-to-low transition that ends the first pulse.
// Here the flag is a small state register clocked by the comparator clock,
// since the comparator output itself only changes right after that clock's
// rising edges:
//   ARMED -> PULSE when the comparator is seen high,
//   PULSE -> DONE  when it is seen low again (flag Q set).
// pwrup or start low returns to ARMED (asynchronously).
//
// pib_out_n = NOT (comp AND switch closed): an active-low pulse whose edges
// follow the comparator edges combinationally, so its width is not quantised
// further by this block.
`timescale 1ps/1fs
module comparator_control (
  input  logic       clk_cmp,
  input  logic       pwrup,
  input  logic       start,
  input  logic       comp,
  output logic [2:1] sc,
  output logic       pib_out_n,
  output logic       done
);

  typedef enum logic [1:0] {ARMED = 2'd0, PULSE = 2'd1, DONE = 2'd2} cc_state_e;

  cc_state_e state;
  logic      arm;

  assign arm = pwrup & start;

  always_ff @(posedge clk_cmp or negedge arm) begin
    if (!arm) begin
      state <= ARMED;
    end else begin
      unique case (state)
        ARMED:   if (comp)  state <= PULSE;
        PULSE:   if (!comp) state <= DONE;
        default: state <= DONE;
      endcase
    end
  end

  assign done      = (state == DONE);
  assign sc[2]     = done;
  assign sc[1]     = ~done;
  assign pib_out_n = ~(comp & arm & sc[1]);

endmodule
