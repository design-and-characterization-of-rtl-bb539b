// output_select_mux: output multiplexer of the adder test circuit.
// One 2:1 mux per output bit, all driven by one select wired to a board switch. With
// sel = 1 the adder's result reaches the output pins; with sel = 0 a bypass path of the
// same memory and wiring, but no adder, does. Measuring both lets the delay of the memory,
// the multiplexers and the interconnect be subtracted from the adder measurement.
// Timing: combinational.
// The mux and its switch follow the published test circuit; the polarity is a choice here.
module output_select_mux #(
  parameter int unsigned WIDTH = 17
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] adder_in,
  input  logic [WIDTH-1:0] bypass_in,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? adder_in : bypass_in;

endmodule
