// adder_test_top: test circuit for measuring the delay of a sparse Kogge-Stone adder.
// A pattern ROM applies {cin, b, a} to the adder; an address counter steps through the
// patterns on 'step' and wraps. Every adder output passes through a 2:1 mux whose select
// is a board switch (sel_adder): 1 puts {cout, sum} on the pins, 0 puts the bypass data
// {cin, a} straight from the ROM on the same pins, so the delay without the adder can be
// measured and subtracted. The adder is combinational; the ROM and counter are clocked.
// Interface: pattern_addr is the address of the pattern now applied to the adder.
// Timing: a pattern reaches the outputs one clock after its address is in the counter,
// i.e. one clock after the 'step' that selected it; pattern_addr is aligned with it.
// Reset: rst_n (active low, synchronous) restarts at address 0.
// The ROM -> adder -> switched output mux arrangement follows the published test circuit;
// the bypass contents, the address counter, 'step' and the reset are choices made here.
module adder_test_top #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned RCA_WIDTH  = 4,
  parameter bit          FAST_CARRY = 1'b0,
  parameter int unsigned ROM_DEPTH  = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         step,
  input  logic                         sel_adder,
  output logic [$clog2(ROM_DEPTH)-1:0] pattern_addr,
  output logic [WIDTH-1:0]             out_sum,
  output logic                         out_cout
);

  localparam int unsigned AW = $clog2(ROM_DEPTH);

  logic [AW-1:0]    addr;
  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr         <= '0;
      pattern_addr <= '0;
    end else begin
      pattern_addr <= addr;
      if (step)
        addr <= (addr == AW'(ROM_DEPTH - 1)) ? '0 : addr + 1'b1;
    end
  end

  pattern_rom #(.WIDTH(WIDTH), .DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .addr(addr), .a(a), .b(b), .cin(cin)
  );

  sparse_ks_adder #(.WIDTH(WIDTH), .RCA_WIDTH(RCA_WIDTH), .FAST_CARRY(FAST_CARRY)) u_adder (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
  );

  output_select_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .sel      (sel_adder),
    .adder_in ({cout, sum}),
    .bypass_in({cin, a}),
    .y        ({out_cout, out_sum})
  );

endmodule
