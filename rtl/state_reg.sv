// state_reg: the state register of one channel (X, Y or Z) with its
// initialisation multiplexer (muxX, muxY, muxZ).
//
// On each rising clk edge the register z^-1 takes init_val when init_sel
// (the InitSelect bit) is 1 and the step adder's result next_val when it is
// 0. Holding init_sel high for as many cycles as the loop latency loads a
// separate initial value into every pipeline slot. Synchronous active-high
// rst clears the register; the reset and the select polarity are this
// design's own choices.
module state_reg #(
  parameter int unsigned P_ARITH = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_sel,
  input  logic [P_ARITH-1:0] init_val,
  input  logic [P_ARITH-1:0] next_val,
  output logic [P_ARITH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)           q <= '0;
    else if (init_sel) q <= init_val;
    else               q <= next_val;
  end

endmodule
