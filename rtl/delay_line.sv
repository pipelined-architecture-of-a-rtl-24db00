// delay_line: a z^-DEPTH buffer, DEPTH registers of WIDTH bits in series.
//
// It serves as the alignment buffers DelayX, DelayY and DelayZ, which hold
// the state of each channel for pDelayS cycles so that it meets the
// pipelined sum (Z + B*Y + X) at the step adders, and as the "serial
// connection of flip-flops" that forms the pipeline stages after an adder.
// DEPTH = 0 is a plain wire. Interface: d is sampled on every rising clk
// edge and appears on q DEPTH cycles later. A synchronous, active-high rst
// clears every stage; the reset is this design's own choice.
module delay_line #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
