// tb_delay_line: checks delay_line at its default size (64 bits, 4 stages)
// and as a plain wire (DEPTH = 0). Random words are pushed in every cycle;
// a queue model predicts q, which must equal the word sent DEPTH cycles
// earlier, and zero while the reset value is still in the line.
module tb_delay_line;
  localparam int W = 64;
  localparam int D = 4;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] d, q, q0;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  always #5 clk = ~clk;

  delay_line dut (.clk, .rst, .d, .q);
  delay_line #(.WIDTH(W), .DEPTH(0)) dut_wire (.clk, .rst, .d, .q(q0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d   = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < D; i++) hist.push_back('0);
    for (int n = 0; n < 300; n++) begin
      d = {$urandom, $urandom};
      #1;
      checks++;
      if (q0 !== d) begin
        failures++;
        $display("wire mismatch %h %h", q0, d);
      end
      hist.push_back(d);
      @(posedge clk);
      #1;
      void'(hist.pop_front());
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", n, q, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
