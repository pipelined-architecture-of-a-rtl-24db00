// tb_state_reg: checks the initialisation multiplexer and state register:
// zero after reset, init_val loaded while init_sel is 1, next_val loaded
// while it is 0, one cycle after the inputs.
module tb_state_reg;
  logic clk = 1'b0;
  logic rst, init_sel;
  logic [63:0] init_val, next_val, q, expq;
  int checks = 0, failures = 0;
  int n_init = 0, n_next = 0;

  always #5 clk = ~clk;

  state_reg dut (.clk, .rst, .init_sel, .init_val, .next_val, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    init_sel = 1'b0;
    init_val = {$urandom, $urandom};
    next_val = {$urandom, $urandom};
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("q=%h after reset", q);
    end
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      init_sel = ($urandom_range(0, 3) == 0);
      init_val = {$urandom, $urandom};
      next_val = {$urandom, $urandom};
      expq = init_sel ? init_val : next_val;
      if (init_sel) n_init++; else n_next++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expq) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", n, q, expq);
      end
    end
    checks++;
    if (n_init == 0 || n_next == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
