// prng_stim_check: stimulus and scoreboard for chaotic_prng, reused by the
// end-to-end testbenches. The caller instantiates the generator with the
// same parameters and connects it here.
//
// Sequence: reset; seed all L = P_DELAY_S + P_DELAY_H + 1 pipeline slots
// with random values in (-2, 2) by holding init_sel for L cycles; run
// N_CYCLES/2 cycles; re-seed only the first two slots while the rest keep
// running (a mid-run mode switch); run N_CYCLES/2 more. Every cycle the
// full outputs and the P_WORD-bit words are compared with the reference
// model, which follows reg(t+1) = init_sel ? init : step(reg(t+1-L)).
// It also checks explicitly that a seeded slot shows its first Euler step
// exactly L cycles after it was loaded, and counts how often each
// mechanism happened: slot loads, re-seeds, steps with Y >= 1 (B = 4) and
// with Y < 1 (B = 0), and cycles in which the output changed from one slot
// to the next (one new triple per clock).
module prng_stim_check
  import prng_model_pkg::*;
#(
  parameter int P_ARITH   = 64,
  parameter int P_DELAY_H = 1,
  parameter int P_DELAY_S = 4,
  parameter int P_WORD    = 56,
  parameter int N_CYCLES  = 2000
) (
  input  logic               clk,
  output logic               rst,
  output logic               init_sel,
  output logic [P_ARITH-1:0] init_x,
  output logic [P_ARITH-1:0] init_y,
  output logic [P_ARITH-1:0] init_z,
  input  logic [P_ARITH-1:0] out_x,
  input  logic [P_ARITH-1:0] out_y,
  input  logic [P_ARITH-1:0] out_z,
  input  logic [P_WORD-1:0]  word_x,
  input  logic [P_WORD-1:0]  word_y,
  input  logic [P_WORD-1:0]  word_z,
  output logic               done,
  output int                 checks,
  output int                 failures
);

  localparam int L = P_DELAY_S + P_DELAY_H + 1;

  state_t hist [$];      // model of the state registers, one entry per cycle
  int n_load = 0, n_reseed = 0, n_b4 = 0, n_b0 = 0, n_new = 0, n_lat = 0;

  function automatic longint sx(logic [P_ARITH-1:0] v);
    return wrap(longint'(v), P_ARITH);
  endfunction

  function automatic logic [P_WORD-1:0] low(longint v);
    return P_WORD'(v);
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("%0d-bit H=%0d S=%0d: %s", P_ARITH, P_DELAY_H, P_DELAY_S, msg);
  endtask

  // One clock: apply inputs, advance the model, compare after the edge.
  task automatic tick(logic sel, state_t seed);
    state_t nxt, prev;
    init_sel = sel;
    init_x   = P_ARITH'(seed.x);
    init_y   = P_ARITH'(seed.y);
    init_z   = P_ARITH'(seed.z);
    prev = hist[hist.size()-1];
    if (sel) begin
      nxt = seed;
      n_load++;
    end else begin
      state_t old;
      old = hist[hist.size()-L];
      nxt = step(old, P_ARITH);
      if (old.y >= (longint'(1) <<< (P_ARITH - 4))) n_b4++;
      else n_b0++;
    end
    hist.push_back(nxt);
    if (hist.size() > 4 * L) void'(hist.pop_front());
    @(posedge clk);
    #1;
    checks++;
    if (sx(out_x) != nxt.x || sx(out_y) != nxt.y || sx(out_z) != nxt.z)
      fail($sformatf("state (%h %h %h) expected (%h %h %h)", out_x, out_y,
                     out_z, P_ARITH'(nxt.x), P_ARITH'(nxt.y), P_ARITH'(nxt.z)));
    checks++;
    if (word_x != low(nxt.x) || word_y != low(nxt.y) || word_z != low(nxt.z))
      fail("output words differ from the low bits of the state");
    if (nxt.x != prev.x || nxt.y != prev.y || nxt.z != prev.z) n_new++;
  endtask

  function automatic state_t rand_state();
    state_t s;
    s.x = rand_seed(P_ARITH);
    s.y = rand_seed(P_ARITH);
    s.z = rand_seed(P_ARITH);
    return s;
  endfunction

  initial begin
    state_t zero, seed0;
    longint x_at_load;
    zero = '{0, 0, 0};
    checks = 0;
    failures = 0;
    done = 1'b0;
    rst = 1'b1;
    init_sel = 1'b0;
    init_x = '0;
    init_y = '0;
    init_z = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 4 * L; i++) hist.push_back(zero);
    rst = 1'b0;
    // Seed every slot; remember slot 0.
    seed0 = rand_state();
    tick(1'b1, seed0);
    for (int i = 1; i < L; i++) tick(1'b1, rand_state());
    // Explicit latency check: slot 0 reappears, stepped once, after L cycles.
    for (int i = 0; i < N_CYCLES / 2; i++) begin
      tick(1'b0, zero);
      if (i == 0) begin
        state_t e1;
        e1 = step(seed0, P_ARITH);
        checks++;
        n_lat++;
        if (sx(out_x) != e1.x || sx(out_y) != e1.y || sx(out_z) != e1.z)
          fail("first step of slot 0 not seen L cycles after its load");
      end
    end
    // Re-seed two slots while the others keep running.
    tick(1'b1, rand_state());
    tick(1'b1, rand_state());
    n_reseed++;
    for (int i = 0; i < N_CYCLES / 2; i++) tick(1'b0, zero);

    // Every mechanism must have happened.
    checks += 6;
    if (n_load < L + 2)            fail("not every slot was loaded");
    if (n_reseed == 0)             fail("no mid-run re-seed");
    if (n_b4 == 0)                 fail("Y >= 1 (B = 4) never happened");
    if (n_b0 == 0)                 fail("Y < 1 (B = 0) never happened");
    if (n_lat == 0)                fail("latency never checked");
    if (n_new < N_CYCLES - N_CYCLES / 50)
      fail($sformatf("only %0d new triples in %0d cycles", n_new, N_CYCLES));
    $display("%0d-bit H=%0d S=%0d (L=%0d): loads=%0d reseeds=%0d B4=%0d B0=%0d new=%0d",
             P_ARITH, P_DELAY_H, P_DELAY_S, L, n_load, n_reseed, n_b4, n_b0, n_new);
    done = 1'b1;
  end

endmodule
