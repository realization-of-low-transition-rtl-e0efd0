// lp_lfsr_tb: self-checking testbench of the low-transition pattern generator.
//
// 1. Loads the seed 0100_1011 and checks the five vectors of the worked
//    example: T1 = 1010_1011, Ta = 1010_1111, Tb = 1010_0101, Tc = 1111_0101,
//    T2 = 0101_0101.
// 2. Steps through 300 groups of vectors and compares every vector with a
//    model built on a plain 8-bit LFSR L (L' = {L[7]^L[0], L[7:1]}): the k-th
//    LFSR vector is {first half of L_k, second half of L_k-1}, Tb is L_k, and
//    an intermediate half takes R = L[0] wherever the bit changes. It also
//    checks that the four steps between two LFSR vectors toggle exactly as
//    many bits as the direct step, and that no vector pair toggles a bit twice.
// 3. Checks that test_en low holds the output and that load restarts.
module lp_lfsr_tb;
  import bist_pkg::*;

  localparam int W = 8;
  localparam int H = W / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [W-1:0] seed = '0;
  logic en = 1'b0;
  logic [W-1:0] pattern;
  lp_phase_t phase;

  int checks = 0;
  int failures = 0;

  lp_lfsr #(.WIDTH(W)) dut (
    .clk, .rst_n, .load_i(load), .seed_i(seed), .test_en_i(en),
    .pattern_o(pattern), .phase_o(phase)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input lp_phase_t ph, input string what);
    checks++;
    if (pattern !== exp || phase !== ph) begin
      failures++;
      $display("FAIL %s: pattern %b phase %s, expected %b %s", what, pattern, phase.name(), exp, ph.name());
    end
  endtask

  function automatic logic [W-1:0] lfsr_step(input logic [W-1:0] l);
    return {l[W-1] ^ l[0], l[W-1:1]};
  endfunction

  // half-vector through the injectors: cur where unchanged, r where changing
  function automatic logic [H-1:0] inject(input logic [H-1:0] cur, input logic [H-1:0] nxt, input logic r);
    logic [H-1:0] o;
    for (int i = 0; i < H; i++) o[i] = (cur[i] == nxt[i]) ? cur[i] : r;
    return o;
  endfunction

  function automatic int hd(input logic [W-1:0] a, input logic [W-1:0] b);
    return $countones(a ^ b);
  endfunction

  task automatic step();
    en = 1'b1;
    @(posedge clk);
    #1;
  endtask

  logic [W-1:0] l_prev, l_cur, l_next, t_vec, a_vec, b_vec, c_vec, t_next;
  int lp_trans, conv_trans;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // --- worked example
    seed = 8'b0100_1011;
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    check(8'b0100_1011, PH_SEED, "seed");
    step(); check(8'b1010_1011, PH_T, "T1");
    step(); check(8'b1010_1111, PH_A, "Ta");
    step(); check(8'b1010_0101, PH_B, "Tb");
    step(); check(8'b1111_0101, PH_C, "Tc");
    step(); check(8'b0101_0101, PH_T, "T2");
    // hold with test_en low
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(8'b0101_0101, PH_T, "hold");

    // --- long run against the model, from a fresh load
    for (int s = 0; s < 3; s++) begin
      seed = (s == 0) ? 8'h4B : W'($urandom_range(1, 255));
      load = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      check(seed, PH_SEED, "reload");
      l_prev = seed;
      l_cur  = lfsr_step(seed);
      lp_trans = 0; conv_trans = 0;
      step();
      for (int k = 0; k < 100; k++) begin
        l_next = lfsr_step(l_cur);
        t_vec  = {l_cur[W-1:H], l_prev[H-1:0]};
        a_vec  = {l_cur[W-1:H], inject(l_prev[H-1:0], l_cur[H-1:0], l_prev[0])};
        b_vec  = l_cur;
        c_vec  = {inject(l_cur[W-1:H], l_next[W-1:H], l_cur[0]), l_cur[H-1:0]};
        t_next = {l_next[W-1:H], l_cur[H-1:0]};
        check(t_vec, PH_T, "T"); step();
        check(a_vec, PH_A, "Ta"); step();
        check(b_vec, PH_B, "Tb"); step();
        check(c_vec, PH_C, "Tc"); step();
        // each changing bit toggles exactly once on the way to the next vector
        checks++;
        if (hd(t_vec, a_vec) + hd(a_vec, b_vec) + hd(b_vec, c_vec) + hd(c_vec, t_next)
            != hd(t_vec, t_next)) begin
          failures++;
          $display("FAIL transition count at step %0d", k);
        end
        lp_trans   += hd(t_vec, a_vec) + hd(a_vec, b_vec) + hd(b_vec, c_vec) + hd(c_vec, t_next);
        conv_trans += 4 * hd(l_cur, l_next);
        l_prev = l_cur;
        l_cur  = l_next;
      end
      $display("seed %h: %0d toggles over 400 low-power vectors, %0d over 400 plain LFSR vectors",
               seed, lp_trans, conv_trans);
      checks++;
      if (lp_trans >= conv_trans) begin
        failures++;
        $display("FAIL low-power sequence does not toggle less");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
