// bist_top_tb: end-to-end testbench of the BIST, at the default parameters
// (8-bit generator, 9-bit signatures, 252 vectors per test).
//
// The bench keeps its own model of the whole test: the generator's vector
// sequence built from a plain 8-bit LFSR, C17 as gate equations with an
// optional stuck-at net, and the MISR as polynomial arithmetic modulo
// x^9 + x^5 + 1. It checks the applied vector and its phase every test cycle,
// both signatures, pass/error, done timing (N_VECTORS + 2 cycles after
// start), the interrupt and its clear, and the CUT in normal mode.
// Tests: fault-free with the seed 0100_1011, each of the 22 single stuck-at
// faults of C17, and fault-free with random seeds. It counts how often each
// mechanism happened (seed load, each of the T/Ta/Tb/Tc vectors, an injector
// using the random bit, normal-mode operation, a pass, a detected fault, an
// interrupt raised and cleared) and fails if one never did.
module bist_top_tb;
  import bist_pkg::*;

  localparam int W  = 8;
  localparam int H  = W / 2;
  localparam int SW = 9;
  localparam int NV = 252;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] seed = '0;
  logic irq_clr = 1'b0;
  logic [4:0] func_in = '0;
  logic [1:0] func_out;
  stuck_fault_t fault = '0;
  logic test_mode, busy, done, pass, err, irq;
  logic [W-1:0] pattern;
  lp_phase_t phase;
  logic [SW-1:0] sig_ref, sig_test;

  int checks = 0;
  int failures = 0;

  bist_top dut (
    .clk, .rst_n, .start_i(start), .seed_i(seed), .interrupt_clear_i(irq_clr),
    .func_in_i(func_in), .func_out_o(func_out), .fault_i(fault),
    .test_mode_o(test_mode), .pattern_o(pattern), .phase_o(phase),
    .busy_o(busy), .done_o(done), .pass_o(pass), .error_o(err), .irq_o(irq),
    .sig_ref_o(sig_ref), .sig_test_o(sig_test)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_seed_load, n_t, n_a, n_b, n_c, n_inject, n_normal, n_pass, n_detect, n_irq, n_irq_clr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- models
  function automatic logic [W-1:0] lfsr_step(input logic [W-1:0] l);
    return {l[W-1] ^ l[0], l[W-1:1]};
  endfunction

  function automatic logic [H-1:0] inject(input logic [H-1:0] cur, input logic [H-1:0] nxt, input logic r);
    logic [H-1:0] o;
    for (int i = 0; i < H; i++) o[i] = (cur[i] == nxt[i]) ? cur[i] : r;
    return o;
  endfunction

  // C17 with an optional stuck net (fsite < 0: none), nets numbered as in bist_pkg
  function automatic logic [1:0] c17_model(input logic [4:0] v, input int fsite, input logic fval);
    logic [10:0] n;
    n[4:0] = {v[0], v[1], v[2], v[3], v[4]};   // N7 N6 N3 N2 N1 -> n[4..0]
    for (int i = 0; i < 5; i++) if (fsite == i) n[i] = fval;
    n[5]  = ~(n[0] & n[2]);  if (fsite == 5)  n[5]  = fval;
    n[6]  = ~(n[2] & n[3]);  if (fsite == 6)  n[6]  = fval;
    n[7]  = ~(n[1] & n[6]);  if (fsite == 7)  n[7]  = fval;
    n[8]  = ~(n[6] & n[4]);  if (fsite == 8)  n[8]  = fval;
    n[9]  = ~(n[5] & n[7]);  if (fsite == 9)  n[9]  = fval;
    n[10] = ~(n[7] & n[8]);  if (fsite == 10) n[10] = fval;
    return {n[9], n[10]};
  endfunction

  function automatic int unsigned misr_model(input int unsigned s, input logic [1:0] d);
    s = s << 1;
    if ((s & 32'h200) != 0) s = s ^ 32'h221;
    return s ^ 32'(d);
  endfunction

  // One test: start, check every cycle, return whether an error was expected.
  task automatic run_test(input logic [W-1:0] sd, input int fsite, input logic fval);
    logic [W-1:0] l_prev, l_cur, l_next, vec;
    lp_phase_t ph;
    int unsigned m_ref, m_test;
    logic exp_err;
    int done_at;
    string tag;
    tag = $sformatf("seed %h fault %0d/sa%0d", sd, fsite, fval);
    seed  = sd;
    fault = '0;
    if (fsite >= 0) begin
      fault.en = 1'b1; fault.site = c17_net_t'(fsite); fault.value = fval;
    end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // LOAD cycle
    check(test_mode && busy && !done, {tag, ": load cycle"});
    n_seed_load++;
    @(posedge clk); #1;
    l_prev = sd; l_cur = lfsr_step(sd); l_next = lfsr_step(l_cur);
    m_ref = 0; m_test = 0;
    for (int j = 0; j < NV; j++) begin
      if (j == 0) begin
        vec = sd; ph = PH_SEED;
      end else begin
        unique case ((j - 1) % 4)
          0: begin vec = {l_cur[W-1:H], l_prev[H-1:0]}; ph = PH_T; end
          1: begin vec = {l_cur[W-1:H], inject(l_prev[H-1:0], l_cur[H-1:0], l_prev[0])}; ph = PH_A;
                   if (l_prev[H-1:0] != l_cur[H-1:0]) n_inject++; end
          2: begin vec = l_cur; ph = PH_B; end
          default: begin
                   vec = {inject(l_cur[W-1:H], l_next[W-1:H], l_cur[0]), l_cur[H-1:0]}; ph = PH_C;
                   if (l_cur[W-1:H] != l_next[W-1:H]) n_inject++;
                   end
        endcase
      end
      check(test_mode && busy && !done && pattern == vec && phase == ph,
            $sformatf("%s: vector %0d is %b/%s, expected %b/%s", tag, j, pattern, phase.name(), vec, ph.name()));
      case (phase)
        PH_T: n_t++;
        PH_A: n_a++;
        PH_B: n_b++;
        PH_C: n_c++;
        default: ;
      endcase
      m_ref  = misr_model(m_ref,  c17_model(vec[4:0], -1, 1'b0));
      m_test = misr_model(m_test, c17_model(vec[4:0], fsite, fval));
      @(posedge clk); #1;
      if (j > 0 && (j - 1) % 4 == 3) begin
        l_prev = l_cur; l_cur = l_next; l_next = lfsr_step(l_cur);
      end
    end
    // CHECK cycle
    check(test_mode && !done, {tag, ": check cycle"});
    check(32'(sig_ref) == m_ref && 32'(sig_test) == m_test,
          $sformatf("%s: signatures %h/%h, expected %h/%h", tag, sig_ref, sig_test, m_ref, m_test));
    @(posedge clk); #1;
    done_at = NV + 2;
    exp_err = (m_ref != m_test);
    check(done && !test_mode && pass == !exp_err && err == exp_err,
          $sformatf("%s: done %b pass %b error %b after %0d cycles", tag, done, pass, err, done_at));
    @(posedge clk); #1;
    check(irq == exp_err, $sformatf("%s: irq %b", tag, irq));
    if (exp_err) n_detect++;
    else         n_pass++;
    if (irq) begin
      n_irq++;
      // interrupt holds until cleared
      repeat (3) @(posedge clk);
      #1 check(irq, {tag, ": irq held"});
      irq_clr = 1'b1;
      @(posedge clk); #1;
      irq_clr = 1'b0;
      check(!irq, {tag, ": irq cleared"});
      if (!irq) n_irq_clr++;
    end
    fault = '0;
  endtask

  task automatic normal_mode_check();
    for (int v = 0; v < 32; v++) begin
      func_in = 5'(v);
      #1;
      check(!test_mode && func_out == c17_model(func_in, -1, 1'b0),
            $sformatf("normal mode in %b out %b", func_in, func_out));
      n_normal++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done && !irq && !test_mode, "idle after reset");
    normal_mode_check();
    run_test(8'b0100_1011, -1, 1'b0);
    for (int s = 0; s < 11; s++)
      for (int v = 0; v < 2; v++)
        run_test(8'b0100_1011, s, 1'(v));
    normal_mode_check();
    for (int i = 0; i < 3; i++) run_test(W'($urandom_range(1, 255)), -1, 1'b0);
    $display("mechanisms: seed loads %0d, T %0d, Ta %0d, Tb %0d, Tc %0d, injections %0d, normal-mode %0d",
             n_seed_load, n_t, n_a, n_b, n_c, n_inject, n_normal);
    $display("            passes %0d, faults detected %0d of 22, irq raised %0d, irq cleared %0d",
             n_pass, n_detect, n_irq, n_irq_clr);
    check(n_seed_load > 0, "seed load never happened");
    check(n_t > 0 && n_a > 0 && n_b > 0 && n_c > 0, "a vector phase never happened");
    check(n_inject > 0, "injector never used R");
    check(n_normal > 0, "normal mode never exercised");
    check(n_pass > 0, "no test passed");
    check(n_detect > 0, "no fault detected");
    check(n_irq > 0 && n_irq_clr > 0, "interrupt never raised and cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
