// bist_ctrl_tb: self-checking testbench of the BIST control unit.
//
// Two units share the bench, each with its own start_i: one with
// N_VECTORS = 7 and one at the default 252. For each test the bench pulses
// start_i and checks the controls cycle by cycle against the expected schedule: one LOAD cycle (load, clears, test
// mode), N_VECTORS RUN cycles (generator and MISR enabled), one CHECK cycle,
// then DONE N_VECTORS + 2 cycles after start. It feeds an error from the
// analyzer in some tests and checks that irq_o rises, stays up, ignores a
// later passing test, and drops on interrupt_clear_i.
module bist_ctrl_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] start = 2'b00;
  logic irq_clr = 1'b0;
  logic tra_err = 1'b0;

  int checks = 0;
  int failures = 0;

  typedef struct packed {
    logic test_mode, load, en, mclr, men, tclr, tchk, busy, done, irq;
  } ctl_t;

  ctl_t c [2];

  bist_ctrl #(.N_VECTORS(7)) dut_small (
    .clk, .rst_n, .start_i(start[0]), .interrupt_clear_i(irq_clr), .tra_error_i(tra_err),
    .test_mode_o(c[0].test_mode), .lfsr_load_o(c[0].load), .lfsr_en_o(c[0].en),
    .misr_clear_o(c[0].mclr), .misr_en_o(c[0].men), .tra_clear_o(c[0].tclr),
    .tra_check_o(c[0].tchk), .busy_o(c[0].busy), .done_o(c[0].done), .irq_o(c[0].irq)
  );

  bist_ctrl dut_full (
    .clk, .rst_n, .start_i(start[1]), .interrupt_clear_i(irq_clr), .tra_error_i(tra_err),
    .test_mode_o(c[1].test_mode), .lfsr_load_o(c[1].load), .lfsr_en_o(c[1].en),
    .misr_clear_o(c[1].mclr), .misr_en_o(c[1].men), .tra_clear_o(c[1].tclr),
    .tra_check_o(c[1].tchk), .busy_o(c[1].busy), .done_o(c[1].done), .irq_o(c[1].irq)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected controls 'cyc' cycles after the start edge (cyc >= 1)
  function automatic ctl_t expected(input int cyc, input int n, input logic irq);
    ctl_t e;
    e = '0;
    e.irq = irq;
    if (cyc == 1) begin
      e.test_mode = 1; e.load = 1; e.mclr = 1; e.tclr = 1; e.busy = 1;
    end else if (cyc <= n + 1) begin
      e.test_mode = 1; e.en = 1; e.men = 1; e.busy = 1;
    end else if (cyc == n + 2) begin
      e.test_mode = 1; e.tchk = 1; e.busy = 1;
    end else begin
      e.done = 1;
    end
    return e;
  endfunction

  logic irq_exp [2];
  int nv [2] = '{7, 252};

  task automatic run_test(input int u, input logic err);
    int done_at;
    start[u] = 1'b1;
    @(posedge clk); #1;
    start = 2'b00;
    done_at = -1;
    for (int cyc = 1; cyc <= nv[u] + 4; cyc++) begin
      // the analyzer answers in the cycle after CHECK
      tra_err = (cyc == nv[u] + 3) ? err : 1'b0;
      if (cyc == nv[u] + 4 && err) irq_exp[u] = 1'b1;
      checks++;
      if (c[u] !== expected(cyc, nv[u], irq_exp[u])) begin
        failures++;
        $display("FAIL unit %0d cycle %0d: got %b expected %b", u, cyc, c[u], expected(cyc, nv[u], irq_exp[u]));
      end
      if (c[u].done && done_at < 0) done_at = cyc;
      @(posedge clk); #1;
    end
    tra_err = 1'b0;
    checks++;
    if (done_at != nv[u] + 3) begin
      failures++;
      $display("FAIL unit %0d: done after %0d cycles, expected %0d", u, done_at - 1, nv[u] + 2);
    end
  endtask

  initial begin
    irq_exp = '{1'b0, 1'b0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (c[u] !== ctl_t'(0)) begin failures++; $display("FAIL unit %0d idle controls %b", u, c[u]); end
    end
    // small unit: pass, error, pass with irq held, then clear
    run_test(0, 1'b0);
    run_test(0, 1'b1);
    run_test(0, 1'b0);
    checks++;
    if (!c[0].irq) begin failures++; $display("FAIL irq dropped without clear"); end
    irq_clr = 1'b1;
    @(posedge clk); #1;
    irq_clr = 1'b0;
    irq_exp[0] = 1'b0;
    checks++;
    if (c[0].irq) begin failures++; $display("FAIL irq not cleared"); end
    // full-size unit: pass, then error and clear
    run_test(1, 1'b0);
    run_test(1, 1'b1);
    irq_clr = 1'b1;
    @(posedge clk); #1;
    irq_clr = 1'b0;
    checks++;
    if (c[1].irq) begin failures++; $display("FAIL full-size irq not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
