// bist_top: test-per-clock BIST of the C17 benchmark with a low-transition
// pattern generator.
//
// The LP-LFSR produces one test vector per clock, with three intermediate
// vectors between successive LFSR vectors so that the primary inputs of the
// circuit under test switch less. In test mode a multiplexer feeds the low
// CUT_IN bits of each vector to the tested C17 and to a fault-free reference
// C17; in normal mode both take the functional inputs func_in_i. Each C17's
// outputs are compacted by its own MISR; at the end of the test the response
// analyzer compares the two signatures and the control unit reports done,
// pass or error, and raises irq_o on error until interrupt_clear_i.
// fault_i places a stuck-at fault on one net of the tested C17 so that the
// test can be seen to catch it. The generator, CUT, MISR, analyzer and control
// unit follow the BIST architecture; the reference copy of the CUT, the choice
// of pattern bits for the CUT and the fault port are this design's own.
//
// Interface: seed_i is sampled in the LOAD cycle that follows start_i.
// Timing: done_o rises N_VECTORS + 2 cycles after the edge that takes start_i;
// pass_o/error_o are valid while done_o is high.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned SIG_WIDTH = 9,
  parameter int unsigned N_VECTORS = 252
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start_i,
  input  logic [WIDTH-1:0]       seed_i,
  input  logic                   interrupt_clear_i,
  input  logic [C17_NUM_IN-1:0]  func_in_i,
  output logic [C17_NUM_OUT-1:0] func_out_o,
  input  stuck_fault_t           fault_i,
  output logic                   test_mode_o,
  output logic [WIDTH-1:0]       pattern_o,
  output lp_phase_t              phase_o,
  output logic                   busy_o,
  output logic                   done_o,
  output logic                   pass_o,
  output logic                   error_o,
  output logic                   irq_o,
  output logic [SIG_WIDTH-1:0]   sig_ref_o,
  output logic [SIG_WIDTH-1:0]   sig_test_o
);

  logic test_mode, lfsr_load, lfsr_en, misr_clear, misr_en, tra_clear, tra_check;
  logic tra_valid;
  logic [WIDTH-1:0]       pattern;
  logic [C17_NUM_IN-1:0]  cut_in;
  logic [C17_NUM_OUT-1:0] out_test, out_ref;

  bist_ctrl #(.N_VECTORS(N_VECTORS)) u_ctrl (
    .clk, .rst_n,
    .start_i, .interrupt_clear_i,
    .tra_error_i  (error_o),
    .test_mode_o  (test_mode),
    .lfsr_load_o  (lfsr_load),
    .lfsr_en_o    (lfsr_en),
    .misr_clear_o (misr_clear),
    .misr_en_o    (misr_en),
    .tra_clear_o  (tra_clear),
    .tra_check_o  (tra_check),
    .busy_o, .done_o, .irq_o
  );

  lp_lfsr #(.WIDTH(WIDTH)) u_prpg (
    .clk, .rst_n,
    .load_i    (lfsr_load),
    .seed_i,
    .test_en_i (lfsr_en),
    .pattern_o (pattern),
    .phase_o
  );

  // Test / normal mode input multiplexer
  assign cut_in = test_mode ? pattern[C17_NUM_IN-1:0] : func_in_i;

  c17 u_cut (
    .in_i    (cut_in),
    .fault_i (fault_i),
    .out_o   (out_test)
  );

  c17 u_ref (
    .in_i    (cut_in),
    .fault_i ('0),
    .out_o   (out_ref)
  );

  misr #(.WIDTH(SIG_WIDTH), .IN_WIDTH(C17_NUM_OUT)) u_misr_test (
    .clk, .rst_n,
    .clear_i     (misr_clear),
    .en_i        (misr_en),
    .data_i      (out_test),
    .signature_o (sig_test_o)
  );

  misr #(.WIDTH(SIG_WIDTH), .IN_WIDTH(C17_NUM_OUT)) u_misr_ref (
    .clk, .rst_n,
    .clear_i     (misr_clear),
    .en_i        (misr_en),
    .data_i      (out_ref),
    .signature_o (sig_ref_o)
  );

  tra #(.WIDTH(SIG_WIDTH)) u_tra (
    .clk, .rst_n,
    .clear_i    (tra_clear),
    .check_i    (tra_check),
    .sig_ref_i  (sig_ref_o),
    .sig_test_i (sig_test_o),
    .valid_o    (tra_valid),
    .pass_o,
    .error_o
  );

  assign test_mode_o = test_mode;
  assign pattern_o   = pattern;
  assign func_out_o  = out_test;

  // A result is only reported once the analyzer has checked
  assert property (@(posedge clk) disable iff (!rst_n) done_o |-> tra_valid);

  initial begin
    assert (WIDTH >= C17_NUM_IN) else $error("bist_top: WIDTH must cover the C17 inputs");
  end

endmodule
