// tra: test response analyzer.
//
// At the end of a test the signature compacted from the tested CUT is
// compared with the reference signature. When check_i is high the result is
// registered: pass_o = 1 if both signatures are equal, error_o = 1 if not.
// valid_o says a result is held; clear_i (a new test starting) drops it.
// Comparing the two signatures and reporting error or no error is the
// analyzer's job as the BIST architecture defines it; taking the reference
// from a fault-free copy of the CUT, the registered result and the
// valid/clear handshake are this design's own.
//
// Timing: result valid the cycle after check_i.
module tra #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic             check_i,
  input  logic [WIDTH-1:0] sig_ref_i,
  input  logic [WIDTH-1:0] sig_test_i,
  output logic             valid_o,
  output logic             pass_o,
  output logic             error_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      pass_o  <= 1'b0;
      error_o <= 1'b0;
    end else if (clear_i) begin
      valid_o <= 1'b0;
      pass_o  <= 1'b0;
      error_o <= 1'b0;
    end else if (check_i) begin
      valid_o <= 1'b1;
      pass_o  <= (sig_ref_i == sig_test_i);
      error_o <= (sig_ref_i != sig_test_i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pass_o && error_o));

endmodule
