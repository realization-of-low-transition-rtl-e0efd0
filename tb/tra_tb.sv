// tra_tb: self-checking testbench of the response analyzer.
//
// Presents random signature pairs, equal about half the time and otherwise
// differing in one random bit, pulses check_i and checks that valid, pass and
// error appear the cycle after and hold until the next check or clear.
module tra_tb;

  localparam int W = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic check = 1'b0;
  logic [W-1:0] sref = '0, stest = '0;
  logic valid, pass, err;

  int checks = 0;
  int failures = 0;

  tra dut (.clk, .rst_n, .clear_i(clear), .check_i(check), .sig_ref_i(sref),
           .sig_test_i(stest), .valid_o(valid), .pass_o(pass), .error_o(err));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic v, input logic p, input logic e, input string what);
    checks++;
    if (valid !== v || pass !== p || err !== e) begin
      failures++;
      $display("FAIL %s: valid %b pass %b error %b, expected %b %b %b", what, valid, pass, err, v, p, e);
    end
  endtask

  logic same;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect3(0, 0, 0, "reset");
    for (int i = 0; i < 500; i++) begin
      same  = 1'($urandom_range(0, 1));
      sref  = W'($urandom);
      stest = same ? sref : sref ^ (W'(1) << $urandom_range(0, W - 1));
      check = 1'b1;
      @(posedge clk); #1;
      check = 1'b0;
      expect3(1, same, !same, "result");
      // inputs change, result holds
      sref  = ~sref;
      @(posedge clk); #1;
      expect3(1, same, !same, "hold");
      if (i % 10 == 0) begin
        clear = 1'b1;
        @(posedge clk); #1;
        clear = 1'b0;
        expect3(0, 0, 0, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
