// misr_tb: self-checking testbench of the signature register.
//
// Drives 2000 cycles of random data, enable and occasional clear into the
// default 9-bit, 2-input MISR and compares the signature every cycle with an
// integer model: multiply by x, reduce modulo x^9 + x^5 + 1 (mask 0x221),
// then add the input bits. Also checks that a single-bit error in one
// response changes the final signature.
module misr_tb;

  localparam int W = 9;
  localparam int D = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic [D-1:0] data = '0;
  logic [W-1:0] sig;

  int checks = 0;
  int failures = 0;

  misr dut (.clk, .rst_n, .clear_i(clear), .en_i(en), .data_i(data), .signature_o(sig));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned absorb(input int unsigned s, input int unsigned d);
    s = s << 1;
    if ((s & 32'h200) != 0) s = s ^ 32'h221;
    return s ^ d;
  endfunction

  int unsigned model;
  int unsigned good_sig;

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (sig !== '0) begin failures++; $display("FAIL reset value %h", sig); end
    for (int i = 0; i < 2000; i++) begin
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 99) == 0);
      data  = D'($urandom);
      @(posedge clk);
      if (clear)   model = 0;
      else if (en) model = absorb(model, 32'(data));
      #1;
      checks++;
      if (32'(sig) !== model) begin
        failures++;
        $display("FAIL cycle %0d: sig %h model %h", i, sig, model);
      end
    end
    // aliasing check: one flipped response bit changes the signature
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1'b1; en = 1'b0;
      @(posedge clk); #1;
      clear = 1'b0; en = 1'b1;
      for (int i = 0; i < 50; i++) begin
        data = D'(i * 7 + 3);
        if (pass == 1 && i == 20) data[0] = ~data[0];
        @(posedge clk); #1;
      end
      en = 1'b0;
      if (pass == 0) good_sig = 32'(sig);
    end
    checks++;
    if (32'(sig) == good_sig) begin failures++; $display("FAIL error not visible in signature"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
