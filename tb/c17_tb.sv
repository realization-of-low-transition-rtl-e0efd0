// c17_tb: self-checking testbench of the C17 circuit under test.
//
// Applies all 32 input vectors fault-free and compares both outputs with the
// two-level forms N22 = N1 N3 + N2 ~(N3 N6) and N23 = ~(N3 N6) (N2 + N7).
// Then, for each of the 22 single stuck-at faults, applies all 32 vectors and
// compares with a gate-by-gate model that forces the same net, and checks
// that every fault changes the outputs for at least one vector.
module c17_tb;
  import bist_pkg::*;

  logic [4:0] in;
  stuck_fault_t fault;
  logic [1:0] out;

  int checks = 0;
  int failures = 0;

  c17 dut (.in_i(in), .fault_i(fault), .out_o(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gate-level model; fsite < 0 means no fault
  function automatic logic [1:0] model(input logic [4:0] v, input int fsite, input logic fval);
    logic [10:0] n;
    n[0] = v[4]; n[1] = v[3]; n[2] = v[2]; n[3] = v[1]; n[4] = v[0];
    for (int i = 0; i < 5; i++) if (fsite == i) n[i] = fval;
    n[5]  = ~(n[0] & n[2]);  if (fsite == 5)  n[5]  = fval;
    n[6]  = ~(n[2] & n[3]);  if (fsite == 6)  n[6]  = fval;
    n[7]  = ~(n[1] & n[6]);  if (fsite == 7)  n[7]  = fval;
    n[8]  = ~(n[6] & n[4]);  if (fsite == 8)  n[8]  = fval;
    n[9]  = ~(n[5] & n[7]);  if (fsite == 9)  n[9]  = fval;
    n[10] = ~(n[7] & n[8]);  if (fsite == 10) n[10] = fval;
    return {n[9], n[10]};
  endfunction

  logic n1, n2, n3, n6, n7;
  logic [1:0] exp;
  bit detected;

  initial begin
    fault = '0;
    for (int v = 0; v < 32; v++) begin
      in = 5'(v);
      {n1, n2, n3, n6, n7} = in;
      exp = {(n1 & n3) | (n2 & ~(n3 & n6)), ~(n3 & n6) & (n2 | n7)};
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL fault-free in=%b out=%b exp=%b", in, out, exp);
      end
    end
    for (int s = 0; s < 11; s++) begin
      for (int val = 0; val < 2; val++) begin
        fault.en = 1'b1;
        fault.site = c17_net_t'(s);
        fault.value = 1'(val);
        detected = 0;
        for (int v = 0; v < 32; v++) begin
          in = 5'(v);
          #1;
          checks++;
          if (out !== model(in, s, 1'(val))) begin
            failures++;
            $display("FAIL site %0d sa%0d in=%b out=%b exp=%b", s, val, in, out, model(in, s, 1'(val)));
          end
          if (out !== model(in, -1, 1'b0)) detected = 1;
        end
        checks++;
        if (!detected) begin
          failures++;
          $display("FAIL site %0d sa%0d never visible", s, val);
        end
      end
    end
    // enable low: no fault even with a site selected
    fault.en = 1'b0;
    fault.site = NET_N16;
    fault.value = 1'b0;
    for (int v = 0; v < 32; v++) begin
      in = 5'(v);
      #1;
      checks++;
      if (out !== model(in, -1, 1'b0)) begin
        failures++;
        $display("FAIL disabled fault in=%b", in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
