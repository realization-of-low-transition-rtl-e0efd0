// misr: multiple-input signature register.
//
// A WIDTH-bit internal-XOR (Galois) shift register with characteristic
// polynomial POLY; every enabled clock it shifts one place towards the MSB,
// folds the MSB back through the polynomial taps and XORs the IN_WIDTH
// response bits into its low bits:
//   s'[0] = s[W-1] ^ d[0],  s'[i] = s[i-1] ^ (POLY[i] & s[W-1]) ^ d[i].
// POLY holds the coefficients x^0..x^(W-1); the x^W term is implied.
// The block's role (compacting the CUT responses for the response analyzer)
// follows the BIST architecture; the 9-bit width matches the 9-bit signature
// signals of the reference simulation, and the polynomial x^9 + x^5 + 1
// (primitive) and the internal-XOR form are this design's own choices.
//
// Interface: clear_i (priority) sets the signature to zero; en_i absorbs
// data_i at the clock edge. signature_o is the register itself.
module misr #(
  parameter int unsigned        WIDTH    = 9,
  parameter int unsigned        IN_WIDTH = 2,
  parameter logic [WIDTH-1:0]   POLY     = 9'h021
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear_i,
  input  logic                en_i,
  input  logic [IN_WIDTH-1:0] data_i,
  output logic [WIDTH-1:0]    signature_o
);

  logic [WIDTH-1:0] sig, sig_next;

  always_comb begin
    sig_next = {sig[WIDTH-2:0], 1'b0} ^ (POLY & {WIDTH{sig[WIDTH-1]}});
    sig_next[IN_WIDTH-1:0] = sig_next[IN_WIDTH-1:0] ^ data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sig <= '0;
    else if (clear_i) sig <= '0;
    else if (en_i)    sig <= sig_next;
  end

  assign signature_o = sig;

  initial begin
    assert (IN_WIDTH <= WIDTH && WIDTH >= 2 && POLY[0])
      else $error("misr: need IN_WIDTH <= WIDTH, WIDTH >= 2 and POLY[0] set");
  end

endmodule
