// lp_lfsr: low-transition pseudo-random pattern generator (LP-LFSR).
//
// An external-XOR LFSR of WIDTH flip-flops is split into a first half
// (flip-flops 1..WIDTH/2) and a second half (WIDTH/2+1..WIDTH), with one
// extra "shaded" flip-flop between them. Flip-flop 1 is the MSB of q.
// Instead of moving from one LFSR vector T1 straight to the next one T2, the
// generator presents five vectors T1, Ta, Tb, Tc, T2 so that every bit that
// changes between T1 and T2 toggles exactly once along the way:
//   T  : clock the first half and the shaded flop (first half shifts right,
//        flip-flop 1 takes FF1 xor FF_WIDTH, the shaded flop keeps the old last
//        bit of the first half); show the flip-flop outputs.
//   Ta : no clock; first half shown as is, second half shown through the
//        injectors.
//   Tb : clock the second half only (it shifts right, taking the shaded flop);
//        show the flip-flop outputs.
//   Tc : no clock; first half shown through the injectors, second half as is.
// An injector compares a flip-flop's current value with its next value (its
// D input): equal, it passes the value; different, it passes the random bit
// R, the output of the last flip-flop. Taken over T..T the flip-flops step
// exactly as a WIDTH-bit LFSR with feedback FF1 xor FF_WIDTH into FF1.
// The halves, the shaded flop, the injectors, R and the feedback taps follow
// the worked example that defines the generator; the seed load port, the
// reset and the PH_SEED state that shows the loaded seed are this design's own.
//
// Interface: load_i (priority over test_en_i) loads seed_i and shows it on
// pattern_o from the next cycle. Each clock with test_en_i high advances to
// the next vector in the order SEED, T, Ta, Tb, Tc, T, Ta, ... pattern_o is
// combinational from the registers, so a vector is valid one full cycle after
// the edge that selected it; phase_o tells which vector is shown.
module lp_lfsr
  import bist_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_i,
  input  logic [WIDTH-1:0] seed_i,
  input  logic             test_en_i,
  output logic [WIDTH-1:0] pattern_o,
  output lp_phase_t        phase_o
);

  localparam int unsigned HALF = WIDTH / 2;

  logic [WIDTH-1:0] q;        // LFSR flip-flops, q[WIDTH-1] is flip-flop 1
  logic             shaded;   // holds the last bit of the first half
  lp_phase_t        phase;

  logic [HALF-1:0]  first_q, second_q;    // current values
  logic [HALF-1:0]  first_d, second_d;    // next values (D inputs)
  logic [HALF-1:0]  first_inj, second_inj;
  logic             r_bit;

  assign first_q  = q[WIDTH-1:HALF];
  assign second_q = q[HALF-1:0];
  assign r_bit    = q[0];

  // D inputs of the two halves
  assign first_d  = {q[WIDTH-1] ^ q[0], first_q[HALF-1:1]};
  assign second_d = {shaded, second_q[HALF-1:1]};

  // Injector circuits: keep a bit that will not change, use R for one that will
  assign first_inj  = (first_q  & ~(first_q  ^ first_d))  | ({HALF{r_bit}} & (first_q  ^ first_d));
  assign second_inj = (second_q & ~(second_q ^ second_d)) | ({HALF{r_bit}} & (second_q ^ second_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      shaded <= 1'b0;
      phase  <= PH_SEED;
    end else if (load_i) begin
      q      <= seed_i;
      shaded <= 1'b0;
      phase  <= PH_SEED;
    end else if (test_en_i) begin
      unique case (phase)
        PH_SEED, PH_C: begin       // go to T: clock first half and shaded flop
          q[WIDTH-1:HALF] <= first_d;
          shaded          <= first_q[0];
          phase           <= PH_T;
        end
        PH_T:    phase <= PH_A;    // no clock
        PH_A: begin                // go to Tb: clock second half
          q[HALF-1:0] <= second_d;
          phase       <= PH_B;
        end
        PH_B:    phase <= PH_C;    // no clock
        default: phase <= PH_SEED;
      endcase
    end
  end

  always_comb begin
    unique case (phase)
      PH_A:    pattern_o = {first_q, second_inj};
      PH_C:    pattern_o = {first_inj, second_q};
      default: pattern_o = q;
    endcase
  end

  assign phase_o = phase;

  initial begin
    assert (WIDTH >= 4 && WIDTH % 2 == 0)
      else $error("lp_lfsr: WIDTH must be even and at least 4");
  end

endmodule
