// bist_ctrl: BIST control unit.
//
// Runs one test per start_i pulse and otherwise leaves the circuit under test
// in normal (functional) mode. A test is a fixed sequence of states:
//   IDLE/DONE --start_i--> LOAD (1 cycle): CUT in test mode, seed loaded into
//     the pattern generator, signature registers and response analyzer cleared
//   RUN (N_VECTORS cycles): one pattern applied and one response compacted
//     per cycle (test-per-clock), the generator stepping every cycle
//   CHECK (1 cycle): the response analyzer compares the signatures
//   DONE: done_o high, CUT back in normal mode, until the next start_i.
// If the analyzer reports an error the cycle after CHECK, irq_o is raised and
// held until interrupt_clear_i (a new error in the same cycle wins).
// What the unit controls (test/normal mode, seed, signature registers,
// analyzer, interrupt and its clear input) follows the BIST architecture; the
// state sequence, the pattern count and the timing are this design's own.
// N_VECTORS = 252 is four vectors for each of the 63 states of the LFSR
// cycle that contains the default seed, so a test covers that cycle once.
//
// Timing: done_o rises N_VECTORS + 2 cycles after the edge that takes start_i.
module bist_ctrl #(
  parameter int unsigned N_VECTORS = 252
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  input  logic interrupt_clear_i,
  input  logic tra_error_i,
  output logic test_mode_o,
  output logic lfsr_load_o,
  output logic lfsr_en_o,
  output logic misr_clear_o,
  output logic misr_en_o,
  output logic tra_clear_o,
  output logic tra_check_o,
  output logic busy_o,
  output logic done_o,
  output logic irq_o
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_CHECK, S_DONE} state_t;

  localparam int unsigned CW = (N_VECTORS > 1) ? $clog2(N_VECTORS) : 1;

  state_t        state;
  logic [CW-1:0] count;
  logic          check_d;   // analyzer result becomes valid this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      count   <= '0;
      check_d <= 1'b0;
      irq_o   <= 1'b0;
    end else begin
      check_d <= (state == S_CHECK);
      unique case (state)
        S_IDLE, S_DONE: if (start_i) state <= S_LOAD;
        S_LOAD: begin
          count <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          count <= count + 1'b1;
          if (count == CW'(N_VECTORS - 1)) state <= S_CHECK;
        end
        S_CHECK: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
      if (check_d && tra_error_i) irq_o <= 1'b1;
      else if (interrupt_clear_i)  irq_o <= 1'b0;
    end
  end

  always_comb begin
    test_mode_o  = (state == S_LOAD) || (state == S_RUN) || (state == S_CHECK);
    lfsr_load_o  = (state == S_LOAD);
    misr_clear_o = (state == S_LOAD);
    tra_clear_o  = (state == S_LOAD);
    lfsr_en_o    = (state == S_RUN);
    misr_en_o    = (state == S_RUN);
    tra_check_o  = (state == S_CHECK);
    busy_o       = test_mode_o;
    done_o       = (state == S_DONE);
  end

  initial begin
    assert (N_VECTORS >= 1) else $error("bist_ctrl: N_VECTORS must be at least 1");
  end

endmodule
