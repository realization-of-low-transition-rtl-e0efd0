// bist_pkg: types and constants shared by the low-transition BIST.
//
// lp_phase_t names the vector the low-power LFSR is presenting: the loaded
// seed, a true LFSR vector T, or one of the three intermediate vectors Ta, Tb
// and Tc that are inserted between two LFSR vectors. The C17 constants give
// the size of the circuit under test and the numbering of its nets used for
// stuck-at fault injection (the five primary inputs, then the six NAND gate
// outputs in netlist order). The phase names follow the text that defines
// the generator; the encodings and the net numbering are this design's own.
package bist_pkg;

  typedef enum logic [2:0] {
    PH_SEED = 3'd0,   // seed just loaded, shown unchanged
    PH_T    = 3'd1,   // LFSR vector (first half shifted)
    PH_A    = 3'd2,   // Ta: first half held, second half from the injectors
    PH_B    = 3'd3,   // Tb: second half shifted, raw flip-flop outputs
    PH_C    = 3'd4    // Tc: first half from the injectors, second half held
  } lp_phase_t;

  // ISCAS-85 C17 circuit under test
  localparam int unsigned C17_NUM_IN  = 5;
  localparam int unsigned C17_NUM_OUT = 2;

  // Fault sites of C17 (ISCAS net names in the comments)
  typedef enum logic [3:0] {
    NET_N1  = 4'd0,  NET_N2  = 4'd1,  NET_N3  = 4'd2,
    NET_N6  = 4'd3,  NET_N7  = 4'd4,
    NET_N10 = 4'd5,  NET_N11 = 4'd6,  NET_N16 = 4'd7,
    NET_N19 = 4'd8,  NET_N22 = 4'd9,  NET_N23 = 4'd10
  } c17_net_t;

  // Stuck-at fault descriptor
  typedef struct packed {
    logic     en;     // inject the fault
    c17_net_t site;   // net that is stuck
    logic     value;  // stuck-at value
  } stuck_fault_t;

endpackage
