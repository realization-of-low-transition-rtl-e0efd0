// c17: the ISCAS-85 C17 benchmark, used as the circuit under test.
//
// Six 2-input NAND gates, five primary inputs and two primary outputs:
//   N10 = nand(N1, N3)   N11 = nand(N3, N6)   N16 = nand(N2, N11)
//   N19 = nand(N11, N7)  N22 = nand(N10, N16) N23 = nand(N16, N19)
// The netlist is the standard ISCAS-85 one. So that a BIST run has something
// to find, any one of the eleven nets can be forced to a stuck-at-0 or
// stuck-at-1 value through fault_i (site numbering in bist_pkg::c17_net_t);
// with fault_i.en low the block is plain C17. The fault port is this design's
// own addition.
//
// Interface: in_i = {N1, N2, N3, N6, N7} (N1 is the MSB), out_o = {N22, N23}.
// Purely combinational.
module c17
  import bist_pkg::*;
(
  input  logic [C17_NUM_IN-1:0]  in_i,
  input  stuck_fault_t           fault_i,
  output logic [C17_NUM_OUT-1:0] out_o
);

  logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;

  // Replace a net's fault-free value by the stuck value if it is the fault site
  function automatic logic net(input logic good, input c17_net_t site, input stuck_fault_t f);
    return (f.en && f.site == site) ? f.value : good;
  endfunction

  always_comb begin
    n1  = net(in_i[4], NET_N1, fault_i);
    n2  = net(in_i[3], NET_N2, fault_i);
    n3  = net(in_i[2], NET_N3, fault_i);
    n6  = net(in_i[1], NET_N6, fault_i);
    n7  = net(in_i[0], NET_N7, fault_i);
    n10 = net(~(n1  & n3),  NET_N10, fault_i);
    n11 = net(~(n3  & n6),  NET_N11, fault_i);
    n16 = net(~(n2  & n11), NET_N16, fault_i);
    n19 = net(~(n11 & n7),  NET_N19, fault_i);
    n22 = net(~(n10 & n16), NET_N22, fault_i);
    n23 = net(~(n16 & n19), NET_N23, fault_i);
  end

  assign out_o = {n22, n23};

endmodule
