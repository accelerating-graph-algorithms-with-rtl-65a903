// sapq_array -- a chain of N processing elements with both ends brought out.
//
// PE(i) takes its operation from PE(i-1) and reads PE(i+1)'s element, so the
// chain behaves exactly like one big PE: operations enter on the left, the
// first PE's element is visible on the left (held), and whatever leaves the
// last PE appears on the right (r_op/r_elem, registered). Chaining two arrays
// (r_op/r_elem of the first into l_op/l_elem of the second, the second's held
// into the first's r_held) gives one longer queue with no extra delay and no
// signal longer than a neighbour hop, which is how a large queue can be
// spread over several devices. Tie r_held to '0 at the end of the last array.
// Cascading as such follows the source design; this wrapper and its port
// names are this design's own.
module sapq_array
  import sapq_pkg::*;
#(
  parameter int unsigned N = 200
) (
  input  logic  clk,
  input  logic  rst_n,
  input  op_e   l_op,
  input  elem_t l_elem,
  output elem_t held,     // element of the first PE (the minimum)
  input  elem_t r_held,   // element of the next array's first PE, '0 if none
  output op_e   r_op,     // what leaves the last PE, registered
  output elem_t r_elem
);

  // index i is the link into PE(i+1) from the left
  op_e   link_op   [N+1];
  elem_t link_elem [N+1];
  elem_t pe_held   [N+1];

  assign link_op[0]   = l_op;
  assign link_elem[0] = l_elem;
  assign pe_held[N]   = r_held;

  for (genvar i = 0; i < N; i++) begin : g_pe
    sapq_pe u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .l_op   (link_op[i]),
      .l_elem (link_elem[i]),
      .held   (pe_held[i]),
      .r_held (pe_held[i+1]),
      .r_op   (link_op[i+1]),
      .r_elem (link_elem[i+1])
    );
  end

  assign held   = pe_held[0];
  assign r_op   = link_op[N];
  assign r_elem = link_elem[N];

endmodule
