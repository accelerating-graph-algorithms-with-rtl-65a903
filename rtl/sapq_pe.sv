// sapq_pe -- one processing element of the systolic array priority queue.
//
// Each PE holds a single queue element and has its own small control unit; it
// talks only to its left and right neighbours. The array is kept sorted, PE1
// holding the smallest priority. Operations arrive from the left and, after
// this PE has acted on them, move on to the right one cycle later (registered),
// so no signal spans more than one neighbour hop.
//
//   INSERT x  : empty PE          -> store x, the operation ends here
//               x.prio <  held    -> store x, pass the old element on as SHIFT
//               x.prio >= held    -> pass x on as INSERT
//   SHIFT y   : store y; if this PE was occupied, pass its old element on
//               as SHIFT (everything behind the insertion point moves one
//               PE to the right, keeping its order)
//   Equal priorities therefore leave in arrival order.
//   EXTRACT   : the left neighbour has taken this PE's element; copy the right
//               neighbour's element and, if it was occupied, pass EXTRACT on.
//
// Interface: l_op/l_elem come from the left neighbour (PE1: the queue
// controller); held goes to the left neighbour; r_held is the right
// neighbour's element ('0 past PEn); r_op/r_elem are registered towards the
// right neighbour. The compare-exchange and the copy-from-right rules follow
// the insertion-sort principle of the source design; the exact PE circuit is
// this design's own, as the source describes the PE only by its role.
//
// Correctness needs successive operations to enter PE1 at least two cycles
// apart so that an operation never overtakes the one before it; the queue
// controller spaces them three cycles apart.
module sapq_pe
  import sapq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  op_e   l_op,
  input  elem_t l_elem,
  output elem_t held,
  input  elem_t r_held,
  output op_e   r_op,
  output elem_t r_elem
);

  elem_t held_q, held_d;
  op_e   fwd_op_d;
  elem_t fwd_elem_d;

  always_comb begin
    held_d     = held_q;
    fwd_op_d   = OP_NOP;
    fwd_elem_d = '0;
    unique case (l_op)
      OP_INSERT: begin
        if (!held_q.valid) begin
          held_d = l_elem;
        end else if (l_elem.prio < held_q.prio) begin
          held_d     = l_elem;
          fwd_op_d   = OP_SHIFT;
          fwd_elem_d = held_q;
        end else begin
          fwd_op_d   = OP_INSERT;
          fwd_elem_d = l_elem;
        end
      end
      OP_SHIFT: begin
        held_d = l_elem;
        if (held_q.valid) begin
          fwd_op_d   = OP_SHIFT;
          fwd_elem_d = held_q;
        end
      end
      OP_EXTRACT: begin
        if (held_q.valid) begin
          held_d = r_held;
          if (r_held.valid) fwd_op_d = OP_EXTRACT;
        end
      end
      default: ;  // OP_NOP
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_q <= '0;
      r_op   <= OP_NOP;
      r_elem <= '0;
    end else begin
      held_q <= held_d;
      r_op   <= fwd_op_d;
      r_elem <= fwd_elem_d;
    end
  end

  assign held = held_q;

  // INSERT and SHIFT always carry a real element.
  a_insert_valid : assert property (@(posedge clk) disable iff (!rst_n)
    (l_op == OP_INSERT || l_op == OP_SHIFT) |-> l_elem.valid);

endmodule
