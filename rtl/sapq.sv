// sapq -- Systolic Array Priority Queue Processor.
//
// A linear array of N identical processing elements (sapq_pe, chained in
// sapq_array), each holding one 64-bit queue element (32-bit ID, 32-bit
// priority) and connected only to its immediate neighbours. Only PE1 talks to the outside: new elements are
// inserted into PE1 and the minimum-priority element is read out of PE1.
// INSERT and EXTRACT-MIN both take a constant 3 clock cycles whatever the
// number of queued elements; the work inside the array ripples to the right
// one PE per cycle behind the interface, overlapping the next operations.
//
// Command handshake (valid/ready, this design's own choice):
//   cycle A    cmd_valid & cmd_ready: the command is registered
//   cycle A+1  the command acts on PE1; an EXTRACT-MIN samples PE1
//   cycle A+2  done pulses; res holds the extracted element (res.valid = 0
//              when the queue was empty)
//   cycle A+3  cmd_ready is high again
// So one operation is accepted every OP_CYCLES = 3 cycles, matching the
// source's 3 cycles per operation and its 64 bits per 3 cycles throughput.
//
// Capacity is N elements (N = 200 in the source's prototype). An INSERT into a
// full queue is still carried out: the element with the largest priority of
// the N+1 is pushed out of PEn and reported on drop_valid/drop_elem, and
// count stays at N. That overflow behaviour, the count/empty/full status and
// the synchronous active-low reset are this design's own choices.
module sapq
  import sapq_pkg::*;
#(
  parameter  int unsigned N     = 200,
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  op_e              cmd_op,
  input  id_t              cmd_id,
  input  prio_t            cmd_prio,
  // completion
  output logic             done,
  output elem_t            res,
  // status
  output logic [CNT_W-1:0] count,
  output logic             empty,
  output logic             full,
  // element pushed out of PEn by an INSERT into a full queue
  output logic             drop_valid,
  output elem_t            drop_elem
);

  op_e   tail_op;    // what leaves PEn
  elem_t tail_elem;
  elem_t front;      // PE1's element

  logic [1:0] phase_q;
  op_e        op_q;
  elem_t      elem_q;
  logic       done_q;
  elem_t      res_q;
  logic [CNT_W-1:0] count_q;

  wire accept = cmd_valid && cmd_ready;

  assign cmd_ready = (phase_q == 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= 2'd0;
      op_q    <= OP_NOP;
      elem_q  <= '0;
      done_q  <= 1'b0;
      res_q   <= '0;
      count_q <= '0;
    end else begin
      // operation slot sequencing: A -> A+1 -> A+2 -> idle
      if (phase_q == 2'd0)                   phase_q <= accept ? 2'd1 : 2'd0;
      else if (phase_q == 2'(OP_CYCLES - 1)) phase_q <= 2'd0;
      else                                   phase_q <= phase_q + 2'd1;

      // stage 1: register the command
      if (accept) begin
        op_q   <= cmd_op;
        elem_q <= '{valid: 1'b1, prio: cmd_prio, id: cmd_id};
      end else begin
        op_q   <= OP_NOP;
        elem_q <= '0;
      end

      // stage 2: the command acts on PE1
      done_q <= (phase_q == 2'(OP_CYCLES - 2));
      if (op_q == OP_EXTRACT) begin
        res_q <= front;
        if (count_q != '0) count_q <= count_q - 1'b1;
      end else if (op_q == OP_INSERT) begin
        if (count_q != CNT_W'(N)) count_q <= count_q + 1'b1;
      end
    end
  end

  sapq_array #(.N(N)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .l_op   (op_q),
    .l_elem (elem_q),
    .held   (front),
    .r_held ('0),
    .r_op   (tail_op),
    .r_elem (tail_elem)
  );

  assign done       = done_q;
  assign res        = res_q;
  assign count      = count_q;
  assign empty      = (count_q == '0);
  assign full       = (count_q == CNT_W'(N));
  assign drop_valid = (tail_op == OP_INSERT) || (tail_op == OP_SHIFT);
  assign drop_elem  = tail_elem;

  // When no operation is in progress, PE1 is occupied exactly when the
  // queue is not empty (elements stay packed towards PE1).
  a_pe1_matches_count : assert property (@(posedge clk) disable iff (!rst_n)
    phase_q == 2'd0 |-> front.valid == (count_q != '0));

endmodule
