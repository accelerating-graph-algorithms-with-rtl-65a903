// tb_sapq_array -- self-checking testbench for cascaded PE chains.
//
// Two 4-PE chains are cascaded into one 8-element queue: the first chain's
// right end drives the second chain's left end, and the second chain's first
// element is fed back as the first chain's right neighbour. The testbench
// issues INSERT and EXTRACT operations straight into the first chain with a
// random spacing of 2 to 4 cycles (2 is the closest spacing the wave scheme
// allows) and compares, at every EXTRACT, the front element with a reference
// queue in which equal priorities leave in arrival order. Elements pushed
// out of the far end of a full cascade are checked too, and every
// operation is counted to make sure the boundary between the chains was
// crossed in both directions.
module tb_sapq_array;
  import sapq_pkg::*;

  localparam int unsigned NA = 4;        // PEs per chain
  localparam int unsigned NQ = 2 * NA;   // capacity of the cascade

  logic  clk = 1'b0;
  logic  rst_n;
  op_e   l_op;
  elem_t l_elem;
  elem_t front, b_front;
  op_e   mid_op, tail_op;
  elem_t mid_elem, tail_elem;

  int checks = 0, failures = 0;
  int n_cross_ins = 0, n_cross_ext = 0, n_drop = 0, n_tie = 0;

  sapq_array #(.N(NA)) u_a (
    .clk, .rst_n, .l_op, .l_elem, .held(front), .r_held(b_front),
    .r_op(mid_op), .r_elem(mid_elem));
  sapq_array #(.N(NA)) u_b (
    .clk, .rst_n, .l_op(mid_op), .l_elem(mid_elem), .held(b_front), .r_held('0),
    .r_op(tail_op), .r_elem(tail_elem));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t model[$];
  elem_t exp_drops[$];
  elem_t drop_exp;

  always @(posedge clk) if (rst_n) begin
    if (mid_op == OP_INSERT || mid_op == OP_SHIFT) n_cross_ins++;
    if (mid_op == OP_EXTRACT) n_cross_ext++;
    if (tail_op == OP_INSERT || tail_op == OP_SHIFT) begin
      checks++;
      n_drop++;
      if (exp_drops.size() == 0) begin failures++; $display("FAIL unexpected drop"); end
      else begin
        drop_exp = exp_drops.pop_front();
        if (tail_elem !== drop_exp) begin
          failures++; $display("FAIL drop %h exp %h", tail_elem, drop_exp);
        end
      end
    end
  end

  task automatic insert(input int unsigned prio, input int unsigned id);
    elem_t e;
    int pos;
    e = '{valid: 1'b1, prio: prio, id: id};
    pos = model.size();
    for (int i = 0; i < model.size(); i++)
      if (e.prio < model[i].prio) begin pos = i; break; end
    for (int i = 0; i < model.size(); i++)
      if (e.prio == model[i].prio) begin n_tie++; break; end
    model.insert(pos, e);
    if (model.size() > NQ) exp_drops.push_back(model.pop_back());
    l_op = OP_INSERT; l_elem = e;
    @(posedge clk); #1;
    l_op = OP_NOP; l_elem = '0;
  endtask

  task automatic extract();
    elem_t exp_e;
    exp_e = (model.size() == 0) ? '0 : model.pop_front();
    checks++;
    if (front.valid !== exp_e.valid || (exp_e.valid && front !== exp_e)) begin
      failures++; $display("FAIL front %h exp %h", front, exp_e);
    end
    l_op = OP_EXTRACT; l_elem = '0;
    @(posedge clk); #1;
    l_op = OP_NOP;
  endtask

  task automatic gap();
    repeat ($urandom_range(1, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; l_op = OP_NOP; l_elem = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    // fill past capacity, drain past empty
    for (int i = 0; i < NQ + 3; i++) begin insert($urandom_range(0, 9), i); gap(); end
    for (int i = 0; i < NQ + 2; i++) begin extract(); gap(); end

    repeat (4000) begin
      if ($urandom_range(0, 99) < 55) insert($urandom_range(0, 15), $urandom);
      else                            extract();
      gap();
    end
    repeat (3 * NQ) @(posedge clk);
    checks++;
    if (exp_drops.size() != 0) begin failures++; $display("FAIL missing drops"); end

    $display("crossing inserts=%0d crossing extracts=%0d drops=%0d ties=%0d",
             n_cross_ins, n_cross_ext, n_drop, n_tie);
    checks++;
    if (n_cross_ins == 0 || n_cross_ext == 0 || n_drop == 0 || n_tie == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
