// tb_sapq_pe -- self-checking testbench for one processing element.
//
// Drives the left-neighbour inputs and the right neighbour's element
// directly and compares the held element and the registered right-going
// operation with a reference model of the PE rules: directed cases (insert
// into empty, displace, pass on, equal priorities, shift, extract with and
// without a right neighbour) followed by random operations.
module tb_sapq_pe;
  import sapq_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  op_e   l_op;
  elem_t l_elem, held, r_held, r_elem;
  op_e   r_op;

  int checks = 0, failures = 0;

  sapq_pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  elem_t m_held;

  function automatic elem_t mk(input int unsigned p, input int unsigned id);
    return '{valid: 1'b1, prio: p, id: id};
  endfunction

  task automatic step(input op_e op, input elem_t e, input elem_t rh);
    op_e   exp_op;
    elem_t exp_elem, exp_held;
    exp_op = OP_NOP; exp_elem = '0; exp_held = m_held;
    if (op == OP_INSERT) begin
      if (!m_held.valid) exp_held = e;
      else if (e.prio < m_held.prio) begin exp_held = e; exp_op = OP_SHIFT; exp_elem = m_held; end
      else begin exp_op = OP_INSERT; exp_elem = e; end
    end else if (op == OP_SHIFT) begin
      exp_held = e;
      if (m_held.valid) begin exp_op = OP_SHIFT; exp_elem = m_held; end
    end else if (op == OP_EXTRACT && m_held.valid) begin
      exp_held = rh;
      if (rh.valid) exp_op = OP_EXTRACT;
    end
    l_op = op; l_elem = e; r_held = rh;
    @(posedge clk); #1;
    m_held = exp_held;
    checks++;
    if (held !== exp_held || r_op !== exp_op || (exp_op != OP_NOP && r_elem !== exp_elem)) begin
      failures++;
      $display("FAIL op=%s held=%h exp=%h r_op=%s exp=%s r_elem=%h exp=%h",
               op.name(), held, exp_held, r_op.name(), exp_op.name(), r_elem, exp_elem);
    end
    l_op = OP_NOP; l_elem = '0;
  endtask

  initial begin
    rst_n = 1'b0; l_op = OP_NOP; l_elem = '0; r_held = '0; m_held = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    checks++;
    if (held.valid || r_op != OP_NOP) begin failures++; $display("FAIL reset"); end

    step(OP_INSERT,  mk(10, 1), '0);          // into empty
    step(OP_INSERT,  mk(5, 2),  '0);          // displaces 10
    step(OP_INSERT,  mk(7, 3),  '0);          // passed on
    step(OP_INSERT,  mk(5, 4),  '0);          // equal priority is passed on
    step(OP_SHIFT,   mk(9, 5),  '0);          // shift: takes 9, passes 5
    step(OP_SHIFT,   mk(2, 6),  '0);          // shift ignores priorities
    step(OP_INSERT,  mk(2, 7),  '0);          // equal to held: passed on
    step(OP_NOP,     '0,        mk(1, 1));    // nothing happens
    step(OP_EXTRACT, '0,        mk(8, 9));    // copy right neighbour
    step(OP_EXTRACT, '0,        '0);          // right neighbour empty
    step(OP_EXTRACT, '0,        mk(3, 3));    // extract from empty PE: no change
    checks++;
    if (held.valid) begin failures++; $display("FAIL PE not empty"); end

    repeat (3000) begin
      int unsigned r;
      r = $urandom_range(0, 9);
      if (r < 4)
        step(OP_INSERT, mk($urandom_range(0, 15), $urandom), '0);
      else if (r < 5)
        step(OP_SHIFT, mk($urandom_range(0, 15), $urandom), '0);
      else if (r < 9)
        step(OP_EXTRACT, '0, ($urandom_range(0, 3) == 0) ? '0 : mk($urandom_range(0, 15), $urandom));
      else
        step(OP_NOP, '0, '0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
