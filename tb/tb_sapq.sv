// tb_sapq -- self-checking testbench for the systolic array priority queue.
//
// Runs a small array (N = 8) against a reference model: a sorted list in
// which an element is placed after all elements of equal priority. Commands
// are issued as fast as cmd_ready allows, with random idle gaps, so that
// several operations ripple through the array at once. Checked: the
// extracted element, the empty case, count/empty/full, the element pushed out
// of a full queue, and the timing (done two cycles after acceptance, the next
// command accepted exactly three cycles after the previous one).
module tb_sapq;
  import sapq_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic             clk = 1'b0;
  logic             rst_n;
  logic             cmd_valid, cmd_ready;
  op_e              cmd_op;
  id_t              cmd_id;
  prio_t            cmd_prio;
  logic             done;
  elem_t            res;
  logic [CNT_W-1:0] count;
  logic             empty, full, drop_valid;
  elem_t            drop_elem;

  int checks = 0, failures = 0;
  int n_ins = 0, n_ext = 0, n_empty_ext = 0, n_drop = 0, n_tie = 0;

  sapq #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  elem_t model[$];
  elem_t exp_drops[$];

  task automatic model_insert(input elem_t e);
    int pos = model.size();
    for (int i = 0; i < model.size(); i++)
      if (e.prio < model[i].prio) begin pos = i; break; end
    for (int i = 0; i < model.size(); i++)
      if (e.prio == model[i].prio) begin n_tie++; break; end
    model.insert(pos, e);
    if (model.size() > N) exp_drops.push_back(model.pop_back());
  endtask

  // drops come out of PEn some cycles later
  elem_t drop_exp;
  always @(posedge clk) if (rst_n && drop_valid) begin
    checks++;
    n_drop++;
    if (exp_drops.size() == 0) begin
      failures++; $display("FAIL unexpected drop %h", drop_elem);
    end else begin
      drop_exp = exp_drops.pop_front();
      if (drop_elem !== drop_exp) begin
        failures++; $display("FAIL drop %h exp %h", drop_elem, drop_exp);
      end
    end
  end

  task automatic do_op(input op_e op, input int unsigned prio, input int unsigned id);
    elem_t exp_res;
    int    waited = 0;
    cmd_valid = 1'b1; cmd_op = op; cmd_prio = prio; cmd_id = id;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; waited++; end
    @(posedge clk); #1;                 // accepted at this edge (cycle A)
    cmd_valid = 1'b0;
    if (op == OP_INSERT) begin
      model_insert('{valid: 1'b1, prio: prio, id: id});
      n_ins++;
    end else begin
      if (model.size() == 0) begin exp_res = '0; n_empty_ext++; end
      else exp_res = model.pop_front();
      n_ext++;
    end
    // cycle A+1: not done yet, not ready
    checks++;
    if (done || cmd_ready) begin failures++; $display("FAIL timing A+1"); end
    @(posedge clk); #1;                 // cycle A+2
    checks++;
    if (!done || cmd_ready) begin failures++; $display("FAIL timing A+2 done=%b", done); end
    if (op == OP_EXTRACT) begin
      checks++;
      if (res.valid !== exp_res.valid || (exp_res.valid && res !== exp_res)) begin
        failures++; $display("FAIL extract got %h exp %h", res, exp_res);
      end
    end
    checks++;
    if (count != CNT_W'(model.size()) || empty != (model.size() == 0) || full != (model.size() == N)) begin
      failures++; $display("FAIL count %0d exp %0d", count, model.size());
    end
    @(posedge clk); #1;                 // cycle A+3
    checks++;
    if (!cmd_ready) begin failures++; $display("FAIL not ready at A+3"); end
    // optional idle gap; otherwise the next command is accepted at A+3
    repeat ($urandom_range(0, 3) == 0 ? $urandom_range(1, 4) : 0) @(posedge clk);
    #0;
  endtask

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = OP_NOP; cmd_id = '0; cmd_prio = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk);

    // extract from empty, then fill past full, then drain past empty
    do_op(OP_EXTRACT, 0, 0);
    for (int i = 0; i < N + 3; i++) do_op(OP_INSERT, $urandom_range(0, 20), 100 + i);
    for (int i = 0; i < N + 2; i++) do_op(OP_EXTRACT, 0, 0);

    // random mix with a small priority range to create ties
    repeat (3000) begin
      if ($urandom_range(0, 99) < 55) do_op(OP_INSERT, $urandom_range(0, 12), $urandom);
      else                            do_op(OP_EXTRACT, 0, 0);
    end
    // full 32-bit priorities
    repeat (500) begin
      if ($urandom_range(0, 99) < 50) do_op(OP_INSERT, $urandom, $urandom);
      else                            do_op(OP_EXTRACT, 0, 0);
    end
    repeat (2 * N) @(posedge clk);
    checks++;
    if (exp_drops.size() != 0) begin failures++; $display("FAIL missing drops"); end

    $display("inserts=%0d extracts=%0d empty_extracts=%0d drops=%0d ties=%0d",
             n_ins, n_ext, n_empty_ext, n_drop, n_tie);
    checks++;
    if (n_empty_ext == 0 || n_drop == 0 || n_tie == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
