// tb_pq_coprocessor -- end-to-end testbench of the priority queue co-processor
// at its default size (N = 200 entries).
//
// The testbench plays the host processor: bus tasks perform Avalon-MM
// transfers that obey waitrequest, and on top of them it runs
//   1. the worst case: fill the queue to all 200 entries with random
//      priorities, then extract every element from a full queue;
//   2. an INSERT into the full queue (overflow) and an EXTRACT-MIN from the
//      empty queue;
//   3. Dijkstra's shortest-path search in the form that needs no
//      DECREASE-KEY: a shorter distance is inserted again, and an extracted
//      entry whose priority no longer equals its vertex's distance is stale
//      and skipped. The graph (64 vertices, random weights) is generated here
//      and the distances are compared with a plain O(V^2) Dijkstra.
// Every extracted element is compared with a reference queue in which equal
// priorities leave in arrival order. The 3-cycle operation time is checked
// as the number of wait states of a read issued right after a command. Each
// mechanism (stall, overflow, empty extract, stale entry, equal priorities)
// must occur at least once.
module tb_pq_coprocessor;
  import sapq_pkg::*;

  localparam int unsigned N  = 200;   // the co-processor's default size
  localparam int unsigned NV = 64;    // graph vertices
  localparam int unsigned INF = 32'hFFFF_FFFF;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [1:0]  avs_address;
  logic        avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic        avs_waitrequest;

  int checks = 0, failures = 0;
  int n_ins = 0, n_ext = 0, n_stall = 0, n_ovf = 0, n_empty_ext = 0, n_stale = 0, n_tie = 0;

  pq_coprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && avs_waitrequest) n_stall++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- host bus tasks ----------------
  task automatic av_write(input logic [1:0] a, input logic [31:0] d);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    #1;
    while (avs_waitrequest) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    avs_write = 1'b0;
  endtask

  task automatic av_read(input logic [1:0] a, output logic [31:0] d, output int waits);
    avs_address = a; avs_read = 1'b1; waits = 0;
    #1;
    while (avs_waitrequest) begin @(posedge clk); #1; waits++; end
    d = avs_readdata;
    @(posedge clk); #1;
    avs_read = 1'b0;
  endtask

  // reference queue
  elem_t model[$];

  task automatic model_insert(input elem_t e);
    int pos = model.size();
    for (int i = 0; i < model.size(); i++)
      if (e.prio < model[i].prio) begin pos = i; break; end
    for (int i = 0; i < model.size(); i++)
      if (e.prio == model[i].prio) begin n_tie++; break; end
    model.insert(pos, e);
    if (model.size() > N) void'(model.pop_back());
  endtask

  task automatic pq_insert(input logic [31:0] id, input logic [31:0] prio);
    logic [31:0] st;
    int w;
    av_write(REG_ID, id);
    av_write(REG_PRIO, prio);
    av_write(REG_CTRL, 32'h1 << CMD_INSERT);
    av_read(REG_CTRL, st, w);            // completes the operation
    check(w == OP_CYCLES - 1, $sformatf("insert took %0d wait states", w));
    model_insert('{valid: 1'b1, prio: prio, id: id});
    n_ins++;
  endtask

  // EXTRACT-MIN; ok = 0 when the queue was empty
  task automatic pq_extract(output bit ok, output logic [31:0] id, output logic [31:0] prio);
    logic [31:0] st;
    int w;
    elem_t exp_e;
    av_write(REG_CTRL, 32'h1 << CMD_EXTRACT);
    av_read(REG_PRIO, prio, w);
    check(w == OP_CYCLES - 1, $sformatf("extract took %0d wait states", w));
    av_read(REG_ID, id, w);
    av_read(REG_CTRL, st, w);
    ok = st[ST_RES_VAL];
    n_ext++;
    if (model.size() == 0) begin
      check(!ok, "extract from empty queue returned an element");
      n_empty_ext++;
    end else begin
      exp_e = model.pop_front();
      check(ok && id == exp_e.id && prio == exp_e.prio,
            $sformatf("extract got %h/%h exp %h/%h", prio, id, exp_e.prio, exp_e.id));
    end
  endtask

  function automatic int unsigned read_count_now();
    return int'(dut.u_sapq.count);
  endfunction

  // ---------------- graph ----------------
  int unsigned adj_w [NV][NV];   // 0 = no edge
  int unsigned dist_ref [NV];
  int unsigned dist_hw  [NV];
  int unsigned pred_hw  [NV];

  task automatic make_graph();
    for (int u = 0; u < NV; u++)
      for (int v = 0; v < NV; v++) adj_w[u][v] = 0;
    for (int u = 0; u + 1 < NV; u++) adj_w[u][u+1] = $urandom_range(50, 200);  // keeps it connected
    for (int k = 0; k < 3 * NV; k++) begin
      int u = $urandom_range(0, NV - 1);
      int v = $urandom_range(0, NV - 1);
      if (u != v) adj_w[u][v] = $urandom_range(1, 100);
    end
  endtask

  task automatic dijkstra_ref(input int s);
    bit done_v [NV];
    for (int v = 0; v < NV; v++) begin dist_ref[v] = INF; done_v[v] = 0; end
    dist_ref[s] = 0;
    for (int it = 0; it < NV; it++) begin
      int u = -1;
      for (int v = 0; v < NV; v++)
        if (!done_v[v] && dist_ref[v] != INF && (u < 0 || dist_ref[v] < dist_ref[u])) u = v;
      if (u < 0) break;
      done_v[u] = 1;
      for (int v = 0; v < NV; v++)
        if (adj_w[u][v] != 0 && dist_ref[u] + adj_w[u][v] < dist_ref[v])
          dist_ref[v] = dist_ref[u] + adj_w[u][v];
    end
  endtask

  // Dijkstra without DECREASE-KEY, all queue work on the co-processor
  task automatic dijkstra_hw(input int s);
    bit          ok;
    logic [31:0] id, pr, st;
    int          w, max_q = 0;
    for (int v = 0; v < NV; v++) begin dist_hw[v] = INF; pred_hw[v] = INF; end
    dist_hw[s] = 0;
    pq_insert(s, 0);
    forever begin
      av_read(REG_CTRL, st, w);
      if (st[ST_EMPTY]) break;
      pq_extract(ok, id, pr);
      if (!ok) break;
      if (dist_hw[id] != pr) begin n_stale++; continue; end   // stale entry
      for (int v = 0; v < NV; v++) begin
        if (adj_w[id][v] != 0 && dist_hw[id] + adj_w[id][v] < dist_hw[v]) begin
          dist_hw[v] = dist_hw[id] + adj_w[id][v];
          pred_hw[v] = id;
          pq_insert(v, dist_hw[v]);
          if (read_count_now() > max_q) max_q = read_count_now();
        end
      end
    end
    $display("dijkstra: largest queue occupancy %0d of %0d", max_q, N);
    check(max_q < N, "queue overflowed during Dijkstra");
  endtask

  // ---------------- main ----------------
  logic [31:0] st, id, pr, prev_pr;
  int          w, c0, c1;
  bit          ok;
  int          cyc = 0;
  int          src;
  always @(posedge clk) cyc++;

  initial begin
    rst_n = 1'b0; avs_address = '0; avs_read = 1'b0; avs_write = 1'b0; avs_writedata = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    av_read(REG_CTRL, st, w);
    check(st[ST_EMPTY] && !st[ST_FULL], "empty after reset");

    // 1. worst case: fill to N, then drain from full
    c0 = cyc;
    for (int i = 0; i < N; i++) pq_insert(1000 + i, $urandom_range(0, 5000));
    c1 = cyc;
    $display("fill: %0d inserts in %0d cycles", N, c1 - c0);
    av_read(REG_COUNT, st, w);
    check(st == N, $sformatf("count %0d after fill", st));
    av_read(REG_CTRL, st, w);
    check(st[ST_FULL] && !st[ST_OVERFLOW], "full, no overflow");

    // 2. overflow: the largest of the N+1 elements leaves the queue
    pq_insert(9999, 0);
    repeat (N + 4) @(posedge clk);
    av_read(REG_CTRL, st, w);
    check(st[ST_OVERFLOW] && st[ST_FULL], "overflow flagged");
    if (st[ST_OVERFLOW]) n_ovf++;
    av_write(REG_CTRL, 32'h1 << CMD_CLR_OVF);
    av_read(REG_CTRL, st, w);
    check(!st[ST_OVERFLOW], "overflow cleared");

    prev_pr = 0;
    c0 = cyc;
    for (int i = 0; i < N; i++) begin
      pq_extract(ok, id, pr);
      check(pr >= prev_pr, "extracted priorities not ascending");
      prev_pr = pr;
    end
    c1 = cyc;
    $display("drain: %0d extracts in %0d cycles", N, c1 - c0);
    av_read(REG_CTRL, st, w);
    check(st[ST_EMPTY], "empty after drain");
    pq_extract(ok, id, pr);                    // from the empty queue
    check(!ok, "empty extract flagged");

    // 3. shortest paths from several sources on two graphs
    repeat (2) begin
      make_graph();
      for (int s = 0; s < 3; s++) begin
        src = $urandom_range(0, NV - 1);
        dijkstra_ref(src);
        dijkstra_hw(src);
        for (int v = 0; v < NV; v++)
          check(dist_hw[v] == dist_ref[v],
                $sformatf("d[%0d] = %0d, expected %0d", v, dist_hw[v], dist_ref[v]));
      end
    end

    $display("inserts=%0d extracts=%0d stall_cycles=%0d overflows=%0d empty_extracts=%0d stale=%0d ties=%0d",
             n_ins, n_ext, n_stall, n_ovf, n_empty_ext, n_stale, n_tie);
    check(n_stall > 0, "no stall seen");
    check(n_ovf > 0, "no overflow seen");
    check(n_empty_ext > 0, "no empty extract seen");
    check(n_stale > 0, "no stale entry seen");
    check(n_tie > 0, "no equal priorities seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
