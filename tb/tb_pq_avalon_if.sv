// tb_pq_avalon_if -- self-checking testbench for the Avalon interface unit.
//
// The queue side is played by the testbench: it accepts a command and then
// stays busy for a random number of cycles, and it presents result, count and
// status values the testbench chooses. An Avalon master task that obeys
// waitrequest performs the host's transfers. Checked: the command decode and
// the staged ID/priority, the stalls of command writes and reads while the
// queue is busy, the register map of every readable register, and the
// sticky overflow flag with its clear command.
module tb_pq_avalon_if;
  import sapq_pkg::*;

  localparam int unsigned N     = 200;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic             clk = 1'b0;
  logic             rst_n;
  logic [1:0]       avs_address;
  logic             avs_read, avs_write;
  logic [31:0]      avs_writedata, avs_readdata;
  logic             avs_waitrequest;
  logic             q_cmd_valid, q_cmd_ready;
  op_e              q_cmd_op;
  id_t              q_cmd_id;
  prio_t            q_cmd_prio;
  elem_t            q_res;
  logic [CNT_W-1:0] q_count;
  logic             q_empty, q_full, q_drop_valid;

  int checks = 0, failures = 0;
  int stalls = 0;

  pq_avalon_if #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue stand-in: busy for busy_len cycles after each accepted command
  int   busy_left = 0;
  int   busy_len  = 2;
  op_e   last_op;
  id_t   last_id;
  prio_t last_prio;
  int    n_cmds = 0;
  assign q_cmd_ready = (busy_left == 0);
  always @(posedge clk) begin
    if (q_cmd_valid && q_cmd_ready) begin
      last_op = q_cmd_op; last_id = q_cmd_id; last_prio = q_cmd_prio;
      n_cmds++;
      busy_left <= busy_len;
    end else if (busy_left > 0) busy_left <= busy_left - 1;
    if (avs_waitrequest) stalls++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

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

  logic [31:0] rd;
  int          w;

  initial begin
    rst_n = 1'b0; avs_address = '0; avs_read = 1'b0; avs_write = 1'b0; avs_writedata = '0;
    q_res = '0; q_count = '0; q_empty = 1'b1; q_full = 1'b0; q_drop_valid = 1'b0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    // INSERT with staged ID and priority
    av_write(REG_ID, 32'hDEAD_BEEF);
    av_write(REG_PRIO, 32'h0000_1234);
    av_write(REG_CTRL, 32'h1);
    check(n_cmds == 1 && last_op == OP_INSERT && last_id == 32'hDEAD_BEEF
          && last_prio == 32'h0000_1234, "insert decode");

    // a command right behind it stalls until the queue is ready
    busy_len = 5;
    av_write(REG_CTRL, 32'h2);
    check(n_cmds == 2 && last_op == OP_EXTRACT, "extract decode");
    // a read while busy stalls for the remaining busy cycles
    q_res = '{valid: 1'b1, prio: 32'h55, id: 32'h77};
    av_read(REG_ID, rd, w);
    check(rd == 32'h77 && w == 5, $sformatf("read id %h after %0d waits", rd, w));
    av_read(REG_PRIO, rd, w);
    check(rd == 32'h55 && w == 0, "read prio, no wait when idle");
    av_read(REG_CTRL, rd, w);
    check(rd == 32'h0000_0009, $sformatf("status %h", rd));   // empty + result valid

    // both command bits: INSERT wins; staged values are kept
    av_write(REG_CTRL, 32'h3);
    check(n_cmds == 3 && last_op == OP_INSERT && last_id == 32'hDEAD_BEEF, "insert wins");
    av_write(REG_CTRL, 32'h0);
    av_write(REG_CTRL, 32'h4);
    check(n_cmds == 3, "no command without a command bit");

    // count and full
    q_count = CNT_W'(N); q_full = 1'b1; q_empty = 1'b0; q_res.valid = 1'b0;
    av_read(REG_COUNT, rd, w);
    check(rd == N, $sformatf("count %0d", rd));
    av_read(REG_CTRL, rd, w);
    check(rd == 32'h2, $sformatf("status full %h", rd));

    // sticky overflow and its clear
    @(posedge clk); #1; q_drop_valid = 1'b1;
    @(posedge clk); #1; q_drop_valid = 1'b0;
    repeat (3) @(posedge clk); #1;
    av_read(REG_CTRL, rd, w);
    check(rd[ST_OVERFLOW], "overflow set");
    av_read(REG_CTRL, rd, w);
    check(rd[ST_OVERFLOW], "overflow sticky");
    av_write(REG_CTRL, 32'h4);
    av_read(REG_CTRL, rd, w);
    check(!rd[ST_OVERFLOW], "overflow cleared");

    // random staged inserts and extracts with random busy times
    repeat (300) begin
      logic [31:0] id, pr;
      id = $urandom; pr = $urandom;
      busy_len = $urandom_range(0, 6);
      av_write(REG_ID, id);
      av_write(REG_PRIO, pr);
      if ($urandom_range(0, 1) == 1) begin
        av_write(REG_CTRL, 32'h1);
        check(last_op == OP_INSERT && last_id == id && last_prio == pr, "random insert");
      end else begin
        av_write(REG_CTRL, 32'h2);
        check(last_op == OP_EXTRACT, "random extract");
        q_res = '{valid: 1'b1, prio: pr, id: id};
        av_read(REG_PRIO, rd, w);
        check(rd == pr && w == busy_len, "random result");
      end
    end
    check(stalls > 0, "stalls seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
