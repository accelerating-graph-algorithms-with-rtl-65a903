// pq_coprocessor -- priority queue co-processor for a host on an Avalon bus.
//
// The host processor runs a graph algorithm (for example Dijkstra's shortest
// path search) and hands all priority queue work to this co-processor: the
// Avalon Interface Unit (pq_avalon_if) decodes the host's 32-bit register
// accesses into INSERT / EXTRACT-MIN commands for the Systolic Array Priority
// Queue Processor (sapq), which performs each in a constant 3 clock cycles
// regardless of how many of its N elements are occupied.
//
// Ports: clock, synchronous active-low reset and one Avalon-MM slave port
// (2-bit word address, 32-bit data, zero-latency reads, waitrequest). The
// register map is described in pq_avalon_if. The block split follows the
// source design; N defaults to its prototype size of 200 entries.
module pq_coprocessor
  import sapq_pkg::*;
#(
  parameter int unsigned N = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_waitrequest
);

  localparam int unsigned CNT_W = $clog2(N + 1);

  logic             cmd_valid, cmd_ready;
  op_e              cmd_op;
  id_t              cmd_id;
  prio_t            cmd_prio;
  elem_t            res;
  logic [CNT_W-1:0] count;
  logic             empty, full, drop_valid;

  pq_avalon_if #(.N(N)) u_avalon_if (
    .clk             (clk),
    .rst_n           (rst_n),
    .avs_address     (avs_address),
    .avs_read        (avs_read),
    .avs_write       (avs_write),
    .avs_writedata   (avs_writedata),
    .avs_readdata    (avs_readdata),
    .avs_waitrequest (avs_waitrequest),
    .q_cmd_valid     (cmd_valid),
    .q_cmd_ready     (cmd_ready),
    .q_cmd_op        (cmd_op),
    .q_cmd_id        (cmd_id),
    .q_cmd_prio      (cmd_prio),
    .q_res           (res),
    .q_count         (count),
    .q_empty         (empty),
    .q_full          (full),
    .q_drop_valid    (drop_valid)
  );

  sapq #(.N(N)) u_sapq (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd_op     (cmd_op),
    .cmd_id     (cmd_id),
    .cmd_prio   (cmd_prio),
    .done       (),          // the bus interface stalls on cmd_ready instead
    .res        (res),
    .count      (count),
    .empty      (empty),
    .full       (full),
    .drop_valid (drop_valid),
    .drop_elem  ()           // only the sticky overflow flag reaches the host
  );

endmodule
