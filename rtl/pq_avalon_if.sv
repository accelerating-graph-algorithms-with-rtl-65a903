// pq_avalon_if -- Avalon Interface Unit of the priority queue co-processor.
//
// Turns the host's 32-bit Avalon-MM slave transfers into the 64-bit
// INSERT / EXTRACT-MIN commands of the systolic array priority queue (sapq).
// Because the bus is only 32 bits wide, an element's ID and priority are
// staged in two registers before the command is issued, and an extracted
// element is read back in two transfers.
//
// Register map (word addresses, see sapq_pkg):
//   0 REG_ID    W: ID of the next INSERT        R: ID of the last EXTRACT-MIN
//   1 REG_PRIO  W: priority of the next INSERT  R: priority of the last EXTRACT-MIN
//   2 REG_CTRL  W: bit0 INSERT, bit1 EXTRACT-MIN (bit0 wins if both),
//                  bit2 clear the overflow flag
//               R: bit0 empty, bit1 full, bit2 overflow (sticky),
//                  bit3 the last EXTRACT-MIN returned an element
//   3 REG_COUNT R: number of queued elements
//
// Timing: reads have zero wait states and writes to REG_ID/REG_PRIO are
// always taken at once. A command write waits (avs_waitrequest) until the
// queue can accept it, and a read waits while an operation is in progress,
// so whatever the host reads reflects every command it issued before. A host
// that issues a command and then reads therefore sees it complete after the
// queue's 3-cycle operation time. The register map, the stall rules and the
// overflow flag are this design's own choices; the source names the unit and
// its role only.
module pq_avalon_if
  import sapq_pkg::*;
#(
  parameter  int unsigned N     = 200,
  localparam int unsigned CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // Avalon-MM slave
  input  logic [1:0]       avs_address,
  input  logic             avs_read,
  input  logic             avs_write,
  input  logic [31:0]      avs_writedata,
  output logic [31:0]      avs_readdata,
  output logic             avs_waitrequest,
  // towards the priority queue
  output logic             q_cmd_valid,
  input  logic             q_cmd_ready,
  output op_e              q_cmd_op,
  output id_t              q_cmd_id,
  output prio_t            q_cmd_prio,
  input  elem_t            q_res,
  input  logic [CNT_W-1:0] q_count,
  input  logic             q_empty,
  input  logic             q_full,
  input  logic             q_drop_valid
);

  id_t   id_q;
  prio_t prio_q;
  logic  ovf_q;

  wire wr_ctrl  = avs_write && (avs_address == REG_CTRL);
  wire want_ins = wr_ctrl && avs_writedata[CMD_INSERT];
  wire want_ext = wr_ctrl && !avs_writedata[CMD_INSERT] && avs_writedata[CMD_EXTRACT];

  assign q_cmd_valid = want_ins || want_ext;
  assign q_cmd_op    = want_ins ? OP_INSERT : OP_EXTRACT;
  assign q_cmd_id    = id_q;
  assign q_cmd_prio  = prio_q;

  assign avs_waitrequest = (q_cmd_valid && !q_cmd_ready) || (avs_read && !q_cmd_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      id_q   <= '0;
      prio_q <= '0;
      ovf_q  <= 1'b0;
    end else begin
      if (avs_write && avs_address == REG_ID)   id_q   <= avs_writedata;
      if (avs_write && avs_address == REG_PRIO) prio_q <= avs_writedata;
      if (q_drop_valid)                              ovf_q <= 1'b1;
      else if (wr_ctrl && avs_writedata[CMD_CLR_OVF]) ovf_q <= 1'b0;
    end
  end

  // q_res holds the last extracted element; the queue changes it only on
  // EXTRACT-MIN, so it is read straight from there.
  always_comb begin
    avs_readdata = '0;
    unique case (avs_address)
      REG_ID:   avs_readdata = q_res.id;
      REG_PRIO: avs_readdata = q_res.prio;
      REG_CTRL: begin
        avs_readdata[ST_EMPTY]    = q_empty;
        avs_readdata[ST_FULL]     = q_full;
        avs_readdata[ST_OVERFLOW] = ovf_q;
        avs_readdata[ST_RES_VAL]  = q_res.valid;
      end
      default:  avs_readdata = 32'(q_count);
    endcase
  end

  // Avalon-MM rule: the master holds its request while waitrequest is high.
  a_hold_during_wait : assert property (@(posedge clk) disable iff (!rst_n)
    avs_waitrequest |=> avs_read == $past(avs_read) && avs_write == $past(avs_write)
                        && avs_address == $past(avs_address)
                        && avs_writedata == $past(avs_writedata));

endmodule
