// sapq_pkg -- types and constants shared by the systolic array priority queue.
//
// A queue element is a 32-bit element ID (a handle to the element's satellite
// data) plus a 32-bit priority; a smaller priority value is served first
// (EXTRACT-MIN). Both widths follow the source design. The `valid` bit that
// marks an occupied processing element, the operation encoding and the
// register map of the bus interface are this design's own choices.
package sapq_pkg;

  // Element field widths (32-bit ID and 32-bit priority).
  localparam int unsigned ID_W   = 32;
  localparam int unsigned PRIO_W = 32;

  // Clock cycles one INSERT or EXTRACT-MIN occupies the queue interface.
  localparam int unsigned OP_CYCLES = 3;

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [PRIO_W-1:0] prio_t;

  // One queue element as held in a processing element.
  typedef struct packed {
    logic  valid;  // the slot holds an element
    prio_t prio;   // priority, smaller is served first
    id_t   id;     // element ID
  } elem_t;

  // Operation travelling through the array from PE1 towards PEn. OP_SHIFT is
  // internal: the tail of an INSERT once the new element has been placed.
  typedef enum logic [1:0] {
    OP_NOP     = 2'd0,
    OP_INSERT  = 2'd1,
    OP_EXTRACT = 2'd2,
    OP_SHIFT   = 2'd3
  } op_e;

  // Avalon register map (word addresses) of the co-processor.
  localparam logic [1:0] REG_ID     = 2'd0;  // W: staged ID,       R: last extracted ID
  localparam logic [1:0] REG_PRIO   = 2'd1;  // W: staged priority, R: last extracted priority
  localparam logic [1:0] REG_CTRL   = 2'd2;  // W: command,         R: status
  localparam logic [1:0] REG_COUNT  = 2'd3;  // R: number of queued elements

  // Command bits written to REG_CTRL.
  localparam int unsigned CMD_INSERT  = 0;
  localparam int unsigned CMD_EXTRACT = 1;
  localparam int unsigned CMD_CLR_OVF = 2;

  // Status bits read from REG_CTRL.
  localparam int unsigned ST_EMPTY    = 0;  // queue holds no element
  localparam int unsigned ST_FULL     = 1;  // all N processing elements occupied
  localparam int unsigned ST_OVERFLOW = 2;  // sticky: an element was pushed out of PEn
  localparam int unsigned ST_RES_VAL  = 3;  // last EXTRACT-MIN returned an element

endpackage
