// polaris_pkg: types and constants shared by the 80-tile mesh processor.
//
// A link between two routers carries 38 wires per direction: a 32-bit data
// word plus 6 bits of overhead (valid, head, tail, lane and two on/off flow
// control bits, one per lane, that travel against the data). The flit data
// width and the two lanes follow the design description; how the six
// overhead bits are assigned, the header format and the packet commands are
// this design's own choices.
//
// Packet format (one lane, wormhole):
//   flit 0 (head) : route, ten 3-bit hops, hop 0 in bits [2:0]. Each router
//                   takes the low hop as its output port and shifts the route
//                   right by 3. Hop code HOP_CHAIN means "route continues in
//                   the next flit": the router drops this flit and treats the
//                   next one as the head.
//   flit 1        : command {cmd[31:28], addr[27:0]}
//   flit 2..      : data words (write commands only), tail on the last flit
//
// Instruction word: 96 bits, seven operation slots (two FPU, load, store,
// send/receive, program flow, sleep), see instr_t.
package polaris_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned NPORTS   = 5;   // local, north, east, south, west
  localparam int unsigned NLANES   = 2;
  localparam int unsigned HOP_W    = 3;
  localparam int unsigned NHOPS    = 10;  // hops carried by one route flit

  // Router port numbers, also the hop codes of a route.
  localparam logic [2:0] P_LOCAL = 3'd0;
  localparam logic [2:0] P_NORTH = 3'd1;
  localparam logic [2:0] P_EAST  = 3'd2;
  localparam logic [2:0] P_SOUTH = 3'd3;
  localparam logic [2:0] P_WEST  = 3'd4;
  localparam logic [2:0] HOP_CHAIN = 3'd7;

  // Forward part of a link: 36 of the 38 wires.
  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic              lane;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam flit_t FLIT_IDLE = '{valid: 1'b0, head: 1'b0, tail: 1'b0, lane: 1'b0, data: '0};

  // Packet commands (flit 1 bits [31:28]).
  typedef enum logic [3:0] {
    CMD_DMEM_WR = 4'h1,  // data words written to DMEM from addr on
    CMD_IMEM_WR = 4'h2,  // data words fill a 96-bit IMEM entry, three per entry
    CMD_PESLEEP = 4'h3,  // put the destination PE to sleep
    CMD_PEWAKE  = 4'h4   // wake the destination PE, start at pc = addr
  } cmd_e;

  // ---------------- instruction word ----------------
  typedef struct packed {
    logic       en;
    logic       clr;   // start a new sum: acc = a*b
    logic       wb;    // write the running sum to rd, 9 cycles later
    logic [4:0] ra;
    logic [4:0] rb;
    logic [4:0] rd;
  } fpu_op_t;          // 18 bits

  typedef struct packed {
    logic       en;
    logic [4:0] r;     // destination (load) or source (store)
    logic [4:0] ra;    // address register
    logic       inc;   // post-increment the address register
  } mem_op_t;          // 12 bits

  typedef enum logic [1:0] {NET_NONE = 2'd0, NET_SND = 2'd1, NET_SNDI = 2'd2, NET_RCV = 2'd3} net_e;

  typedef struct packed {
    net_e       op;
    logic [4:0] rs;    // data register
    logic [4:0] rh;    // route in R[rh], command in R[rh+1]
  } net_op_t;          // 12 bits

  typedef enum logic [2:0] {
    FL_NOP = 3'd0, FL_JMP = 3'd1, FL_LOOP = 3'd2, FL_SETLC = 3'd3,
    FL_LI  = 3'd4, FL_STALL = 3'd5, FL_HALT = 3'd6
  } flow_e;

  typedef struct packed {
    flow_e       op;
    logic [4:0]  rd;   // for FL_LI
    logic [10:0] imm;
  } flow_op_t;         // 19 bits

  typedef enum logic [2:0] {
    SL_NONE = 3'd0, SL_NAP0 = 3'd1, SL_NAP1 = 3'd2, SL_WAKE0 = 3'd3,
    SL_WAKE1 = 3'd4, SL_PESLEEP = 3'd5, SL_PEWAKE = 3'd6
  } sleep_e;

  typedef struct packed {
    sleep_e     op;
    logic [1:0] rsv;
  } sleep_op_t;        // 5 bits

  typedef struct packed {
    sleep_op_t sl;     // [95:91]
    flow_op_t  fl;     // [90:72]
    net_op_t   net;    // [71:60]
    mem_op_t   st;     // [59:48]
    mem_op_t   ld;     // [47:36]
    fpu_op_t   fpu1;   // [35:18]
    fpu_op_t   fpu0;   // [17:0]
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Latencies from the instruction table, in cycles.
  localparam int unsigned LAT_FPU  = 9;
  localparam int unsigned LAT_LOAD = 2;
  localparam int unsigned LAT_SEND = 2;

endpackage
