// dec_pkg: types and constants shared by the Deadline Enforcement Checker (DEC),
// the TDMA bus access controller, the system bus and the global memory.
//
// Bus: a simplified single-outstanding-transfer bus standing in for AMBA AHB.
// A master raises bus_req_t.valid with address, write flag, write data and an
// instruction-fetch flag (the role AHB's HPROT[0] plays) and holds them until it
// sees bus_rsp_t.ack for one cycle; read data is valid in that same cycle.
//
// Policy code: the DEC tells the bus controller which access policy applies.
// The two printed codes follow the document: 2'b01 = Shared mode (every core
// gets its TDMA slice), 2'b00 = Isolated mode (only the critical core).
package dec_pkg;

  localparam int unsigned ADDR_W = 32;  // 32-bit SPARC V8 address space
  localparam int unsigned DATA_W = 32;  // 32-bit data path

  typedef struct packed {
    logic              valid;
    logic              we;
    logic              fetch;   // 1 = instruction fetch, 0 = data access
    logic [ADDR_W-1:0] addr;    // byte address
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  typedef enum logic [1:0] {
    POLICY_ISOLATED = 2'b00,
    POLICY_SHARED   = 2'b01
  } policy_e;

  // Tiny Memory (configuration register) map, word index on the config port.
  typedef enum logic [2:0] {
    CFG_CT_FIRST  = 3'd0,  // address of the first CT instruction
    CFG_CT_LAST   = 3'd1,  // address of the last CT instruction
    CFG_WCET      = 3'd2,  // CT WCET in Isolated mode, clock cycles
    CFG_DEADLINE  = 3'd3,  // CT deadline from CT start, clock cycles
    CFG_DT_COMPL  = 3'd4   // Delta T completion (all cores), clock cycles
  } cfg_addr_e;

  localparam int unsigned CFG_WORDS = 5;

  // Control FSM states.
  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,  // no CT running, Shared mode
    ST_SHARED   = 2'd1,  // CT running, Shared mode, counter running
    ST_ISOLATED = 2'd2   // CT running, Isolated mode
  } dec_state_e;

endpackage
