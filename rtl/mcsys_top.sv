// mcsys_top: a multicore system whose critical task keeps its deadline while
// less-critical cores share the memory bus with it.
//
// Blocks: the Deadline Enforcement Checker (dec), the TDMA bus access controller
// (tdma_bus_ctrl), the system bus (system_bus) and the global memory
// (global_memory). The processor cores are outside this module: each core's bus
// master port (core_req / core_rsp) and the critical core's Program Counter and
// Annul signals are ports. Core CRIT (core 0) runs the critical task.
//
// Operation: with no critical task running, the cores share the bus in TDMA
// slices of TTS cycles. When core CRIT fetches the first critical-task
// instruction, the DEC gives it the next slice at once and starts counting down
// the shared-mode budget deadline - WCET - Delta T completion. When the budget is
// used up, the DEC switches the bus to Isolated mode: only core CRIT is served
// until it completes the last critical-task instruction, after which Shared mode
// resumes. The DEC is configured through the cfg_* port before the critical task
// runs.
//
// Status outputs: policy (2'b01 Shared, 2'b00 Isolated), ct_active (critical
// task detected running), dec_state, dec_count, and the bus grant (gnt_valid,
// gnt_idx: which core is accessing the global memory; slot_owner, slot_cnt:
// the TDMA slice).
//
// The system structure follows the document's overview figures; default
// parameters are those of its dual-core experiment (two cores, TDMA slice of 300
// cycles). Memory size and timing are this design's choices.
module mcsys_top
  import dec_pkg::*;
#(
  parameter int unsigned NCORES    = 2,
  parameter int unsigned TTS       = 300,
  parameter int unsigned CRIT      = 0,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned MEM_WORDS = 16384,
  parameter int unsigned MEM_WAIT  = 1,
  localparam int unsigned IDX_W    = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned TTS_W    = (TTS > 1) ? $clog2(TTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // DEC configuration port
  input  logic              cfg_we,
  input  logic [2:0]        cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  output logic [DATA_W-1:0] cfg_rdata,
  // core bus masters
  input  bus_req_t          core_req [NCORES],
  output bus_rsp_t          core_rsp [NCORES],
  // critical core pipeline signals
  input  logic [ADDR_W-1:0] crit_pc,
  input  logic              crit_annul,
  // status
  output policy_e           policy,
  output logic              ct_active,
  output logic              ct_stop,
  output dec_state_e        dec_state,
  output logic [CNT_W-1:0]  dec_count,
  output logic              gnt_valid,
  output logic [IDX_W-1:0]  gnt_idx,
  output logic [IDX_W-1:0]  slot_owner,
  output logic [TTS_W-1:0]  slot_cnt
);

  logic              force_crit;
  logic [NCORES-1:0] req_valid;
  bus_req_t          s_req;
  bus_rsp_t          s_rsp;

  always_comb
    for (int i = 0; i < int'(NCORES); i++) req_valid[i] = core_req[i].valid;

  dec #(.CNT_W(CNT_W)) u_dec (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .crit_req(core_req[CRIT]), .crit_pc, .crit_annul,
    .policy, .force_crit, .ct_active, .ct_stop, .state(dec_state), .count(dec_count)
  );

  tdma_bus_ctrl #(.NCORES(NCORES), .TTS(TTS), .CRIT(CRIT)) u_arb (
    .clk, .rst_n, .req_valid, .ack(s_rsp.ack), .policy, .force_crit,
    .gnt_valid, .gnt_idx, .slot_owner, .slot_cnt
  );

  system_bus #(.NCORES(NCORES)) u_bus (
    .m_req(core_req), .m_rsp(core_rsp), .gnt_valid, .gnt_idx, .s_req, .s_rsp
  );

  global_memory #(.WORDS(MEM_WORDS), .WAIT(MEM_WAIT)) u_mem (
    .clk, .rst_n, .req(s_req), .rsp(s_rsp)
  );

endmodule
