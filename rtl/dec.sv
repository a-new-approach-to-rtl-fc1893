// dec: Deadline Enforcement Checker (DEC), the infrastructure IP that lets
// less-critical cores share the bus with the critical core for as long as the
// critical task (CT) can still meet its deadline.
//
// How it works: the Tiny Memory (dec_cfg_mem) is configured at boot with the CT's
// first and last instruction addresses, its WCET in Isolated mode, its deadline
// and Delta T completion. The CT Start/Stop Detector (ct_detector) sees the
// critical core fetch the first CT instruction; the Control FSM (dec_ctrl_fsm)
// then loads the Counter (dec_counter) with
//     Delta T = deadline - WCET - Delta T completion
// and asks the bus controller for an immediate slice for the critical core. The
// counter is decremented in each cycle the Instruction Completion Indicator
// (instr_completion) reports a not-annulled instruction at the end of the
// critical core's pipeline. When it reaches zero, the policy output switches from
// Shared (2'b01) to Isolated (2'b00). When the last CT instruction completes, the
// policy returns to Shared. Since at most Delta T cycles are spent in Shared
// mode, the rest of the CT runs alone and ends within WCET + Delta T completion,
// which is before the deadline.
//
// Interface: config write/read port; the critical core's bus request (sniffed,
// not driven); the critical core's Program Counter and Annul; outputs policy,
// force_crit (one-cycle request to start a slice for the critical core) and
// status (ct_active, ct_stop, state, count).
//
// The five internal blocks, the two processor inputs and the
// behaviour follow the document; widths, timing and register map are this
// design's choices.
module dec
  import dec_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // boot-time configuration
  input  logic              cfg_we,
  input  logic [2:0]        cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  output logic [DATA_W-1:0] cfg_rdata,
  // observed from the critical core
  input  bus_req_t          crit_req,
  input  logic [ADDR_W-1:0] crit_pc,
  input  logic              crit_annul,
  // to the bus access controller
  output policy_e           policy,
  output logic              force_crit,
  // status
  output logic              ct_active,
  output logic              ct_stop,
  output dec_state_e        state,
  output logic [CNT_W-1:0]  count
);

  logic [ADDR_W-1:0] ct_first, ct_last;
  logic [CNT_W-1:0]  delta_t;
  logic ct_start, exec, last_done, cnt_load, cnt_dec, cnt_zero;

  dec_cfg_mem #(.CNT_W(CNT_W)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .ct_first, .ct_last, .delta_t
  );

  ct_detector u_det (
    .clk, .rst_n,
    .fetch_valid (crit_req.valid && crit_req.fetch),
    .fetch_addr  (crit_req.addr),
    .ct_first, .ct_last, .ct_start, .ct_stop, .ct_active
  );

  instr_completion u_ici (
    .clk, .rst_n, .pc(crit_pc), .annul(crit_annul), .ct_last, .exec, .last_done
  );

  dec_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .load(cnt_load), .load_val(delta_t), .dec_en(cnt_dec),
    .count, .zero(cnt_zero)
  );

  dec_ctrl_fsm u_fsm (
    .clk, .rst_n, .ct_start, .last_done, .exec, .cnt_zero,
    .cnt_load, .cnt_dec, .force_crit, .policy, .state
  );

  // ct_stop (fetch of the last CT instruction) is a status output only: the
  // return to Shared mode waits until that instruction completes (last_done).

endmodule
