// tb_mcsys_top: end-to-end test of the multicore system with the quad-core
// arrangement of the document's worked example (four cores, core 0 critical),
// at a reduced TDMA slice of 20 cycles so that the runs stay short.
//
// Core 0 is a critical-core model, cores 1..3 are less-critical models that
// keep the bus saturated. Three critical-task runs are made:
//   1. tight deadline with the DEC armed: Shared, then Isolated, deadline met;
//   2. the same task with the DEC never triggered (first address set to an
//      address that is never fetched): the task stays in Shared mode and misses
//      that deadline, which shows why the switch is needed;
//   3. generous deadline: the task ends while still in Shared mode.
// Checked every cycle: transfers start only for the slice owner in Shared mode
// and only for core 0 in Isolated mode; the critical core gets a fresh slice
// when the task starts; the switch happens exactly after Delta T not-annulled
// Shared-mode cycles; Shared mode resumes when the task ends; the less-critical
// cores' memory data stay intact. Each mechanism must be seen at least once.
module tb_mcsys_top;
  import dec_pkg::*;
  localparam int N = 4, TTS = 20;
  localparam logic [31:0] CT_FIRST = 32'h0000_1000;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  bus_req_t core_req [N];
  bus_rsp_t core_rsp [N];
  logic [31:0] crit_pc;
  logic crit_annul;
  policy_e policy;
  logic ct_active, ct_stop, gnt_valid;
  dec_state_e dec_state;
  logic [31:0] dec_count;
  logic [1:0] gnt_idx, slot_owner;
  logic [4:0] slot_cnt;

  logic start = 0, done;
  int n_instr = 300, annul_pct = 10, n_annulled;
  int bg_access [N], bg_err [N];

  mcsys_top #(.NCORES(N), .TTS(TTS)) dut (.*);

  crit_core_model #(.CT_FIRST(CT_FIRST)) u_c0 (
    .clk, .rst_n, .start, .n_instr, .annul_pct, .req(core_req[0]), .rsp(core_rsp[0]),
    .pc(crit_pc), .annul(crit_annul), .done, .n_annulled
  );

  for (genvar g = 1; g < N; g++) begin : g_bg
    bg_core_model #(.BASE(32'h0000_4000 + 32'(g) * 32'h400), .WORDS(24), .SEED(32'(g) * 32'h9e37_79b9))
      u_bg (.clk, .rst_n, .enable(1'b1), .req(core_req[g]), .rsp(core_rsp[g]),
            .n_access(bg_access[g]), .errors(bg_err[g]));
  end
  assign bg_access[0] = 0;
  assign bg_err[0] = 0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---- per-cycle monitor -------------------------------------------------
  int cyc = 0;
  bit prev_busy = 0;
  dec_state_e prev_state = ST_IDLE;
  int nexec = 0, nexec_prev = 0, exp_budget = 0;
  int t_first = -1, t_end = -1;
  logic [31:0] ct_last_addr;
  // mechanism counters
  int m_rotation [N];
  int m_fresh_slice = 0, m_switch = 0, m_iso_cycles = 0, m_resume = 0;
  int m_overrun_slice = 0, m_overrun_switch = 0, m_annul_skip = 0, m_early_end = 0;
  int m_stalled_bg = 0;
  bit after_iso = 0;

  always @(posedge clk) if (rst_n) begin
    bit any_ack, tstart;
    cyc++;
    any_ack = 0;
    for (int i = 0; i < N; i++) any_ack |= core_rsp[i].ack;
    tstart = gnt_valid && !prev_busy;
    // grant rules
    if (tstart) begin
      if (policy == POLICY_ISOLATED) chk(gnt_idx == 0, "only core 0 starts in Isolated mode");
      else begin
        chk(gnt_idx == slot_owner, "only the slice owner starts in Shared mode");
        m_rotation[gnt_idx]++;
        if (after_iso && gnt_idx != 0) begin m_resume++; after_iso = 0; end
      end
    end
    if (gnt_valid && policy == POLICY_SHARED && gnt_idx != slot_owner) m_overrun_slice++;
    if (gnt_valid && policy == POLICY_ISOLATED && gnt_idx != 0) m_overrun_switch++;
    if (policy == POLICY_ISOLATED) begin
      m_iso_cycles++;
      for (int i = 1; i < N; i++) if (core_req[i].valid) m_stalled_bg++;
    end
    prev_busy = gnt_valid && !any_ack;
    // critical task timing (from the first request for the first CT address)
    if (t_first < 0 && core_req[0].valid && core_req[0].fetch && core_req[0].addr == CT_FIRST)
      t_first = cyc;
    if (t_first >= 0 && t_end < 0 && crit_pc == ct_last_addr && !crit_annul) t_end = cyc;
    // DEC sequencing
    if (dec_state == ST_SHARED && prev_state == ST_IDLE) begin
      chk(slot_owner == 0 && slot_cnt == 0, "fresh slice for core 0 at CT start");
      m_fresh_slice++;
      nexec = 0;
    end
    if (dec_state == ST_SHARED) begin
      nexec_prev = nexec;
      if (!crit_annul) nexec++; else m_annul_skip++;
    end
    if (dec_state == ST_ISOLATED && prev_state == ST_SHARED) begin
      chk(nexec_prev == exp_budget, $sformatf("switch after %0d executed cycles, budget %0d",
                                              nexec_prev, exp_budget));
      m_switch++;
    end
    if (dec_state == ST_IDLE && prev_state == ST_ISOLATED) after_iso = 1;
    if (dec_state == ST_IDLE && prev_state == ST_SHARED) m_early_end++;
    chk(policy == ((dec_state == ST_ISOLATED) ? POLICY_ISOLATED : POLICY_SHARED), "policy code");
    prev_state = dec_state;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 32'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  // one critical-task run; returns response time in cycles
  task automatic run(input logic [31:0] first, input int wcet, input int deadline,
                     input int dtc, output int resp);
    ct_last_addr = CT_FIRST + 32'(4 * (n_instr - 1));
    wr(CFG_CT_FIRST, int'(first)); wr(CFG_CT_LAST, int'(ct_last_addr));
    wr(CFG_WCET, wcet); wr(CFG_DEADLINE, deadline); wr(CFG_DT_COMPL, dtc);
    exp_budget = deadline - wcet - dtc;
    t_first = -1; t_end = -1;
    @(negedge clk); start = 1;
    wait (done);
    repeat (3) @(negedge clk);
    chk(dec_state == ST_IDLE && policy == POLICY_SHARED, "Shared mode after the task");
    resp = t_end - t_first + 1;
    start = 0;
    repeat (200) @(negedge clk);   // less-critical cores run alone on the bus
  endtask

  initial begin
    int r1, r2, r3;
    for (int i = 0; i < N; i++) m_rotation[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    // 1: tight deadline, DEC armed
    run(CT_FIRST, 1100, 1400, 10, r1);
    chk(r1 <= 1400, $sformatf("deadline met with the DEC: %0d <= 1400", r1));
    // 2: DEC never triggered: the task shares the bus all along
    run(32'hFFFF_0000, 1100, 1400, 10, r2);
    chk(r2 > 1400, $sformatf("without the switch the deadline is missed: %0d > 1400", r2));
    // 3: generous deadline, the task ends in Shared mode
    run(CT_FIRST, 1100, 10000, 10, r3);
    chk(r3 <= 10000, "generous deadline met");
    $display("response times: DEC %0d, no switch %0d, generous %0d (cycles)", r1, r2, r3);
    $display("mechanisms: fresh_slice=%0d switch=%0d iso_cycles=%0d resume=%0d overrun_slice=%0d overrun_switch=%0d annul_skip=%0d early_end=%0d stalled_bg=%0d",
             m_fresh_slice, m_switch, m_iso_cycles, m_resume, m_overrun_slice, m_overrun_switch,
             m_annul_skip, m_early_end, m_stalled_bg);
    chk(m_fresh_slice >= 2, "fresh slice seen");
    chk(m_switch >= 1, "Shared-to-Isolated switch seen");
    chk(m_resume >= 1, "less-critical cores resumed after Isolated mode");
    chk(m_overrun_slice >= 1, "transfer overrunning a slice end seen");
    chk(m_overrun_switch >= 1, "transfer overrunning the mode switch seen");
    // the overrun into Isolated mode stays inside the Delta T completion margin (10)
    chk(m_overrun_switch <= 10, $sformatf("overrun into Isolated mode %0d <= 10 cycles", m_overrun_switch));
    chk(m_annul_skip >= 1, "annulled cycles not counted seen");
    chk(m_early_end >= 1, "task ending in Shared mode seen");
    chk(m_stalled_bg >= 100, "less-critical requests held off in Isolated mode");
    for (int i = 0; i < N; i++) chk(m_rotation[i] >= 10, $sformatf("core %0d served in Shared mode", i));
    for (int i = 1; i < N; i++) begin
      chk(bg_err[i] == 0, $sformatf("core %0d memory data intact", i));
      chk(bg_access[i] > 50, "less-critical core made progress");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
