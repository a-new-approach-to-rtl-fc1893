// tb_quadcore_example: the quad-core worked example at full size. Four cores,
// TDMA slice (TTS) of 10,000 cycles, critical task on core 0 with WCET
// 3,600,000 cycles (360 TTS), deadline 4,000,000 cycles (400 TTS), Delta T
// completion over all cores 1 TTS, and an actual run of 3,000,000 cycles
// (300 TTS) when alone on the bus. Cores 1..3 run less-critical work all the
// time.
//
// The critical task starts at TTS 100. Expected, from the budget
// 400 - 360 - 1 = 39 TTS: Shared mode from TTS 100 to 139, in which core 0 gets
// its fresh slice and every fourth one after it, 10 slices in all; Isolated mode
// from TTS 139 to the end of the task at TTS 100 + 39 + (300 - 10) = 429, well
// before the deadline at TTS 500. The task stand-in is 1,000,000 straight-line
// instructions of one 3-cycle fetch each, with no annulled instructions so the
// times are exact; times are checked to within a few cycles of bus overrun.
// Shared mode then resumes with slice 429, owned by core 1.
module tb_quadcore_example;
  import dec_pkg::*;
  localparam int N = 4, TTS = 10000;
  localparam logic [31:0] CT_FIRST = 32'h0000_1000;
  localparam int PRE = 8;

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
  logic [13:0] slot_cnt;

  logic start = 0, done;
  int n_instr = 1000000, annul_pct = 0, n_annulled;
  int bg_access [N], bg_err [N];

  mcsys_top #(.NCORES(N), .TTS(TTS)) dut (.*);

  crit_core_model #(.CT_FIRST(CT_FIRST), .PRE_INSTR(PRE)) u_c0 (
    .clk, .rst_n, .start, .n_instr, .annul_pct, .req(core_req[0]), .rsp(core_rsp[0]),
    .pc(crit_pc), .annul(crit_annul), .done, .n_annulled
  );

  for (genvar g = 1; g < N; g++) begin : g_bg
    bg_core_model #(.BASE(32'h0000_4000 + 32'(g) * 32'h400), .WORDS(64), .SEED(32'(g) * 32'h0bad_cafe))
      u_bg (.clk, .rst_n, .enable(1'b1), .req(core_req[g]), .rsp(core_rsp[g]),
            .n_access(bg_access[g]), .errors(bg_err[g]));
  end
  assign bg_access[0] = 0;
  assign bg_err[0] = 0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0, t_first = -1, t_iso = -1, t_end = -1, slices_c0 = 0;
  bit prev_busy = 0, c0_slice_used = 0;
  logic [31:0] last_addr;
  assign last_addr = CT_FIRST + 32'(4 * (n_instr - 1));

  always @(posedge clk) if (rst_n) begin
    bit any_ack;
    cyc++;
    any_ack = 0;
    for (int i = 0; i < N; i++) any_ack |= core_rsp[i].ack;
    if (gnt_valid && !prev_busy && policy == POLICY_ISOLATED && gnt_idx != 0) chk(0, "isolation");
    prev_busy = gnt_valid && !any_ack;
    if (t_first < 0 && core_req[0].valid && core_req[0].addr == CT_FIRST) t_first = cyc;
    if (t_iso < 0 && policy == POLICY_ISOLATED) t_iso = cyc;
    if (t_end < 0 && t_first >= 0 && crit_pc == last_addr) t_end = cyc;
    // Shared-mode slices in which core 0 starts transfers, while the task runs
    if (dec_state == ST_SHARED && gnt_valid && gnt_idx == 0 && slot_owner == 0 && !c0_slice_used) begin
      slices_c0++; c0_slice_used = 1;
    end
    if (slot_owner != 0) c0_slice_used = 0;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 32'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int rel_iso, rel_end;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(CFG_CT_FIRST, int'(CT_FIRST)); wr(CFG_CT_LAST, int'(last_addr));
    wr(CFG_WCET, 360 * TTS); wr(CFG_DEADLINE, 400 * TTS); wr(CFG_DT_COMPL, 1 * TTS);
    // let the less-critical cores run; start the task so its first fetch falls
    // early in TTS 100 (the 8 pre-task fetches wait for core 0's slice 100)
    while (cyc < 100 * TTS - 40) @(negedge clk);
    start = 1;
    wait (done);
    repeat (5) @(negedge clk);
    rel_iso = t_iso - t_first;
    rel_end = t_end - t_first + 1;
    $display("task start at cycle %0d (TTS %0d), Isolated from TTS %0d, end at TTS %0d; core 0 used %0d Shared slices",
             t_first, t_first / TTS, (t_first + rel_iso) / TTS, (t_first + rel_end) / TTS, slices_c0);
    chk(rel_iso >= 39 * TTS && rel_iso <= 39 * TTS + 4, $sformatf("switch after 39 TTS (%0d cycles)", rel_iso));
    chk(slices_c0 == 10, "core 0 used 10 Shared-mode slices");
    chk(rel_end >= 329 * TTS - 8 && rel_end <= 329 * TTS + 8, $sformatf("task takes 329 TTS (%0d cycles)", rel_end));
    chk(rel_end <= 400 * TTS, "deadline met");
    chk(dec_state == ST_IDLE && policy == POLICY_SHARED, "Shared mode after the task");
    // slice 429 continues the rotation begun at slice 100: it belongs to core 1,
    // so Shared mode resumes with the order C1 C2 C3 C0 ...
    chk(slot_owner == 2'd1, $sformatf("slice owner after the task is core %0d", slot_owner));
    for (int i = 1; i < N; i++) chk(bg_err[i] == 0 && bg_access[i] > 1000, "less-critical cores ran correctly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
