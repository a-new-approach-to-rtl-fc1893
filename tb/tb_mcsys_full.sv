// tb_mcsys_full: the system at its default parameters (two cores, TDMA slice of
// 300 cycles) running the three critical-task workloads of the dual-core
// experiment: Hamming coder, NMEA coder and bubble sort, with WCET and deadline
// in clock cycles as configured in the experiment:
//     Hamming  WCET 14,769  deadline 20,000
//     NMEA     WCET 16,964  deadline 24,000
//     Bubble   WCET 35,762  deadline 48,000
// Delta T completion is set to 12 cycles, and the less-critical core's transfer
// that overruns the switch to Isolated mode must fit in it. The critical-task stand-in on core 0
// executes a straight-line instruction stream sized so that, alone on the bus,
// it takes about the measured execution time of each task (11,775, 14,425 and
// 34,238 cycles): n = time / (3 cycles per fetch * 1.05 for 5 % annulled
// wrong-path instructions). Core 1 runs a less-critical memory test all along.
//
// Each task runs twice: once with the DEC never triggered (its first address
// is set to one that is never fetched), where the task shares the bus for its
// whole run and misses its deadline, and once with the DEC armed, where it must
// meet the deadline after switching to Isolated mode exactly Delta T executed
// cycles after it started.
module tb_mcsys_full;
  import dec_pkg::*;
  localparam int N = 2;
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
  logic gnt_idx, slot_owner;
  logic [8:0] slot_cnt;

  logic start = 0, done;
  int n_instr = 100, annul_pct = 5, n_annulled;
  int bg_access, bg_err;

  mcsys_top dut (.*);

  crit_core_model #(.CT_FIRST(CT_FIRST)) u_c0 (
    .clk, .rst_n, .start, .n_instr, .annul_pct, .req(core_req[0]), .rsp(core_rsp[0]),
    .pc(crit_pc), .annul(crit_annul), .done, .n_annulled
  );

  bg_core_model #(.BASE(32'h0000_8000), .WORDS(64)) u_c1 (
    .clk, .rst_n, .enable(1'b1), .req(core_req[1]), .rsp(core_rsp[1]),
    .n_access(bg_access), .errors(bg_err)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int cyc = 0, t_first = -1, t_end = -1;
  int nexec = 0, nexec_prev = 0, exp_budget = 0, n_switch = 0, iso_start = -1;
  bit prev_busy = 0;
  int overrun = 0;  // Isolated-mode cycles still serving core 1
  dec_state_e prev_state = ST_IDLE;
  logic [31:0] ct_last_addr;

  always @(posedge clk) if (rst_n) begin
    bit tstart;
    cyc++;
    tstart = gnt_valid && !prev_busy;
    if (tstart && policy == POLICY_ISOLATED) chk(gnt_idx == 0, "only core 0 in Isolated mode");
    if (tstart && policy == POLICY_SHARED) chk(gnt_idx == slot_owner, "slice owner in Shared mode");
    if (gnt_valid && gnt_idx != 0 && policy == POLICY_ISOLATED) overrun++;
    prev_busy = gnt_valid && !(core_rsp[0].ack || core_rsp[1].ack);
    if (t_first < 0 && core_req[0].valid && core_req[0].fetch && core_req[0].addr == CT_FIRST)
      t_first = cyc;
    if (t_first >= 0 && t_end < 0 && crit_pc == ct_last_addr && !crit_annul) t_end = cyc;
    if (dec_state == ST_SHARED && prev_state == ST_IDLE) nexec = 0;
    if (dec_state == ST_SHARED) begin
      nexec_prev = nexec;
      if (!crit_annul) nexec++;
    end
    if (dec_state == ST_ISOLATED && prev_state == ST_SHARED) begin
      chk(nexec_prev == exp_budget, $sformatf("switch after %0d executed cycles, budget %0d",
                                              nexec_prev, exp_budget));
      n_switch++;
      iso_start = cyc - t_first;
    end
    prev_state = dec_state;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 32'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run(input logic [31:0] first, input int wcet, input int deadline,
                     output int resp);
    ct_last_addr = CT_FIRST + 32'(4 * (n_instr - 1));
    wr(CFG_CT_FIRST, int'(first)); wr(CFG_CT_LAST, int'(ct_last_addr));
    wr(CFG_WCET, wcet); wr(CFG_DEADLINE, deadline); wr(CFG_DT_COMPL, 12);
    exp_budget = deadline - wcet - 12;
    t_first = -1; t_end = -1; iso_start = -1; overrun = 0;
    @(negedge clk); start = 1;
    wait (done);
    repeat (3) @(negedge clk);
    chk(dec_state == ST_IDLE && policy == POLICY_SHARED, "Shared mode after the task");
    chk(overrun <= 12, $sformatf("overrun into Isolated mode %0d <= 12 cycles", overrun));
    resp = t_end - t_first + 1;
    start = 0;
    repeat (1000) @(negedge clk);
  endtask

  string names [3] = '{"Hamming coder", "NMEA coder", "Bubble sort"};
  int wcets [3] = '{14769, 16964, 35762};
  int dls   [3] = '{20000, 24000, 48000};
  int execs [3] = '{11775, 14425, 34238};

  initial begin
    int r_no, r_dec, sw0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (500) @(negedge clk);
    for (int w = 0; w < 3; w++) begin
      n_instr = execs[w] * 100 / 315;
      sw0 = n_switch;
      run(32'hFFFF_0000, wcets[w], dls[w], r_no);
      chk(r_no > dls[w], $sformatf("%s without the switch misses its deadline", names[w]));
      run(CT_FIRST, wcets[w], dls[w], r_dec);
      chk(r_dec <= dls[w], $sformatf("%s with the DEC meets its deadline: %0d <= %0d",
                                    names[w], r_dec, dls[w]));
      chk(n_switch == sw0 + 1, "one switch to Isolated mode");
      $display("%-14s n=%0d  shared-only %0d cc, with DEC %0d cc (Isolated from cc %0d), deadline %0d cc",
               names[w], n_instr, r_no, r_dec, iso_start, dls[w]);
    end
    chk(bg_err == 0, "less-critical core memory data intact");
    chk(bg_access > 1000, "less-critical core made progress");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
