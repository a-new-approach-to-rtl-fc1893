// tb_dec: self-checking test of the whole Deadline Enforcement Checker.
// The DEC is configured through its port, then critical-task runs are played:
// the critical core's fetch stream (first CT address, body, last CT address) and
// its end-of-pipeline PC with random annulled instructions. Checked against the
// rule "after Delta T = deadline - WCET - Delta T completion not-annulled cycles
// in Shared mode, switch to Isolated (policy 00); return to Shared (01) one cycle
// after the last CT instruction completes", plus the one-cycle force_crit pulse,
// the ct_active level and the config readback. Scenarios: switch to Isolated,
// CT ending while still Shared, zero budget, and an annulled last instruction
// that must not end the task.
module tb_dec;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  bus_req_t crit_req;
  logic [31:0] crit_pc = 0;
  logic crit_annul = 0;
  policy_e policy;
  logic force_crit, ct_active, ct_stop;
  dec_state_e state;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int n_iso = 0, n_early = 0, n_annul_skip = 0, n_annul_last = 0;

  localparam logic [31:0] FIRST = 32'h0000_1000;

  dec dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = 32'(d);
    @(negedge clk); cfg_we = 0;
    cfg_addr = 3'(a); #1 chk(cfg_rdata == 32'(d), "config readback");
  endtask

  // One CT run of n_instr instructions; budget = expected Delta T.
  task automatic run_ct(input int n_instr, input int budget, input int annul_pct,
                        input bit annul_last_once);
    logic [31:0] last = FIRST + 32'(4 * (n_instr - 1));
    int k = 0;          // instructions completed
    int nexec = 0;      // not-annulled Shared-mode cycles so far
    int exp_state = 0;  // 0 idle, 1 shared, 2 isolated (expected)
    bit started = 0, seen_iso = 0, did_annul_last = 0;
    int cyc = 0;
    wr(CFG_CT_LAST, int'(last));
    // fetch the first CT instruction (held 3 cycles, as if waiting for the bus)
    @(negedge clk);
    crit_req = '0; crit_req.valid = 1; crit_req.fetch = 1; crit_req.addr = FIRST;
    crit_pc = 32'h0000_0ff8; crit_annul = 0;
    forever begin
      bit done_now;
      @(negedge clk);
      cyc++;
      // drive: fetch stream runs ahead of the pipeline end by a few addresses
      crit_req.addr = (cyc < 3) ? FIRST : FIRST + 32'(4 * ((k + 3 < n_instr) ? k + 3 : n_instr - 1));
      // pipeline end: each cycle either stall (PC held), annulled wrong-path
      // instruction, or the next CT instruction
      done_now = 0;
      crit_annul = 0;
      if (cyc >= 4) begin
        int r = $urandom_range(0, 99);
        if (annul_last_once && !did_annul_last && k == n_instr - 1) begin
          // an annulled instance of the last instruction, then the executed one
          crit_annul = 1; crit_pc = last; did_annul_last = 1; n_annul_last++;
        end else if (r < annul_pct) begin
          crit_annul = 1;
          crit_pc = 32'h0000_8000 + 32'(4 * $urandom_range(0, 15));
        end else if (r < 70 || did_annul_last) begin
          crit_pc = FIRST + 32'(4 * k);
          if (k == n_instr - 1) done_now = 1;
          k++;
        end
      end
      #1;
      // outputs for this cycle
      chk(int'(state) == exp_state, $sformatf("state %0d exp %0d", state, exp_state));
      chk(policy == ((exp_state == 2) ? POLICY_ISOLATED : POLICY_SHARED), "policy");
      if (exp_state == 1 && crit_annul) n_annul_skip++;
      if (exp_state == 2) seen_iso = 1;
      // expected next state
      if (!started) begin
        // the fetch of FIRST was seen in cycle 0: start pulse now (cycle 1)
        if (cyc == 1) begin
          chk(force_crit && ct_active, "start pulse");
          exp_state = 1; started = 1;
        end
      end else begin
        chk(!force_crit, "single force pulse");
        if (exp_state == 1) begin
          if (done_now) exp_state = 0;
          else if (nexec == budget) exp_state = 2;
          if (!crit_annul) nexec++;
        end else if (exp_state == 2) begin
          if (done_now) exp_state = 0;
        end
      end
      if (started && exp_state == 0) break;
      if (cyc > 100000) break;
    end
    @(negedge clk);
    chk(state == ST_IDLE && policy == POLICY_SHARED, "back to shared");
    chk(!ct_active, "ct_active low after last fetch");
    crit_req.valid = 0;
    if (seen_iso) n_iso++; else n_early++;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    crit_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(CFG_CT_FIRST, int'(FIRST));
    // budget 300 - 200 - 20 = 80
    wr(CFG_WCET, 200); wr(CFG_DEADLINE, 300); wr(CFG_DT_COMPL, 20);
    run_ct(200, 80, 10, 0);
    run_ct(200, 80, 25, 1);
    run_ct(20, 80, 10, 0);     // ends while still Shared
    wr(CFG_DEADLINE, 150);    // budget saturates to 0
    run_ct(50, 0, 10, 0);
    wr(CFG_WCET, 1000); wr(CFG_DEADLINE, 1500); wr(CFG_DT_COMPL, 3);  // budget 497
    run_ct(2000, 497, 15, 1);
    chk(n_iso >= 4 && n_early >= 1, "scenario coverage");
    chk(n_annul_skip > 20 && n_annul_last >= 2, "annul coverage");
    $display("iso=%0d early=%0d annul_skip=%0d annul_last=%0d", n_iso, n_early, n_annul_skip, n_annul_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
