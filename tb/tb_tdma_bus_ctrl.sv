// tb_tdma_bus_ctrl: self-checking test of the TDMA bus access controller with
// four cores, critical core 1 and short 10-cycle slices. A slave model here acks
// each transfer after a random latency; masters hold requests until acked. The
// slice rotation, the grants in Shared and Isolated mode, the immediate slice on
// force_crit and non-pre-empted transfers are checked against a reference kept
// here, every cycle.
module tb_tdma_bus_ctrl;
  import dec_pkg::*;
  localparam int N = 4, TTS = 10, CRIT = 1;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid = '0;
  logic ack = 0, force_crit = 0;
  policy_e policy = POLICY_SHARED;
  logic gnt_valid;
  logic [1:0] gnt_idx, slot_owner;
  logic [3:0] slot_cnt;
  int checks = 0, failures = 0;
  int owner = 0, cnt = 0, cur = 0, lat = 0, drop = -1;
  bit inflight = 0;
  int n_overrun = 0, n_iso_gnt = 0, n_force = 0, n_gnt [N];

  tdma_bus_ctrl #(.NCORES(N), .TTS(TTS), .CRIT(CRIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    int oe;
    bit start;
    for (int i = 0; i < N; i++) n_gnt[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      // stimulus for this cycle
      if (drop >= 0) begin req_valid[drop] = 1'b0; drop = -1; end
      for (int i = 0; i < N; i++)
        if (!req_valid[i] && $urandom_range(0, 2) == 0) req_valid[i] = 1'b1;
      ack = inflight && (lat == 0);
      force_crit = ($urandom_range(0, 199) == 0);
      if ($urandom_range(0, 149) == 0)
        policy = (policy == POLICY_SHARED) ? POLICY_ISOLATED : POLICY_SHARED;
      #1;
      // expected outputs
      oe = (policy == POLICY_ISOLATED) ? CRIT : owner;
      start = !inflight && req_valid[oe];
      chk(int'(slot_owner) == owner && int'(slot_cnt) == cnt, $sformatf("slot dut %0d/%0d model %0d/%0d", slot_owner, slot_cnt, owner, cnt));
      chk(gnt_valid == (inflight || start), "gnt_valid");
      if (gnt_valid) chk(int'(gnt_idx) == (inflight ? cur : oe), "gnt_idx");
      if (inflight && cur != oe) n_overrun++;
      if (start && policy == POLICY_ISOLATED) n_iso_gnt++;
      if (start) n_gnt[oe]++;
      if (force_crit) n_force++;
      // reference state for the coming edge
      if (inflight) begin
        if (ack) begin inflight = 0; drop = cur; end
        else lat--;
      end else if (start) begin
        inflight = 1; cur = oe; lat = $urandom_range(1, 4);
      end
      if (force_crit) begin owner = CRIT; cnt = 0; end
      else if (cnt == TTS - 1) begin cnt = 0; owner = (owner + 1) % N; end
      else cnt++;
    end
    chk(n_overrun > 20, "transfers running past a slice end");
    chk(n_iso_gnt > 20, "grants in isolated mode");
    chk(n_force > 20, "forced critical slices");
    for (int i = 0; i < N; i++) chk(n_gnt[i] > 100, "every core granted");
    $display("overrun=%0d iso_gnt=%0d force=%0d", n_overrun, n_iso_gnt, n_force);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
