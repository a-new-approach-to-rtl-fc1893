// tb_dec_ctrl_fsm: self-checking test of the DEC control FSM. Random ct_start,
// last_done, exec and counter-zero inputs are applied; the state, the policy code
// (01 Shared, 00 Isolated) and the load/decrement/force outputs are compared with
// a reference written here. Every transition must occur.
module tb_dec_ctrl_fsm;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ct_start = 0, last_done = 0, exec = 0, cnt_zero = 0;
  logic cnt_load, cnt_dec, force_crit;
  policy_e policy;
  dec_state_e state;
  int checks = 0, failures = 0;
  int m = 0;  // 0 idle, 1 shared, 2 isolated
  int n_tr [4];  // idle->shared, shared->iso, shared->idle, iso->idle

  dec_ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (model state %0d)", what, m); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) n_tr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 10000; it++) begin
      @(negedge clk);
      ct_start  = ($urandom_range(0, 7) == 0);
      last_done = ($urandom_range(0, 9) == 0);
      exec      = ($urandom_range(0, 3) != 0);
      cnt_zero  = ($urandom_range(0, 5) == 0);
      #1;
      chk(int'(state) == m, "state");
      chk(policy == ((m == 2) ? 2'b00 : 2'b01), "policy code");
      chk(cnt_load == (m == 0 && ct_start), "cnt_load");
      chk(force_crit == (m == 0 && ct_start), "force_crit");
      chk(cnt_dec == (m == 1 && exec), "cnt_dec");
      case (m)
        0: if (ct_start) begin m = 1; n_tr[0]++; end
        1: if (last_done) begin m = 0; n_tr[2]++; end
           else if (cnt_zero) begin m = 2; n_tr[1]++; end
        default: if (last_done) begin m = 0; n_tr[3]++; end
      endcase
    end
    for (int i = 0; i < 4; i++) chk(n_tr[i] > 5, $sformatf("transition %0d seen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
