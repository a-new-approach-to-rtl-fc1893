// tb_instr_completion: self-checking test of the instruction completion
// indicator. Random PC/annul streams with stalls (PC held) are compared with a
// reference: exec = not annulled; last_done = a not annulled instruction at the
// last CT address that is not a stall (same PC as an executed instruction in
// the previous cycle).
module tb_instr_completion;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] pc = 0, ct_last = 32'h0000_0200;
  logic annul = 0;
  logic exec, last_done;
  int checks = 0, failures = 0, n_done = 0, n_stall_last = 0;
  logic [31:0] prev_pc = 0;
  logic prev_annul = 0;
  int n_after_annul = 0;
  bit first = 1;

  instr_completion dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) != 0) pc = ($urandom_range(0, 3) == 0) ? ct_last : 32'(($urandom_range(0, 255)) * 4);
      annul = ($urandom_range(0, 4) == 0);
      #1;
      checks++;
      if (exec !== !annul) begin failures++; $display("FAIL exec"); end
      checks++;
      if (last_done !== (!annul && pc == ct_last && (first || pc != prev_pc || prev_annul))) begin
        failures++; $display("FAIL last_done at %0d", it);
      end
      if (last_done) n_done++;
      if (!annul && pc == ct_last && !first && pc == prev_pc && !prev_annul) n_stall_last++;
      if (!annul && pc == ct_last && !first && pc == prev_pc && prev_annul) n_after_annul++;
      @(posedge clk);
      prev_pc = pc; prev_annul = annul; first = 0;
    end
    checks++;
    if (n_done < 10 || n_stall_last < 10 || n_after_annul < 5) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
