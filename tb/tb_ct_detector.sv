// tb_ct_detector: self-checking test of the CT start/stop detector.
// Random fetch streams (addresses drawn mostly from the first/last CT addresses
// and a few others, with held requests) are compared cycle by cycle with a
// reference model: start on a first-address fetch while idle, stop on a
// last-address fetch while active, both one cycle after the fetch.
module tb_ct_detector;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fetch_valid = 0;
  logic [31:0] fetch_addr = 0;
  logic [31:0] ct_first = 32'h0000_4000, ct_last = 32'h0000_4ffc;
  logic ct_start, ct_stop, ct_active;
  int checks = 0, failures = 0, n_start = 0, n_stop = 0;
  logic m_active = 0, m_start = 0, m_stop = 0;

  ct_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      // check outputs against model (updated on the previous edge)
      checks++;
      if (ct_active !== m_active || ct_start !== m_start || ct_stop !== m_stop) begin
        failures++;
        $display("FAIL cycle %0d: dut %b%b%b model %b%b%b", it, ct_active, ct_start, ct_stop,
                 m_active, m_start, m_stop);
      end
      if (ct_start) n_start++;
      if (ct_stop) n_stop++;
      // new stimulus
      if ($urandom_range(0, 3) != 0) begin
        fetch_valid = $urandom_range(0, 1);
        case ($urandom_range(0, 5))
          0: fetch_addr = ct_first;
          1: fetch_addr = ct_last;
          default: fetch_addr = 32'h4000 + 32'($urandom_range(1, 'h3fe)) * 4;
        endcase
      end
      // model for the coming edge
      m_start = 0; m_stop = 0;
      if (!m_active && fetch_valid && fetch_addr == ct_first) begin m_active = 1; m_start = 1; end
      else if (m_active && fetch_valid && fetch_addr == ct_last) begin m_active = 0; m_stop = 1; end
    end
    checks++;
    if (n_start < 10 || n_stop < 10) begin failures++; $display("FAIL too few events"); end
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
