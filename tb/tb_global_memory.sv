// tb_global_memory: self-checking test of the global memory at its default size
// and wait count. Random reads and writes over the whole address range are
// checked against a model array, and each transfer must ack in its (WAIT + 2)-th
// cycle, counting the first cycle of valid as the first; a master that issues
// its next request right after the ack cycle thus gets one access every
// WAIT + 2 cycles.
module tb_global_memory;
  import dec_pkg::*;
  localparam int WORDS = 16384, WAIT = 1;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];
  bit written [WORDS];

  global_memory dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic xfer(input bit we, input int idx, input logic [31:0] d, output logic [31:0] q);
    int cyc = 0;
    req.valid = 1; req.we = we; req.fetch = !we; req.addr = 32'(idx) << 2; req.wdata = d;
    req.addr[31:16] = 16'($urandom);  // bits above the memory size are ignored
    forever begin
      @(negedge clk);
      cyc++;
      if (rsp.ack) break;
      if (cyc > 20) break;
    end
    chk(cyc == WAIT + 2, $sformatf("latency %0d", cyc));
    q = rsp.rdata;
    @(posedge clk); #1;
    req.valid = 0;
  endtask

  initial begin
    logic [31:0] q;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!rsp.ack, "no ack when idle");
    @(posedge clk); #1;
    for (int it = 0; it < 3000; it++) begin
      int idx;
      logic [31:0] d;
      idx = (it < 1000) ? $urandom_range(0, 63) : $urandom_range(0, WORDS - 1);
      if (!written[idx] || $urandom_range(0, 1) == 0) begin
        d = $urandom;
        xfer(1, idx, d, q);
        if (written[idx]) chk(q == model[idx], "write returns old word");
        model[idx] = d; written[idx] = 1;
      end else begin
        xfer(0, idx, 0, q);
        chk(q == model[idx], $sformatf("read %0d", idx));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
