// tb_system_bus: self-checking test of the system bus multiplexers with three
// masters: the granted master's request reaches the slave (valid only when
// granted), the slave's ack returns only to the granted master, read data to all.
module tb_system_bus;
  import dec_pkg::*;
  localparam int N = 3;
  bus_req_t m_req [N];
  bus_rsp_t m_rsp [N];
  logic gnt_valid;
  logic [1:0] gnt_idx;
  bus_req_t s_req;
  bus_rsp_t s_rsp;
  int checks = 0, failures = 0;

  system_bus #(.NCORES(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      for (int i = 0; i < N; i++) begin
        m_req[i].valid = 1'($urandom);
        m_req[i].we    = 1'($urandom);
        m_req[i].fetch = 1'($urandom);
        m_req[i].addr  = $urandom;
        m_req[i].wdata = $urandom;
      end
      gnt_valid   = 1'($urandom);
      gnt_idx     = 2'($urandom_range(0, N - 1));
      s_rsp.ack   = 1'($urandom);
      s_rsp.rdata = $urandom;
      #1;
      chk(s_req.valid == (gnt_valid && m_req[gnt_idx].valid), "s_req.valid");
      chk(s_req.addr == m_req[gnt_idx].addr && s_req.wdata == m_req[gnt_idx].wdata &&
          s_req.we == m_req[gnt_idx].we && s_req.fetch == m_req[gnt_idx].fetch, "s_req fields");
      for (int i = 0; i < N; i++) begin
        chk(m_rsp[i].ack == (gnt_valid && s_rsp.ack && gnt_idx == 2'(i)), "m_rsp.ack");
        chk(m_rsp[i].rdata == s_rsp.rdata, "m_rsp.rdata");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
