// system_bus: the shared system bus (AHB in the two-core system), reduced to its
// multiplexers.
//
// The bus access controller names the granted master (gnt_valid, gnt_idx). The
// bus passes that master's request to the single slave, with valid forced low
// when no master is granted, and returns the slave's ack only to the granted
// master. Read data goes to all masters; only the one with ack takes it.
// Purely combinational.
//
// The document only names the bus; this single-slave, single-outstanding form is
// this design's choice.
module system_bus
  import dec_pkg::*;
#(
  parameter int unsigned NCORES = 2,
  localparam int unsigned IDX_W = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  bus_req_t          m_req [NCORES],
  output bus_rsp_t          m_rsp [NCORES],
  input  logic              gnt_valid,
  input  logic [IDX_W-1:0]  gnt_idx,
  output bus_req_t          s_req,
  input  bus_rsp_t          s_rsp
);

  always_comb begin
    s_req       = m_req[gnt_idx];
    s_req.valid = gnt_valid && m_req[gnt_idx].valid;
    for (int i = 0; i < int'(NCORES); i++) begin
      m_rsp[i].rdata = s_rsp.rdata;
      m_rsp[i].ack   = gnt_valid && s_rsp.ack && (gnt_idx == IDX_W'(i));
    end
  end

endmodule
