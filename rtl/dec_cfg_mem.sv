// dec_cfg_mem: the DEC's "Tiny Memory", the configuration it is given at system
// boot before any critical task (CT) runs.
//
// It holds five words: the address of the first and of the last CT instruction,
// the CT worst-case execution time (WCET) in Isolated mode, the CT deadline
// measured from CT start, and Delta T completion, the cycles the cores need to
// finish bus transfers already under way when the bus is handed over. All times
// are in clock cycles. From them it derives the shared-mode budget
//     delta_t = deadline - wcet - dt_completion   (0 if negative),
// the value the DEC counter is loaded with when the CT starts.
//
// Interface: a simple write port (cfg_we, cfg_addr, cfg_wdata) and a
// combinational read port (cfg_rdata) on the same word address; the two CT
// addresses and delta_t are also outputs. Writes take effect at the next clock edge.
// Reset clears every word.
//
// The stored items and the budget formula follow the document; the register map,
// the port, the reset values and saturation at zero are this design's choices.
module dec_cfg_mem
  import dec_pkg::*;
#(
  parameter int unsigned CNT_W = 32   // width of the time values
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [2:0]        cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  output logic [DATA_W-1:0] cfg_rdata,
  output logic [ADDR_W-1:0] ct_first,
  output logic [ADDR_W-1:0] ct_last,
  output logic [CNT_W-1:0]  delta_t
);

  logic [DATA_W-1:0] regs [CFG_WORDS];
  logic [CNT_W-1:0]  wcet, deadline, dt_compl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CFG_WORDS); i++) regs[i] <= '0;
    end else if (cfg_we && (32'(cfg_addr) < CFG_WORDS)) begin
      regs[cfg_addr] <= cfg_wdata;
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (32'(cfg_addr) < CFG_WORDS) cfg_rdata = regs[cfg_addr];
  end

  assign ct_first = regs[CFG_CT_FIRST];
  assign ct_last  = regs[CFG_CT_LAST];
  assign wcet     = CNT_W'(regs[CFG_WCET]);
  assign deadline = CNT_W'(regs[CFG_DEADLINE]);
  assign dt_compl = CNT_W'(regs[CFG_DT_COMPL]);

  // Shared-mode budget, saturated at zero: a CT whose deadline leaves no slack
  // goes to Isolated mode right after it starts.
  logic [CNT_W:0] need;
  always_comb begin
    need = {1'b0, wcet} + {1'b0, dt_compl};
    if ({1'b0, deadline} > need) delta_t = CNT_W'({1'b0, deadline} - need);
    else                         delta_t = '0;
  end

endmodule
