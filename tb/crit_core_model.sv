// crit_core_model: behavioural model of the critical core, for testbenches only
// (not synthesizable). It stands in for a processor core whose bus-master port,
// end-of-pipeline Program Counter and Annul signal the system observes.
//
// When start rises it fetches PRE_INSTR instructions of ordinary code from
// PRE_BASE, then the critical task: n_instr instructions from CT_FIRST upward,
// the last at CT_FIRST + 4*(n_instr-1). Each instruction is one bus fetch; with
// probability annul_pct % a wrong-path instruction (fetched from WRONG_BASE) is
// inserted before it and shows up at the pipeline end with annul = 1. An
// instruction reaches the pipeline end (pc, annul) in the cycle after its fetch
// is acked; between fetches pc holds (stall) and annul is 0. After the last CT
// instruction, done is raised and the model idles until start falls.
module crit_core_model
  import dec_pkg::*;
#(
  parameter logic [31:0] PRE_BASE   = 32'h0000_0100,
  parameter logic [31:0] CT_FIRST   = 32'h0000_1000,
  parameter logic [31:0] WRONG_BASE = 32'h0000_F000,
  parameter int          PRE_INSTR  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  int          n_instr,
  input  int          annul_pct,
  output bus_req_t    req,
  input  bus_rsp_t    rsp,
  output logic [31:0] pc,
  output logic        annul,
  output logic        done,
  output int          n_annulled
);

  logic cur_wrong;

  initial begin
    req = '0; cur_wrong = 0; pc = PRE_BASE - 4; annul = 0; done = 0; n_annulled = 0;
  end

  // pipeline end: the instruction whose fetch is acked now retires next cycle
  always @(posedge clk) begin
    if (rsp.ack && req.valid) begin
      pc    <= req.addr;
      annul <= cur_wrong;
      if (cur_wrong) n_annulled <= n_annulled + 1;
    end else begin
      annul <= 1'b0;
    end
  end

  task automatic fetch(input logic [31:0] a, input logic wrong);
    req.valid <= 1'b1; req.we <= 1'b0; req.fetch <= 1'b1; req.addr <= a; req.wdata <= '0;
    cur_wrong <= wrong;
    do @(posedge clk); while (!rsp.ack);
  endtask

  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && start && !done) begin
        for (int i = 0; i < PRE_INSTR; i++) fetch(PRE_BASE + 32'(4 * i), 1'b0);
        for (int k = 0; k < n_instr; k++) begin
          if ($urandom_range(0, 99) < 32'(annul_pct))
            fetch(WRONG_BASE + 32'(4 * $urandom_range(0, 63)), 1'b1);
          fetch(CT_FIRST + 32'(4 * k), 1'b0);
        end
        req.valid <= 1'b0;
        @(posedge clk);   // last instruction at the pipeline end
        done <= 1'b1;
      end else if (!start) begin
        done <= 1'b0;
      end
    end
  end

endmodule
