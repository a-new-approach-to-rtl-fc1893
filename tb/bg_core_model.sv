// bg_core_model: behavioural model of a less-critical core, for testbenches only
// (not synthesizable). While enable is high it keeps the bus busy with
// back-to-back transfers: it writes a pattern over its own WORDS-word region at
// BASE and reads it back, alternating with instruction fetches from the same
// region, and counts read-back mismatches in errors. Its request is held until
// acked, so while the bus controller keeps it out its request stays high.
module bg_core_model
  import dec_pkg::*;
#(
  parameter logic [31:0] BASE  = 32'h0000_4000,
  parameter int          WORDS = 32,
  parameter logic [31:0] SEED  = 32'h1234_5678
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  output bus_req_t req,
  input  bus_rsp_t rsp,
  output int       n_access,
  output int       errors
);

  initial begin
    req = '0; n_access = 0; errors = 0;
  end

  task automatic access(input logic we, input logic f, input logic [31:0] a,
                        input logic [31:0] d, output logic [31:0] q);
    req.valid <= 1'b1; req.we <= we; req.fetch <= f; req.addr <= a; req.wdata <= d;
    do @(posedge clk); while (!rsp.ack);
    q = rsp.rdata;
    n_access <= n_access + 1;
  endtask

  initial begin
    logic [31:0] q;
    int pass = 0;
    forever begin
      @(posedge clk);
      if (rst_n && enable) begin
        for (int i = 0; i < WORDS; i++)
          access(1'b1, 1'b0, BASE + 32'(4 * i), SEED ^ 32'(pass * 977 + i), q);
        for (int i = 0; i < WORDS; i++) begin
          access(1'b0, 1'b1, BASE + 32'(4 * ((i * 7) % WORDS)), '0, q);
          access(1'b0, 1'b0, BASE + 32'(4 * i), '0, q);
          if (q != (SEED ^ 32'(pass * 977 + i))) errors <= errors + 1;
        end
        pass++;
        req.valid <= 1'b0;
      end else begin
        req.valid <= 1'b0;
      end
    end
  end

endmodule
