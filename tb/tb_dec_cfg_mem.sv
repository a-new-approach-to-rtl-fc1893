// tb_dec_cfg_mem: self-checking test of the DEC configuration registers.
// Writes random words to every address (including unmapped ones), reads them
// back, and checks the decoded outputs and the saturated shared-mode budget
// delta_t = max(0, deadline - wcet - dt_compl) against a model kept here.
module tb_dec_cfg_mem;
  import dec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic [31:0] ct_first, ct_last, delta_t;
  int checks = 0, failures = 0;
  logic [31:0] model [8];

  dec_cfg_mem dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
    if (a < 5) model[a] = d;
  endtask

  function automatic logic [31:0] budget();
    longint need = longint'(model[2]) + longint'(model[4]);
    return (longint'(model[3]) > need) ? 32'(longint'(model[3]) - need) : 32'd0;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); cfg_addr = 3'(a);
      #1 chk(cfg_rdata == 0, "reset value");
    end
    for (int it = 0; it < 300; it++) begin
      logic [2:0] a;
      logic [31:0] d;
      a = 3'($urandom_range(0, 7));
      // time words mostly in a range where budgets are both positive and
      // saturated, with some full-width words
      case (a)
        3'd2:    d = 32'($urandom_range(0, 30000));   // WCET
        3'd3:    d = 32'($urandom_range(0, 60000));   // deadline
        3'd4:    d = 32'($urandom_range(0, 200));     // completion margin
        default: d = $urandom;
      endcase
      if (it % 10 == 0) d = $urandom;
      wr(a, d);
      for (int r = 0; r < 8; r++) begin
        cfg_addr = 3'(r); #1;
        chk(cfg_rdata == ((r < 5) ? model[r] : 32'd0), $sformatf("readback %0d", r));
      end
      chk(ct_first == model[0] && ct_last == model[1], "decoded outputs");
      chk(delta_t == budget(), $sformatf("delta_t %0d vs %0d", delta_t, budget()));
    end
    // the document's example: D=4,000,000 WCET=3,600,000 dTc=10,000 -> 390,000
    wr(2, 3600000); wr(3, 4000000); wr(4, 10000);
    chk(delta_t == 390000, "example budget");
    // Hamming coder task (WCET 14,769, deadline 20,000) with a 12-cycle margin
    wr(2, 14769); wr(3, 20000); wr(4, 12);
    chk(delta_t == 5219, "hamming budget");
    wr(3, 14000);
    chk(delta_t == 0, "saturation");
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
