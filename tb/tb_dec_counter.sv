// tb_dec_counter: self-checking test of the DEC down-counter: random loads and
// decrement enables against a reference count that stops at zero, with load
// winning over decrement.
module tb_dec_counter;
  logic clk = 0, rst_n = 0;
  logic load = 0, dec_en = 0;
  logic [31:0] load_val = 0, count;
  logic zero;
  int checks = 0, failures = 0, n_zero_hold = 0;
  longint model = 0;

  dec_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      checks++;
      if (count !== 32'(model) || zero !== (model == 0)) begin
        failures++; $display("FAIL %0d: count %0d model %0d", it, count, model);
      end
      load = ($urandom_range(0, 99) == 0);
      load_val = ($urandom_range(0, 9) == 0) ? $urandom : 32'($urandom_range(0, 60));
      dec_en = ($urandom_range(0, 3) != 0);
      if (dec_en && !load && model == 0) n_zero_hold++;
      if (load) model = load_val;
      else if (dec_en && model != 0) model--;
    end
    checks++;
    if (n_zero_hold < 10) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
