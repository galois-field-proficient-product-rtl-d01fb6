// tb_ca_keygen: self-checking test of the hybrid cellular automaton.
// Checks reset value, seed load, hold without step, each step against the
// cell-by-cell rule model, priority of load over step, and that a non-zero
// seed returns to itself after exactly 255 steps with all 255 states seen.
module tb_ca_keygen;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [7:0] seed = 0, key;
  int checks = 0, failures = 0;

  ca_keygen dut (.clk, .rst_n, .load, .seed, .step, .key);

  always #5 clk = ~clk;

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    bit seen [256];
    int period;
    #12 rst_n = 1;
    check(key, 8'h01, "reset value");
    for (int s = 0; s < 8; s++) begin
      seed = 8'($urandom_range(1, 255));
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      model = seed;
      check(key, model, "load");
      @(negedge clk);
      check(key, model, "hold");
      repeat (20) begin
        step = 1;
        @(negedge clk);
        model = ca_step_ref(model);
        check(key, model, "step");
      end
      step = 0;
    end
    // load has priority over step
    seed = 8'h5A;
    @(negedge clk); load = 1; step = 1;
    @(negedge clk); load = 0; step = 0;
    check(key, 8'h5A, "load over step");
    // period of the sequence
    foreach (seen[i]) seen[i] = 0;
    period = 0;
    step = 1;
    do begin
      seen[key] = 1;
      @(negedge clk);
      period++;
    end while (key != 8'h5A && period < 300);
    step = 0;
    checks++;
    if (period != 255) begin failures++; $display("FAIL period %0d", period); end
    checks++;
    if (seen[0]) begin failures++; $display("FAIL zero state reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
