// tb_gf_mult: self-checking test of the combinational GF(2^8) multiplier.
// It first repeats the four products of the published multiplier-array
// simulation (23h, 5Fh, B7h, FFh times AAh = 79h, 31h, EFh, EBh) and the
// logarithm example (log 23h = B5h, log AAh = 1Fh, exp D4h = 79h), then
// compares all 65536 operand pairs with a log/antilog table model.
module tb_gf_mult;
  import gf_ref_pkg::*;

  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mult dut (.a, .b, .p);

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] img [4] = '{8'h23, 8'h5F, 8'hB7, 8'hFF};
    logic [7:0] enc [4] = '{8'h79, 8'h31, 8'hEF, 8'hEB};
    build_tables();
    check(log_t[8'h23], 8'hB5, "log 23h");
    check(log_t[8'hAA], 8'h1F, "log AAh");
    check(exp_t[8'hD4], 8'h79, "exp D4h");
    b = 8'hAA;
    foreach (img[i]) begin
      a = img[i];
      #1;
      check(p, enc[i], $sformatf("%h * AA", img[i]));
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        check(p, gf_mul_ref(a, b), $sformatf("%h * %h", a, b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
