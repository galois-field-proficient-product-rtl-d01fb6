// tb_key_mix: exhaustive self-checking test of the XOR/XNOR key mixer
// against the reference model, for both selections.
module tb_key_mix;
  logic [7:0] key, pixel, mixed;
  logic xnor_sel;
  int checks = 0, failures = 0;

  key_mix dut (.key, .pixel, .xnor_sel, .mixed);

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 256; k++)
        for (int p = 0; p < 256; p++) begin
          key = 8'(k); pixel = 8'(p); xnor_sel = s[0];
          #1;
          exp = gf_ref_pkg::mix_ref(key, pixel, s);
          checks++;
          if (mixed !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL k=%h p=%h sel=%0d got %h", key, pixel, s, mixed);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
