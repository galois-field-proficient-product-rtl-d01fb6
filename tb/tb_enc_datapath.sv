// tb_enc_datapath: self-checking test of the read/mix and multiply stages.
// Random pixels and keys are driven in both modes and both XOR/XNOR
// selections; the encrypted pixel must equal the reference product one
// clock after the multiply cycle, and must hold while mult_en is low.
module tb_enc_datapath;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic variable_key = 0, xnor_sel = 0, rd_en = 0, mult_en = 0;
  logic [7:0] ca_key = 0, pixel = 0, cipher;
  int checks = 0, failures = 0;

  enc_datapath dut (.clk, .rst_n, .variable_key, .ca_key, .pixel, .xnor_sel,
                    .rd_en, .mult_en, .cipher);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] k, p, kk, exp;
    #12 rst_n = 1;
    checks++;
    if (cipher !== 8'h00) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 4000; n++) begin
      k = 8'($urandom); p = 8'($urandom);
      @(negedge clk);
      variable_key = n[1]; xnor_sel = n[0];
      ca_key = k; pixel = p; rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      // the inputs may change after the read cycle without effect
      ca_key = 8'($urandom); pixel = 8'($urandom); xnor_sel = ~xnor_sel;
      mult_en = 1;
      @(negedge clk);
      mult_en = 0;
      kk  = n[1] ? mix_ref(k, p, n[0]) : k;
      exp = gf_mul_ref(p, kk);
      checks++;
      if (cipher !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d k=%h p=%h got %h exp %h", n, k, p, cipher, exp);
      end
      @(negedge clk);
      checks++;
      if (cipher !== exp) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
