// tb_enc_ctrl: self-checking test of the sequencer with a 10-pixel image.
// For both modes it records the phase strobes of every cycle and checks the
// phase order per pixel, the address and XOR/XNOR selection of each phase,
// the cycle count to done (3 or 4 per pixel), that start is ignored while
// busy and that a new start from DONE runs again.
module tb_enc_ctrl;
  localparam int N  = 10;
  localparam int AW = $clog2(N);
  logic clk = 0, rst_n = 0, start = 0, variable_key = 0;
  logic ca_load, ca_step, rd_en, mult_en, wr_en, xnor_sel, busy, done, mode_variable;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  enc_ctrl #(.NPIX_P(N)) dut (.clk, .rst_n, .start, .variable_key, .ca_load,
    .ca_step, .rd_en, .mult_en, .wr_en, .xnor_sel, .addr, .busy, .done,
    .mode_variable);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit var_mode);
    int cyc;
    int per;
    per = var_mode ? 4 : 3;
    @(negedge clk);
    variable_key = var_mode; start = 1;
    #1;
    check(ca_load, "ca_load with start");
    @(negedge clk);
    start = 0;
    variable_key = ~var_mode;  // must have been latched
    cyc = 0;
    for (int px = 0; px < N; px++) begin
      for (int ph = 0; ph < per; ph++) begin
        int kind;
        kind = var_mode ? ph : ph + 1;  // 0 keygen, 1 read, 2 mult, 3 write
        check(busy && !done, "busy during run");
        check(addr == AW'(px), $sformatf("addr px=%0d ph=%0d", px, ph));
        check(xnor_sel == px[0], "xnor_sel");
        check(mode_variable == var_mode, "mode latched");
        check({ca_step, rd_en, mult_en, wr_en} == (4'b1000 >> kind),
              $sformatf("phase strobes px=%0d ph=%0d", px, ph));
        if (px == 3 && ph == 1) start = 1;  // ignored while busy
        else start = 0;
        check(!ca_load, "no load while busy");
        @(negedge clk);
        cyc++;
      end
    end
    start = 0;
    check(done && !busy, "done after last pixel");
    check(cyc == per * N, $sformatf("cycles %0d", cyc));
    @(negedge clk);
    check(done, "done holds");
  endtask

  initial begin
    #12 rst_n = 1;
    check(!busy && !done, "idle after reset");
    run(1'b0);
    run(1'b1);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
