// tb_cipher_ram: self-checking test of the encrypted-image RAM at its full
// 16384 x 8 size: fill it, read every word back with the one-clock read
// latency, and check that a read issued in the write cycle of the same
// address returns the old word.
module tb_cipher_ram;
  localparam int DEPTH = 16384;
  logic clk = 0, we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  cipher_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) model[a] = 8'($urandom);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 14'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 14'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
    end
    // read-during-write of the same address returns the old word
    raddr = 14'd500; we = 1; waddr = 14'd500; wdata = ~model[500];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[500]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (rdata !== ~model[500]) begin failures++; $display("FAIL new word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
