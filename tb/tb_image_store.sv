// tb_image_store: self-checking test of the secret-image store at its full
// 16384-pixel size: every address is written with a value derived from a
// random table, then read back through the asynchronous port, first in
// order and then at random addresses, and a rewrite is checked.
module tb_image_store;
  localparam int DEPTH = 16384;
  logic clk = 0, we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  image_store dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_addr(int a);
    raddr = 14'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) model[a] = 8'($urandom);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 14'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) check_addr(a);
    repeat (2000) check_addr($urandom_range(0, DEPTH - 1));
    // rewrite one location; the read port shows it after the clock edge
    @(negedge clk); we = 1; waddr = 14'd77; wdata = ~model[77];
    @(negedge clk); we = 0; model[77] = ~model[77];
    check_addr(77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
