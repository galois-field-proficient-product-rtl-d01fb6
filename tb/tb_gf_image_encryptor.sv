// tb_gf_image_encryptor: end-to-end test of the image encryptor at its full
// 128 x 128 size, with every parameter at its default.
//
// Four encryptions are run on two generated images:
//   A  smooth gradient image whose first four pixels are 23h 5Fh B7h FFh,
//      fixed key AAh (the first four cipher pixels must be 79h 31h EFh EBh)
//   B  the same image, variable key seeded with 5Ah
//   C  a two-level "logo" image (flat background, a square and a bar),
//      fixed key 35h
//   D  the same logo image, variable key seeded with C3h
// Each run loads the image, pulses start, counts the cycles to done
// (3 per pixel fixed, 4 per pixel variable), reads the whole encrypted image
// back and compares it with a reference model (log/antilog GF tables and a
// cell-by-cell automaton model). For C and D it also measures the number of
// distinct cipher values and the correlation of horizontally adjacent cipher
// pixels: with a fixed key a two-level image stays two-level and fully
// correlated, with the variable key it must spread out and decorrelate.
// A start pulse in the middle of run B must be ignored. Each mechanism
// (fixed mode, variable mode, XOR pixel, XNOR pixel, restart from done,
// ignored start) is counted, and one that never occurs is a failure.
module tb_gf_image_encryptor;
  import gf_ref_pkg::*;

  localparam int W = 128, H = 128, N = W * H;

  logic clk = 0, rst_n = 0, start = 0, variable_key = 0;
  logic [7:0] key = 0;
  logic load_we = 0;
  logic [13:0] load_addr = 0, rd_addr = 0;
  logic [7:0] load_data = 0, rd_data;
  logic busy, done;

  int checks = 0, failures = 0;
  int n_fixed = 0, n_variable = 0, n_xor = 0, n_xnor = 0, n_restart = 0, n_ignored = 0;

  logic [7:0] img [N];
  logic [7:0] got [N];

  gf_image_encryptor dut (.clk, .rst_n, .start, .variable_key, .key, .load_we,
    .load_addr, .load_data, .rd_addr, .rd_data, .busy, .done);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_image();
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 14'(a); load_data = img[a];
    end
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic read_back();
    rd_addr = 0;
    for (int a = 0; a < N; a++) begin
      rd_addr = 14'(a);
      @(negedge clk);
      got[a] = rd_data;
    end
  endtask

  task automatic encrypt(bit var_mode, logic [7:0] k, bit poke_start);
    int cyc;
    if (done) n_restart++;
    @(negedge clk);
    start = 1; variable_key = var_mode; key = k;
    @(negedge clk);
    start = 0; variable_key = ~var_mode; key = ~k;  // sampled at start only
    cyc = 0;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
      check(cyc == (var_mode ? 4 : 3) * N || busy, "busy during run");
      if (poke_start && cyc == 1000) begin
        start = 1;
        n_ignored++;
      end else begin
        start = 0;
      end
    end
    check(cyc == (var_mode ? 4 : 3) * N,
          $sformatf("cycles %0d, expected %0d", cyc, (var_mode ? 4 : 3) * N));
    $display("%s-key run: %0d cycles, %0.3f us at 50 MHz",
             var_mode ? "variable" : "fixed", cyc, cyc * 0.02);
    if (var_mode) n_variable++; else n_fixed++;
  endtask

  task automatic compare(bit var_mode, logic [7:0] k, string tag);
    logic [7:0] ca, kk, exp;
    int bad;
    bad = 0;
    ca = k;
    for (int a = 0; a < N; a++) begin
      if (var_mode) begin
        ca = ca_step_ref(ca);
        kk = mix_ref(ca, img[a], a);
        if (a % 2 == 0) n_xor++; else n_xnor++;
      end else begin
        kk = k;
      end
      exp = gf_mul_ref(img[a], kk);
      checks++;
      if (got[a] !== exp) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL %s pixel %0d: got %h exp %h", tag, a, got[a], exp);
      end
    end
  endtask

  function automatic int distinct_values();
    bit seen [256];
    int n;
    n = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int a = 0; a < N; a++) seen[got[a]] = 1;
    foreach (seen[i]) n += seen[i];
    return n;
  endfunction

  function automatic real h_corr();
    real sx, sy, sxx, syy, sxy, m, x, y;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; m = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W - 1; c++) begin
        x = real'(got[r * W + c]);
        y = real'(got[r * W + c + 1]);
        sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y; m += 1;
      end
    return (m * sxy - sx * sy) / ($sqrt(m * sxx - sx * sx) * $sqrt(m * syy - sy * sy));
  endfunction

  initial begin
    int dv;
    real rc;
    build_tables();
    #35 rst_n = 1;
    check(!busy && !done, "idle after reset");

    // A and B: gradient image with the four published test pixels in front
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r * W + c] = 8'(r + 2 * c);
    img[0] = 8'h23; img[1] = 8'h5F; img[2] = 8'hB7; img[3] = 8'hFF;
    load_image();

    encrypt(1'b0, 8'hAA, 1'b0);
    read_back();
    check(got[0] == 8'h79 && got[1] == 8'h31 && got[2] == 8'hEF && got[3] == 8'hEB,
          $sformatf("first pixels %h %h %h %h", got[0], got[1], got[2], got[3]));
    compare(1'b0, 8'hAA, "A");

    encrypt(1'b1, 8'h5A, 1'b1);
    read_back();
    compare(1'b1, 8'h5A, "B");

    // C and D: two-level logo image
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r * W + c] = ((r >= 32 && r < 96 && c >= 32 && c < 96) ||
                          (r >= 110 && r < 118)) ? 8'h20 : 8'hF0;
    load_image();

    encrypt(1'b0, 8'h35, 1'b0);
    read_back();
    compare(1'b0, 8'h35, "C");
    dv = distinct_values();
    rc = h_corr();
    $display("logo, fixed key:    %0d distinct values, horizontal correlation %0.4f", dv, rc);
    check(dv == 2, "fixed key keeps two levels");
    check(rc > 0.9 || rc < -0.9, "fixed key keeps correlation");

    encrypt(1'b1, 8'hC3, 1'b0);
    read_back();
    compare(1'b1, 8'hC3, "D");
    dv = distinct_values();
    rc = h_corr();
    $display("logo, variable key: %0d distinct values, horizontal correlation %0.4f", dv, rc);
    check(dv >= 64, "variable key spreads the histogram");
    check(rc < 0.1 && rc > -0.1, "variable key decorrelates");

    $display("mechanisms: fixed=%0d variable=%0d xor=%0d xnor=%0d restart=%0d ignored_start=%0d",
             n_fixed, n_variable, n_xor, n_xnor, n_restart, n_ignored);
    check(n_fixed > 0, "fixed-key mode exercised");
    check(n_variable > 0, "variable-key mode exercised");
    check(n_xor > 0, "XOR pixels exercised");
    check(n_xnor > 0, "XNOR pixels exercised");
    check(n_restart > 0, "restart from done exercised");
    check(n_ignored > 0, "start while busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
