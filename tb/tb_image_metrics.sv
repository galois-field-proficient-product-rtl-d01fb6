// tb_image_metrics: image-quality evaluation of the encryptor at full size.
//
// Three generated 128 x 128 test images stand in for photographs and a logo:
//   smooth  - a slowly varying sine/cosine pattern with mild texture
//   texture - a busy pattern with strong local contrast
//   logo    - two gray levels, flat background with a square and a bar
// Each is encrypted with the fixed key 53h and with the variable key seeded
// with 9Dh. For every run the testbench reads back the cipher image,
// compares it with the reference model, and reports the mean squared error
// and PSNR between plain and cipher image, the correlation of horizontally,
// vertically and diagonally adjacent pixels, and the number of distinct
// cipher values. It checks the properties expected of the scheme:
//   - every cipher image is far from its plain image (PSNR below 12 dB);
//   - with the variable key all three correlations are within +-0.05 and
//     at least 250 of the 256 gray levels occur;
//   - with the fixed key the logo keeps two levels and a high correlation,
//     the weakness that the variable key removes.
module tb_image_metrics;
  import gf_ref_pkg::*;

  localparam int W = 128, H = 128, N = W * H;

  logic clk = 0, rst_n = 0, start = 0, variable_key = 0;
  logic [7:0] key = 0;
  logic load_we = 0;
  logic [13:0] load_addr = 0, rd_addr = 0;
  logic [7:0] load_data = 0, rd_data;
  logic busy, done;

  int checks = 0, failures = 0;
  logic [7:0] img [N];
  logic [7:0] got [N];

  gf_image_encryptor dut (.clk, .rst_n, .start, .variable_key, .key, .load_we,
    .load_addr, .load_data, .rd_addr, .rd_data, .busy, .done);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_image(int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        real v;
        case (kind)
          0: v = 128.0 + 70.0 * $sin(real'(c) / 11.0) * $cos(real'(r) / 17.0)
                 + real'((r * 7 + c * 13) % 9);
          1: v = 128.0 + 100.0 * $sin(real'(c) / 2.3 + real'(r) / 5.1)
                 + real'((r * 31 + c * 17) % 23);
          default: v = ((r >= 32 && r < 96 && c >= 32 && c < 96) ||
                        (r >= 110 && r < 118)) ? 32.0 : 240.0;
        endcase
        if (v < 0.0) v = 0.0;
        if (v > 255.0) v = 255.0;
        img[r * W + c] = 8'(int'(v));
      end
  endtask

  task automatic run(bit var_mode, logic [7:0] k);
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 14'(a); load_data = img[a];
    end
    @(negedge clk);
    load_we = 0; start = 1; variable_key = var_mode; key = k;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int a = 0; a < N; a++) begin
      rd_addr = 14'(a);
      @(negedge clk);
      got[a] = rd_data;
    end
  endtask

  function automatic logic [7:0] expected(bit var_mode, logic [7:0] k, int a, ref logic [7:0] ca);
    if (!var_mode) return gf_mul_ref(img[a], k);
    ca = ca_step_ref(ca);
    return gf_mul_ref(img[a], mix_ref(ca, img[a], a));
  endfunction

  // correlation of got[] with its neighbour at offset (dr, dc)
  function automatic real corr(int dr, int dc);
    real sx, sy, sxx, syy, sxy, m, x, y;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; m = 0;
    for (int r = 0; r < H - dr; r++)
      for (int c = 0; c < W - dc; c++) begin
        x = real'(got[r * W + c]);
        y = real'(got[(r + dr) * W + c + dc]);
        sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y; m += 1;
      end
    if (m * sxx - sx * sx == 0.0 || m * syy - sy * sy == 0.0) return 1.0;
    return (m * sxy - sx * sy) / ($sqrt(m * sxx - sx * sx) * $sqrt(m * syy - sy * sy));
  endfunction

  task automatic evaluate(int kind, bit var_mode, logic [7:0] k);
    string names [3] = '{"smooth", "texture", "logo"};
    logic [7:0] ca;
    real mse, psnr, ch, cv, cd;
    int bad, levels;
    bit seen [256];
    run(var_mode, k);
    ca = k; bad = 0; mse = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int a = 0; a < N; a++) begin
      logic [7:0] e;
      e = expected(var_mode, k, a, ca);
      if (got[a] !== e) bad++;
      mse += (real'(got[a]) - real'(img[a])) ** 2;
      seen[got[a]] = 1;
    end
    check(bad == 0, $sformatf("%s: %0d cipher pixels differ from the model", names[kind], bad));
    mse = mse / real'(N);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    levels = 0;
    foreach (seen[i]) levels += seen[i];
    ch = corr(0, 1); cv = corr(1, 0); cd = corr(1, 1);
    $display("%-7s %-8s MSE %8.1f  PSNR %6.3f dB  corr H %7.4f V %7.4f D %7.4f  levels %0d",
             names[kind], var_mode ? "variable" : "fixed", mse, psnr, ch, cv, cd, levels);
    check(psnr < 12.0, $sformatf("%s PSNR %f", names[kind], psnr));
    if (var_mode) begin
      check(ch < 0.05 && ch > -0.05, "variable key: horizontal correlation");
      check(cv < 0.05 && cv > -0.05, "variable key: vertical correlation");
      check(cd < 0.05 && cd > -0.05, "variable key: diagonal correlation");
      check(levels >= 250, "variable key: histogram spread");
    end else if (kind == 2) begin
      check(levels == 2, "fixed key: logo keeps two levels");
      check(ch > 0.5 || ch < -0.5, "fixed key: logo stays correlated");
    end
  endtask

  initial begin
    build_tables();
    #35 rst_n = 1;
    for (int kind = 0; kind < 3; kind++) begin
      make_image(kind);
      evaluate(kind, 1'b0, 8'h53);
      evaluate(kind, 1'b1, 8'h9D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
