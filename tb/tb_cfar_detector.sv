// tb_cfar_detector: a stream of 6000 noise-like spectral lines with strong
// lines inserted singly and in clusters. For every result the testbench
// recomputes, from its own copy of the powers, the CMLD threshold
// (T = 32/256 times the sum of the 56 smallest of the 64 reference cells),
// the GO threshold (40/256 times the larger half sum), their maximum and the
// detection decision, and compares them and the line tag exactly. It also
// checks that strong lines with no other strong line within the window are
// detected and that a result appears for
// every line once the 73-cell window has filled.
module tb_cfar_detector;
  localparam int DW = 16, LINES = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_det;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic [19:0] in_tag = 0, out_tag;
  logic [32:0] out_power;
  logic [47:0] out_thr;

  cfar_detector #(.DW(DW)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_tag,
    .out_valid, .out_tag, .out_power, .out_thr, .out_det);

  int n_cmld = 0, n_go = 0;
  int checks = 0, failures = 0, nres = 0, n_strong = 0, n_strong_hit = 0, hits = 0;
  longint p [LINES];
  bit spike [LINES];
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic bit alone(input int c);
    for (int j = 1; j <= 36; j++) if (spike[c - j] || spike[c + j]) return 0;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int c;
    longint refs [64], sl, sr, z, tc, tg, thr, tmp;
    c = int'(out_tag);
    sl = 0; sr = 0;
    for (int j = 0; j < 32; j++) begin
      refs[j] = p[c + 5 + j];  sl += p[c + 5 + j];
      refs[32 + j] = p[c - 5 - j]; sr += p[c - 5 - j];
    end
    // sort descending, drop the 8 largest
    for (int i = 0; i < 64; i++)
      for (int j = i + 1; j < 64; j++)
        if (refs[j] > refs[i]) begin tmp = refs[i]; refs[i] = refs[j]; refs[j] = tmp; end
    z = 0;
    for (int i = 8; i < 64; i++) z += refs[i];
    tc = (z * 32) >>> 8;
    tg = (((sl > sr) ? sl : sr) * 40) >>> 8;
    thr = (tc > tg) ? tc : tg;
    if (tc > tg) n_cmld++; else n_go++;
    chk(c == nres + 36, $sformatf("result %0d for line %0d", nres, c));
    chk(out_power == 33'(p[c]) && out_thr == 48'(thr) && out_det == (p[c] > thr),
        $sformatf("line %0d: power %0d thr %0d det %0d, want %0d %0d %0d", c, out_power, out_thr,
                  out_det, p[c], thr, p[c] > thr));
    if (spike[c] && alone(c)) begin n_strong++; if (out_det) n_strong_hit++; end
    if (out_det) hits++;
    nres++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LINES; i++) begin
      int re, im;
      re = $signed($urandom_range(600, 0)) - 300;
      im = $signed($urandom_range(600, 0)) - 300;
      spike[i] = 0;
      if (i % 97 == 50 || (i % 500 > 200 && i % 500 < 206)) begin
        re = 20000; im = -15000; spike[i] = 1;
      end
      p[i] = longint'(re) * re + longint'(im) * im;
      @(negedge clk);
      in_valid = ($urandom_range(4, 0) != 0);
      while (!in_valid) begin @(negedge clk); in_valid = 1; end
      in_re = DW'(re); in_im = DW'(im); in_tag = 20'(i);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    chk(nres == LINES - 73, $sformatf("%0d results", nres));
    chk(n_strong > 20 && n_strong_hit == n_strong, $sformatf("%0d of %0d strong lines detected", n_strong_hit, n_strong));
    chk(n_cmld > 0 && n_go > 0, "one of the two thresholds never decided");
    $display("CMLD decided %0d, GO decided %0d", n_cmld, n_go);
    $display("detections %0d, lone strong lines %0d", hits, n_strong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
