// tb_out_order_dss: output buffer at N = 4096 (cfg_n = 1, M = 4), memory
// sized for NMAX = 1. 1024 row frames of 4 words (k1 tags in a shuffled
// order, in_last on the fourth) with per-row exponents are written, first
// with dss = 0, then, after a reset, with dss = 1. Expected, computed here:
// natural order k = 0..N-1, X(k) = value >> (E - exponent of row k mod 1024);
// with separation, k = 0..N/2 and X1, X2 from X(k) and X(N-k) by the
// half-sum / half-difference formulas. Also checks out_last and that the
// output runs at one word per cycle in plain mode.
module tb_out_order_dss;
  localparam int SW = 19, DW = 16, N = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dss = 0, in_valid = 0, in_last = 0, can_claim, claim = 0;
  logic [1:0] in_k1 = 0;
  logic signed [SW-1:0] in_re = 0, in_im = 0;
  logic [5:0] in_exp = 0, out_exp;
  logic out_valid, out_last;
  logic [11:0] out_k;
  logic signed [DW-1:0] out_re, out_im, out2_re, out2_im;

  out_order_dss #(.SW(SW), .DW(DW), .NMAX(1)) dut (.clk, .rst_n, .cfg_n(3'd1), .dss, .in_valid,
    .in_k1, .in_re, .in_im, .in_exp, .in_last, .can_claim, .claim, .out_valid, .out_k, .out_re,
    .out_im, .out2_re, .out2_im, .out_exp, .out_last);

  int checks = 0, failures = 0, nout = 0, lasts = 0;
  longint t0, t1, cyc = 0;
  int vr [N], vi [N], ex [1024], eall, ar [N], ai [N];
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int k, nk;
    k = nout;
    if (nout == 0) t0 = cyc;
    t1 = cyc;
    nk = (N - k) % N;
    chk(out_k == 12'(k) && out_exp == 6'(eall), $sformatf("index %0d got %0d / exp %0d want %0d", k, out_k, out_exp, eall));
    if (!dss)
      chk(out_re == DW'(ar[k]) && out_im == DW'(ai[k]), $sformatf("X(%0d) got (%0d,%0d) want (%0d,%0d)", k, out_re, out_im, ar[k], ai[k]));
    else begin
      chk(out_re == DW'((ar[k] + ar[nk]) >>> 1) && out_im == DW'((ai[k] - ai[nk]) >>> 1),
          $sformatf("X1(%0d) got (%0d,%0d)", k, out_re, out_im));
      chk(out2_re == DW'((ai[k] + ai[nk]) >>> 1) && out2_im == DW'((ar[nk] - ar[k]) >>> 1),
          $sformatf("X2(%0d) got (%0d,%0d)", k, out2_re, out2_im));
    end
    if (out_last) lasts++;
    nout++;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      int mx;
      rst_n = 0; dss = pass[0];
      repeat (2) @(negedge clk);
      rst_n = 1;
      nout = 0; lasts = 0; eall = 0;
      for (int k0 = 0; k0 < 1024; k0++) begin
        ex[k0] = $urandom_range(6, 0);
        mx = 1;
        for (int k1 = 0; k1 < 4; k1++) begin
          vr[k1 * 1024 + k0] = $signed($urandom_range(200000, 0)) - 100000;
          vi[k1 * 1024 + k0] = $signed($urandom_range(200000, 0)) - 100000;
        end
      end
      // expected exponent: every row here needs a shift of 2 (18-bit values)
      for (int k0 = 0; k0 < 1024; k0++) if (ex[k0] + 2 > eall) eall = ex[k0] + 2;
      for (int k = 0; k < N; k++) begin
        ar[k] = vr[k] >>> (eall - ex[k % 1024]);
        ai[k] = vi[k] >>> (eall - ex[k % 1024]);
      end
      for (int k0 = 0; k0 < 1024; k0++) begin
        @(negedge clk);
        while (!can_claim) @(negedge clk);
        claim = 1; @(negedge clk); claim = 0;
        for (int j = 0; j < 4; j++) begin
          int k1;
          k1 = (j * 3 + k0) % 4;
          in_valid = 1; in_k1 = 2'(k1); in_last = (j == 3);
          in_re = SW'(vr[k1 * 1024 + k0]); in_im = SW'(vi[k1 * 1024 + k0]); in_exp = 6'(ex[k0]);
          // force the 18-bit magnitude in every row so the shift is 2
          if (j == 0) in_re = -SW'(131072);
          if (j == 0) vr[k1 * 1024 + k0] = -131072;
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
      end
      for (int k = 0; k < N; k++) ar[k] = vr[k] >>> (eall - ex[k % 1024]);
      while (lasts == 0) @(posedge clk);
      repeat (3) @(posedge clk);
      chk(nout == (dss ? N / 2 + 1 : N), $sformatf("dss=%0d: %0d words", dss, nout));
      if (!dss) chk(t1 - t0 == N - 1, $sformatf("plain output took %0d cycles", t1 - t0 + 1));
    end
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
