// tb_large_fft_top: end-to-end test of the large-point FFT.
// Runs three configurations, each with three blocks of random data sent back to
// back at one sample per cycle: N = 1024 (cfg_n = 0), N = 4096 (cfg_n = 1) and
// N = 4096 with double-sequence separation (two real signals). Every output
// word, scaled by 2^out_exp, is compared with a direct DFT computed here in
// floating point (for the separated case, with the DFTs of the two real
// signals). It also counts the design's mechanisms and fails if one never
// happened: input back-pressure, both banks of the ping-pong buffers in use,
// a block-floating-point shift, sub-frames with different exponents aligned
// in the transposition buffer, a level left idle by the configuration, and
// each output mode, and a CFAR detection.
module tb_large_fft_top;
  localparam int DW = 16;
  localparam int NM = 1 << 14;           // largest N simulated here
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_n = 0;
  logic cfg_dss = 0;
  logic in_valid = 0, in_ready;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_last;
  logic [19:0] out_k;
  logic signed [DW-1:0] out_re, out_im, out2_re, out2_im;
  logic [5:0] out_exp;
  logic det_valid, det_hit;
  logic [19:0] det_k;
  logic [32:0] det_power;
  logic [47:0] det_thr;

  large_fft_top dut (.clk, .rst_n, .cfg_n, .cfg_dss, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid, .out_k, .out_re, .out_im, .out2_re, .out2_im, .out_exp, .out_last,
    .det_valid, .det_k, .det_power, .det_thr, .det_hit);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // stimulus and results for two blocks
  int   xr [3][NM], xi [3][NM];
  real  yr [3][NM], yi [3][NM], zr [3][NM], zi [3][NM];
  int   seen [3][NM];
  int   oblk, owords;
  real  ct [NM], st [NM];

  // mechanism counters
  int n_det = 0, n_det_lines = 0, n_stall = 0, n_bank1 = 0, n_bfp = 0, n_align = 0, n_idle_lvl = 0, n_dss = 0, n_plain = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (det_valid) n_det_lines++;
    if (det_valid && det_hit) n_det++;
    if (dut.u_col_fetch.u_mem.rb && dut.u_row_fetch.u_mem.rb && dut.u_out.u_mem.rb && out_valid) n_bank1++;
    if (dut.u_col_fft.g_lvl[3].u_stage.u_mem.rd_valid && dut.u_col_fft.g_lvl[3].u_stage.u_mem.sh != 0) n_bfp++;
    if (dut.u_row_fetch.u_mem.rd_valid && dut.u_row_fetch.u_mem.sh != 0) n_align++;
    if (out_valid) begin
      if (oblk < 3) begin
        yr[oblk][out_k] = real'(out_re) * (2.0 ** out_exp);
        yi[oblk][out_k] = real'(out_im) * (2.0 ** out_exp);
        zr[oblk][out_k] = real'(out2_re) * (2.0 ** out_exp);
        zi[oblk][out_k] = real'(out2_im) * (2.0 ** out_exp);
        seen[oblk][out_k]++;
      end
      owords++;
      if (cfg_dss) n_dss++; else n_plain++;
      if (out_last) oblk++;
    end
  end

  task automatic run_config(input int n, input bit dss);
    int len, nout;
    real er, ei, fr, fi, gr, gi, err, tol, rms;
    len = 1024 << (2 * n);
    rst_n = 0; cfg_n = 3'(n); cfg_dss = dss;
    repeat (3) @(negedge clk);
    rst_n = 1;
    oblk = 0; owords = 0;
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < len; i++) begin
        xr[b][i] = $signed($urandom_range(32767, 0)) - 16384;
        xi[b][i] = $signed($urandom_range(32767, 0)) - 16384;
        seen[b][i] = 0;
      end
    for (int i = 0; i < len; i++) begin
      ct[i] = $cos(2.0 * 3.14159265358979 * real'(i) / real'(len));
      st[i] = $sin(2.0 * 3.14159265358979 * real'(i) / real'(len));
    end
    // three blocks back to back, one word per cycle whenever accepted
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < len; i++) begin
        in_valid = 1; in_re = DW'(xr[b][i]); in_im = DW'(xi[b][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
    in_valid = 0;
    while (oblk < 3) @(posedge clk);
    repeat (4) @(posedge clk);
    nout = dss ? len / 2 + 1 : len;
    chk(owords == 3 * nout, $sformatf("n=%0d dss=%0d words %0d", n, dss, owords));
    rms = $sqrt(real'(len)) * 16384.0 / $sqrt(3.0) * $sqrt(2.0);
    tol = 4.0e-3 * rms;
    for (int b = 0; b < 3; b++)
      for (int k = 0; k < nout; k++) begin
        er = 0; ei = 0;
        for (int i = 0; i < len; i++) begin
          int m;
          m = (i * k) % len;
          // X(k) = sum x(i) (cos - j sin)
          er += real'(xr[b][i]) * ct[m] + real'(xi[b][i]) * st[m];
          ei += real'(xi[b][i]) * ct[m] - real'(xr[b][i]) * st[m];
        end
        chk(seen[b][k] == 1, $sformatf("n=%0d index %0d seen %0d", n, k, seen[b][k]));
        if (!dss) begin
          err = $sqrt((er - yr[b][k]) ** 2 + (ei - yi[b][k]) ** 2);
          chk(err < tol, $sformatf("n=%0d b=%0d k=%0d ref (%0.0f,%0.0f) got (%0.0f,%0.0f)",
                                   n, b, k, er, ei, yr[b][k], yi[b][k]));
        end else begin
          // X1 = DFT of real part, X2 = DFT of imaginary part
          fr = 0; fi = 0; gr = 0; gi = 0;
          for (int i = 0; i < len; i++) begin
            int m;
            m = (i * k) % len;
            fr += real'(xr[b][i]) * ct[m];  fi -= real'(xr[b][i]) * st[m];
            gr += real'(xi[b][i]) * ct[m];  gi -= real'(xi[b][i]) * st[m];
          end
          err = $sqrt((fr - yr[b][k]) ** 2 + (fi - yi[b][k]) ** 2);
          chk(err < tol, $sformatf("dss X1 k=%0d ref (%0.0f,%0.0f) got (%0.0f,%0.0f)", k, fr, fi, yr[b][k], yi[b][k]));
          err = $sqrt((gr - zr[b][k]) ** 2 + (gi - zi[b][k]) ** 2);
          chk(err < tol, $sformatf("dss X2 k=%0d ref (%0.0f,%0.0f) got (%0.0f,%0.0f)", k, gr, gi, zr[b][k], zi[b][k]));
        end
      end
    if (n < 5 && dut.u_row_fft.g_lvl[5].u_stage.u_mem.full == 2'b00) n_idle_lvl++;
  endtask

  initial begin
    run_config(0, 0);
    run_config(1, 0);
    run_config(1, 1);
    $display("mechanisms: cfar lines=%0d hits=%0d stall=%0d bank1=%0d bfp_shift=%0d align=%0d idle_level=%0d dss=%0d plain=%0d",
             n_det_lines, n_det, n_stall, n_bank1, n_bfp, n_align, n_idle_lvl, n_dss, n_plain);
    chk(n_det_lines > 0 && n_det > 0, "CFAR never detected a line");
    chk(n_stall > 0, "input back-pressure never happened");
    chk(n_bank1 > 0, "second ping-pong bank never used");
    chk(n_bfp > 0, "block floating point never shifted");
    chk(n_align > 0, "sub-frame exponent alignment never happened");
    chk(n_idle_lvl > 0, "no level was left idle");
    chk(n_dss > 0 && n_plain > 0, "an output mode never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout, blocks out %0d", oblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
