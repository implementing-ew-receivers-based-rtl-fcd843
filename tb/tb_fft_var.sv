// tb_fft_var: self-checking test of the variable-length FFT.
// For every length 4^n, n = 0..5, it sends two frames of random complex data,
// collects the outputs by their spectral index, and compares
// (out * 2^out_exp) with a direct DFT computed here in floating point. It also
// checks that every index appears once per frame, that only the first n
// levels are used, and that a 1024-point frame streams at close to one word
// per cycle.
module tb_fft_var;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_n;
  logic in_valid = 0, in_claim = 0, in_can_claim;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_last, dn_claim;
  logic [9:0] out_addr;
  logic signed [DW+2:0] out_re, out_im;
  logic [5:0] out_exp;

  fft_var #(.DW(DW)) dut (.clk, .rst_n, .cfg_n, .in_valid, .in_re, .in_im, .in_exp(6'd0),
    .in_can_claim, .in_claim, .out_valid, .out_addr, .out_re, .out_im, .out_exp, .out_last,
    .dn_can_claim(1'b1), .dn_claim);

  int checks = 0, failures = 0;
  real xr [2][1024], xi [2][1024];
  real yr [1024], yi [1024];
  int  seen [1024];
  int  ofr, ocnt, lasts;
  longint t_in0, t_in1;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // output capture
  always @(posedge clk) if (rst_n && out_valid) begin
    yr[out_addr] = real'(out_re) * (2.0 ** out_exp);
    yi[out_addr] = real'(out_im) * (2.0 ** out_exp);
    seen[out_addr]++;
    ocnt++;
    if (out_last) lasts++;
  end

  task automatic send_frame(input int f, input int len);
    @(negedge clk);
    while (!in_can_claim) @(negedge clk);
    in_claim = 1;
    @(negedge clk);
    in_claim = 0;
    for (int i = 0; i < len; i++) begin
      in_valid = 1;
      in_re = DW'($rtoi(xr[f][i]));
      in_im = DW'($rtoi(xi[f][i]));
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic check_frame(input int f, input int len, input int n);
    real er, ei, ang, err, pk, tol;
    pk = 0;
    for (int k = 0; k < len; k++) begin
      er = 0; ei = 0;
      for (int i = 0; i < len; i++) begin
        ang = -2.0 * 3.14159265358979 * real'((i * k) % len) / real'(len);
        er += xr[f][i] * $cos(ang) - xi[f][i] * $sin(ang);
        ei += xr[f][i] * $sin(ang) + xi[f][i] * $cos(ang);
      end
      err = $sqrt((er - yr[k]) ** 2 + (ei - yi[k]) ** 2);
      tol = 2.0e-3 * $sqrt(real'(len)) * 16384.0 + 4.0;
      chk(err < tol, $sformatf("n=%0d k=%0d ref=(%f,%f) got=(%f,%f)", n, k, er, ei, yr[k], yi[k]));
      chk(seen[k] == 1, $sformatf("n=%0d index %0d seen %0d times", n, k, seen[k]));
    end
  endtask

  initial begin
    for (int n = 0; n <= 5; n++) begin
      int len;
      len = 1 << (2 * n);
      rst_n = 0; cfg_n = 3'(n);
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < len; i++) begin
          xr[f][i] = real'($signed($urandom_range(32767, 0)) - 16384);
          xi[f][i] = real'($signed($urandom_range(32767, 0)) - 16384);
        end
      for (int f = 0; f < 2; f++) begin
        for (int k = 0; k < len; k++) seen[k] = 0;
        ocnt = 0; lasts = 0;
        t_in0 = cyc;
        send_frame(f, len);
        t_in1 = cyc;
        while (ocnt < len) @(posedge clk);
        repeat (2) @(posedge clk);
        chk(ocnt == len, $sformatf("n=%0d output count %0d", n, ocnt));
        chk(lasts == 1, $sformatf("n=%0d out_last count %0d", n, lasts));
        check_frame(f, len, n);
        if (n == 5 && f == 0)
          chk(t_in1 - t_in0 <= 1024 + 4, $sformatf("input of 1024 words took %0d cycles", t_in1 - t_in0));
      end
      // levels above n stayed idle
      if (n < 5) chk(dut.g_lvl[5].u_stage.u_mem.full == 2'b00, "unused level got data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
