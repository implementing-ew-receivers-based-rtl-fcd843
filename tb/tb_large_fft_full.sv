// tb_large_fft_full: one complete 1M-point transform (cfg_n = 5) with the
// design at its default parameters.
// Input: two complex tones, x(n) = A1 exp(j2*pi*F1*n/N) + A2 exp(j2*pi*F2*n/N),
// plus uniform noise of +-2000, rounded to 16 bits. The exact spectrum is A1*N at bin F1, A2*N at bin F2 and
// only rounding noise elsewhere, so the test checks both peaks (amplitude and
// phase to 0.5 %), every other bin against a floor of 1e-3 * A1*N, that all N
// indices come out once in natural order, the processing time, that the
// CFAR detector flags both tone lines and few others.
module tb_large_fft_full;
  localparam int DW = 16;
  localparam int N  = 1 << 20;
  localparam int F1 = 123457, F2 = 777777;
  localparam real A1 = 12000.0, A2 = 4000.0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  large_fft_top dut (.clk, .rst_n, .cfg_n(3'd5), .cfg_dss(1'b0), .in_valid, .in_ready,
    .in_re, .in_im, .out_valid, .out_k, .out_re, .out_im, .out2_re, .out2_im, .out_exp,
    .out_last,
    .det_valid, .det_k, .det_power, .det_thr, .det_hit);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int  hit1 = 0, hit2 = 0, hits = 0, lines = 0;
  int  nout = 0, order_err = 0, floor_err = 0, done = 0;
  real yr1, yi1, yr2, yi2, worst = 0.0;
  longint cyc = 0, t_first_in = 0, t_last_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && det_valid) begin
    lines++;
    if (det_hit) begin
      hits++;
      if (det_k == 20'(F1)) hit1++;
      if (det_k == 20'(F2)) hit2++;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real r, i, m;
    r = real'(out_re) * (2.0 ** out_exp);
    i = real'(out_im) * (2.0 ** out_exp);
    if (out_k != 20'(nout)) order_err++;
    if (out_k == 20'(F1)) begin yr1 = r; yi1 = i; end
    else if (out_k == 20'(F2)) begin yr2 = r; yi2 = i; end
    else begin
      m = $sqrt(r * r + i * i);
      if (m > worst) worst = m;
      if (m > 1.0e-3 * A1 * real'(N)) floor_err++;
    end
    nout++;
    if (out_last) begin done = 1; t_last_out = cyc; end
  end

  initial begin
    real ph;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t_first_in = cyc;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * 3.14159265358979 * real'((longint'(F1) * n) % N) / real'(N);
      in_re = DW'($rtoi(A1 * $cos(ph) + ((A1 * $cos(ph) >= 0) ? 0.5 : -0.5)));
      in_im = DW'($rtoi(A1 * $sin(ph) + ((A1 * $sin(ph) >= 0) ? 0.5 : -0.5)));
      ph = 2.0 * 3.14159265358979 * real'((longint'(F2) * n) % N) / real'(N);
      in_re = in_re + DW'($rtoi(A2 * $cos(ph)));
      in_im = in_im + DW'($rtoi(A2 * $sin(ph)));
      in_re = in_re + DW'($signed($urandom_range(4000, 0)) - 2000);
      in_im = in_im + DW'($signed($urandom_range(4000, 0)) - 2000);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    while (!done) @(posedge clk);
    $display("peak1 (%0.4e,%0.4e) peak2 (%0.4e,%0.4e) worst other bin %0.4e, %0d cycles",
             yr1, yi1, yr2, yi2, worst, t_last_out - t_first_in);
    chk(nout == N, $sformatf("output count %0d", nout));
    chk(order_err == 0, $sformatf("%0d words out of natural order", order_err));
    chk($sqrt((yr1 - A1 * N) ** 2 + yi1 ** 2) < 5.0e-3 * A1 * N, "tone 1 peak");
    chk($sqrt((yr2 - A2 * N) ** 2 + yi2 ** 2) < 5.0e-3 * A1 * N, "tone 2 peak");
    repeat (4) @(posedge clk);
    $display("CFAR: %0d lines, %0d detections", lines, hits);
    chk(hit1 == 1 && hit2 == 1, "CFAR missed a tone");
    chk(hits < lines / 20, "CFAR false alarms above 5 %");
    chk(floor_err == 0, $sformatf("%0d bins above the noise floor", floor_err));
    // a block passes the input buffer, the column FFTs, the transposition and
    // the row FFTs each in about N cycles
    chk(t_last_out - t_first_in < 6 * N, $sformatf("took %0d cycles", t_last_out - t_first_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * N) @(posedge clk);
    failures++;
    $display("watchdog timeout, %0d words out", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
