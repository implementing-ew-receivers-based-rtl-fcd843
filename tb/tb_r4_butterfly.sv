// tb_r4_butterfly: random inputs and twiddle factors; every output is
// compared with the radix-4 DIT butterfly worked out in floating point
// (tolerance 3 LSB), one cycle after in_valid.
module tb_r4_butterfly;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [DW-1:0] x_re [4], x_im [4];
  logic signed [17:0] w_re [1:3], w_im [1:3];
  logic signed [DW+2:0] y_re [4], y_im [4];
  r4_butterfly #(.DW(DW)) dut (.clk, .rst_n, .in_valid, .x_re, .x_im, .w_re, .w_im,
    .out_valid, .y_re, .y_im);

  int checks = 0, failures = 0;
  real ar [4], ai [4];

  initial begin
    real ang, pr, pi_, er, ei;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int q = 0; q < 4; q++) begin
        x_re[q] = DW'($urandom);
        x_im[q] = DW'($urandom);
      end
      if (t % 3 == 0) for (int q = 0; q < 4; q++) begin x_re[q] = -32768; x_im[q] = 32767; end
      ar[0] = real'(x_re[0]); ai[0] = real'(x_im[0]);
      for (int q = 1; q < 4; q++) begin
        ang = 2.0 * 3.14159265358979 * real'($urandom_range(1023, 0)) / 1024.0;
        w_re[q] = 18'($rtoi($cos(ang) * 65536.0));
        w_im[q] = 18'(-$rtoi($sin(ang) * 65536.0));
        ar[q] = (real'(x_re[q]) * real'(w_re[q]) - real'(x_im[q]) * real'(w_im[q])) / 65536.0;
        ai[q] = (real'(x_re[q]) * real'(w_im[q]) + real'(x_im[q]) * real'(w_re[q])) / 65536.0;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int m = 0; m < 4; m++) begin
        // sum_q a_q * (-j)^(m*q)
        pr = 0; pi_ = 0;
        for (int q = 0; q < 4; q++)
          case ((m * q) % 4)
            0: begin pr += ar[q]; pi_ += ai[q]; end
            1: begin pr += ai[q]; pi_ -= ar[q]; end
            2: begin pr -= ar[q]; pi_ -= ai[q]; end
            default: begin pr -= ai[q]; pi_ += ar[q]; end
          endcase
        er = real'(y_re[m]) - pr;
        ei = real'(y_im[m]) - pi_;
        checks++;
        if (er > 3.0 || er < -3.0 || ei > 3.0 || ei < -3.0) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d m=%0d got (%0d,%0d) ref (%f,%f)", t, m, y_re[m], y_im[m], pr, pi_);
        end
      end
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
