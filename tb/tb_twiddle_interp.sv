// tb_twiddle_interp: compares the interpolated twiddle factors with
// cos/-sin computed in floating point, for all octant boundaries and 20000
// random indices, to within 2 LSB of the Q1.16 format, and checks the
// two-cycle latency.
module tb_twiddle_interp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [19:0] idx = 0;
  logic signed [17:0] w_re, w_im;
  twiddle_interp dut (.clk, .idx, .w_re, .w_im);

  int checks = 0, failures = 0;
  logic [19:0] hist [3];

  task automatic check(input logic [19:0] i);
    real a, er, ei;
    a  = 2.0 * 3.14159265358979 * real'(i) / 1048576.0;
    er = real'(w_re) - $cos(a) * 65536.0;
    ei = real'(w_im) + $sin(a) * 65536.0;
    checks++;
    if (er > 2.0 || er < -2.0 || ei > 2.0 || ei < -2.0) begin
      failures++;
      if (failures < 10) $display("FAIL idx=%0d got (%0d,%0d) err (%f,%f)", i, w_re, w_im, er, ei);
    end
  endtask

  initial begin
    logic [19:0] seq [$];
    for (int o = 0; o < 8; o++) begin
      seq.push_back(20'(o << 17));
      seq.push_back(20'((o << 17) + 1));
      seq.push_back(20'((o << 17) - 1));
      seq.push_back(20'((o << 17) + 64));
      seq.push_back(20'((o << 17) + 127));
    end
    for (int k = 0; k < 20000; k++) seq.push_back(20'($urandom));
    foreach (seq[k]) begin
      @(negedge clk);
      idx = seq[k];
      if (k >= 2) check(seq[k-2]);     // result of the index two cycles ago
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
