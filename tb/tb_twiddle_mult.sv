// tb_twiddle_mult: N = 4096 (cfg_n = 1, M = 4). Four column frames of 1024
// random words, each tagged with a random spectral index k0 and closed by
// in_last, pass through; each output must equal the input times
// exp(-j*2*pi*n0*k0/4096) (to 2 LSB plus the twiddle's 2^-15 relative error), carry the address k0*4 + n0 and the
// input exponent, three cycles after its input.
module tb_twiddle_mult;
  localparam int DW = 19;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, out_valid;
  logic [9:0] in_k0 = 0;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic [5:0] in_exp = 0, out_exp;
  logic [11:0] out_addr;
  logic signed [DW:0] out_re, out_im;

  twiddle_mult #(.DW(DW), .NMAX(1)) dut (.clk, .rst_n, .cfg_n(3'd1), .in_valid, .in_k0, .in_re,
    .in_im, .in_exp, .in_last, .out_valid, .out_addr, .out_re, .out_im, .out_exp);

  int checks = 0, failures = 0;
  typedef struct { int re, im, k0, n0, e; } item_t;
  item_t q [$];
  logic [2:0] vpipe = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    real a, er, ei;
    it = q.pop_front();
    a  = 2.0 * 3.14159265358979 * real'(it.n0 * it.k0) / 4096.0;
    er = real'(it.re) * $cos(a) + real'(it.im) * $sin(a);
    ei = real'(it.im) * $cos(a) - real'(it.re) * $sin(a);
    checks++;
    if ((real'(out_re) - er) ** 2 + (real'(out_im) - ei) ** 2 >
        (2.0 + 4.0e-5 * (real'(it.re < 0 ? -it.re : it.re) + real'(it.im < 0 ? -it.im : it.im))) ** 2 ||
        out_addr != 12'(it.k0 * 4 + it.n0) || out_exp != 6'(it.e)) begin
      failures++;
      if (failures < 10) $display("FAIL n0=%0d k0=%0d got (%0d,%0d)@%0d ref (%f,%f)@%0d",
                                  it.n0, it.k0, out_re, out_im, out_addr, er, ei, it.k0 * 4 + it.n0);
    end
  end
  // latency: valid comes out exactly three cycles after it went in
  always @(posedge clk) if (rst_n) begin
    vpipe <= {vpipe[1:0], in_valid};
    checks++;
    if (out_valid != vpipe[2]) failures++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n0 = 0; n0 < 4; n0++)
      for (int i = 0; i < 1024; i++) begin
        item_t it;
        @(negedge clk);
        it.re = $signed($urandom_range(400000, 0)) - 200000;
        it.im = $signed($urandom_range(400000, 0)) - 200000;
        it.k0 = (i < 4) ? 1023 - i : $urandom_range(1023, 0);
        it.n0 = n0; it.e = n0 + 1;
        in_valid = 1; in_re = DW'(it.re); in_im = DW'(it.im); in_k0 = 10'(it.k0);
        in_exp = 6'(it.e); in_last = (i == 1023);
        q.push_back(it);
        if ($urandom_range(7, 0) == 0) begin
          @(negedge clk); in_valid = 0; in_last = 0;
        end
      end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
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
