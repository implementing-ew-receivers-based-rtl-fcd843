// tb_col_fetch: input rearrangement at N = 4096 (cfg_n = 1, M = 4), with the
// memory sized for N = 4096 (NMAX = 1). Three blocks are written at one
// sample per cycle; each sample's value encodes its block and position. The
// output must be, per block, the columns n0 = 0..3, each the 1024 samples
// x(4*n1 + n0) in order of n1. The consumer withholds dn_can_claim at random,
// and no column may start then. The third block must be held off
// (in_ready low) until the first bank has been read.
module tb_col_fetch;
  localparam int DW = 16;
  localparam int N = 4096, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, dn_can_claim = 0, dn_claim;
  logic signed [DW-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [5:0] out_exp;

  col_fetch #(.DW(DW), .NMAX(1)) dut (.clk, .rst_n, .cfg_n(3'd1), .in_valid, .in_ready,
    .in_re, .in_im, .out_valid, .out_re, .out_im, .out_exp, .dn_can_claim, .dn_claim);

  int checks = 0, failures = 0, nout = 0, stalls = 0, claims = 0, bad_claim = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (dn_claim) begin claims++; if (!dn_can_claim) bad_claim++; end
    if (out_valid) begin
      int b, r, n0, n1, idx;
      b = nout / N; r = nout % N;
      n0 = r / 1024; n1 = r % 1024;
      idx = M * n1 + n0;
      chk(out_re == DW'(idx) && out_im == DW'(b * 7 + 1) && out_exp == 0,
          $sformatf("word %0d: got (%0d,%0d), want x(%0d) of block %0d", nout, out_re, out_im, idx, b));
      nout++;
    end
  end

  always @(negedge clk) dn_can_claim <= ($urandom_range(3, 0) != 0);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_re = DW'(i); in_im = DW'(b * 7 + 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
    in_valid = 0;
    while (nout < 3 * N) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(nout == 3 * N, "output count");
    chk(claims == 3 * M, $sformatf("%0d column claims", claims));
    chk(bad_claim == 0, "column started without room downstream");
    chk(stalls > 0, "third block was never held off");
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
