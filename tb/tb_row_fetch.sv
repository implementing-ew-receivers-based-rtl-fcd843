// tb_row_fetch: transposition buffer at N = 4096 (cfg_n = 1, M = 4), memory
// sized for NMAX = 1. Two banks of four column frames are written (each column
// claimed first, its 1024 words at addresses k0*4 + n0 in reverse order), with
// a different block exponent per column and one column too large for 16 bits.
// The buffer must return, row by row, the words of row k0 for n0 = 0..3,
// aligned to the common exponent computed here; no row may start while the
// row FFT cannot take it.
module tb_row_fetch;
  localparam int SW = 20, DW = 16, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, can_claim, claim = 0, out_valid, dn_can_claim = 0, dn_claim;
  logic [11:0] wr_addr = 0;
  logic signed [SW-1:0] wr_re = 0, wr_im = 0;
  logic [5:0] wr_exp = 0, out_exp;
  logic signed [DW-1:0] out_re, out_im;

  row_fetch #(.SW(SW), .DW(DW), .NMAX(1)) dut (.clk, .rst_n, .cfg_n(3'd1), .wr_en, .wr_addr,
    .wr_re, .wr_im, .wr_exp, .can_claim, .claim, .out_valid, .out_re, .out_im, .out_exp,
    .dn_can_claim, .dn_claim);

  int checks = 0, failures = 0, nout = 0, bad_claim = 0, rows = 0;
  int vr [2][4096], vi [2][4096], ex [2][4], eall [2];
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int bits_of(input int v);
    int b;
    b = 1;
    while (!(v >= -(1 <<< (b - 1)) && v < (1 <<< (b - 1)))) b++;
    return b;
  endfunction

  always @(negedge clk) dn_can_claim <= ($urandom_range(3, 0) != 0);

  always @(posedge clk) if (rst_n) begin
    if (dn_claim) begin rows++; if (!dn_can_claim) bad_claim++; end
    if (out_valid) begin
      int b, a, n0, sh;
      b = nout / 4096; a = nout % 4096; n0 = a % M;
      sh = eall[b] - ex[b][n0];
      chk(out_re == DW'(vr[b][a] >>> sh) && out_im == DW'(vi[b][a] >>> sh) && out_exp == 6'(eall[b]),
          $sformatf("bank %0d word %0d got (%0d,%0d) e%0d want (%0d,%0d) e%0d", b, a,
                    out_re, out_im, out_exp, vr[b][a] >>> sh, vi[b][a] >>> sh, eall[b]));
      nout++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      eall[b] = 0;
      for (int n0 = 0; n0 < M; n0++) begin
        int amp, mx;
        ex[b][n0] = $urandom_range(8, 3);
        amp = (n0 == 2) ? 400000 : 20000;
        mx = 1;
        for (int k0 = 0; k0 < 1024; k0++) begin
          vr[b][k0 * M + n0] = $signed($urandom_range(2 * amp, 0)) - amp;
          vi[b][k0 * M + n0] = $signed($urandom_range(2 * amp, 0)) - amp;
          if (bits_of(vr[b][k0 * M + n0]) > mx) mx = bits_of(vr[b][k0 * M + n0]);
          if (bits_of(vi[b][k0 * M + n0]) > mx) mx = bits_of(vi[b][k0 * M + n0]);
        end
        if (ex[b][n0] + ((mx > DW) ? mx - DW : 0) > eall[b]) eall[b] = ex[b][n0] + ((mx > DW) ? mx - DW : 0);
      end
    end
    for (int b = 0; b < 2; b++)
      for (int n0 = 0; n0 < M; n0++) begin
        @(negedge clk);
        while (!can_claim) @(negedge clk);
        claim = 1; @(negedge clk); claim = 0;
        for (int k0 = 1023; k0 >= 0; k0--) begin
          wr_en = 1; wr_addr = 12'(k0 * M + n0);
          wr_re = SW'(vr[b][k0 * M + n0]); wr_im = SW'(vi[b][k0 * M + n0]); wr_exp = 6'(ex[b][n0]);
          @(negedge clk);
        end
        wr_en = 0;
      end
    while (nout < 2 * 4096) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(rows == 2 * 1024, $sformatf("%0d rows", rows));
    chk(bad_claim == 0, "row started without room downstream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
