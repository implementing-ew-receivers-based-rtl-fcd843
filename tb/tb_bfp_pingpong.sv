// tb_bfp_pingpong: banks of 16 words in 4 sub-frames with different block
// exponents and magnitudes. Checks, against values computed here, the common
// exponent E = max(exponent + shift needed to fit 16 bits) and every word read
// (value >> (E - exponent of its sub-frame)), the two-cycle read latency,
// ping-pong alternation with the writer stalled (wr_ready low) while both
// banks are full, and the claim limit of two banks.
module tb_bfp_pingpong;
  localparam int SW = 20, DW = 16, AW = 4, KW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_ready, claim = 0, can_claim;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic signed [SW-1:0] wr_re = 0, wr_im = 0;
  logic [5:0] wr_exp = 0, rd_exp;
  logic rd_avail, rd_en = 0, rd_release = 0, rd_valid;
  logic signed [DW-1:0] rd_re, rd_im;

  bfp_pingpong #(.SW(SW), .DW(DW), .AW(AW), .KW(KW)) dut (.clk, .rst_n,
    .len_log(5'd4), .key_log(5'd2), .wr_en, .wr_addr, .wr_re, .wr_im, .wr_exp, .wr_ready,
    .claim, .can_claim, .rd_avail, .rd_en, .rd_addr, .rd_release, .rd_valid, .rd_re, .rd_im, .rd_exp);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int vr [3][16], vi [3][16], ex [3][4];

  function automatic int bits_of(input int v);
    int b;
    b = 1;
    while (!(v >= -(1 <<< (b - 1)) && v < (1 <<< (b - 1)))) b++;
    return b;
  endfunction

  initial begin
    int e_all, need, mx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 3; b++)
      for (int s = 0; s < 4; s++) begin
        ex[b][s] = $urandom_range(5, 0);
        mx = 1 << $urandom_range(18, 8);
        for (int i = 0; i < 4; i++) begin
          vr[b][4*s+i] = $signed($urandom_range(2 * mx - 1, 0)) - mx;
          vi[b][4*s+i] = $signed($urandom_range(2 * mx - 1, 0)) - mx;
        end
      end
    // claims: two banks of four sub-frames
    for (int c = 0; c < 8; c++) begin
      chk(can_claim, "claim refused below two banks");
      claim = 1; @(negedge clk); claim = 0;
    end
    chk(!can_claim, "ninth sub-frame claim allowed");
    // write three banks; sub-frame s occupies addresses with low bits s
    for (int b = 0; b < 3; b++)
      for (int w = 0; w < 16; w++) begin
        int s, i;
        s = w / 4; i = w % 4;
        if (b == 2) chk(!wr_ready, "write accepted while both banks full");
        if (b == 2) break;
        wr_en = 1; wr_addr = AW'(4 * i + s); wr_re = SW'(vr[b][w]); wr_im = SW'(vi[b][w]);
        wr_exp = 6'(ex[b][s]);
        @(negedge clk);
        wr_en = 0;
      end
    // read banks 0 and 1, then write and read bank 2 into the freed bank
    for (int b = 0; b < 3; b++) begin
      if (b == 2) begin
        chk(wr_ready, "freed bank not writable");
        for (int c = 0; c < 4; c++) begin
          chk(can_claim, "claim refused after release");
          claim = 1; @(negedge clk); claim = 0;
        end
        for (int w = 0; w < 16; w++) begin
          wr_en = 1; wr_addr = AW'(4 * (w % 4) + w / 4); wr_re = SW'(vr[b][w]); wr_im = SW'(vi[b][w]);
          wr_exp = 6'(ex[b][w / 4]);
          @(negedge clk);
        end
        wr_en = 0;
      end
      chk(rd_avail, "full bank not available");
      e_all = 0;
      for (int s = 0; s < 4; s++) begin
        mx = 1;
        for (int i = 0; i < 4; i++) begin
          if (bits_of(vr[b][4*s+i]) > mx) mx = bits_of(vr[b][4*s+i]);
          if (bits_of(vi[b][4*s+i]) > mx) mx = bits_of(vi[b][4*s+i]);
        end
        need = ex[b][s] + ((mx > DW) ? mx - DW : 0);
        if (need > e_all) e_all = need;
      end
      for (int a = 0; a < 16; a++) begin
        int s, i, sh, er, ei;
        s = a % 4; i = a / 4;
        rd_en = 1; rd_addr = AW'(a); rd_release = (a == 15);
        @(negedge clk);
        rd_en = 0; rd_release = 0;
        @(negedge clk);
        sh = e_all - ex[b][s];
        er = vr[b][4*s+i] >>> sh; ei = vi[b][4*s+i] >>> sh;
        chk(rd_valid && rd_exp == 6'(e_all) && rd_re == DW'(er) && rd_im == DW'(ei),
            $sformatf("bank %0d addr %0d got (%0d,%0d) e=%0d, want (%0d,%0d) e=%0d",
                      b, a, rd_re, rd_im, rd_exp, er, ei, e_all));
        chk(er >= -32768 && er < 32768, "reference exceeds 16 bits");
      end
    end
    chk(can_claim, "claims not returned on release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
