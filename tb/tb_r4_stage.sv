// tb_r4_stage: second radix-4 level (butterfly span 4) on 16-word frames.
// Frames are written in natural order; the level must return, at each
// address n + 4m, sum_q x(n+4q) W_16^(q*n) (-j)^(m*q), computed here in
// floating point from the block-scaled inputs. The first frame has 18-bit
// values so the block floating point must shift (out_exp = 2); the second is
// small (no shift). Also checks one out_last per frame, every address once,
// and that a frame is not started while the next level cannot take it.
module tb_r4_stage;
  localparam int DW = 16, AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, can_claim, claim = 0;
  logic [AW-1:0] wr_addr = 0;
  logic signed [DW+2:0] wr_re = 0, wr_im = 0;
  logic out_valid, out_last, dn_can_claim = 0, dn_claim;
  logic [AW-1:0] out_addr;
  logic signed [DW+2:0] out_re, out_im;
  logic [5:0] out_exp;

  r4_stage #(.STAGE(2), .DW(DW), .AW(AW)) dut (.clk, .rst_n, .len_log(5'd4),
    .wr_en, .wr_addr, .wr_re, .wr_im, .wr_exp(6'd0), .can_claim, .claim,
    .out_valid, .out_addr, .out_re, .out_im, .out_exp, .out_last, .dn_can_claim, .dn_claim);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int xr [16], xi [16];
  real yr [16], yi [16];
  int seen [16], lasts, outs;
  logic [5:0] e_seen;

  always @(posedge clk) if (out_valid) begin
    yr[out_addr] = real'(out_re); yi[out_addr] = real'(out_im);
    seen[out_addr]++; outs++; e_seen = out_exp;
    if (out_last) lasts++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      int sh, amp;
      amp = (f == 0) ? 131071 : 20000;
      sh  = (f == 0) ? 2 : 0;
      for (int i = 0; i < 16; i++) begin
        xr[i] = $signed($urandom_range(2 * amp, 0)) - amp;
        xi[i] = $signed($urandom_range(2 * amp, 0)) - amp;
        seen[i] = 0;
      end
      xr[5] = -amp;                 // make the needed shift certain
      lasts = 0; outs = 0;
      @(negedge clk);
      claim = 1; @(negedge clk); claim = 0;
      for (int i = 0; i < 16; i++) begin
        wr_en = 1; wr_addr = AW'(i); wr_re = (DW+3)'(xr[i]); wr_im = (DW+3)'(xi[i]);
        @(negedge clk);
      end
      wr_en = 0;
      repeat (5) @(negedge clk);
      chk(outs == 0, "frame started while downstream could not take it");
      dn_can_claim = 1;
      while (!dut.busy) @(negedge clk);
      @(negedge clk);
      dn_can_claim = 0;
      repeat (30) @(negedge clk);
      chk(outs == 16 && lasts == 1, $sformatf("frame %0d: %0d words, %0d last", f, outs, lasts));
      chk(e_seen == 6'(sh), $sformatf("exponent %0d, want %0d", e_seen, sh));
      for (int n = 0; n < 4; n++)
        for (int m = 0; m < 4; m++) begin
          real pr, pi_, ar, ai, c, s, ang;
          pr = 0; pi_ = 0;
          for (int q = 0; q < 4; q++) begin
            ang = 2.0 * 3.14159265358979 * real'(q * n) / 16.0;
            c = $cos(ang); s = -$sin(ang);
            ar = real'(xr[n + 4*q] >>> sh) * c - real'(xi[n + 4*q] >>> sh) * s;
            ai = real'(xr[n + 4*q] >>> sh) * s + real'(xi[n + 4*q] >>> sh) * c;
            case ((m * q) % 4)
              0: begin pr += ar; pi_ += ai; end
              1: begin pr += ai; pi_ -= ar; end
              2: begin pr -= ar; pi_ -= ai; end
              default: begin pr -= ai; pi_ += ar; end
            endcase
          end
          chk(seen[n + 4*m] == 1, "address missing or repeated");
          chk((yr[n + 4*m] - pr) ** 2 + (yi[n + 4*m] - pi_) ** 2 < 16.0,
              $sformatf("f=%0d addr %0d got (%0.0f,%0.0f) ref (%0.1f,%0.1f)", f, n + 4*m,
                        yr[n + 4*m], yi[n + 4*m], pr, pi_));
        end
    end
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
