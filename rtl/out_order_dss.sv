// out_order_dss: output buffer, natural ordering and double-sequence separation.
//
// The row FFT delivers, for row k0 (counted here from the frames' last words),
// X(k) at index k1, with k = 1024*k1 + k0. Each word is written at address k
// of a ping-pong memory; the rows' block exponents are aligned on reading (the
// row of a word is the low 10 address bits). When a bank is complete it is
// read in natural order:
//  * dss = 0: X(k), k = 0..N-1, one word per cycle on out_re/out_im.
//  * dss = 1: the input was x1(n) + j*x2(n) with two real sequences. For
//    k = 0..N/2 the buffer reads X(k) and X(N-k) (X(0) for k = 0) in two
//    cycles and emits
//        X1(k) = ((R(k) + R(N-k)) + j(I(k) - I(N-k))) / 2   on out_re/out_im
//        X2(k) = ((I(k) + I(N-k)) + j(R(N-k) - R(k))) / 2   on out2_re/out2_im
//    The other half of each spectrum is its complex conjugate mirror and is
//    not emitted, so the output still takes N cycles per transform.
// out_exp is the common block exponent; out_k the index; out_last marks the
// final word of a transform. The output does not stall. Rounding is by
// truncation. Ordering (step 5) and the separation formulas follow the design
// description; emitting only k <= N/2 is this design's choice.
module out_order_dss #(
  parameter int SW   = 19,        // width of the row FFT results
  parameter int DW   = 16,        // output width
  parameter int NMAX = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    dss,
  input  logic                    in_valid,
  input  logic [2*NMAX-1:0]       in_k1,
  input  logic signed [SW-1:0]    in_re,
  input  logic signed [SW-1:0]    in_im,
  input  logic [fft_pkg::EW-1:0]  in_exp,
  input  logic                    in_last,
  output logic                    can_claim,
  input  logic                    claim,
  output logic                    out_valid,
  output logic [fft_pkg::LOG2_L+2*NMAX-1:0] out_k,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic signed [DW-1:0]    out2_re,
  output logic signed [DW-1:0]    out2_im,
  output logic [fft_pkg::EW-1:0]  out_exp,
  output logic                    out_last
);
  import fft_pkg::*;
  localparam int AW = LOG2_L + 2 * NMAX;

  logic [4:0]    len_log, m_log;
  logic [9:0]    k0;
  logic [AW-1:0] wr_addr, rd_addr, kcnt, nmask;
  logic          rd_avail, rd_en, rd_release, rd_valid, wr_ready_unused;
  logic signed [DW-1:0] rd_re, rd_im;
  logic [EW-1:0] rd_exp;

  assign m_log   = 5'({cfg_n, 1'b0});
  assign len_log = 5'(LOG2_L) + m_log;
  assign nmask   = AW'(((AW+1)'(1) << len_log) - 1'b1);
  assign wr_addr = (AW'(in_k1) << LOG2_L) | AW'(k0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                   k0 <= '0;
    else if (in_valid && in_last) k0 <= k0 + 1'b1;

  bfp_pingpong #(.SW(SW), .DW(DW), .AW(AW), .KW(LOG2_L)) u_mem (
    .clk, .rst_n, .len_log, .key_log(5'(LOG2_L)),
    .wr_en(in_valid), .wr_addr, .wr_re(in_re), .wr_im(in_im), .wr_exp(in_exp),
    .wr_ready(wr_ready_unused), .claim, .can_claim,
    .rd_avail, .rd_en, .rd_addr, .rd_release,
    .rd_valid, .rd_re, .rd_im, .rd_exp);

  // ---------------- read sequencing
  logic busy, second, last_k;
  assign last_k  = dss ? ((AW+1)'(kcnt) == ((AW+1)'(1) << (len_log - 1'b1)))
                       : (kcnt == nmask);
  assign rd_en   = busy;
  assign rd_addr = (dss && second) ? ((~kcnt + 1'b1) & nmask) : kcnt;
  assign rd_release = busy && last_k && (!dss || second);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      second <= 1'b0;
      kcnt   <= '0;
    end else if (!busy) begin
      if (rd_avail) begin
        busy   <= 1'b1;
        second <= 1'b0;
        kcnt   <= '0;
      end
    end else begin
      if (dss) second <= !second;
      if (!dss || second) kcnt <= kcnt + 1'b1;
      if (rd_release) busy <= 1'b0;
    end
  end

  // tags of each read, two cycles behind
  logic [AW-1:0] k_d [2];
  logic [1:0]    sec_d, last_d;
  always_ff @(posedge clk) begin
    k_d[0] <= kcnt;  k_d[1] <= k_d[0];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_d  <= '0;
      last_d <= '0;
    end else begin
      sec_d  <= {sec_d[0], dss && second};
      last_d <= {last_d[0], rd_release};
    end
  end

  // ---------------- separation
  logic signed [DW-1:0] xr, xi;           // X(k), held for one cycle
  logic signed [DW:0]   s1r, s1i, s2r, s2i;
  always_ff @(posedge clk) if (rd_valid && !sec_d[1]) begin xr <= rd_re; xi <= rd_im; end

  always_comb begin
    s1r = (DW+1)'(xr) + (DW+1)'(rd_re);     // R(k) + R(N-k)
    s1i = (DW+1)'(xi) - (DW+1)'(rd_im);     // I(k) - I(N-k)
    s2r = (DW+1)'(xi) + (DW+1)'(rd_im);     // I(k) + I(N-k)
    s2i = (DW+1)'(rd_re) - (DW+1)'(xr);     // R(N-k) - R(k)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k <= '0; out_re <= '0; out_im <= '0; out2_re <= '0; out2_im <= '0;
      out_exp <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= rd_valid && (!dss || sec_d[1]);
      out_k     <= k_d[1];
      out_exp   <= rd_exp;
      out_last  <= rd_valid && last_d[1];
      if (dss) begin
        out_re  <= DW'(s1r >>> 1);
        out_im  <= DW'(s1i >>> 1);
        out2_re <= DW'(s2r >>> 1);
        out2_im <= DW'(s2i >>> 1);
      end else begin
        out_re  <= rd_re;
        out_im  <= rd_im;
        out2_re <= '0;
        out2_im <= '0;
      end
    end
  end
endmodule
