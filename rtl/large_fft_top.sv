// large_fft_top: large-point reconfigurable FFT, N = 1024 * 4^cfg_n points
// (cfg_n = 0..5, N = 1K .. 1M), for a wideband FFT receiver.
//
// The N-point DFT is computed as a two-dimensional transform with L = 1024
// and M = 4^cfg_n: writing n = M*n1 + n0 and k = L*k1 + k0,
//   X(L*k1 + k0) = sum_n0 [ W_N^(n0*k0) * sum_n1 x(M*n1 + n0) W_L^(n1*k0) ] W_M^(n0*k1).
// Data path:
//   col_fetch      stores N input samples, streams M columns of 1024 samples
//   fft_fixed1024  1024-point column FFTs (five radix-4 levels)
//   twiddle_mult   times W_N^(n0*k0), factors from an interpolated table
//   row_fetch      transposition buffer, streams 1024 rows of M words
//   fft_var        M-point row FFTs (first cfg_n radix-4 levels)
//   out_order_dss  natural-order output, optional two-real-sequence split
//   cfar_detector  CMLD/GO-CFAR threshold and detection on |X(k)|^2
// Every buffer is a ping-pong memory, so a new N-sample block can enter while
// the previous one is transformed. Block floating point runs through the whole
// chain; the result is (out_re + j*out_im) * 2^out_exp.
//
// Interface: samples in_valid/in_ready/in_re/in_im (complex, or x1 + j*x2 for
// two real signals when cfg_dss = 1). Results out_valid/out_k/out_re/out_im
// (X(k), or X1(k)) and out2_re/out2_im (X2(k) when cfg_dss = 1, k = 0..N/2),
// out_exp, out_last on the final word of a block. The output never stalls.
// Detections: det_valid/det_k/det_power/det_thr/det_hit, one per output line
// after the CFAR window has filled (block exponent not applied: all lines of a
// block share it).
// cfg_n and cfg_dss may only change while the design is empty (after reset).
// The two-dimensional decomposition with a fixed 1024-point column transform
// and a variable 4^n row transform follows the design description; widths,
// handshakes and the buffer organisation are this implementation's choices.
module large_fft_top #(
  parameter int DW   = 16,
  parameter int NMAX = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    cfg_dss,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
  output logic                    out_valid,
  output logic [fft_pkg::LOG2_L+2*NMAX-1:0] out_k,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic signed [DW-1:0]    out2_re,
  output logic signed [DW-1:0]    out2_im,
  output logic [fft_pkg::EW-1:0]  out_exp,
  output logic                    out_last,
  // CFAR detection on the output spectrum (X(k), or X1(k) when cfg_dss = 1)
  output logic                    det_valid,
  output logic [fft_pkg::LOG2_L+2*NMAX-1:0] det_k,
  output logic [2*DW:0]           det_power,
  output logic [2*DW+15:0]        det_thr,
  output logic                    det_hit
);
  import fft_pkg::*;
  localparam int AW = LOG2_L + 2 * NMAX;

  // column fetch -> column FFT
  logic                 cf_valid, cf_claim, cf_can;
  logic signed [DW-1:0] cf_re, cf_im;
  logic [EW-1:0]        cf_exp;

  col_fetch #(.DW(DW), .NMAX(NMAX)) u_col_fetch (
    .clk, .rst_n, .cfg_n, .in_valid, .in_ready, .in_re, .in_im,
    .out_valid(cf_valid), .out_re(cf_re), .out_im(cf_im), .out_exp(cf_exp),
    .dn_can_claim(cf_can), .dn_claim(cf_claim));

  // column FFT -> twiddle multiplication
  logic                 c_valid, c_last, c_claim, c_can;
  logic [9:0]           c_k0;
  logic signed [DW+2:0] c_re, c_im;
  logic [EW-1:0]        c_exp;

  fft_fixed1024 #(.DW(DW)) u_col_fft (
    .clk, .rst_n, .in_valid(cf_valid), .in_re(cf_re), .in_im(cf_im), .in_exp(cf_exp),
    .in_can_claim(cf_can), .in_claim(cf_claim),
    .out_valid(c_valid), .out_addr(c_k0), .out_re(c_re), .out_im(c_im), .out_exp(c_exp),
    .out_last(c_last), .dn_can_claim(c_can), .dn_claim(c_claim));

  logic                 t_valid;
  logic [AW-1:0]        t_addr;
  logic signed [DW+3:0] t_re, t_im;
  logic [EW-1:0]        t_exp;

  twiddle_mult #(.DW(DW+3), .NMAX(NMAX)) u_twiddle (
    .clk, .rst_n, .cfg_n, .in_valid(c_valid), .in_k0(c_k0), .in_re(c_re), .in_im(c_im),
    .in_exp(c_exp), .in_last(c_last),
    .out_valid(t_valid), .out_addr(t_addr), .out_re(t_re), .out_im(t_im), .out_exp(t_exp));

  // transposition buffer -> row FFT
  logic                 rf_valid, rf_claim, rf_can;
  logic signed [DW-1:0] rf_re, rf_im;
  logic [EW-1:0]        rf_exp;

  row_fetch #(.SW(DW+4), .DW(DW), .NMAX(NMAX)) u_row_fetch (
    .clk, .rst_n, .cfg_n, .wr_en(t_valid), .wr_addr(t_addr), .wr_re(t_re), .wr_im(t_im),
    .wr_exp(t_exp), .can_claim(c_can), .claim(c_claim),
    .out_valid(rf_valid), .out_re(rf_re), .out_im(rf_im), .out_exp(rf_exp),
    .dn_can_claim(rf_can), .dn_claim(rf_claim));

  logic                 r_valid, r_last, r_claim, r_can;
  logic [2*NMAX-1:0]    r_k1;
  logic signed [DW+2:0] r_re, r_im;
  logic [EW-1:0]        r_exp;

  fft_var #(.DW(DW), .LOG4N(NMAX)) u_row_fft (
    .clk, .rst_n, .cfg_n, .in_valid(rf_valid), .in_re(rf_re), .in_im(rf_im), .in_exp(rf_exp),
    .in_can_claim(rf_can), .in_claim(rf_claim),
    .out_valid(r_valid), .out_addr(r_k1), .out_re(r_re), .out_im(r_im), .out_exp(r_exp),
    .out_last(r_last), .dn_can_claim(r_can), .dn_claim(r_claim));

  out_order_dss #(.SW(DW+3), .DW(DW), .NMAX(NMAX)) u_out (
    .clk, .rst_n, .cfg_n, .dss(cfg_dss), .in_valid(r_valid), .in_k1(r_k1), .in_re(r_re),
    .in_im(r_im), .in_exp(r_exp), .in_last(r_last), .can_claim(r_can), .claim(r_claim),
    .out_valid, .out_k, .out_re, .out_im, .out2_re, .out2_im, .out_exp, .out_last);

  // spectral threshold detection
  cfar_detector #(.DW(DW), .TAGW(AW)) u_cfar (
    .clk, .rst_n, .in_valid(out_valid), .in_re(out_re), .in_im(out_im), .in_tag(out_k),
    .out_valid(det_valid), .out_tag(det_k), .out_power(det_power), .out_thr(det_thr),
    .out_det(det_hit));
endmodule
