// cmul: combinational complex multiplication of a data word by a Q1.16
// twiddle factor, (a + jb)(c + jd) = (ac - bd) + j(ad + bc), rounded to
// nearest at the 16 fraction bits. The result has one bit more than the data
// because |W| <= 1 can still lift one part by up to sqrt(2).
// Used by the radix-4 butterfly and by the inter-transform twiddle stage.
module cmul #(
  parameter int DW = 16
) (
  input  logic signed [DW-1:0]           a_re,
  input  logic signed [DW-1:0]           a_im,
  input  logic signed [fft_pkg::TW-1:0]  w_re,
  input  logic signed [fft_pkg::TW-1:0]  w_im,
  output logic signed [DW:0]             p_re,
  output logic signed [DW:0]             p_im
);
  import fft_pkg::*;
  localparam int PW = DW + TW + 1;
  logic signed [PW-1:0] re_full, im_full;
  always_comb begin
    re_full = PW'(a_re) * PW'(w_re) - PW'(a_im) * PW'(w_im) + PW'(1 <<< (TW_FRAC - 1));
    im_full = PW'(a_re) * PW'(w_im) + PW'(a_im) * PW'(w_re) + PW'(1 <<< (TW_FRAC - 1));
    p_re    = (DW+1)'(re_full >>> TW_FRAC);
    p_im    = (DW+1)'(im_full >>> TW_FRAC);
  end
endmodule
