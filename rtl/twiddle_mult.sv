// twiddle_mult: multiplies the column transforms by W_N^(n0*k0).
//
// The column FFT delivers, for column n0 (counted here from the frames' last
// words, modulo M = 4^cfg_n), the values X_n0(k0) tagged with k0. Each is
// multiplied by W_N^(n0*k0), N = 1024*M. With a 2^20-point twiddle generator
// the factor is W_(2^20)^i with i = n0*k0 * 2^(10 - 2*cfg_n), which lies below
// 2^20 because n0*k0 < N. The factor comes from twiddle_interp (compressed,
// interpolated table). The result is tagged with its place in the transposed
// array, k0*M + n0, for the middle buffer.
//
// Timing: a fixed three-cycle pipeline with no handshake; frame claims pass
// through unchanged because they precede their data. Output width DW+1 where
// DW is the input width (a twiddle can raise a part by sqrt(2)).
// Step 3 of the design description; the index arithmetic is this design's.
module twiddle_mult #(
  parameter int DW   = 19,        // width of the column FFT results
  parameter int NMAX = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    in_valid,
  input  logic [9:0]              in_k0,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
  input  logic [fft_pkg::EW-1:0]  in_exp,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic [fft_pkg::LOG2_L+2*NMAX-1:0] out_addr,
  output logic signed [DW:0]      out_re,
  output logic signed [DW:0]      out_im,
  output logic [fft_pkg::EW-1:0]  out_exp
);
  import fft_pkg::*;
  localparam int AW = LOG2_L + 2 * NMAX;

  logic [4:0]    m_log;
  logic [AW-1:0] n0;
  logic [19:0]   idx;
  assign m_log = 5'({cfg_n, 1'b0});
  assign idx   = 20'((20'(n0) * 20'(in_k0)) << (5'd10 - m_log));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  n0 <= '0;
    else if (in_valid && in_last) n0 <= (n0 == (AW'(1) << m_log) - 1'b1) ? '0 : n0 + 1'b1;

  logic signed [TW-1:0] w_re, w_im;
  twiddle_interp #(.IW(20)) u_tw (.clk, .idx, .w_re, .w_im);

  logic [1:0]           v_d;
  logic signed [DW-1:0] re_d [2], im_d [2];
  logic [AW-1:0]        a_d [2];
  logic [EW-1:0]        e_d [2];
  always_ff @(posedge clk) begin
    re_d[0] <= in_re;  re_d[1] <= re_d[0];
    im_d[0] <= in_im;  im_d[1] <= im_d[0];
    a_d[0]  <= (AW'(in_k0) << m_log) | n0;  a_d[1] <= a_d[0];
    e_d[0]  <= in_exp; e_d[1]  <= e_d[0];
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[0], in_valid};

  logic signed [DW:0] p_re, p_im;
  cmul #(.DW(DW)) u_mul (.a_re(re_d[1]), .a_im(im_d[1]), .w_re, .w_im, .p_re, .p_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re <= '0; out_im <= '0; out_addr <= '0; out_exp <= '0;
    end else begin
      out_valid <= v_d[1];
      out_re    <= p_re;
      out_im    <= p_im;
      out_addr  <= a_d[1];
      out_exp   <= e_d[1];
    end
  end
endmodule
