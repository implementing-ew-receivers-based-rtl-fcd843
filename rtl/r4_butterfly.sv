// r4_butterfly: decimation-in-time radix-4 butterfly.
//
// With y0 = x0 and y_q = x_q * W_q (q = 1..3, W_q = W_(4^s)^(q*n) supplied by
// the caller) it forms the 4-point DFT
//   X0 = y0 +   y1 + y2 +   y3
//   X1 = y0 - j*y1 - y2 + j*y3
//   X2 = y0 -   y1 + y2 -   y3
//   X3 = y0 + j*y1 - y2 - j*y3
// The twiddle of the fourth input is W^(3n); the design's printed equation
// reads 2n there, which would not be a DFT, so 3n is used. Outputs are DW+3
// bits wide so that no sum can overflow (growth up to 4*sqrt(2)). One
// register stage: X* are valid one cycle after in_valid.
module r4_butterfly #(
  parameter int DW = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [DW-1:0]          x_re [4],
  input  logic signed [DW-1:0]          x_im [4],
  input  logic signed [fft_pkg::TW-1:0] w_re [1:3],
  input  logic signed [fft_pkg::TW-1:0] w_im [1:3],
  output logic                          out_valid,
  output logic signed [DW+2:0]          y_re [4],
  output logic signed [DW+2:0]          y_im [4]
);
  localparam int OW = DW + 3;
  logic signed [DW:0] p_re [4], p_im [4];

  assign p_re[0] = (DW+1)'(x_re[0]);
  assign p_im[0] = (DW+1)'(x_im[0]);
  for (genvar q = 1; q < 4; q++) begin : g_mul
    cmul #(.DW(DW)) u_mul (
      .a_re(x_re[q]), .a_im(x_im[q]), .w_re(w_re[q]), .w_im(w_im[q]),
      .p_re(p_re[q]), .p_im(p_im[q]));
  end

  logic signed [OW-1:0] a0r, a0i, a1r, a1i, a2r, a2i, a3r, a3i;
  always_comb begin
    a0r = OW'(p_re[0]); a0i = OW'(p_im[0]);
    a1r = OW'(p_re[1]); a1i = OW'(p_im[1]);
    a2r = OW'(p_re[2]); a2i = OW'(p_im[2]);
    a3r = OW'(p_re[3]); a3i = OW'(p_im[3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_re <= '{default: '0};
      y_im <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        // -j*(a + jb) = b - ja ;  +j*(a + jb) = -b + ja
        y_re[0] <= a0r + a1r + a2r + a3r;
        y_im[0] <= a0i + a1i + a2i + a3i;
        y_re[1] <= a0r + a1i - a2r - a3i;
        y_im[1] <= a0i - a1r - a2i + a3r;
        y_re[2] <= a0r - a1r + a2r - a3r;
        y_im[2] <= a0i - a1i + a2i - a3i;
        y_re[3] <= a0r - a1i - a2r + a3i;
        y_im[3] <= a0i + a1r - a2i - a3r;
      end
    end
  end
endmodule
