// fft_var: variable-length FFT of 4^cfg_n points, cfg_n = 0..5 (1 to 1024).
//
// The same five radix-4 DIT levels as the fixed FFT, plus a configuration unit.
// For 4^n points only the first n levels work: the input unit digit-reverses
// over n base-4 digits, the frame length of every active level is 2^(2n), the
// claim chain ends at level n and the output is taken from level n; later
// levels receive nothing and stay idle. With n = 0 the transform is the
// identity and words pass straight through (address 0).
//
// Interface and timing as fft_fixed1024; out_addr is the spectral index k in
// the low 2*cfg_n bits. cfg_n must not change while frames are in flight.
// Enabling the first n of the five levels follows the design description
// ("1024 points: all five levels; 256 points: the first four"); bypass by
// output selection is this implementation's choice.
module fft_var #(
  parameter int DW    = 16,
  parameter int LOG4N = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
  input  logic [fft_pkg::EW-1:0]  in_exp,
  output logic                    in_can_claim,
  input  logic                    in_claim,
  output logic                    out_valid,
  output logic [2*LOG4N-1:0]      out_addr,
  output logic signed [DW+2:0]    out_re,
  output logic signed [DW+2:0]    out_im,
  output logic [fft_pkg::EW-1:0]  out_exp,
  output logic                    out_last,
  input  logic                    dn_can_claim,
  output logic                    dn_claim
);
  import fft_pkg::*;
  localparam int AW = 2 * LOG4N;

  logic [4:0]    len_log;
  logic [AW-1:0] icnt, irev, len_m1;
  assign len_log = 5'({cfg_n, 1'b0});
  assign len_m1  = AW'((1 << len_log) - 1);

  always_comb begin
    irev = '0;
    for (int d = 0; d < LOG4N; d++)
      if (d < int'(cfg_n))
        irev[2*(int'(cfg_n)-1-d) +: 2] = icnt[2*d +: 2];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        icnt <= '0;
    else if (in_valid) icnt <= (icnt == len_m1) ? '0 : icnt + 1'b1;

  logic                 v   [LOG4N+1];
  logic [AW-1:0]        a   [LOG4N+1];
  logic signed [DW+2:0] re  [LOG4N+1];
  logic signed [DW+2:0] im  [LOG4N+1];
  logic [EW-1:0]        e   [LOG4N+1];
  logic                 lst [LOG4N+1];
  logic                 cc  [LOG4N+1];
  logic                 cl  [LOG4N+1];

  assign v[0]   = in_valid;
  assign a[0]   = irev;
  assign re[0]  = (DW+3)'(in_re);
  assign im[0]  = (DW+3)'(in_im);
  assign e[0]   = in_exp;
  assign lst[0] = in_valid;          // frames of one word when cfg_n = 0
  assign cl[0]  = in_claim;

  for (genvar s = 1; s <= LOG4N; s++) begin : g_lvl
    logic en, dcc, wen, cfrom;
    assign en    = s <= int'(cfg_n);                      // configuration logic
    assign dcc   = (s == int'(cfg_n)) ? dn_can_claim : cc[s];
    assign wen   = en && v[s-1];
    assign cfrom = en && cl[s-1];
    r4_stage #(.STAGE(s), .DW(DW), .AW(AW)) u_stage (
      .clk, .rst_n, .len_log,
      .wr_en(wen), .wr_addr(a[s-1]), .wr_re(re[s-1]), .wr_im(im[s-1]), .wr_exp(e[s-1]),
      .can_claim(cc[s-1]), .claim(cfrom),
      .out_valid(v[s]), .out_addr(a[s]), .out_re(re[s]), .out_im(im[s]), .out_exp(e[s]),
      .out_last(lst[s]), .dn_can_claim(dcc), .dn_claim(cl[s]));
  end
  assign cc[LOG4N] = dn_can_claim;

  // output selection: the last enabled level
  always_comb begin
    in_can_claim = (cfg_n == 3'd0) ? dn_can_claim : cc[0];
    dn_claim     = (cfg_n == 3'd0) ? in_claim : 1'b0;
    out_valid = v[0]; out_addr = '0; out_re = re[0]; out_im = im[0];
    out_exp = e[0]; out_last = lst[0];
    for (int s = 1; s <= LOG4N; s++)
      if (s == int'(cfg_n)) begin
        out_valid = v[s]; out_addr = a[s]; out_re = re[s]; out_im = im[s];
        out_exp = e[s]; out_last = lst[s]; dn_claim = cl[s];
      end
  end
endmodule
