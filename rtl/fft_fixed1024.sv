// fft_fixed1024: fixed 1024-point FFT, five radix-4 DIT pipeline levels.
//
// The data input unit counts the words of each incoming frame and writes word
// m to the first level's ping-pong memory at the base-4 digit reversal of m, as
// decimation in time requires. Five r4_stage levels follow, each with its own
// ping-pong memory and block floating point, so up to five frames are in
// flight. The last level emits X(k) with k = out_addr in in-place (natural
// index) order of butterflies, not in sequence: a consumer writes each word at
// its address. out_exp is the frame's block exponent: the true spectrum is
// (out_re + j*out_im) * 2^out_exp.
//
// Interface: the producer claims a frame (in_claim while in_can_claim) and then
// writes its 1024 words, one per cycle or with gaps (in_valid). The output
// stream never stalls; a frame is started only while dn_can_claim. Throughput
// is one word per cycle (plus one cycle per frame and level); latency is about
// five frames. The five-level DIT radix-4 pipeline with ping-pong memories and
// block floating point follows the design description.
module fft_fixed1024 #(
  parameter int DW    = 16,
  parameter int LOG4N = 5     // number of levels; 4^LOG4N points
) (
  input  logic                    clk,
  input  logic                    rst_n,
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

  // data input unit: digit-reversed write addresses
  logic [AW-1:0] icnt, irev;
  always_comb
    for (int d = 0; d < LOG4N; d++)
      irev[2*(LOG4N-1-d) +: 2] = icnt[2*d +: 2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        icnt <= '0;
    else if (in_valid) icnt <= icnt + 1'b1;

  // level chain
  logic                 v   [LOG4N+1];
  logic [AW-1:0]        a   [LOG4N+1];
  logic signed [DW+2:0] re  [LOG4N+1];
  logic signed [DW+2:0] im  [LOG4N+1];
  logic [EW-1:0]        e   [LOG4N+1];
  logic                 lst [LOG4N+1];
  logic                 cc  [LOG4N+1];   // can_claim of level s (index s-1), downstream at LOG4N
  logic                 cl  [LOG4N+1];   // claim into level s (index s-1)

  assign v[0]  = in_valid;
  assign a[0]  = irev;
  assign re[0] = (DW+3)'(in_re);
  assign im[0] = (DW+3)'(in_im);
  assign e[0]  = in_exp;
  assign lst[0] = 1'b0;
  assign in_can_claim = cc[0];
  assign cl[0] = in_claim;
  assign cc[LOG4N] = dn_can_claim;
  assign dn_claim  = cl[LOG4N];

  for (genvar s = 1; s <= LOG4N; s++) begin : g_lvl
    r4_stage #(.STAGE(s), .DW(DW), .AW(AW)) u_stage (
      .clk, .rst_n, .len_log(5'(AW)),
      .wr_en(v[s-1]), .wr_addr(a[s-1]), .wr_re(re[s-1]), .wr_im(im[s-1]), .wr_exp(e[s-1]),
      .can_claim(cc[s-1]), .claim(cl[s-1]),
      .out_valid(v[s]), .out_addr(a[s]), .out_re(re[s]), .out_im(im[s]), .out_exp(e[s]),
      .out_last(lst[s]), .dn_can_claim(cc[s]), .dn_claim(cl[s]));
  end

  assign out_valid = v[LOG4N];
  assign out_addr  = a[LOG4N];
  assign out_re    = re[LOG4N];
  assign out_im    = im[LOG4N];
  assign out_exp   = e[LOG4N];
  assign out_last  = lst[LOG4N];
endmodule
