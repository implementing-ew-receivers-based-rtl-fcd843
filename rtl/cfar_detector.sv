// cfar_detector: spectral threshold detector combining CMLD-CFAR and GO-CFAR.
//
// The power |X(k)|^2 = re^2 + im^2 of each spectral line enters a sliding
// window of RREF reference cells (half on each side), GUARD guard cells (half
// on each side) and the cell under test (CUT) in the middle.
//  * CMLD (censored mean level): the RCENS largest reference cells are
//    discarded (they may hold harmonics or other signals) and the rest are
//    summed, Z = sum of the RREF-RCENS smallest; threshold T*Z.
//  * GO (greatest of): the larger of the left and right reference sums, times
//    GO_SCALE.
// The detection threshold is the larger of the two, and a line is reported
// when its power exceeds it. The censoring works by ranking: each reference
// cell counts how many cells are larger (ties broken by position), and the
// cells ranked below RCENS form the censored sum, which is subtracted from the
// total.
//
// Interface: in_valid/in_re/in_im, one spectral line per valid, lines of
// consecutive blocks form one continuous stream (the window is not restarted at
// a block edge). After the window has filled, every valid input produces one
// result for the line that entered WIN/2 inputs earlier: out_valid, out_tag
// (the in_tag of that line), out_power, out_thr, out_det, one cycle after the input. RREF = 64, RCENS = 8, T = 0.125
// and a guard of 8 cells follow the design's simulation set-up; the split of
// the guard cells into 4 per side, the GO-CFAR scale (not given) and the
// streaming window are this implementation's choices.
module cfar_detector #(
  parameter int DW       = 16,
  parameter int RREF     = 64,    // reference cells (R for CMLD, M for GO)
  parameter int RCENS    = 8,     // largest cells censored by CMLD (r)
  parameter int GUARD    = 8,     // guard cells around the CUT
  parameter int T_Q8     = 32,    // CMLD nominal factor T = 0.125, 8 fraction bits
  parameter int GO_Q8    = 40,    // GO factor on the larger half sum, 8 fraction bits
  parameter int TAGW     = 20     // width of the line index carried along
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  input  logic [TAGW-1:0]       in_tag,
  output logic                  out_valid,
  output logic [TAGW-1:0]       out_tag,
  output logic [2*DW:0]         out_power,
  output logic [2*DW+$clog2(RREF)+9:0] out_thr,
  output logic                  out_det
);
  localparam int PW   = 2 * DW + 1;                 // power width
  localparam int HALF = RREF / 2;
  localparam int GH   = GUARD / 2;
  localparam int WIN  = RREF + GUARD + 1;
  localparam int CUT  = HALF + GH;
  localparam int SUMW = PW + $clog2(RREF) + 1;
  localparam int THW  = SUMW + 8;

  logic [PW-1:0] win [WIN];
  logic [TAGW-1:0] tag [CUT+1];
  logic [PW-1:0] pin;
  logic [$clog2(WIN+1)-1:0] fill;

  assign pin = PW'(in_re * in_re) + PW'(in_im * in_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win  <= '{default: '0};
      tag  <= '{default: '0};
      fill <= '0;
    end else if (in_valid) begin
      win[0] <= pin;
      for (int i = 1; i < WIN; i++) win[i] <= win[i-1];
      tag[0] <= in_tag;
      for (int i = 1; i <= CUT; i++) tag[i] <= tag[i-1];
      if (fill != ($clog2(WIN+1))'(WIN)) fill <= fill + 1'b1;
    end
  end

  // reference cells: window positions 0..HALF-1 and CUT+GH+1..WIN-1
  logic [PW-1:0]   ref_v [RREF];
  logic [SUMW-1:0] sum_l, sum_r, sum_top, z;
  logic [THW-1:0]  thr_cmld, thr_go, thr;

  // rank of each reference cell: the number of cells above it, ties broken
  // by position, so exactly RCENS cells have rank < RCENS
  logic [RREF-1:0] is_top;

  for (genvar gi = 0; gi < RREF; gi++) begin : g_rank
    logic [RREF-1:0] above;
    for (genvar gj = 0; gj < RREF; gj++) begin : g_cmp
      if (gj == gi) begin : g_self
        assign above[gj] = 1'b0;
      end else begin : g_other
        assign above[gj] = ref_v[gj] > ref_v[gi] || (ref_v[gj] == ref_v[gi] && gj < gi);
      end
    end
    assign is_top[gi] = $countones(above) < RCENS;
  end

  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      ref_v[i]        = win[i];
      ref_v[HALF + i] = win[CUT + GH + 1 + i];
    end
  end

  always_comb begin
    sum_l = '0; sum_r = '0; sum_top = '0;
    for (int i = 0; i < HALF; i++) begin
      sum_l = sum_l + SUMW'(ref_v[i]);
      sum_r = sum_r + SUMW'(ref_v[HALF + i]);
    end
    for (int i = 0; i < RREF; i++)
      if (is_top[i]) sum_top = sum_top + SUMW'(ref_v[i]);
    z        = sum_l + sum_r - sum_top;
    thr_cmld = (THW'(z) * THW'(T_Q8)) >> 8;
    thr_go   = (THW'((sum_l > sum_r) ? sum_l : sum_r) * THW'(GO_Q8)) >> 8;
    thr      = (thr_cmld > thr_go) ? thr_cmld : thr_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_power <= '0;
      out_tag   <= '0;
      out_thr   <= '0;
      out_det   <= 1'b0;
    end else begin
      out_valid <= in_valid && fill == ($clog2(WIN+1))'(WIN);
      out_power <= win[CUT];
      out_tag   <= tag[CUT];
      out_thr   <= thr;
      out_det   <= THW'(win[CUT]) > thr;
    end
  end
endmodule
