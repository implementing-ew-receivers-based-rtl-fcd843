// twiddle_interp: twiddle factor W = exp(-j*2*pi*i/2^20) for a 20-bit index i,
// from a compressed table.
//
// Instead of storing all 2^20 factors (2M x 18 bits), the quarter of a quadrant
// (one octant, 0..pi/4) is cut into 1024 segments of P = 128 index steps. For
// each segment k the table keeps the start values R_B = cos and I_B = sin at
// i_k = 128k as 18-bit Q1.16 numbers, and the rise of each over the segment
// (R_delta, I_delta, 14 bits, = value at i_(k+1) minus value at i_k). A factor
// inside the segment is R_B + R_delta*(i - i_k)/128: one multiplication and one
// addition. Two 32-bit words {base, rise} per segment give the 2k x 32-bit table
// of the design description. The octant symmetries of sine and cosine map any
// index onto the first octant. The table is computed at elaboration from
// $cos/$sin; the segment length 128, the 18-bit twiddle and the 2k x 32 table
// follow the design description; the octant folding, the Q1.16 format and the
// rounding of the interpolation are this implementation's choices.
//
// Timing: idx is registered with the table read (cycle 1); w_re/w_im appear two
// clock cycles after idx. No handshake: a new index may enter every cycle.
module twiddle_interp #(
  parameter int IW = 20   // index width, the table covers 2^IW points
) (
  input  logic                           clk,
  input  logic [IW-1:0]                  idx,
  output logic signed [fft_pkg::TW-1:0]  w_re,   //  cos(2*pi*i/2^IW)
  output logic signed [fft_pkg::TW-1:0]  w_im    // -sin(2*pi*i/2^IW)
);
  import fft_pkg::*;

  localparam int SEGS = 1024;              // segments in one octant
  localparam int OCT  = IW - 3;            // index bits inside one octant
  localparam int PLOG = OCT - 10;          // log2 of the segment length P
  localparam int DWD  = 14;                // width of a stored rise
  localparam real PI  = 3.14159265358979323846;

  typedef logic [31:0] tab_t [2*SEGS];

  function automatic int qval(input real v);
    return $rtoi(v * (1 << TW_FRAC) + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // word 2k = {cos base, cos rise}, word 2k+1 = {sin base, sin rise}
  function automatic tab_t make_table();
    tab_t t;
    int c0, c1, s0, s1;
    real a0, a1;
    for (int k = 0; k < SEGS; k++) begin
      a0 = 2.0 * PI * real'(k) / real'(8 * SEGS);
      a1 = 2.0 * PI * real'(k + 1) / real'(8 * SEGS);
      c0 = qval($cos(a0)); c1 = qval($cos(a1));
      s0 = qval($sin(a0)); s1 = qval($sin(a1));
      t[2*k]   = {TW'(c0), DWD'(c1 - c0)};
      t[2*k+1] = {TW'(s0), DWD'(s1 - s0)};
    end
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  // ---- cycle 0: fold into the first octant
  logic [2:0]     oct;
  logic [OCT:0]   r;          // 0 .. 2^OCT inclusive
  logic [9:0]     seg;
  logic [PLOG:0]  off;        // 0 .. P inclusive

  always_comb begin
    oct = idx[IW-1 -: 3];
    r   = oct[0] ? ((OCT+1)'(1) << OCT) - (OCT+1)'(idx[OCT-1:0]) : (OCT+1)'(idx[OCT-1:0]);
    if (r[OCT]) begin             // exactly pi/4: end of the last segment
      seg = 10'(SEGS - 1);
      off = (PLOG+1)'(1) << PLOG;
    end else begin
      seg = r[OCT-1 -: 10];
      off = (PLOG+1)'(r[PLOG-1:0]);
    end
  end

  // ---- cycle 1: table read
  logic [31:0]    wc, ws;
  logic [2:0]     oct1;
  logic [PLOG:0]  off1;
  always_ff @(posedge clk) begin
    wc   <= TAB[{seg, 1'b0}];
    ws   <= TAB[{seg, 1'b1}];
    oct1 <= oct;
    off1 <= off;
  end

  // ---- cycle 2: interpolate and unfold
  logic signed [TW+1:0] c, s;
  always_comb begin
    c = (TW+2)'($signed(wc[31 -: TW])) +
        (TW+2)'(($signed(wc[DWD-1:0]) * $signed({1'b0, off1}) + (1 <<< (PLOG-1))) >>> PLOG);
    s = (TW+2)'($signed(ws[31 -: TW])) +
        (TW+2)'(($signed(ws[DWD-1:0]) * $signed({1'b0, off1}) + (1 <<< (PLOG-1))) >>> PLOG);
  end

  always_ff @(posedge clk) begin
    // (cos, sin) of the full angle from (c, s) of the folded angle
    unique case (oct1)
      3'd0: begin w_re <=  TW'(c); w_im <= -TW'(s); end
      3'd1: begin w_re <=  TW'(s); w_im <= -TW'(c); end
      3'd2: begin w_re <= -TW'(s); w_im <= -TW'(c); end
      3'd3: begin w_re <= -TW'(c); w_im <= -TW'(s); end
      3'd4: begin w_re <= -TW'(c); w_im <=  TW'(s); end
      3'd5: begin w_re <= -TW'(s); w_im <=  TW'(c); end
      3'd6: begin w_re <=  TW'(s); w_im <=  TW'(c); end
      default: begin w_re <= TW'(c); w_im <= TW'(s); end
    endcase
  end
endmodule
