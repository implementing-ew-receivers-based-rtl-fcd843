// row_fetch: middle (transposition) buffer between the column and row FFTs.
//
// The twiddled column results arrive one column at a time, each tagged with
// its place k0*M + n0 in a 1024 x M array (M = 4^cfg_n), and are written there
// in a ping-pong memory. Every column carries its own block exponent; the
// memory aligns them all to the largest on reading (see bfp_pingpong; the
// column of a word is the low 2*cfg_n address bits). Once all M columns of a
// bank are in, the array is read row by row: row k0 is the M words
// k0*M .. k0*M + M-1, one frame for the M-point row FFT; 1024 rows, then the
// bank is released.
//
// Interface: the writer claims one column frame at a time (claim/can_claim,
// room for two banks); each row is claimed from the row FFT (dn_claim while
// dn_can_claim) and streamed two cycles behind its reads; one idle cycle
// separates rows. Steps 3 and 4 of the design description; the exponent
// alignment and memory organisation are this design's choices.
module row_fetch #(
  parameter int SW   = 20,        // stored width (twiddled column results)
  parameter int DW   = 16,        // width passed to the row FFT
  parameter int NMAX = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    wr_en,
  input  logic [fft_pkg::LOG2_L+2*NMAX-1:0] wr_addr,
  input  logic signed [SW-1:0]    wr_re,
  input  logic signed [SW-1:0]    wr_im,
  input  logic [fft_pkg::EW-1:0]  wr_exp,
  output logic                    can_claim,
  input  logic                    claim,
  output logic                    out_valid,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic [fft_pkg::EW-1:0]  out_exp,
  input  logic                    dn_can_claim,
  output logic                    dn_claim
);
  import fft_pkg::*;
  localparam int AW = LOG2_L + 2 * NMAX;

  logic [4:0]    len_log, m_log;
  logic [AW-1:0] rcnt;
  logic [AW-1:0] inrow;                 // position inside the current row
  logic          busy, rd_en, rd_release, rd_avail, wr_ready_unused, row_end;

  assign m_log   = 5'({cfg_n, 1'b0});
  assign len_log = 5'(LOG2_L) + m_log;

  bfp_pingpong #(.SW(SW), .DW(DW), .AW(AW), .KW(2*NMAX)) u_mem (
    .clk, .rst_n, .len_log, .key_log(m_log),
    .wr_en, .wr_addr, .wr_re, .wr_im, .wr_exp, .wr_ready(wr_ready_unused),
    .claim, .can_claim,
    .rd_avail, .rd_en, .rd_addr(rcnt), .rd_release,
    .rd_valid(out_valid), .rd_re(out_re), .rd_im(out_im), .rd_exp(out_exp));

  assign inrow      = rcnt & ((AW'(1) << m_log) - 1'b1);
  assign row_end    = busy && inrow == (AW'(1) << m_log) - 1'b1;
  assign rd_en      = busy;
  assign rd_release = row_end && ((AW+1)'(rcnt) == ((AW+1)'(1) << len_log) - 1'b1);
  assign dn_claim   = !busy && rd_avail && dn_can_claim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      rcnt <= '0;
    end else begin
      if (dn_claim) busy <= 1'b1;
      else if (row_end) busy <= 1'b0;
      if (busy) rcnt <= rd_release ? '0 : rcnt + 1'b1;
    end
  end
endmodule
