// col_fetch: input rearrangement buffer with fetch-data and repetition control
// for the column transforms.
//
// N = 1024 * M samples (M = 4^cfg_n) are written in arrival order into one bank
// of a ping-pong memory, so sample x(n) sits at address n = M*n1 + n0. Once a
// bank is full it is read as M columns: column n0 is the 1024 samples
// x(M*n1 + n0), n1 = 0..1023, i.e. addresses n1*M + n0, which form one frame
// for the 1024-point column FFT. The repetition counter steps n0 through all
// M columns, then the bank is released. While one bank is read the next N
// samples fill the other.
//
// Interface: the sample source uses in_valid/in_ready (ready is low only when
// both banks hold unread data). Each column is claimed from the FFT
// (dn_claim while dn_can_claim) and then streamed without gaps on
// out_valid/out_re/out_im, two cycles behind its reads. One idle cycle
// separates columns. cfg_n must stay constant while data is held.
// Reading the input as a 1024 x 4^n array column by column follows the design
// description (steps 1 and 2); the memory organisation is this design's.
module col_fetch #(
  parameter int DW   = 16,
  parameter int NMAX = 5          // largest N = 1024 * 4^NMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              cfg_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [DW-1:0]    in_re,
  input  logic signed [DW-1:0]    in_im,
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
  logic [AW-1:0] wcnt, rd_addr;
  logic [9:0]    n1;
  logic [AW-1:0] n0;
  logic          busy, rd_en, rd_release, rd_avail, can_claim_unused, wr_en;
  logic          col_end, last_col;

  assign m_log   = 5'({cfg_n, 1'b0});
  assign len_log = 5'(LOG2_L) + m_log;
  assign wr_en   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     wcnt <= '0;
    else if (wr_en) wcnt <= ((AW+1)'(wcnt) == ((AW+1)'(1) << len_log) - 1'b1) ? '0 : wcnt + 1'b1;

  bfp_pingpong #(.SW(DW), .DW(DW), .AW(AW), .KW(0)) u_mem (
    .clk, .rst_n, .len_log, .key_log(5'd0),
    .wr_en, .wr_addr(wcnt), .wr_re(in_re), .wr_im(in_im), .wr_exp('0), .wr_ready(in_ready),
    .claim(1'b0), .can_claim(can_claim_unused),
    .rd_avail, .rd_en, .rd_addr, .rd_release,
    .rd_valid(out_valid), .rd_re(out_re), .rd_im(out_im), .rd_exp(out_exp));

  // fetch-data address unit and repetition control
  assign rd_addr    = (AW'(n1) << m_log) | n0;
  assign rd_en      = busy;
  assign col_end    = busy && n1 == 10'h3FF;
  assign last_col   = n0 == (AW'(1) << m_log) - 1'b1;
  assign rd_release = col_end && last_col;
  assign dn_claim   = !busy && rd_avail && dn_can_claim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      n1   <= '0;
      n0   <= '0;
    end else begin
      if (dn_claim) begin
        busy <= 1'b1;
        n1   <= '0;
      end else if (busy) begin
        n1 <= n1 + 1'b1;
        if (col_end) begin
          busy <= 1'b0;
          n0   <= last_col ? '0 : n0 + 1'b1;
        end
      end
    end
  end
endmodule
