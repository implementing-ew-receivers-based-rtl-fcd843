// r4_stage: one pipeline level of the radix-4 decimation-in-time FFT.
//
// A level owns a ping-pong memory (bfp_pingpong) into which the previous level
// writes its results at their in-place addresses. When a full frame of
// 2^len_log words waits and the next level can take a frame, the level reads
// the frame in butterfly order, one word per cycle: butterfly b = c/4 reads its
// input q = c%4 from address  g*4^S + n + q*4^(S-1),  where n = b mod 4^(S-1)
// and g = b / 4^(S-1), i.e. the two bits of q are inserted into b at bit
// 2(S-1). The twiddle address unit forms q*n*4^(5-S), the exponent of W_1024,
// in step, and the factor is produced by twiddle_interp. Every fourth word the
// radix-4 butterfly fires; its four results leave over the next four cycles
// with the addresses the inputs came from, so the frame stays in natural
// in-place order and the next level simply writes them there.
// Block floating point: words are read already scaled to DW bits by the
// memory's block exponent, which travels with the frame (out_exp); the
// butterfly output has DW+3 bits, rescaled by the next level's memory.
//
// Interface: write port and claim handshake as in bfp_pingpong; the output is
// a stream out_valid/out_addr/out_re/out_im/out_exp with out_last on the final
// word of a frame, which never stalls once the frame has started; a frame is
// started only while dn_can_claim, and dn_claim marks its start.
// Timing: results leave 7 to 10 cycles after their reads; one idle cycle
// separates frames. The level structure, DIT radix-4, ping-pong memories and
// block floating point follow the design description; the serial one-word-per-
// cycle access, the addressing and the handshake are this implementation's.
module r4_stage #(
  parameter int STAGE = 1,    // level number, 1 = first (butterflies of span 1)
  parameter int DW    = 16,   // butterfly input width
  parameter int AW    = 10    // log2 of the largest frame (1024 points)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [4:0]                    len_log,   // frame length 2^len_log, even, >= 2*STAGE
  // write side (previous level)
  input  logic                          wr_en,
  input  logic [AW-1:0]                 wr_addr,
  input  logic signed [DW+2:0]          wr_re,
  input  logic signed [DW+2:0]          wr_im,
  input  logic [fft_pkg::EW-1:0]        wr_exp,
  output logic                          can_claim,
  input  logic                          claim,
  // result stream (next level)
  output logic                          out_valid,
  output logic [AW-1:0]                 out_addr,
  output logic signed [DW+2:0]          out_re,
  output logic signed [DW+2:0]          out_im,
  output logic [fft_pkg::EW-1:0]        out_exp,
  output logic                          out_last,
  input  logic                          dn_can_claim,
  output logic                          dn_claim
);
  import fft_pkg::*;

  localparam int SW = DW + 3;
  localparam int QS = 2 * (STAGE - 1);     // log2 of the butterfly span 4^(S-1)

  // ---------------- memory
  logic                  rd_avail, rd_en, rd_release, rd_valid, wr_ready_unused;
  logic [AW-1:0]         rd_addr;
  logic signed [DW-1:0]  rd_re, rd_im;
  logic [EW-1:0]         rd_exp;

  bfp_pingpong #(.SW(SW), .DW(DW), .AW(AW), .KW(0)) u_mem (
    .clk, .rst_n, .len_log, .key_log(5'd0),
    .wr_en, .wr_addr, .wr_re, .wr_im, .wr_exp, .wr_ready(wr_ready_unused),
    .claim, .can_claim,
    .rd_avail, .rd_en, .rd_addr, .rd_release,
    .rd_valid, .rd_re, .rd_im, .rd_exp);

  // ---------------- data and twiddle address units
  logic          busy;
  logic [AW-1:0] c;
  logic [AW-3:0] b, n;
  logic [1:0]    q;
  logic [9:0]    tw_exp;            // exponent of W_1024
  logic          last_rd;

  assign b = c[AW-1:2];
  assign q = c[1:0];
  assign n = b & ((AW-2)'(1 << QS) - 1'b1);
  assign rd_addr = AW'((AW'(b >> QS) << (QS + 2)) | (AW'(q) << QS) | AW'(n));
  assign tw_exp  = 10'((10'(q) * 10'(n)) << (2 * (5 - STAGE)));
  assign rd_en   = busy;
  assign last_rd = busy && ((AW+1)'(c) == ((AW+1)'(1) << len_log) - 1'b1);
  assign rd_release = last_rd;
  assign dn_claim   = !busy && rd_avail && dn_can_claim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      c    <= '0;
    end else if (dn_claim) begin
      busy <= 1'b1;
      c    <= '0;
    end else if (busy) begin
      busy <= !last_rd;
      c    <= c + 1'b1;
    end
  end

  logic signed [TW-1:0] tw_re, tw_im;
  twiddle_interp #(.IW(20)) u_tw (.clk, .idx({tw_exp, 10'd0}), .w_re(tw_re), .w_im(tw_im));

  // delay address, input number and end-of-frame flag to the read data
  logic [AW-1:0] addr_d [2];
  logic [1:0]    q_d [2];
  logic [1:0]    last_d;
  always_ff @(posedge clk) begin
    addr_d[0] <= rd_addr;  addr_d[1] <= addr_d[0];
    q_d[0]    <= q;        q_d[1]    <= q_d[0];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= '0;
    else        last_d <= {last_d[0], last_rd};
  end

  // ---------------- gather four inputs, fire the butterfly
  logic signed [DW-1:0] xs_re [3], xs_im [3];
  logic signed [TW-1:0] ws_re [1:2], ws_im [1:2];
  logic [AW-1:0]        as [3];
  logic signed [DW-1:0] bx_re [4], bx_im [4];
  logic signed [TW-1:0] bw_re [1:3], bw_im [1:3];
  logic                 bf_in, bf_out;
  logic signed [DW+2:0] y_re [4], y_im [4];
  logic [AW-1:0]        bf_addr [4];
  logic [EW-1:0]        bf_exp;
  logic                 bf_last;

  assign bf_in = rd_valid && (q_d[1] == 2'd3);

  always_ff @(posedge clk) begin
    if (rd_valid && q_d[1] != 2'd3) begin
      xs_re[q_d[1]] <= rd_re;
      xs_im[q_d[1]] <= rd_im;
      as[q_d[1]]    <= addr_d[1];
      if (q_d[1] != 2'd0) begin
        ws_re[q_d[1]] <= tw_re;
        ws_im[q_d[1]] <= tw_im;
      end
    end
    if (bf_in) begin
      bf_addr <= '{as[0], as[1], as[2], addr_d[1]};
      bf_exp  <= rd_exp;
      bf_last <= last_d[1];
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      bx_re[k] = xs_re[k];
      bx_im[k] = xs_im[k];
    end
    bx_re[3] = rd_re;
    bx_im[3] = rd_im;
    bw_re[1] = ws_re[1]; bw_im[1] = ws_im[1];
    bw_re[2] = ws_re[2]; bw_im[2] = ws_im[2];
    bw_re[3] = tw_re;    bw_im[3] = tw_im;
  end

  r4_butterfly #(.DW(DW)) u_bf (
    .clk, .rst_n, .in_valid(bf_in), .x_re(bx_re), .x_im(bx_im), .w_re(bw_re), .w_im(bw_im),
    .out_valid(bf_out), .y_re, .y_im);

  // ---------------- serialise the four results
  logic signed [DW+2:0] s_re [4], s_im [4];
  logic [AW-1:0]        s_addr [4];
  logic [1:0]           scnt;
  logic                 sact, s_last;

  always_ff @(posedge clk) begin
    if (bf_out) begin
      s_re   <= y_re;
      s_im   <= y_im;
      s_addr <= bf_addr;
      out_exp <= bf_exp;
      s_last <= bf_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sact <= 1'b0;
      scnt <= '0;
    end else if (bf_out) begin
      sact <= 1'b1;
      scnt <= '0;
    end else if (sact) begin
      scnt <= scnt + 1'b1;
      sact <= scnt != 2'd3;
    end
  end

  assign out_valid = sact;
  assign out_re    = s_re[scnt];
  assign out_im    = s_im[scnt];
  assign out_addr  = s_addr[scnt];
  assign out_last  = sact && s_last && scnt == 2'd3;
endmodule
