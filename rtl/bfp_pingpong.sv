// bfp_pingpong: two-bank ping-pong memory with block floating point.
//
// One bank is written while the other is read, so a producer and a consumer
// can each stream a whole frame at one word per cycle. A bank holds 2^len_log
// complex words and is divided into 2^key_log sub-frames of equal length; each
// sub-frame arrives with its own block exponent (wr_exp). While a sub-frame is
// written the memory ORs together the magnitude patterns of its words; at its
// last word it works out how far the sub-frame must be shifted right to fit in
// DW bits, and keeps the largest "exponent + shift" of the bank as the bank's
// common exponent E. On the read side every word is shifted right by
// E - (exponent of its sub-frame), so all words leave in DW bits with the one
// exponent E (rd_exp). The sub-frame of a word read is addr[key_log-1:0]; this
// fits both transposition buffers of the large FFT, where the sub-frame index
// is the low part of the address.
//
// Interface:
//  * write: wr_en/wr_addr/wr_data/wr_exp. The bank fills after 2^len_log
//    writes; wr_ready is low while the bank next to be written is still full.
//  * claim/can_claim: a producer that streams whole sub-frames without stalls
//    asserts claim for one cycle when it starts one, and may do so only while
//    can_claim; at most two banks' worth of sub-frames are outstanding.
//  * read: rd_avail says a full bank waits; rd_en/rd_addr read it, rd_release
//    (one cycle, with or after the last rd_en) frees it. rd_valid/rd_data/
//    rd_exp follow rd_en by two cycles.
// Rounding is by truncation. len_log, key_log must stay constant while busy.
// The block floating point follows the design description; the sub-frame
// exponent alignment, truncation and the claim handshake are choices of this
// implementation.
module bfp_pingpong #(
  parameter int SW = 19,   // stored width of a real / imaginary part
  parameter int DW = 16,   // width of the words read
  parameter int AW = 10,   // log2 of the largest bank
  parameter int KW = 0     // log2 of the largest number of sub-frames per bank
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [4:0]            len_log,
  input  logic [4:0]            key_log,
  // write side
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic signed [SW-1:0]  wr_re,
  input  logic signed [SW-1:0]  wr_im,
  input  logic [fft_pkg::EW-1:0] wr_exp,
  output logic                  wr_ready,
  input  logic                  claim,
  output logic                  can_claim,
  // read side
  output logic                  rd_avail,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  input  logic                  rd_release,
  output logic                  rd_valid,
  output logic signed [DW-1:0]  rd_re,
  output logic signed [DW-1:0]  rd_im,
  output logic [fft_pkg::EW-1:0] rd_exp
);
  import fft_pkg::*;

  localparam int KD  = 1 << KW;
  localparam int KWW = (KW > 0) ? KW : 1;

  logic [2*SW-1:0] mem [2 << AW];
  logic [EW-1:0]   etab [2][KD];
  logic [EW-1:0]   ebank [2];
  logic [1:0]      full;
  logic            wb, rb;
  logic [AW-1:0]   wcnt;
  logic [SW-1:0]   wmag;               // OR of magnitude patterns of this sub-frame
  logic [KW+1:0]   claims;

  logic [AW:0]     len;
  logic [AW:0]     sublen_m1;
  logic [KW:0]     nsub;
  logic [KWW-1:0]  wkey;               // sub-frame index of the current write
  logic [SW-1:0]   mag_now;
  logic            sub_end;
  int              nbits;
  logic [EW:0]     need;

  assign len       = (AW+1)'(1) << len_log;
  assign sublen_m1 = ((AW+1)'(1) << (len_log - key_log)) - 1'b1;
  assign nsub      = (KW+1)'(1) << key_log;
  assign wkey      = KWW'(wcnt >> (len_log - key_log));
  assign mag_now   = wmag | SW'(wr_re ^ (wr_re >>> (SW-1))) | SW'(wr_im ^ (wr_im >>> (SW-1)));
  assign sub_end   = ((AW+1)'(wcnt) & sublen_m1) == sublen_m1;
  assign nbits     = signed_bits(64'(mag_now));
  assign need      = (EW+1)'(wr_exp) + ((nbits > DW) ? (EW+1)'(nbits - DW) : '0);

  assign wr_ready  = !full[wb];
  assign rd_avail  = full[rb];
  assign can_claim = claims < (KW+2)'(2 * nsub);

  // ---------------- write side
  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[{wb, wr_addr}] <= {wr_re, wr_im};
      etab[wb][wkey] <= wr_exp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      wb     <= 1'b0;
      rb     <= 1'b0;
      wcnt   <= '0;
      wmag   <= '0;
      claims <= '0;
      ebank  <= '{default: '0};
    end else begin
      if (wr_en) begin
        wmag <= sub_end ? '0 : mag_now;
        if (sub_end) begin
          // first sub-frame of a bank starts the running maximum afresh
          if (wcnt <= AW'(sublen_m1) || need > (EW+1)'(ebank[wb]))
            ebank[wb] <= EW'(need);
        end
        if ((AW+1)'(wcnt) == len - 1'b1) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
          wcnt     <= '0;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (rd_release) begin
        full[rb] <= 1'b0;
        rb       <= ~rb;
      end
      claims <= claims + (KW+2)'(claim) - (rd_release ? (KW+2)'(nsub) : '0);
    end
  end

  // ---------------- read side: cycle 1 memory and exponent table, cycle 2 shift
  logic [2*SW-1:0] q1;
  logic [EW-1:0]   esub1, ebank1;
  logic            v1;
  logic [KWW-1:0]  rkey;
  assign rkey = KWW'(rd_addr) & KWW'(nsub - 1'b1);

  always_ff @(posedge clk) begin
    q1     <= mem[{rb, rd_addr}];
    esub1  <= etab[rb][rkey];
    ebank1 <= ebank[rb];
  end

  logic [EW-1:0] sh;
  logic signed [SW-1:0] q1re, q1im;
  assign sh   = ebank1 - esub1;
  assign q1re = q1[2*SW-1:SW];
  assign q1im = q1[SW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      rd_valid <= 1'b0;
      rd_re    <= '0;
      rd_im    <= '0;
      rd_exp   <= '0;
    end else begin
      v1       <= rd_en;
      rd_valid <= v1;
      rd_re    <= DW'(q1re >>> sh);
      rd_im    <= DW'(q1im >>> sh);
      rd_exp   <= ebank1;
    end
  end

  // A producer must not claim beyond two banks and must not write a full bank.
  a_claim: assert property (@(posedge clk) disable iff (!rst_n) claim |-> can_claim);
  a_write: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full[wb]);
endmodule
