// hist_equalizer: the image-processing core. It equalizes the histogram of a
// 24-bit colour image so that an over- or under-exposed picture spreads over
// the whole tone range, using one transformation shared by the three channels.
//
// A run goes through four phases after `start`:
//   HIST  first pass over the image: each pixel adds one to the bin of its
//         value in each of the three 256-bin channel histograms h0, h1, h2;
//   CUMU  256 steps build the cumulative distribution of all three channels
//         together, cum[i] = sum over k <= i of h0[k] + h1[k] + h2[k]
//         (a two-stage pipeline: sum the three bins, then accumulate);
//   TRAN  256 steps feed the 40-stage divider with 255*cum[i] and the divisor
//         3*M*N; the quotients form the transformation table
//         t[i] = floor(255 * cum[i] / (3*M*N));
//   SCAN  second pass over the image: every channel value v is replaced by
//         t[v] and the pixel goes to the write master.
// The histogram bins are memories that are cleared as CUMU reads them, so
// they are zero again for the next image; after reset a CLEAR sweep of 256
// cycles zeroes them once, during which the core reports busy and ignores
// `start`.
// The run ends when the write master reports the last word written; `done`
// then pulses and the core returns to idle. For M x N pixels at one pixel per
// clock this takes about 2*M*N + 256 + 256 + 40 cycles plus a few cycles of
// pipeline fill.
// Pixel input is a valid/ready stream from the read master; in SCAN `ready`
// drops while the write master signals `write_full`, which pauses the pass.
// The output stream has no ready: the write master sizes its FIFO for it.
// The phases, the shared cumulative function over the three channels, the
// 255/(3*M*N) scaling and the 40-step division follow the description; the
// pipeline depths of CUMU and TRAN, the clear-on-read histogram and the
// handshakes are this design's.
module hist_equalizer
  import he_pkg::*;
#(
  parameter int unsigned PIX_W      = 18,          // bits of a pixel count
  parameter int unsigned DIVIDEND_W = 40,          // divider width = its pipeline steps
  localparam int unsigned HW        = PIX_W,       // one channel histogram bin
  localparam int unsigned CW        = PIX_W + 2    // cumulative count of three channels
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PIX_W-1:0] npix,
  output logic             busy,
  output logic             done,
  // read master control and pixel stream
  output logic             rd_go,
  input  pixel_t           pix_in,
  input  logic             pix_in_valid,
  output logic             pix_in_ready,
  input  logic             read_done,
  // write master control and pixel stream
  output logic             wr_go,
  output pixel_t           pix_out,
  output logic             pix_out_valid,
  input  logic             write_full,
  input  logic             write_done
);

  localparam int unsigned DIVISOR_W = COLOR_NUM * X;

  typedef enum logic [2:0] {CLEAR, IDLE, HIST, CUMU, TRAN, SCAN, DRAIN} state_e;
  state_e state;

  logic [HW-1:0]        hist [COLOR_NUM][W];
  logic [CW-1:0]        cum  [W];
  logic [X-1:0]         tmap [W];
  logic [DIVISOR_W-1:0] divisor;
  logic [X:0]           cnt;           // step counter for CUMU and TRAN

  // CUMU pipeline
  logic                 s1_v;
  logic [X-1:0]         s1_idx;
  logic [CW-1:0]        s1_sum, acc;

  // divider
  logic                  div_in_v, div_out_v;
  logic [DIVIDEND_W-1:0] div_num, div_q;
  logic [DIVISOR_W-1:0]  div_rem;
  logic [X-1:0]          div_in_tag, div_out_tag;

  logic pix_fire;

  assign busy         = state != IDLE;
  assign pix_in_ready = state == HIST || (state == SCAN && !write_full);
  assign pix_fire     = pix_in_valid && pix_in_ready;

  // TRAN: issue step cnt to the divider, (2^X - 1) * cum = (cum << X) - cum.
  always_comb begin
    div_in_v   = state == TRAN && cnt < (X+1)'(W);
    div_in_tag = cnt[X-1:0];
    div_num    = (DIVIDEND_W'(cum[cnt[X-1:0]]) << X) - DIVIDEND_W'(cum[cnt[X-1:0]]);
  end

  pipelined_divider #(
    .DIVIDEND_W(DIVIDEND_W),
    .DIVISOR_W (DIVISOR_W),
    .TAG_W     (X)
  ) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (div_in_v),
    .dividend (div_num),
    .divisor  (divisor),
    .in_tag   (div_in_tag),
    .out_valid(div_out_v),
    .quotient (div_q),
    .remainder(div_rem),
    .out_tag  (div_out_tag)
  );

  // Control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= CLEAR;
      cnt           <= '0;
      divisor       <= '0;
      rd_go         <= 1'b0;
      wr_go         <= 1'b0;
      done          <= 1'b0;
      pix_out_valid <= 1'b0;
      pix_out       <= '0;
      s1_v          <= 1'b0;
      s1_idx        <= '0;
      s1_sum        <= '0;
      acc           <= '0;
    end else begin
      rd_go         <= 1'b0;
      wr_go         <= 1'b0;
      done          <= 1'b0;
      pix_out_valid <= 1'b0;
      s1_v          <= 1'b0;
      unique case (state)
        CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == (X+1)'(W - 1)) begin
            cnt   <= '0;
            state <= IDLE;
          end
        end
        IDLE: if (start) begin
          divisor <= DIVISOR_W'(npix) * DIVISOR_W'(COLOR_NUM);
          rd_go   <= 1'b1;
          state   <= HIST;
        end
        HIST: if (read_done) begin
          cnt   <= '0;
          acc   <= '0;
          state <= CUMU;
        end
        CUMU: begin
          if (cnt < (X+1)'(W)) begin
            s1_v   <= 1'b1;
            s1_idx <= cnt[X-1:0];
            s1_sum <= CW'(hist[0][cnt[X-1:0]]) + CW'(hist[1][cnt[X-1:0]])
                    + CW'(hist[2][cnt[X-1:0]]);
            cnt    <= cnt + 1'b1;
          end
          if (s1_v) acc <= acc + s1_sum;
          if (s1_v && s1_idx == X'(W - 1)) begin
            cnt   <= '0;
            state <= TRAN;
          end
        end
        TRAN: begin
          if (cnt < (X+1)'(W)) cnt <= cnt + 1'b1;
          if (div_out_v && div_out_tag == X'(W - 1)) begin
            rd_go <= 1'b1;
            wr_go <= 1'b1;
            state <= SCAN;
          end
        end
        SCAN: begin
          if (pix_fire) begin
            for (int k = 0; k < int'(COLOR_NUM); k++)
              pix_out[k*X +: X] <= tmap[pix_in[k*X +: X]];
            pix_out_valid <= 1'b1;
          end
          if (read_done) state <= DRAIN;
        end
        DRAIN: if (write_done) begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Histogram bins: one increment per channel per pixel in HIST; each bin is
  // cleared as CUMU reads it, and all bins are swept once after reset.
  logic hist_clr;
  assign hist_clr = state == CLEAR || (state == CUMU && cnt < (X+1)'(W));
  for (genvar k = 0; k < int'(COLOR_NUM); k++) begin : g_hist
    always_ff @(posedge clk) begin
      if (hist_clr)
        hist[k][cnt[X-1:0]] <= '0;
      else if (state == HIST && pix_fire)
        hist[k][pix_in[k*X +: X]] <= hist[k][pix_in[k*X +: X]] + 1'b1;
    end
  end

  // Cumulative function, second CUMU stage.
  always_ff @(posedge clk)
    if (state == CUMU && s1_v) cum[s1_idx] <= acc + s1_sum;

  // Transformation table; the quotient never exceeds 2^X - 1.
  always_ff @(posedge clk)
    if (div_out_v) tmap[div_out_tag] <= div_q[X-1:0];

  a_quotient_range: assert property (@(posedge clk) disable iff (!rst_n)
                                     div_out_v |-> div_q < DIVIDEND_W'(W));

endmodule
