// dwt2d_top -- single-level separable 2-D 9/7 DWT of an IMG_H x IMG_W image
// using NEDA (multiplier-free, ROM-free distributed arithmetic) filters.
//
// Operation alternates between two phases per frame:
//  * ROW phase: pixels arrive row-major on pix_* (valid/ready). The row
//    stage (dwt_1d, DATA_W-bit input) filters each row with the 9-tap
//    low-pass and 7-tap high-pass NEDA units and writes each (L, H) result
//    pair into transpose_buffer at [row][pair].
//  * COLUMN phase: once all IMG_H * IMG_W/2 pairs are stored, columns are
//    read back, first the IMG_W/2 low-pass columns (L) and then the IMG_W/2
//    high-pass columns (H), each from the top row down, into the column stage
//    (a second dwt_1d, RY_W-bit input). Every column yields IMG_H/2 outputs:
//    yl is the low-pass result and yh the high-pass result, i.e. (LL, LH)
//    for an L column (band_sel = 0) and (HL, HH) for an H column
//    (band_sel = 1). out_col is the column (0 .. IMG_W-1, L columns first),
//    out_row the output index down the column. pix_ready is low during this
//    phase, and from the last pixel of a frame on, until the frame's last
//    output; frame_done pulses with that last output.
// Both stages clear their delay lines at the end of every line, so each
// row and column is filtered from zero history, and keep every second
// filter output (samples 1, 3, 5, .. of the line).
//
// Widths: row results are RY_W = 15 bits, column results CY_W = 26 bits
// internally; yl/yh are their OUT_W = 20 low bits, which holds every
// result for the default coefficients and 4-bit signed pixels (largest
// magnitude 1520 * 190 = 288800 < 2^19). A frame takes about
// IMG_H*IMG_W/2 * (COEF_W+1) clocks per phase.
//
// The NEDA filters, the 4-bit input and the 20-bit outputs follow the
// document. The frame buffer, the phase sequencing, the line boundary
// handling and the image size are this design's own: the document gives
// none of them.
module dwt2d_top #(
  parameter int unsigned IMG_W  = 16,
  parameter int unsigned IMG_H  = 16,
  parameter int unsigned DATA_W = neda_pkg::DATA_W,
  parameter int unsigned COEF_W = neda_pkg::COEF_W,
  parameter int unsigned OUT_W  = neda_pkg::OUT_W,
  localparam int unsigned CW    = $clog2(IMG_W),
  localparam int unsigned RWID  = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [DATA_W-1:0] pix_data,
  output logic              out_valid,
  output logic [OUT_W-1:0]  yl,
  output logic [OUT_W-1:0]  yh,
  output logic              band_sel,
  output logic [CW-1:0]     out_col,
  output logic [RWID-1:0]   out_row,
  output logic              frame_done
);
  import neda_pkg::*;

  localparam int unsigned RY_W   = (DATA_W + 1) + $clog2(LP_NR + 1) + COEF_W;
  localparam int unsigned CY_W   = (RY_W + 1) + $clog2(LP_NR + 1) + COEF_W;
  localparam int unsigned HALF_W = IMG_W / 2;
  localparam int unsigned HALF_H = IMG_H / 2;
  localparam int unsigned NWORDS = IMG_H * HALF_W;
  localparam int unsigned AW     = (NWORDS > 1) ? $clog2(NWORDS) : 1;
  localparam int unsigned PW     = (HALF_W > 1) ? $clog2(HALF_W) : 1;

  typedef enum logic {PH_ROW, PH_COL} phase_e;
  phase_e phase;

  // ---------------- row stage ----------------
  logic            row_in_ready, row_accept, row_last;
  logic            row_out_valid;
  logic [RY_W-1:0] row_lo, row_hi;
  logic [CW-1:0]   pix_col;
  logic [RWID-1:0] pix_row;
  logic            pix_hold;   // whole frame taken, waiting for the column phase to end
  logic [PW-1:0]   wr_pair;
  logic [RWID-1:0] wr_row;
  logic [AW-1:0]   wr_addr;
  logic            rows_done;
  logic            cols_done;

  assign pix_ready  = (phase == PH_ROW) && !pix_hold && row_in_ready;
  assign row_accept = pix_valid && pix_ready;
  assign row_last   = (pix_col == CW'(IMG_W - 1));

  dwt_1d #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_row (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid && (phase == PH_ROW) && !pix_hold), .in_ready(row_in_ready),
    .in_data(pix_data), .in_last(row_last),
    .out_valid(row_out_valid), .out_lo(row_lo), .out_hi(row_hi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_col  <= '0;
      pix_row  <= '0;
      pix_hold <= 1'b0;
    end else begin
      if (row_accept) begin
        pix_col <= row_last ? '0 : pix_col + 1'b1;
        if (row_last) begin
          if (pix_row == RWID'(IMG_H - 1)) begin
            pix_row  <= '0;
            pix_hold <= 1'b1;
          end else begin
            pix_row <= pix_row + 1'b1;
          end
        end
      end
      if (cols_done) pix_hold <= 1'b0;
    end
  end

  assign wr_addr   = AW'(wr_row) * AW'(HALF_W) + AW'(wr_pair);
  assign rows_done = row_out_valid && (wr_pair == PW'(HALF_W - 1))
                     && (wr_row == RWID'(IMG_H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pair <= '0;
      wr_row  <= '0;
    end else if (row_out_valid) begin
      if (wr_pair == PW'(HALF_W - 1)) begin
        wr_pair <= '0;
        wr_row  <= (wr_row == RWID'(IMG_H - 1)) ? '0 : wr_row + 1'b1;
      end else begin
        wr_pair <= wr_pair + 1'b1;
      end
    end
  end

  // ---------------- transpose buffer ----------------
  logic                 rd_en;
  logic [AW-1:0]        rd_addr;
  logic [2*RY_W-1:0]    rd_word;

  transpose_buffer #(.W(2 * RY_W), .DEPTH(NWORDS)) u_buf (
    .clk(clk), .we(row_out_valid), .waddr(wr_addr), .wdata({row_hi, row_lo}),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_word)
  );

  // ---------------- column feed ----------------
  // rd_col/rd_row walk the columns; feed_* is the word fetched for the
  // column stage, held until it is accepted.
  logic [CW-1:0]   rd_col;
  logic [RWID-1:0] rd_row;
  logic            rd_more;     // words still to fetch this frame
  logic            feed_valid, feed_last;
  logic            col_in_ready, col_accept;
  logic [RY_W-1:0] feed_data;
  logic            hsel_q, last_q;
  logic [PW-1:0]   rd_pair;

  assign rd_pair    = (rd_col >= CW'(HALF_W)) ? PW'(rd_col - CW'(HALF_W)) : PW'(rd_col);
  assign rd_addr    = AW'(rd_row) * AW'(HALF_W) + AW'(rd_pair);
  assign col_accept = feed_valid && col_in_ready;
  assign rd_en      = (phase == PH_COL) && rd_more && (!feed_valid || col_accept);
  assign feed_data  = hsel_q ? rd_word[2*RY_W-1:RY_W] : rd_word[RY_W-1:0];
  assign feed_last  = last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_col     <= '0;
      rd_row     <= '0;
      rd_more    <= 1'b0;
      feed_valid <= 1'b0;
      hsel_q     <= 1'b0;
      last_q     <= 1'b0;
    end else begin
      if (rows_done) rd_more <= 1'b1;
      if (col_accept) feed_valid <= 1'b0;
      if (rd_en) begin
        feed_valid <= 1'b1;
        hsel_q     <= (rd_col >= CW'(HALF_W));
        last_q     <= (rd_row == RWID'(IMG_H - 1));
        if (rd_row == RWID'(IMG_H - 1)) begin
          rd_row <= '0;
          if (rd_col == CW'(IMG_W - 1)) begin
            rd_col  <= '0;
            rd_more <= 1'b0;
          end else begin
            rd_col <= rd_col + 1'b1;
          end
        end else begin
          rd_row <= rd_row + 1'b1;
        end
      end
    end
  end

  // ---------------- column stage ----------------
  logic            col_out_valid;
  logic [CY_W-1:0] col_lo, col_hi;

  dwt_1d #(.DATA_W(RY_W), .COEF_W(COEF_W)) u_col (
    .clk(clk), .rst_n(rst_n),
    .in_valid(feed_valid), .in_ready(col_in_ready),
    .in_data(feed_data), .in_last(feed_last),
    .out_valid(col_out_valid), .out_lo(col_lo), .out_hi(col_hi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_col <= '0;
      out_row <= '0;
    end else if (col_out_valid) begin
      if (out_row == RWID'(HALF_H - 1)) begin
        out_row <= '0;
        out_col <= (out_col == CW'(IMG_W - 1)) ? '0 : out_col + 1'b1;
      end else begin
        out_row <= out_row + 1'b1;
      end
    end
  end

  assign cols_done  = col_out_valid && (out_row == RWID'(HALF_H - 1))
                      && (out_col == CW'(IMG_W - 1));
  assign out_valid  = col_out_valid;
  assign yl         = col_lo[OUT_W-1:0];
  assign yh         = col_hi[OUT_W-1:0];
  assign band_sel   = (out_col >= CW'(HALF_W));
  assign frame_done = cols_done;

  // ---------------- phase ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          phase <= PH_ROW;
    else if (rows_done)  phase <= PH_COL;
    else if (cols_done)  phase <= PH_ROW;
  end

  // the column stage only ever sees words of the current frame
  a_feed_in_col: assert property (@(posedge clk) disable iff (!rst_n)
                                  feed_valid |-> phase == PH_COL);
endmodule
