// tb_dwt2d_top -- end-to-end test of the 2-D NEDA 9/7 DWT at its default
// size (16 x 16 pixels of 4 bits, 20-bit outputs).
// Three frames are sent row-major with random gaps in pix_valid: random
// pixels, a constant image of ones, and a constant image of the most
// negative pixel (-8). The expected subbands come from the integer
// reference model (rows, then columns, each line from zero history,
// outputs at odd samples). Every output is checked for value (yl, yh),
// band_sel, out_col and out_row, and frame_done must pulse with the last
// output of each frame. For the image of ones, the last output of the
// last L and H column is also checked against the products of the row
// gains (158 low pass, 52 high pass). The testbench also counts that each mechanism of
// the design happened: input back-pressure during a row, input held off
// during the column phase, both band_sel values, line-end clears on the
// row and column stage, and the phase switch at each frame end.
module tb_dwt2d_top;
  import tb_ref_pkg::*;
  localparam int IMG_W = 16, IMG_H = 16, DATA_W = 4, OUT_W = 20;
  localparam int NFRAMES = 3;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready, out_valid, band_sel, frame_done;
  logic [DATA_W-1:0] pix_data = '0;
  logic [OUT_W-1:0] yl, yh;
  logic [3:0] out_col, out_row;
  int checks = 0, failures = 0;

  typedef struct { longint yl, yh; int col, row; bit band; bit last; } exp_t;
  exp_t expq [$];

  int n_out = 0, n_frames = 0, row_stall = 0, col_phase_hold = 0;
  bit offering_first = 0;  // first pixel of a frame offered after the previous frame
  int n_band0 = 0, n_band1 = 0, n_row_lines = 0, n_col_lines = 0;

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s = %0d expected %0d", what, got, exp);
    end
  endtask

  // expected outputs of one frame
  task automatic model_frame(longint img [IMG_H][IMG_W]);
    longint rm [IMG_H][IMG_W];
    lvec_t x, lo, hi;
    for (int r = 0; r < IMG_H; r++) begin
      x = {};
      for (int c = 0; c < IMG_W; c++) x.push_back(img[r][c]);
      line_dwt(x, lo, hi);
      for (int j = 0; j < IMG_W / 2; j++) begin
        rm[r][j] = lo[j];
        rm[r][IMG_W / 2 + j] = hi[j];
      end
    end
    for (int c = 0; c < IMG_W; c++) begin
      x = {};
      for (int r = 0; r < IMG_H; r++) x.push_back(rm[r][c]);
      line_dwt(x, lo, hi);
      for (int j = 0; j < IMG_H / 2; j++) begin
        exp_t e;
        e.yl = lo[j];
        e.yh = hi[j];
        e.col = c;
        e.row = j;
        e.band = (c >= IMG_W / 2);
        e.last = (c == IMG_W - 1) && (j == IMG_H / 2 - 1);
        // the outputs carry OUT_W bits: the reference must fit
        check("yl fits OUT_W", longint'(e.yl >= -(longint'(1) << (OUT_W - 1)) && e.yl < (longint'(1) << (OUT_W - 1))), 1);
        check("yh fits OUT_W", longint'(e.yh >= -(longint'(1) << (OUT_W - 1)) && e.yh < (longint'(1) << (OUT_W - 1))), 1);
        expq.push_back(e);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          exp_t e;
          e = expq.pop_front();
          check("yl", sext(longint'(yl), OUT_W), e.yl);
          check("yh", sext(longint'(yh), OUT_W), e.yh);
          check("out_col", longint'(out_col), e.col);
          check("out_row", longint'(out_row), e.row);
          check("band_sel", longint'(band_sel), e.band);
          check("frame_done", longint'(frame_done), e.last);
          // constant image of ones (frame 1), away from the line starts:
          // row gains 158 (low) and 52 (high), so LL = 158*158, LH = HL = 158*52,
          // HH = 52*52
          if (n_frames == 1 && e.row == IMG_H / 2 - 1 && (e.col == IMG_W / 2 - 1 || e.col == IMG_W - 1)) begin
            check("steady LL/HL", sext(longint'(yl), OUT_W), (e.col < IMG_W / 2) ? 158 * 158 : 52 * 158);
            check("steady LH/HH", sext(longint'(yh), OUT_W), (e.col < IMG_W / 2) ? 158 * 52 : 52 * 52);
          end
          if (band_sel) n_band1++; else n_band0++;
          if (e.row == IMG_H / 2 - 1) n_col_lines++;
        end
        n_out++;
      end else if (frame_done) begin
        failures++;
        $display("FAIL frame_done without output");
      end
      if (frame_done) n_frames++;
      if (pix_valid && !pix_ready) begin
        if (offering_first) col_phase_hold++;
        else row_stall++;
      end
    end
  end

  initial begin
    longint img [IMG_H][IMG_W];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++)
          img[r][c] = (f == 0) ? sext(longint'($urandom), DATA_W) : (f == 1) ? 1 : -8;
      model_frame(img);
      for (int r = 0; r < IMG_H; r++) begin
        for (int c = 0; c < IMG_W; c++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin
            pix_valid = 0;
            @(negedge clk);
          end
          pix_valid = 1;
          pix_data  = DATA_W'(img[r][c]);
          offering_first = (f > 0) && (r == 0) && (c == 0);
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
        end
        n_row_lines++;
      end
      // keep offering the next frame's first pixel: it must be held off
      // until the column phase of this frame has finished
      @(negedge clk);
      pix_valid = 0;
    end
    while (expq.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    check("outputs", n_out, NFRAMES * IMG_W * IMG_H / 2);
    check("frames", n_frames, NFRAMES);
    $display("row stalls=%0d column-phase holds=%0d band0=%0d band1=%0d row lines=%0d column lines=%0d frames=%0d",
             row_stall, col_phase_hold, n_band0, n_band1, n_row_lines, n_col_lines, n_frames);
    if (row_stall == 0)      begin failures++; $display("FAIL no back-pressure during a row"); end
    if (col_phase_hold == 0) begin failures++; $display("FAIL input never held off in column phase"); end
    if (n_band0 == 0 || n_band1 == 0) begin failures++; $display("FAIL a band_sel value never seen"); end
    if (n_row_lines != NFRAMES * IMG_H) begin failures++; $display("FAIL row line count"); end
    if (n_col_lines != NFRAMES * IMG_W) begin failures++; $display("FAIL column line count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
