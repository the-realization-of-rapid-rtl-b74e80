// median_filter_yuv - 3x3 median filter for a decoded Y/U/V video stream.
//
// The decoded video arrives as three 8-bit samples per pixel, Y, U and V,
// of a W x H frame (352 x 288 by default) in raster order. Each of the three
// is filtered on its own: there are three median_channel instances, each
// with its own four-line cache and its own median engine. The channels get
// the same handshake and run in lock step, so their outputs line up.
//
// Input: in_valid/in_ready handshake, a triple is taken on a clock edge
// with both high. With the default pipelined engine in_ready stays high.
// Output: out_valid marks one filtered triple per interior pixel (the
// frame's first and last row and column are not filtered and not output),
// with out_eol on the last pixel of a row and out_eof on the last of the
// frame. The median of centre row i, column x comes out about two input rows
// after it went in, since row i is filtered while row i+2 is received.
// Frames follow each other without a gap; pixels are counted from reset.
module median_filter_yuv
  import median_pkg::*;
#(
  parameter int unsigned W      = 352,
  parameter int unsigned H      = 288,
  parameter int unsigned DEPTH  = 1024,
  parameter engine_e     ENGINE = ENG_PIPE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_y,
  input  pix_t in_u,
  input  pix_t in_v,
  output logic out_valid,
  output pix_t out_y,
  output pix_t out_u,
  output pix_t out_v,
  output logic out_eol,
  output logic out_eof
);

  pix_t [2:0] in_pix, out_pix;
  logic [2:0] ch_ready, ch_valid, ch_eol, ch_eof;

  assign in_pix   = '{in_v, in_u, in_y};
  assign in_ready = &ch_ready;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    median_channel #(.W(W), .H(H), .DEPTH(DEPTH), .ENGINE(ENGINE)) u_ch (
      .clk, .rst_n,
      .in_valid (in_valid && in_ready),
      .in_ready (ch_ready[c]),
      .in_data  (in_pix[c]),
      .out_valid(ch_valid[c]),
      .out_data (out_pix[c]),
      .out_eol  (ch_eol[c]),
      .out_eof  (ch_eof[c])
    );
  end

  assign out_valid = ch_valid[0];
  assign out_eol   = ch_eol[0];
  assign out_eof   = ch_eof[0];
  assign out_y     = out_pix[0];
  assign out_u     = out_pix[1];
  assign out_v     = out_pix[2];

  // The three channels share their control, so they must agree.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ch_valid == {3{ch_valid[0]}} && ch_eol == {3{ch_eol[0]}} && ch_eof == {3{ch_eof[0]}})
    else $error("median_filter_yuv: channels out of step");

endmodule
