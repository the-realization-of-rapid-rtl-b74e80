// median_channel - the filter of one colour channel (Y, U or V).
//
// A line_cache turns the raster pixel stream into 3x3 windows, and a median
// engine reduces each window to its median. ENGINE picks the engine:
//   ENG_PIPE  median9_pipe, one window per clock with 8 clocks of latency.
//             The window side never stalls, so the input runs at one pixel
//             per clock.
//   ENG_FSM   median9_fsm under its Start handshake: start is the window's
//             valid, dropped in WAIT, and the window is released in WAIT.
//             One window takes 8 clocks, and the cache holds the input back
//             (in_ready low) when the passes fall behind.
// Output: one median per interior pixel (rows 1..H-2, columns 1..W-2) in
// raster order, out_eol on the last of each row and out_eof on the last of
// the frame. Pairing both engines behind one cache is this design's choice.
module median_channel
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
  input  pix_t in_data,
  output logic out_valid,
  output pix_t out_data,
  output logic out_eol,
  output logic out_eof
);

  logic       win_valid, win_ready;
  win_t       win;
  logic [1:0] win_tag, out_tag;

  line_cache #(.W(W), .H(H), .DEPTH(DEPTH)) u_cache (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .win_valid, .win_ready, .win, .win_tag
  );

  if (ENGINE == ENG_PIPE) begin : g_pipe
    assign win_ready = 1'b1;
    median9_pipe #(.TAG_W(2)) u_median (
      .clk, .rst_n,
      .in_valid (win_valid),
      .win      (win),
      .tag_in   (win_tag),
      .out_valid(out_valid),
      .med_o    (out_data),
      .tag_out  (out_tag)
    );
  end else begin : g_fsm
    logic       in_wait;
    fsm_state_e state;
    median9_fsm #(.TAG_W(2)) u_median (
      .clk, .rst_n,
      .start    (win_valid && !in_wait),
      .win      (win),
      .tag_in   (win_tag),
      .out_valid(out_valid),
      .in_wait  (in_wait),
      .median_o (out_data),
      .tag_out  (out_tag),
      .state_o  (state)
    );
    assign win_ready = in_wait;
    logic unused;
    assign unused = ^state;
  end

  assign out_eol = out_tag[0];
  assign out_eof = out_tag[1];

endmodule
