// End-to-end test of median_filter_yuv at reduced frame size (16 x 8, 16-word
// line RAMs), with one instance per engine. Three frames of Y, U and V
// (smooth ramps with salt-and-pepper noise, each channel different) are fed
// back to back; the pipelined instance also sees random gaps in the input.
// Every output triple is compared with counting medians of the generated
// frames, with its row and frame markers. The test counts how often each
// mechanism of the design happened and fails if one never did:
//   input gap, input held back (in_ready low), a pass waiting for the one
//   before it, a window held for the state machine, end of row, end of
//   frame, a new frame following without pause, and a noise pixel removed.
module tb_median_filter_yuv;
  import median_pkg::*;

  localparam int W = 16, H = 8, FR = 3;
  localparam int NOUT = FR * (H - 2) * (W - 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pix_t img [FR][3][H][W];
  int checks = 0, failures = 0, cycle = 0;

  logic in_valid[2], in_ready[2], out_valid[2], out_eol[2], out_eof[2];
  pix_t in_y[2], in_u[2], in_v[2], out_y[2], out_u[2], out_v[2];
  int   n_in[2], n_out[2];
  int   gaps = 0, stalls = 0, waits = 0, holds = 0, eols = 0, eofs = 0, noise_removed = 0;
  int   frame_follow = 0;

  median_filter_yuv #(.W(W), .H(H), .DEPTH(16), .ENGINE(ENG_PIPE)) u_pipe (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_y(in_y[0]), .in_u(in_u[0]), .in_v(in_v[0]),
    .out_valid(out_valid[0]), .out_y(out_y[0]), .out_u(out_u[0]), .out_v(out_v[0]),
    .out_eol(out_eol[0]), .out_eof(out_eof[0]));
  median_filter_yuv #(.W(W), .H(H), .DEPTH(16), .ENGINE(ENG_FSM)) u_fsm (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_y(in_y[1]), .in_u(in_u[1]), .in_v(in_v[1]),
    .out_valid(out_valid[1]), .out_y(out_y[1]), .out_u(out_u[1]), .out_v(out_v[1]),
    .out_eol(out_eol[1]), .out_eof(out_eof[1]));

  function automatic pix_t expect_med(int k, int ch, output logic noisy_centre);
    int f, i, x;
    win_t w;
    f = k / ((H - 2) * (W - 2));
    i = 1 + (k % ((H - 2) * (W - 2))) / (W - 2);
    x = 1 + k % (W - 2);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[3 * r + c] = img[f][ch][i - 1 + r][x - 1 + c];
    noisy_centre = (w[4] == 8'd0 || w[4] == 8'd255);
    return median9_ref(w);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && u_fsm.g_ch[0].u_ch.u_cache.pend_v) waits++;
    if (rst_n && u_fsm.g_ch[0].u_ch.u_cache.win_valid && !u_fsm.g_ch[0].u_ch.u_cache.win_ready) holds++;
    for (int e = 0; e < 2; e++) begin
      if (rst_n && in_valid[e] && in_ready[e]) begin
        n_in[e]++;
        if (n_in[e] % (H * W) == 0 && n_in[e] < FR * H * W && in_valid[e]) frame_follow++;
      end
      if (rst_n && in_valid[e] && !in_ready[e]) stalls++;
      if (rst_n && out_valid[e]) begin
        int k, x, i;
        pix_t ey, eu, ev;
        logic ny, nu, nv;
        k = n_out[e] % ((H - 2) * (W - 2));
        x = 1 + k % (W - 2);
        i = 1 + k / (W - 2);
        check(n_out[e] < NOUT, "too many outputs");
        if (n_out[e] < NOUT) begin
          ey = expect_med(n_out[e], 0, ny);
          eu = expect_med(n_out[e], 1, nu);
          ev = expect_med(n_out[e], 2, nv);
          check({out_y[e], out_u[e], out_v[e]} == {ey, eu, ev},
                $sformatf("engine %0d output %0d: %0d %0d %0d want %0d %0d %0d",
                          e, n_out[e], out_y[e], out_u[e], out_v[e], ey, eu, ev));
          check(out_eol[e] == (x == W - 2) && out_eof[e] == ((x == W - 2) && (i == H - 2)),
                $sformatf("engine %0d markers at output %0d", e, n_out[e]));
          if (ny && out_y[e] != 8'd0 && out_y[e] != 8'd255) noise_removed++;
          if (out_eol[e]) eols++;
          if (out_eof[e]) eofs++;
        end
        n_out[e]++;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar e = 0; e < 2; e++) begin : g_drv
    initial begin
      in_valid[e] = 1'b0;
      in_y[e] = '0; in_u[e] = '0; in_v[e] = '0;
      wait (rst_n);
      while (n_in[e] < FR * H * W) begin
        @(negedge clk);
        if (n_in[e] < FR * H * W) begin
          int f, r, c;
          f = n_in[e] / (H * W);
          r = (n_in[e] / W) % H;
          c = n_in[e] % W;
          // Gaps only for the pipelined instance, never at a frame boundary.
          in_valid[e] = (e == 1) || (c == 0 && r == 0) || ($urandom_range(0, 7) != 0);
          if (!in_valid[e]) gaps++;
          in_y[e] = img[f][0][r][c];
          in_u[e] = img[f][1][r][c];
          in_v[e] = img[f][2][r][c];
        end else in_valid[e] = 1'b0;
      end
      @(negedge clk);
      in_valid[e] = 1'b0;
    end
  end

  initial begin
    n_in[0] = 0; n_in[1] = 0; n_out[0] = 0; n_out[1] = 0;
    for (int f = 0; f < FR; f++)
      for (int ch = 0; ch < 3; ch++)
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++)
            img[f][ch][r][c] = ($urandom_range(0, 6) == 0)
                             ? (($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0)
                             : pix_t'(40 + 30 * ch + 10 * f + 5 * r + 2 * c);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out[0] == NOUT && n_out[1] == NOUT);
    repeat (20) @(posedge clk);
    check(n_out[0] == NOUT && n_out[1] == NOUT, "output counts");
    check(gaps > 0, "no input gap");
    check(stalls > 0, "input never held back");
    check(waits > 0, "no pass ever waited");
    check(holds > 0, "no window held for the state machine");
    check(eols == 2 * FR * (H - 2), "row ends");
    check(eofs == 2 * FR, "frame ends");
    check(frame_follow > 0, "no frame followed directly");
    check(noise_removed > 0, "no noise pixel removed");
    $display("gaps %0d stalls %0d waits %0d holds %0d eol %0d eof %0d follow %0d noise_removed %0d",
             gaps, stalls, waits, holds, eols, eofs, frame_follow, noise_removed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
