// Full-size test of median_filter_yuv with every parameter at its default:
// one 352 x 288 Y/U/V frame with salt-and-pepper noise, offered at one
// pixel per clock. All 350 x 286 output triples are compared with counting
// medians of the generated frame. The pipelined filter must accept the
// whole frame without holding the input back, and the last median must
// come at most W + 16 clocks after the last input pixel, so a frame takes
// about W x H clocks (101 376; 2.03 ms at 50 MHz).
module tb_median_filter_yuv_full;
  import median_pkg::*;

  localparam int W = 352, H = 288;
  localparam int NOUT = (H - 2) * (W - 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pix_t img [3][H][W];
  int checks = 0, failures = 0, cycle = 0;
  int n_in = 0, n_out = 0, stalls = 0, t_first = 0, t_last_in = 0, t_last_out = 0;

  logic in_valid, in_ready, out_valid, out_eol, out_eof;
  pix_t in_y, in_u, in_v, out_y, out_u, out_v;

  median_filter_yuv dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_y, .in_u, .in_v,
    .out_valid, .out_y, .out_u, .out_v, .out_eol, .out_eof);

  function automatic pix_t expect_med(int k, int ch);
    int i, x;
    win_t w;
    i = 1 + k / (W - 2);
    x = 1 + k % (W - 2);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[3 * r + c] = img[ch][i - 1 + r][x - 1 + c];
    return median9_ref(w);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid && in_ready) begin
      if (n_in == 0) t_first = cycle;
      n_in++;
      t_last_in = cycle;
    end
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && out_valid) begin
      check(n_out < NOUT, "too many outputs");
      if (n_out < NOUT) begin
        pix_t ey, eu, ev;
        int x, i;
        x = 1 + n_out % (W - 2);
        i = 1 + n_out / (W - 2);
        ey = expect_med(n_out, 0);
        eu = expect_med(n_out, 1);
        ev = expect_med(n_out, 2);
        check({out_y, out_u, out_v} == {ey, eu, ev},
              $sformatf("output %0d: %0d %0d %0d want %0d %0d %0d", n_out, out_y, out_u, out_v, ey, eu, ev));
        check(out_eol == (x == W - 2) && out_eof == ((x == W - 2) && (i == H - 2)),
              $sformatf("markers at output %0d", n_out));
      end
      n_out++;
      t_last_out = cycle;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < 3; ch++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[ch][r][c] = ($urandom_range(0, 9) == 0)
                        ? (($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0)
                        : pix_t'(((r + c) / 3 + 50 * ch) % 200 + 20);
    in_valid = 1'b0; in_y = '0; in_u = '0; in_v = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n_in < H * W) begin
      @(negedge clk);
      if (n_in < H * W) begin
        in_valid = 1'b1;
        in_y = img[0][n_in / W][n_in % W];
        in_u = img[1][n_in / W][n_in % W];
        in_v = img[2][n_in / W][n_in % W];
      end else in_valid = 1'b0;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (W + 40) @(posedge clk);
    check(n_out == NOUT, $sformatf("%0d outputs, want %0d", n_out, NOUT));
    check(stalls == 0, "input held back");
    check(t_last_in - t_first == H * W - 1, "input not at one pixel per clock");
    check(t_last_out - t_last_in <= W + 16, $sformatf("tail of %0d clocks", t_last_out - t_last_in));
    $display("frame: %0d clocks from first input to last median", t_last_out - t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
