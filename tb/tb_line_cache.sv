// Self-checking test of line_cache on small frames (W=8, H=6, 16-word
// RAMs), three frames back to back. The input has random gaps and the
// window consumer applies random back-pressure, with long stalls now and
// then so that passes queue up and the cache must hold the input back.
// Every window is compared with the nine pixels taken from the frame
// the testbench generated: rows i-1..i+1 and columns x-1..x+1 around each
// interior centre, in raster order, with the end-of-row and end-of-frame
// tags. The test counts input stalls, a waiting pass and held windows and
// fails if one of them never happened.
module tb_line_cache;
  import median_pkg::*;

  localparam int W = 8, H = 6, FR = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, win_valid, win_ready;
  pix_t       in_data;
  win_t       win;
  logic [1:0] win_tag;

  pix_t img [FR][H][W];
  int checks = 0, failures = 0;
  int n_in = 0, n_win = 0, stalls = 0, pend_seen = 0, held = 0;

  line_cache #(.W(W), .H(H), .DEPTH(16)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .win_valid, .win_ready, .win, .win_tag
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Window checker.
  always @(posedge clk) begin
    if (rst_n && win_valid && win_ready) begin
      int f, i, x, k;
      win_t e;
      k = n_win % ((H - 2) * (W - 2));
      f = n_win / ((H - 2) * (W - 2));
      i = 1 + k / (W - 2);
      x = 1 + k % (W - 2);
      for (int r = 0; r < 3; r++)
        for (int cc = 0; cc < 3; cc++)
          e[3 * r + cc] = img[f % FR][i - 1 + r][x - 1 + cc];
      check(win == e, $sformatf("window frame %0d row %0d col %0d", f, i, x));
      check(win_tag == {(x == W - 2) && (i == H - 2), x == W - 2},
            $sformatf("tag %b at row %0d col %0d", win_tag, i, x));
      n_win++;
    end
    if (rst_n && win_valid && !win_ready) held++;
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && in_valid && in_ready) n_in++;
    if (rst_n && dut.pend_v) pend_seen++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Consumer: random readiness with occasional long stalls.
  initial begin
    win_ready = 1'b0;
    forever begin
      @(negedge clk);
      if ($urandom_range(0, 12) == 0) begin
        win_ready = 1'b0;
        repeat ($urandom_range(10, 40)) @(negedge clk);
      end
      win_ready = $urandom_range(0, 3) != 0;
    end
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = pix_t'($urandom);
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n_in < FR * H * W) begin
      @(negedge clk);
      if (n_in < FR * H * W) begin
        in_valid = $urandom_range(0, 4) != 0;
        in_data  = img[n_in / (H * W)][(n_in / W) % H][n_in % W];
      end else begin
        in_valid = 1'b0;
      end
    end
    in_valid = 1'b0;
    repeat (400) @(posedge clk);
    check(n_win == FR * (H - 2) * (W - 2), $sformatf("%0d windows", n_win));
    check(stalls > 0, "input never stalled");
    check(pend_seen > 0, "no pass ever waited");
    check(held > 0, "no window was held");
    $display("windows %0d stalls %0d pend %0d held %0d", n_win, stalls, pend_seen, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
