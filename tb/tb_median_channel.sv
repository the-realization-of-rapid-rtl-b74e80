// Self-checking test of median_channel with both engines side by side on
// small frames (W=10, H=7, 16-word RAMs), two frames back to back with
// salt-and-pepper noise on a smooth ramp. Each output median is compared
// with a counting median of the 3x3 neighbourhood of the generated frame,
// in raster order over the interior pixels, with its row/frame markers.
// The pipelined channel must never hold the input back and must take one
// pixel per clock; the state-machine channel needs 8 clocks per window, so
// its input must be held back, and the test checks that it was.
module tb_median_channel;
  import median_pkg::*;

  localparam int W = 10, H = 7, FR = 2;
  localparam int NOUT = FR * (H - 2) * (W - 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pix_t img [FR][H][W];
  int checks = 0, failures = 0;

  logic in_valid [2];
  logic in_ready [2];
  pix_t in_data  [2];
  logic out_valid[2], out_eol[2], out_eof[2];
  pix_t out_data [2];
  int   n_in[2], n_out[2], stalls[2], last_out_cycle[2], cycle;

  median_channel #(.W(W), .H(H), .DEPTH(16), .ENGINE(ENG_PIPE)) u_pipe (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_data(in_data[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_eol(out_eol[0]), .out_eof(out_eof[0]));
  median_channel #(.W(W), .H(H), .DEPTH(16), .ENGINE(ENG_FSM)) u_fsm (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_data(in_data[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_eol(out_eol[1]), .out_eof(out_eof[1]));

  function automatic pix_t expect_med(int k);
    int f, i, x;
    win_t w;
    f = k / ((H - 2) * (W - 2));
    i = 1 + (k % ((H - 2) * (W - 2))) / (W - 2);
    x = 1 + k % (W - 2);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[3 * r + c] = img[f][i - 1 + r][x - 1 + c];
    return median9_ref(w);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int e = 0; e < 2; e++) begin
      if (rst_n && in_valid[e] && in_ready[e]) n_in[e]++;
      if (rst_n && in_valid[e] && !in_ready[e]) stalls[e]++;
      if (rst_n && out_valid[e]) begin
        int k, x, i;
        k = n_out[e] % ((H - 2) * (W - 2));
        x = 1 + k % (W - 2);
        i = 1 + k / (W - 2);
        check(n_out[e] < NOUT, "too many outputs");
        if (n_out[e] < NOUT) begin
          check(out_data[e] == expect_med(n_out[e]),
                $sformatf("engine %0d output %0d: %0d want %0d", e, n_out[e], out_data[e], expect_med(n_out[e])));
          check(out_eol[e] == (x == W - 2) && out_eof[e] == ((x == W - 2) && (i == H - 2)),
                $sformatf("engine %0d markers at output %0d", e, n_out[e]));
        end
        n_out[e]++;
        last_out_cycle[e] = cycle;
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Both channels get the same frames, each at its own pace, input always offered.
  for (genvar e = 0; e < 2; e++) begin : g_drv
    initial begin
      in_valid[e] = 1'b0;
      in_data[e]  = '0;
      wait (rst_n);
      while (n_in[e] < FR * H * W) begin
        @(negedge clk);
        if (n_in[e] < FR * H * W) begin
          in_valid[e] = 1'b1;
          in_data[e]  = img[n_in[e] / (H * W)][(n_in[e] / W) % H][n_in[e] % W];
        end else in_valid[e] = 1'b0;
      end
      @(negedge clk);
      in_valid[e] = 1'b0;
    end
  end

  initial begin
    int t0;
    for (int e = 0; e < 2; e++) begin n_in[e] = 0; n_out[e] = 0; stalls[e] = 0; end
    cycle = 0;
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = ($urandom_range(0, 5) == 0) ? (($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0)
                                                     : pix_t'(20 * f + 8 * r + 3 * c);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    wait (n_out[0] == NOUT && n_out[1] == NOUT);
    repeat (20) @(posedge clk);
    check(n_out[0] == NOUT && n_out[1] == NOUT, "output counts");
    check(stalls[0] == 0, "pipelined channel held the input back");
    check(stalls[1] > 0, "state-machine channel never held the input back");
    // Pipelined: all pixels in at one per clock; the last median comes
    // 8 clocks after its window, which is formed 2 clocks after the last read.
    check(last_out_cycle[0] - t0 <= FR * H * W + W + 16,
          $sformatf("pipelined channel took %0d clocks", last_out_cycle[0] - t0));
    // State machine: 8 clocks per window.
    check(last_out_cycle[1] - t0 >= 8 * NOUT,
          $sformatf("state-machine channel took %0d clocks for %0d windows", last_out_cycle[1] - t0, NOUT));
    $display("pipe %0d clocks, fsm %0d clocks, fsm stalls %0d", last_out_cycle[0] - t0, last_out_cycle[1] - t0, stalls[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
