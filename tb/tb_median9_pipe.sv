// Self-checking test of median9_pipe. Windows are offered on most clocks
// with random gaps: random pixels, windows with many equal values, and
// salt-and-pepper windows (0 and 255 mixed with a smooth value). Each
// expected median is found by counting (the value with at least five
// window values on either side), independently of the sort network, and
// is stamped with its input cycle: every result must come out exactly
// 8 clocks after its window went in, carrying the window's tag.
module tb_median9_pipe;
  import median_pkg::*;

  localparam int LAT = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, out_valid;
  win_t       win;
  logic [1:0] tag_in, tag_out;
  pix_t       med;
  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, got = 0, back_to_back = 0;

  typedef struct { pix_t med; logic [1:0] tag; int t; } exp_t;
  exp_t q[$];

  median9_pipe #(.TAG_W(2)) dut (.clk, .rst_n, .in_valid, .win, .tag_in,
                                 .out_valid, .med_o(med), .tag_out);

  always @(posedge clk) cycle <= cycle + 1;

  function automatic win_t make_win(int kind);
    win_t w;
    pix_t base;
    base = pix_t'($urandom_range(30, 220));
    for (int i = 0; i < 9; i++) begin
      case (kind)
        0: w[i] = pix_t'($urandom);
        1: w[i] = pix_t'($urandom_range(0, 3)) + base;
        default: w[i] = ($urandom_range(0, 3) == 0) ? (($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0) : base;
      endcase
    end
    return w;
  endfunction

  // Compare outputs with the expectation queue.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      got++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", med);
      end else begin
        e = q.pop_front();
        if (med !== e.med || tag_out !== e.tag || cycle - e.t != LAT) begin
          failures++;
          $display("FAIL med %0d tag %0d after %0d clk, want %0d tag %0d after %0d",
                   med, tag_out, cycle - e.t, e.med, e.tag, LAT);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    in_valid = 1'b0; win = '0; tag_in = '0; prev = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      win      = make_win(n % 3);
      tag_in   = 2'($urandom);
      if (in_valid) begin
        q.push_back('{med: median9_ref(win), tag: tag_in, t: cycle});
        sent++;
        if (prev) back_to_back++;
      end
      prev = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != sent || q.size() != 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL sent %0d got %0d left %0d b2b %0d", sent, got, q.size(), back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
