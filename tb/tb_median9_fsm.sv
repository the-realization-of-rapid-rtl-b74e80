// Self-checking test of median9_fsm. Windows are filtered one per Start
// handshake. For each window the test checks the median (against a
// counting reference), the tag, the visited states READY, STEP1 x2,
// STEP2 x2, STEP3 x2, WAIT (one clock each for setting and for seeing a
// done flag), that out_valid comes 7 clocks after the READY cycle that saw
// start, that WAIT is held while start stays high, and that the machine
// stays in READY while start is low.
module tb_median9_fsm;
  import median_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, out_valid, in_wait;
  win_t       win;
  logic [1:0] tag_in, tag_out;
  pix_t       med;
  fsm_state_e st;
  int checks = 0, failures = 0;
  int wait_holds = 0, ready_idles = 0;

  median9_fsm #(.TAG_W(2)) dut (.clk, .rst_n, .start, .win, .tag_in,
                                .out_valid, .in_wait, .median_o(med),
                                .tag_out, .state_o(st));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fsm_state_e seq [8];
    start = 1'b0; win = '0; tag_in = '0;
    seq = '{ST_READY, ST_STEP1, ST_STEP1, ST_STEP2, ST_STEP2, ST_STEP3, ST_STEP3, ST_WAIT};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int idle, hold;
      pix_t want;
      idle = $urandom_range(0, 2);
      hold = $urandom_range(0, 2);
      // Idle cycles with start low: the machine must stay in READY.
      repeat (idle) begin
        @(negedge clk);
        start = 1'b0;
        check(st == ST_READY, "not READY while idle");
        ready_idles++;
      end
      @(negedge clk);
      for (int i = 0; i < 9; i++)
        win[i] = (n % 2 == 0) ? pix_t'($urandom)
                              : (($urandom_range(0, 2) == 0) ? 8'd255 : pix_t'(8'd100 + 8'($urandom_range(0, 5))));
      tag_in = 2'($urandom);
      want   = median9_ref(win);
      start  = 1'b1;
      // Walk the state sequence, one state per clock.
      for (int k = 0; k < 8; k++) begin
        check(st == seq[k], $sformatf("state %0d at step %0d, want %0d", st, k, seq[k]));
        check(out_valid == (k == 7), $sformatf("out_valid %0d at step %0d", out_valid, k));
        if (k == 7) begin
          check(med == want, $sformatf("median %0d want %0d", med, want));
          check(tag_out == tag_in, "tag");
          check(in_wait, "in_wait low in WAIT");
        end
        if (k < 7) @(negedge clk);
      end
      // Hold start high: WAIT must stay (a window is filtered only once).
      repeat (hold) begin
        @(negedge clk);
        check(st == ST_WAIT && !out_valid, "left WAIT while start high");
        wait_holds++;
      end
      start = 1'b0;
      @(negedge clk);
      check(st == ST_READY, "no return to READY");
      check(med == want, "result not kept");
    end
    check(wait_holds > 0 && ready_idles > 0, "hold cases not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
