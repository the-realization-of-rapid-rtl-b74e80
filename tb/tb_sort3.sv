// Self-checking test of sort3: both the combinational (PIPE=0) and the
// registered (PIPE=1) form are fed corner values (all equal, pairs of equal
// values, every order of three distinct values, 0 and 255) and random
// triples. The expected min/med/max come from a plain compare-and-swap sort
// in the testbench. The registered form must answer one clock later.
module tb_sort3;
  import median_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pix_t a, b, c;
  pix_t mn0, md0, mx0, mn1, md1, mx1;
  int checks = 0, failures = 0;

  sort3 #(.PIPE(1'b0)) u_comb (.clk, .rst_n, .en(1'b1), .a, .b, .c,
                               .min_o(mn0), .med_o(md0), .max_o(mx0));
  sort3 #(.PIPE(1'b1)) u_reg  (.clk, .rst_n, .en(1'b1), .a, .b, .c,
                               .min_o(mn1), .med_o(md1), .max_o(mx1));

  task automatic ref_sort(input pix_t x, y, z, output pix_t lo, md, hi);
    pix_t t;
    if (x > y) begin t = x; x = y; y = t; end
    if (y > z) begin t = y; y = z; z = t; end
    if (x > y) begin t = x; x = y; y = t; end
    lo = x; md = y; hi = z;
  endtask

  task automatic check_one(input pix_t x, y, z);
    pix_t lo, md, hi;
    ref_sort(x, y, z, lo, md, hi);
    @(negedge clk);
    a = x; b = y; c = z;
    #1;
    checks++;
    if ({mn0, md0, mx0} !== {lo, md, hi}) begin
      failures++;
      $display("FAIL comb %0d %0d %0d -> %0d %0d %0d, want %0d %0d %0d", x, y, z, mn0, md0, mx0, lo, md, hi);
    end
    @(negedge clk);
    checks++;
    if ({mn1, md1, mx1} !== {lo, md, hi}) begin
      failures++;
      $display("FAIL reg %0d %0d %0d -> %0d %0d %0d, want %0d %0d %0d", x, y, z, mn1, md1, mx1, lo, md, hi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_t v [3];
    a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Every arrangement of the values {lo, mid, hi}, with ties.
    v = '{8'd10, 8'd20, 8'd30};
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++)
          check_one(v[i], v[j], v[k]);
    check_one(8'd0, 8'd255, 8'd0);
    check_one(8'd255, 8'd255, 8'd0);
    check_one(8'd0, 8'd0, 8'd0);
    repeat (400) check_one(pix_t'($urandom), pix_t'($urandom), pix_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
