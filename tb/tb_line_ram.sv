// Self-checking test of line_ram at its full 1024 x 8 size: fills every
// word, reads it back, checks that rdata holds while re is low, that a read
// of the address being written returns the old word, and random traffic
// against a model array in the testbench.
module tb_line_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we, re;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [1024];
  int checks = 0, failures = 0;

  line_ram #(.DEPTH(1024), .DW(8)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      re = 1; raddr = 10'(1023 - i);
      @(negedge clk);
      re = 0;
      check(rdata == model[1023 - i], $sformatf("read %0d", 1023 - i));
    end
    // Hold while re is low, even with writes and a new address.
    held = rdata;
    @(negedge clk);
    we = 1; waddr = 10'd5; wdata = ~model[5]; raddr = 10'd7;
    @(negedge clk);
    we = 0; model[5] = ~model[5];
    check(rdata == held, "rdata not held");
    // Read during write of the same address gives the old word.
    @(negedge clk);
    we = 1; re = 1; waddr = 10'd9; raddr = 10'd9; wdata = ~model[9];
    @(negedge clk);
    we = 0; re = 0;
    check(rdata == model[9], "read-during-write");
    model[9] = ~model[9];
    // Random traffic.
    // Random traffic; reads are skipped at random and rdata must then keep
    // the last word read.
    held = rdata;
    for (int n = 0; n < 3000; n++) begin
      logic [9:0] ra;
      @(negedge clk);
      ra = 10'($urandom);
      we = $urandom_range(0, 1) != 0; waddr = 10'($urandom); wdata = 8'($urandom);
      re = $urandom_range(0, 2) != 0; raddr = ra;
      @(negedge clk);
      if (re) held = model[ra];
      check(rdata == held, $sformatf("random read %0d (re %0d)", ra, re));
      if (we) model[waddr] = wdata;
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
