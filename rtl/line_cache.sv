// line_cache - four-line cache and 3x3 window for one colour channel.
//
// Four line RAMs of DEPTH x 8 hold image rows. While the rows i-1, i and
// i+1 are read out to build the windows of the filter pass for centre row i,
// the incoming row i+2 is written into the fourth RAM. When a row is done,
// each RAM takes the next role down the chain (incoming -> i+1 -> i -> i-1 ->
// incoming). Here that move is made by renaming: a 2-bit slot counter picks
// the RAM that receives the next row, and each pass records which RAMs hold
// its three rows, so no data is copied between RAMs.
//
// Write side (in_valid/in_ready/in_data): pixels arrive in raster order, W per
// row and H rows per frame, and are counted after reset. in_ready is low
// only while the RAM the next pixel would go to is still needed by a pass
// that is running or waiting, which happens only when passes are slower than
// the input (for example with the state-machine engine).
//
// Passes: when frame row r (r >= 2) has been written, a pass for centre row
// r-1 is queued (one running, one waiting at most). The first and last row
// of a frame are never a centre row, and neither are the first and last
// column. A pass reads columns 0..W-1 of its three RAMs, one column per
// clock on which the window moves, and shifts them into a 3-column window.
//
// Window side (win_valid/win_ready/win/win_tag): from the third column on,
// each new column completes a window; win[0..8] are P1..P9, with P1 the
// upper left (row i-1, column x-1) and P5 the centre (row i, column x).
// win_tag[0] marks the last window of a row, win_tag[1] the last of the
// frame. The window stays put while win_valid is high and win_ready low.
// A window appears two clocks after its right-hand column is read.
module line_cache
  import median_pkg::*;
#(
  parameter int unsigned W     = 352,
  parameter int unsigned H     = 288,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = $clog2(H)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pix_t       in_data,
  output logic       win_valid,
  input  logic       win_ready,
  output win_t       win,
  output logic [1:0] win_tag
);

  typedef logic [1:0] slot_t;

  typedef struct packed {
    slot_t top;   // RAM holding row i-1
    slot_t mid;   // RAM holding row i
    slot_t bot;   // RAM holding row i+1
    logic  eof;   // centre row is the frame's last one
  } pass_t;

  // ---------------------------------------------------------------------
  // Write side
  // ---------------------------------------------------------------------
  logic [AW-1:0] wr_col;
  logic [RW-1:0] wr_row;
  slot_t         wr_slot;
  logic          wr_fire, row_end;

  pass_t  act, pend;
  logic   act_v, pend_v;
  logic [3:0] busy;

  always_comb begin
    busy = '0;
    if (act_v)  begin busy[act.top]  = 1'b1; busy[act.mid]  = 1'b1; busy[act.bot]  = 1'b1; end
    if (pend_v) begin busy[pend.top] = 1'b1; busy[pend.mid] = 1'b1; busy[pend.bot] = 1'b1; end
  end

  assign in_ready = !busy[wr_slot];
  assign wr_fire  = in_valid && in_ready;
  assign row_end  = wr_fire && (wr_col == AW'(W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_col  <= '0;
      wr_row  <= '0;
      wr_slot <= '0;
    end else if (wr_fire) begin
      if (row_end) begin
        wr_col  <= '0;
        wr_slot <= wr_slot + 2'd1;
        wr_row  <= (wr_row == RW'(H - 1)) ? '0 : wr_row + 1'b1;
      end else begin
        wr_col <= wr_col + 1'b1;
      end
    end
  end

  // A completed row r >= 2 queues the pass for centre row r-1.
  logic  req;
  pass_t req_pass;
  assign req = row_end && (wr_row >= RW'(2));
  assign req_pass = '{top: wr_slot - 2'd2, mid: wr_slot - 2'd1, bot: wr_slot,
                      eof: (wr_row == RW'(H - 1))};

  // ---------------------------------------------------------------------
  // Read side: pass scheduling and column reads
  // ---------------------------------------------------------------------
  logic          advance;     // the window moves this clock
  logic [AW-1:0] rd_col;
  logic          rd_en, pass_fin;

  assign advance  = !win_valid || win_ready;
  assign rd_en    = act_v && advance;
  assign pass_fin = rd_en && (rd_col == AW'(W - 1));

  // Next pass state: a finishing pass hands over to the waiting one, and a
  // new request takes the running slot if it is free, else the waiting one.
  logic          act_v_n, pend_v_n;
  pass_t         act_n, pend_n;
  logic [AW-1:0] rd_col_n;

  always_comb begin
    act_v_n  = act_v;
    pend_v_n = pend_v;
    act_n    = act;
    pend_n   = pend;
    rd_col_n = rd_col;
    if (pass_fin) begin
      act_v_n  = pend_v;
      act_n    = pend;
      pend_v_n = 1'b0;
      rd_col_n = '0;
    end else if (rd_en) begin
      rd_col_n = rd_col + 1'b1;
    end
    if (req) begin
      if (!act_v_n) begin
        act_v_n  = 1'b1;
        act_n    = req_pass;
        rd_col_n = '0;
      end else begin
        pend_v_n = 1'b1;
        pend_n   = req_pass;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_v  <= 1'b0;
      pend_v <= 1'b0;
      act    <= '0;
      pend   <= '0;
      rd_col <= '0;
    end else begin
      act_v  <= act_v_n;
      pend_v <= pend_v_n;
      act    <= act_n;
      pend   <= pend_n;
      rd_col <= rd_col_n;
    end
  end

  // The four line RAMs. Each read targets the same column in all four; the
  // pass record selects which three outputs are used.
  pix_t [3:0] rdata;
  for (genvar s = 0; s < 4; s++) begin : g_ram
    line_ram #(.DEPTH(DEPTH), .DW(PIX_W)) u_ram (
      .clk   (clk),
      .we    (wr_fire && (wr_slot == slot_t'(s))),
      .waddr (wr_col),
      .wdata (in_data),
      .re    (rd_en),
      .raddr (rd_col),
      .rdata (rdata[s])
    );
  end

  // Read-return stage: what the RAM outputs currently hold.
  logic          rd_v_q;
  logic [AW-1:0] rd_col_q;
  pass_t         rd_pass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v_q    <= 1'b0;
      rd_col_q  <= '0;
      rd_pass_q <= '0;
    end else if (advance) begin
      rd_v_q    <= rd_en;
      rd_col_q  <= rd_col;
      rd_pass_q <= act;
    end
  end

  // ---------------------------------------------------------------------
  // 3x3 window
  // ---------------------------------------------------------------------
  // col[k] = {top, mid, bot} of window column k (0 = left).
  pix_t [2:0][2:0] col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      win_valid <= 1'b0;
      win_tag   <= '0;
    end else if (advance) begin
      if (rd_v_q) begin
        col[0] <= col[1];
        col[1] <= col[2];
        col[2] <= '{rdata[rd_pass_q.top], rdata[rd_pass_q.mid], rdata[rd_pass_q.bot]};
        win_valid  <= (rd_col_q >= AW'(2));
        win_tag[0] <= (rd_col_q == AW'(W - 1));
        win_tag[1] <= (rd_col_q == AW'(W - 1)) && rd_pass_q.eof;
      end else begin
        win_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      win[k]     = col[k][2];   // top row    -> P1 P2 P3
      win[3 + k] = col[k][1];   // middle row -> P4 P5 P6
      win[6 + k] = col[k][0];   // bottom row -> P7 P8 P9
    end
  end

  // A row completing while two passes are already queued would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) req |-> !(act_v && pend_v && !pass_fin))
    else $error("line_cache: pass queue overflow");

  // The frame size must fit the line RAMs.
  initial begin
    assert (W <= DEPTH && W >= 3 && H >= 3)
      else $error("line_cache: W must be 3..DEPTH and H at least 3");
  end

endmodule
