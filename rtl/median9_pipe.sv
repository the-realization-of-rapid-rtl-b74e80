// median9_pipe - pipelined rapid median of a 3x3 window, one window per clock.
//
// The median of nine pixels is found in three steps of three-input sorts:
//   Step 1: sort each window row (P1-P3, P4-P6, P7-P9) into min/med/max,
//           giving a set of row maxima, a set of row medians and a set of
//           row minima (3 sorts in parallel, 9 comparisons).
//   Step 2: take the minimum of the maxima (Max_min), the median of the
//           medians (Med_med) and the maximum of the minima (Min_max)
//           (3 sorts in parallel, 7 comparisons are needed).
//   Step 3: the median of Max_min, Med_med and Min_max is the window median
//           (1 sort, 3 comparisons). 19 comparisons in all.
//
// Pipelining: every sort3 has two compare levels, and a register level is
// put after each of them, framed by an input and an output register. That
// gives eight register levels:
//   1 window input, 2/3 step 1, 4/5 step 2, 6/7 step 3, 8 output.
// A window presented with in_valid in clock cycle n is at med_o, with
// out_valid high, in cycle n+8 (latency LAT = 8), and a new window can enter
// on every clock. The tag input (row/frame markers of the
// window) travels beside the data with the same latency.
// The three steps and the count of eight levels follow the filter's
// description; the exact placement of the registers is this design's choice.
module median9_pipe
  import median_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  win_t             win,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output pix_t             med_o,
  output logic [TAG_W-1:0] tag_out
);

  localparam int unsigned LAT = 8;

  // Valid and tag shift register for levels 1..8.
  logic [LAT-1:0]             vld_q;
  logic [LAT-1:0][TAG_W-1:0]  tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      tag_q <= '0;
    end else begin
      vld_q <= {vld_q[LAT-2:0], in_valid};
      tag_q <= {tag_q[LAT-2:0], tag_in};
    end
  end

  // Level 1: window input register.
  win_t w1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w1 <= '0;
    else        w1 <= win;
  end

  // Step 1 (levels 2 and 3): sort the three rows.
  pix_t [2:0] rmin, rmed, rmax;        // combinational sort3 outputs per row
  pix_t [2:0] max_set, med_set, min_set;

  for (genvar r = 0; r < 3; r++) begin : g_row
    sort3 #(.PIPE(1'b1)) u_row (
      .clk, .rst_n, .en(1'b1),
      .a(w1[3*r]), .b(w1[3*r+1]), .c(w1[3*r+2]),
      .min_o(rmin[r]), .med_o(rmed[r]), .max_o(rmax[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_set <= '0;
      med_set <= '0;
      min_set <= '0;
    end else begin
      max_set <= rmax;
      med_set <= rmed;
      min_set <= rmin;
    end
  end

  // Step 2 (levels 4 and 5): Max_min, Med_med, Min_max.
  pix_t s_max_min, s_max_med, s_max_max;
  pix_t s_med_min, s_med_med, s_med_max;
  pix_t s_min_min, s_min_med, s_min_max;

  sort3 #(.PIPE(1'b1)) u_maxset (
    .clk, .rst_n, .en(1'b1),
    .a(max_set[0]), .b(max_set[1]), .c(max_set[2]),
    .min_o(s_max_min), .med_o(s_max_med), .max_o(s_max_max)
  );
  sort3 #(.PIPE(1'b1)) u_medset (
    .clk, .rst_n, .en(1'b1),
    .a(med_set[0]), .b(med_set[1]), .c(med_set[2]),
    .min_o(s_med_min), .med_o(s_med_med), .max_o(s_med_max)
  );
  sort3 #(.PIPE(1'b1)) u_minset (
    .clk, .rst_n, .en(1'b1),
    .a(min_set[0]), .b(min_set[1]), .c(min_set[2]),
    .min_o(s_min_min), .med_o(s_min_med), .max_o(s_min_max)
  );

  pix_t max_min, med_med, min_max;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_min <= '0;
      med_med <= '0;
      min_max <= '0;
    end else begin
      max_min <= s_max_min;
      med_med <= s_med_med;
      min_max <= s_min_max;
    end
  end

  // Only one output of each step-2 sort is needed.
  logic unused_step2;
  assign unused_step2 = ^{s_max_med, s_max_max, s_med_min, s_med_max,
                          s_min_min, s_min_med};

  // Step 3 (levels 6 and 7): Final_med.
  pix_t f_min, f_med, f_max;
  sort3 #(.PIPE(1'b1)) u_final (
    .clk, .rst_n, .en(1'b1),
    .a(max_min), .b(med_med), .c(min_max),
    .min_o(f_min), .med_o(f_med), .max_o(f_max)
  );

  logic unused_step3;
  assign unused_step3 = ^{f_min, f_max};

  pix_t final_med, med_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      final_med <= '0;
      med_q     <= '0;
    end else begin
      final_med <= f_med;   // level 7
      med_q     <= final_med; // level 8: output register
    end
  end

  assign med_o     = med_q;
  assign out_valid = vld_q[LAT-1];
  assign tag_out   = tag_q[LAT-1];

endmodule
