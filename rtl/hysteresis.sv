// hysteresis: fourth Canny phase, edge tracking by hysteresis.
//
// Input pixels are classified as 0, weak (WEAK_VAL) or strong (255). A strong
// pixel stays an edge; a weak pixel becomes an edge (255) when at least one of
// its eight neighbours is strong; everything else becomes 0. The phase makes
// one streaming pass over the 3x3 neighbourhood, like the other phases, so a
// weak pixel that touches a strong one only through other weak pixels is
// dropped. Neighbours outside the frame count as 0. That the edge tracking
// is the last streaming phase and works on a 3x3 neighbourhood follows the
// original design; the single-pass rule and the 8-neighbour test are this
// design's choices.
//
// Interface: 8-bit valid/ready streams, one pixel per cycle; latency WIDTH+1
// input beats plus one cycle; out_last marks the last pixel of the frame.
module hysteresis
  import canny_pkg::*;
#(
  parameter int     WIDTH    = 1280,
  parameter int     HEIGHT   = 720,
  parameter pixel_t WEAK_VAL = WEAK_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output pixel_t out_data,
  output logic   out_last,
  output logic   out_valid,
  input  logic   out_ready
);

  logic [8:0][7:0] win;
  logic [8:0]      tap_ok;
  logic            win_last, win_valid, win_ready;

  line_window #(.DW(8), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .win, .tap_ok, .win_last, .win_valid, .win_ready
  );

  logic   strong_nb;
  pixel_t edge_px;

  always_comb begin
    strong_nb = 1'b0;
    for (int t = 0; t < 9; t++) begin
      if (t != TAP_C && win[t] == STRONG) strong_nb = 1'b1;
    end
    if (win[TAP_C] == STRONG)                     edge_px = STRONG;
    else if (win[TAP_C] == WEAK_VAL && strong_nb) edge_px = STRONG;
    else                                          edge_px = '0;
  end

  axis_skid #(.DW(8)) u_out (
    .clk, .rst_n,
    .in_data(edge_px), .in_last(win_last), .in_valid(win_valid), .in_ready(win_ready),
    .out_data, .out_last, .out_valid, .out_ready
  );

endmodule
