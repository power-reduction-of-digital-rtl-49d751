// Parallel 2D (5,3) discrete wavelet transform for subthreshold operation.
//
// The transform is spread over NU identical parallel units, one per column of
// a stripe, so each unit can run NU times slower than the pixel rate (and at
// a much lower supply) while the whole still keeps up with one pixel per
// clock.  No SRAM is needed: all intermediate values live in registers.
//
//   serial pixels -> dwt_split_bus -> dwt_row_stage -> NU x dwt_col_unit
//                    (demux, fast      (row DWT        (Register B..E chain,
//                     and input regs)   processors,     column DWT processor)
//                                       Register A)
//
// Image order.  An image of IMG_W x IMG_H pixels is cut into IMG_W/NU
// vertical stripes, sent stripe by stripe, each stripe row by row from row 0.
// A stripe row is NU pixels (columns 0..NU-1 of the stripe) followed, when
// the image is wider than NU, by three more: x(-2), x(-1) from the stripe on
// the left and x(NU) from the stripe on the right.  Where those fall outside
// the image their values are ignored and the unit mirrors instead.
//
// Output.  After each row enable every column presents one 2D coefficient:
// coef_stb is high for one clock and coef_valid[c] marks columns holding
// image data.  Odd columns run one row enable ahead of even ones, so each
// parity has its own row index and low/high-pass flag.  Subband of a
// coefficient: column parity gives the horizontal band (even: L, odd: H),
// *_lp the vertical one.  The last two rows of the final stripe come out
// only after the next stripe's first rows, or after a flush (three empty
// rows) requested with flush while no pixels are being sent.
//
// Throughput: one pixel per clock (NX/NU of that when striping), NU
// coefficients per row enable.  The architecture follows the document;
// the tag-based control, the flush and the parallel output are this
// design's own.
module dwt2d_parallel
  import dwt_pkg::*;
#(
  parameter int NU     = 32,
  parameter int IMG_W  = 256,
  parameter int IMG_H  = 256,
  parameter int SPLITS = 4,
  parameter int PIX_W  = 8,
  parameter int DW     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // serial pixel input
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     in_pix,
  input  logic                 flush,         // push the last rows out
  // parallel coefficient output
  output logic                 coef_stb,
  output logic signed [DW-1:0] coef       [NU],
  output logic                 coef_valid [NU],
  output logic                 odd_lp,
  output logic [ROW_W-1:0]     odd_row,
  output logic                 even_lp,
  output logic [ROW_W-1:0]     even_row,
  output logic [STRIPE_W-1:0]  odd_stripe,
  output logic [STRIPE_W-1:0]  even_stripe,
  output logic                 flushing
);

  localparam int STRIPES = IMG_W / NU;
  localparam int NX      = (STRIPES > 1) ? NU + 3 : NU;

  initial begin
    assert (NU >= 4 && NU % 2 == 0) else $fatal(1, "NU must be even and >= 4");
    assert (IMG_W % NU == 0)         else $fatal(1, "IMG_W must be a multiple of NU");
    assert (IMG_H >= 4 && IMG_H % 2 == 0) else $fatal(1, "IMG_H must be even and >= 4");
  end

  // ---------------------------------------------------------------- bus
  logic [PIX_W-1:0] in_reg [NX];
  logic             bus_row_en;

  dwt_split_bus #(.NU(NU), .NX(NX), .SPLITS(SPLITS), .PIX_W(PIX_W)) u_bus (
    .clk, .rst_n, .in_valid, .in_pix, .in_reg, .row_en(bus_row_en)
  );

  // ---------------------------------------------------------------- control
  logic [ROW_W-1:0]    row_cnt;
  logic [STRIPE_W-1:0] stripe_cnt;
  logic [1:0]          flush_left;
  logic                row_en, bubble;
  row_tag_t            tag_in;

  assign bubble   = (flush_left != 2'd0) && !bus_row_en;
  assign row_en   = bus_row_en || bubble;
  assign flushing = (flush_left != 2'd0);

  always_comb begin
    tag_in            = TAG_NONE;
    tag_in.valid      = !bubble;
    tag_in.row        = bubble ? ROW_W'(2'd3 - flush_left) : row_cnt;
    tag_in.stripe     = stripe_cnt;
    tag_in.left_edge  = (stripe_cnt == '0);
    tag_in.right_edge = (stripe_cnt == STRIPE_W'(STRIPES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_cnt    <= '0;
      stripe_cnt <= '0;
      flush_left <= '0;
    end else begin
      if (bus_row_en) begin
        if (row_cnt == ROW_W'(IMG_H - 1)) begin
          row_cnt    <= '0;
          stripe_cnt <= (stripe_cnt == STRIPE_W'(STRIPES - 1)) ? '0 : stripe_cnt + 1'b1;
        end else begin
          row_cnt <= row_cnt + 1'b1;
        end
      end
      if (flush && flush_left == 2'd0)
        flush_left <= 2'd3;
      else if (bubble)
        flush_left <= flush_left - 1'b1;
    end
  end

  // ---------------------------------------------------------------- rows
  logic signed [DW-1:0] x [NU];
  logic signed [DW-1:0] x_m2, x_m1, x_pn;
  logic signed [DW-1:0] reg_a [NU];
  row_tag_t             tag_odd, tag_even;

  for (genvar c = 0; c < NU; c++) begin : g_x
    assign x[c] = DW'({1'b0, in_reg[c]});
  end
  if (NX > NU) begin : g_stripe
    assign x_m2 = DW'({1'b0, in_reg[NU]});
    assign x_m1 = DW'({1'b0, in_reg[NU+1]});
    assign x_pn = DW'({1'b0, in_reg[NU+2]});
  end else begin : g_nostripe
    assign x_m2 = '0;
    assign x_m1 = '0;
    assign x_pn = '0;
  end

  dwt_row_stage #(.NU(NU), .DW(DW)) u_rows (
    .clk, .rst_n, .row_en, .x, .x_m2, .x_m1, .x_pn, .tag_in,
    .reg_a, .tag_odd, .tag_even
  );

  // ---------------------------------------------------------------- columns
  logic                y_valid [NU];
  logic                y_lp    [NU];
  logic [ROW_W-1:0]    y_row   [NU];
  logic [STRIPE_W-1:0] y_str   [NU];

  for (genvar c = 0; c < NU; c++) begin : g_colu
    dwt_col_unit #(.DW(DW)) u_col (
      .clk, .rst_n, .row_en,
      .reg_a(reg_a[c]), .tag_a((c % 2 == 1) ? tag_odd : tag_even),
      .y(coef[c]), .y_valid(y_valid[c]), .y_lp(y_lp[c]),
      .y_row(y_row[c]), .y_stripe(y_str[c])
    );
    assign coef_valid[c] = coef_stb && y_valid[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coef_stb <= 1'b0;
    else        coef_stb <= row_en;
  end

  assign odd_lp      = y_lp[1];
  assign odd_row     = y_row[1];
  assign odd_stripe  = y_str[1];
  assign even_lp     = y_lp[0];
  assign even_row    = y_row[0];
  assign even_stripe = y_str[0];

  // a flush may only be requested while no row is being received
  a_flush_idle: assert property (@(posedge clk) disable iff (!rst_n) flush |-> !in_valid)
    else $error("flush while pixels arrive");

endmodule
