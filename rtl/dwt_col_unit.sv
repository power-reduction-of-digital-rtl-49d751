// Column unit of the parallel 2D (5,3) DWT: one column processor and its
// register chain.
//
// Row-transformed values of one column arrive in Register A (owned by the row
// stage) and shift up through Registers B, C, D and E, one row per row_en.
// The column processor sits behind a multiplexer:
//   * when Register B holds an odd row, it computes the column high pass of B
//     from A, B and C; on the next shift that result, not B, is written into
//     Register C ("put back in" for the low pass);
//   * when Register B holds an even row, D holds the even row two rows up,
//     flanked by the column high-pass results in C and E, and the processor
//     computes the column low pass of D.
// So the unit alternates high-pass and low-pass cycles and delivers one 2D
// coefficient per row enable.  The row index in each register's tag chooses
// the cycle type and the mirroring at the column ends: at the last row of a
// stripe (Register A does not hold the next row) C replaces A, and at row 0
// C replaces E.  Outputs are combinational from the chain and are valid from
// the cycle after a row_en until the next one.  The chain and the multiplexer
// follow the document; the tag-driven control is this design's choice.
module dwt_col_unit
  import dwt_pkg::*;
#(
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 row_en,
  input  logic signed [DW-1:0] reg_a,   // Register A (row stage output)
  input  row_tag_t             tag_a,   // its tag
  output logic signed [DW-1:0] y,       // 2D coefficient
  output logic                 y_valid, // y holds a coefficient of image data
  output logic                 y_lp,    // 1: column low pass (even row), 0: high pass
  output logic [ROW_W-1:0]     y_row,   // row of the coefficient
  output logic [STRIPE_W-1:0]  y_stripe
);

  logic signed [DW-1:0] rb, rc, rd, re;
  row_tag_t             tb, tc, td, te;

  logic                 hp_cycle;
  logic signed [DW-1:0] px, pa, pb;
  row_tag_t             centre;

  always_comb begin
    hp_cycle = tb.row[0];
    if (hp_cycle) begin
      px     = rb;
      pa     = rc;
      // bottom edge: the row after B is missing, mirror with C
      pb     = (tag_a.valid && tag_a.row == tb.row + 1'b1) ? reg_a : rc;
      centre = tb;
    end else begin
      px     = rd;
      pa     = rc;
      // top edge: no high pass above row 0, mirror with C
      pb     = (td.row == '0) ? rc : re;
      centre = td;
    end
  end

  dwt53_proc #(.DW(DW)) u_proc (
    .lp(~hp_cycle), .x(px), .a(pa), .b(pb), .y(y)
  );

  assign y_valid  = centre.valid;
  assign y_lp     = ~hp_cycle;
  assign y_row    = centre.row;
  assign y_stripe = centre.stripe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rb, rc, rd, re} <= '0;
      tb <= TAG_NONE; tc <= TAG_NONE; td <= TAG_NONE; te <= TAG_NONE;
    end else if (row_en) begin
      rb <= reg_a;
      rc <= hp_cycle ? y : rb;
      rd <= rc;
      re <= rd;
      tb <= tag_a; tc <= tb; td <= tc; te <= td;
    end
  end

  // the low-pass step reads E, which must be the high pass two rows below D
  always_ff @(posedge clk) begin
    if (row_en && !hp_cycle && td.valid && td.row != '0)
      assert (te.row == td.row - 1'b1) else $error("column chain out of order");
  end

endmodule
