// Row stage of the parallel 2D (5,3) DWT: NU row processors side by side.
//
// Every column of the stripe has its own DWT processor, so a whole row is
// transformed in two clock enables.  Columns are numbered from 0.
//   * Odd columns (high pass) read their own input register and both
//     neighbouring input registers and write Register A on the first enable.
//   * Even columns (low pass) need the high-pass results of their neighbours,
//     so their input first goes through an alignment register; on the next
//     enable their processor reads it together with the Register A of the two
//     odd neighbours and writes its own Register A.
// Register A of each column is the first register of that column's register
// chain in the column stage, so odd columns run one row enable ahead of even
// columns; the tags tag_odd / tag_even say which row each set of Register A
// values belongs to.
//
// Edges.  Column 0 is even and column NU-1 is odd.  When the stripe touches
// the image border the transform mirrors (x(-1) = x(1), x(NU) = x(NU-2), so
// HP(-1) = HP(1)).  Inside a wide image (striping) the neighbouring stripe
// supplies x(-2), x(-1) and x(NU): one extra processor forms HP(-1) from
// x(-2), x(-1), x(0) for column 0, and x(NU) feeds column NU-1.
//
// Timing: all registers load on row_en, one row per enable; outputs are
// registers.  The row processors and the edge processor follow the document;
// the tags, the use of a clock enable for the slow clock and the numbering of
// columns are this design's choices.
module dwt_row_stage
  import dwt_pkg::*;
#(
  parameter int NU = 32,   // parallel units (stripe width); even, >= 4
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 row_en,
  input  logic signed [DW-1:0] x    [NU],  // input registers, columns 0..NU-1
  input  logic signed [DW-1:0] x_m2,       // x(-2) from the stripe on the left
  input  logic signed [DW-1:0] x_m1,       // x(-1) from the stripe on the left
  input  logic signed [DW-1:0] x_pn,       // x(NU) from the stripe on the right
  input  row_tag_t             tag_in,     // tag of the row in the input registers
  output logic signed [DW-1:0] reg_a [NU], // Register A of every column
  output row_tag_t             tag_odd,    // row held in odd columns' Register A
  output row_tag_t             tag_even    // row held in even columns' Register A
);

  logic signed [DW-1:0] align_q [NU];      // even columns' alignment register
  logic signed [DW-1:0] hp_m1_q;           // HP(-1) of the neighbouring stripe
  logic signed [DW-1:0] row_y   [NU];
  logic signed [DW-1:0] hp_m1;

  // extra processor for the left stripe edge: HP(-1) = x(-1) - (x(-2)+x(0))/2
  dwt53_proc #(.DW(DW)) u_edge (
    .lp(1'b0), .x(x_m1), .a(x_m2), .b(x[0]), .y(hp_m1)
  );

  for (genvar c = 0; c < NU; c++) begin : g_col
    if (c % 2 == 1) begin : g_odd
      logic signed [DW-1:0] right;
      if (c == NU-1) begin : g_last
        assign right = tag_in.right_edge ? x[NU-2] : x_pn;
      end else begin : g_mid
        assign right = x[c+1];
      end
      dwt53_proc #(.DW(DW)) u_proc (
        .lp(1'b0), .x(x[c]), .a(x[c-1]), .b(right), .y(row_y[c])
      );
    end else begin : g_even
      logic signed [DW-1:0] left;
      if (c == 0) begin : g_first
        assign left = tag_odd.left_edge ? reg_a[1] : hp_m1_q;
      end else begin : g_mid
        assign left = reg_a[c-1];
      end
      dwt53_proc #(.DW(DW)) u_proc (
        .lp(1'b1), .x(align_q[c]), .a(left), .b(reg_a[c+1]), .y(row_y[c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NU; c++) begin
        reg_a[c]   <= '0;
        align_q[c] <= '0;
      end
      hp_m1_q  <= '0;
      tag_odd  <= TAG_NONE;
      tag_even <= TAG_NONE;
    end else if (row_en) begin
      for (int c = 0; c < NU; c++) begin
        reg_a[c]   <= row_y[c];
        align_q[c] <= x[c];
      end
      hp_m1_q  <= hp_m1;
      tag_odd  <= tag_in;
      tag_even <= tag_odd;
    end
  end

endmodule
