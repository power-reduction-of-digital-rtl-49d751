// Shared types of the parallel 2D (5,3) discrete wavelet transform.
//
// Every row that enters the parallel units carries a tag: whether it holds
// real image data, its row index inside the stripe, the stripe it belongs to,
// and whether the stripe touches the left or right border of the image (so
// the row transform must mirror instead of using neighbouring-stripe pixels).
// The tag travels beside the data through the row stage and the column
// register chains, which is how the otherwise uniform parallel units know
// when to mirror and when a result is a column high-pass or low-pass value.
package dwt_pkg;

  localparam int ROW_W    = 16;  // row index width (images up to 65536 rows)
  localparam int STRIPE_W = 8;   // stripe index width

  typedef struct packed {
    logic                valid;       // row holds image data (0: flush bubble)
    logic [ROW_W-1:0]    row;         // row index within the stripe
    logic [STRIPE_W-1:0] stripe;      // stripe index
    logic                left_edge;   // stripe starts at the image's left border
    logic                right_edge;  // stripe ends at the image's right border
  } row_tag_t;

  localparam row_tag_t TAG_NONE = '0;

endpackage
