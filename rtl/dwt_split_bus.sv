// Split-bus data distribution for the parallel DWT.
//
// Pixels arrive serially, one per clock, in bus positions 0..NX-1 of a row.
// A global position counter numbers them.  Instead of hanging every input
// register on one fast bus, a demultiplexer deals the stream out over SPLITS
// sub-buses (position p goes to sub-bus p mod SPLITS) and a fast register on
// each sub-bus holds the pixel for SPLITS clocks.  Each parallel unit's input
// register listens to one sub-bus and latches when the (one clock delayed)
// counter equals its position, so input registers only have to accept one
// value per SPLITS clocks and can run from a lower supply.
//
// Positions 0..NU-1 are the stripe's columns; when NX > NU the three extra
// positions NU, NU+1, NU+2 hold x(-2), x(-1) and x(NU) from the neighbouring
// stripes (the extra registers striping needs).
//
// Timing: pixel p of a row is in its input register two clocks after it was
// on the bus.  row_en is high for one clock, the clock after the input
// register of position NX-1 latched; the whole row is then stable in the
// input registers, and back-to-back rows are accepted without a gap.
// The demultiplexer, fast registers, counter matching and three extra
// registers follow the document; the interleaving order was read from the
// pixel sequences of its figure, and the row_en timing is this design's own.
module dwt_split_bus #(
  parameter int NU     = 32,      // parallel units
  parameter int NX     = NU + 3,  // bus positions per row (NU, or NU+3 when striping)
  parameter int SPLITS = 4,       // number of sub-buses
  parameter int PIX_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic [PIX_W-1:0] in_reg [NX],   // input registers
  output logic             row_en         // whole row present in in_reg
);

  localparam int PW = $clog2(NX + 1);
  localparam int SW = (SPLITS > 1) ? $clog2(SPLITS) : 1;

  logic [PW-1:0]    pos;                 // global column counter
  logic [SW-1:0]    sub;                 // demultiplexer select = pos mod SPLITS
  logic [PIX_W-1:0] fast_q [SPLITS];     // fast register of each sub-bus
  logic [PW-1:0]    pos_q;               // counter as seen by the input registers
  logic             vld_q;


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos    <= '0;
      sub    <= '0;
      pos_q  <= '0;
      vld_q  <= 1'b0;
      row_en <= 1'b0;
      for (int k = 0; k < SPLITS; k++) fast_q[k] <= '0;
    end else begin
      if (in_valid) begin
        fast_q[sub] <= in_pix;
        if (pos == PW'(NX - 1)) begin
          pos <= '0;
          sub <= '0;
        end else begin
          pos <= pos + 1'b1;
          sub <= (sub == SW'(SPLITS - 1)) ? '0 : sub + 1'b1;
        end
      end
      pos_q  <= pos;
      vld_q  <= in_valid;
      row_en <= vld_q && (pos_q == PW'(NX - 1));
    end
  end

  for (genvar c = 0; c < NX; c++) begin : g_in
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                              in_reg[c] <= '0;
      else if (vld_q && pos_q == PW'(c))       in_reg[c] <= fast_q[c % SPLITS];
    end
  end

endmodule
