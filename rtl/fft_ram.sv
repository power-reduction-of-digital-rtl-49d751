// Data memory of the FFT: DEPTH complex words, split into BANKS banks.
//
// The memory holds the input samples, every intermediate stage and finally
// the (bit-reversed) spectrum in place.  It has the two read ports and two
// write ports the processing element needs for one butterfly per clock.
// The address space is cut into BANKS consecutive banks selected by the top
// address bits; each bank is an array of DEPTH/BANKS words.  Splitting lets
// each bank run at a lower supply in silicon; logically the memory behaves
// as one.  Reads are synchronous (data one clock after the address), writes
// take effect at the clock edge; a read of a word written in the same clock
// returns the old value.  The two write ports must not hit the same address
// in one clock.  The bank split follows the document; the address-to-bank
// mapping and port timing are this design's choices.
module fft_ram #(
  parameter int DEPTH = 1024,
  parameter int BANKS = 2,
  parameter int DW    = 32
) (
  input  logic                     clk,
  input  logic                     re0,
  input  logic [$clog2(DEPTH)-1:0] ra0,
  output logic [DW-1:0]            rd0,
  input  logic                     re1,
  input  logic [$clog2(DEPTH)-1:0] ra1,
  output logic [DW-1:0]            rd1,
  input  logic                     we0,
  input  logic [$clog2(DEPTH)-1:0] wa0,
  input  logic [DW-1:0]            wd0,
  input  logic                     we1,
  input  logic [$clog2(DEPTH)-1:0] wa1,
  input  logic [DW-1:0]            wd1
);

  localparam int AW = $clog2(DEPTH);
  localparam int BD = DEPTH / BANKS;          // words per bank
  localparam int LW = $clog2(BD);             // in-bank address width
  localparam int BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  function automatic logic [BW-1:0] bank_of(input logic [AW-1:0] a);
    return (BANKS > 1) ? BW'(a >> LW) : '0;
  endfunction

  logic [DW-1:0] q0 [BANKS];
  logic [DW-1:0] q1 [BANKS];
  logic [BW-1:0] sel0, sel1;

  for (genvar k = 0; k < BANKS; k++) begin : g_bank
    logic [DW-1:0] mem [BD];
    always_ff @(posedge clk) begin
      if (we0 && bank_of(wa0) == BW'(k)) mem[wa0[LW-1:0]] <= wd0;
      if (we1 && bank_of(wa1) == BW'(k)) mem[wa1[LW-1:0]] <= wd1;
      if (re0 && bank_of(ra0) == BW'(k)) q0[k] <= mem[ra0[LW-1:0]];
      if (re1 && bank_of(ra1) == BW'(k)) q1[k] <= mem[ra1[LW-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (re0) sel0 <= bank_of(ra0);
    if (re1) sel1 <= bank_of(ra1);
  end

  assign rd0 = q0[sel0];
  assign rd1 = q1[sel1];

  always_ff @(posedge clk) begin
    if (we0 && we1) assert (wa0 != wa1) else $error("both write ports address the same word");
  end

endmodule
