// Parallel processing element: N_BP butterfly processors behind a
// demultiplexer and a multiplexer.
//
// Seen from the controller the element still has three operand inputs
// (a, b, W) and two result outputs and accepts one butterfly per clock.
// Inside, the demultiplexer hands successive butterflies to successive
// butterfly processors (BPs) in round-robin order.  Each BP is given N_BP
// clocks for its work, standing for a BP running N_BP times slower at a
// subthreshold supply; the multiplexer collects the results in the same
// staggered order.  The element's throughput does not depend on N_BP, only
// its latency does: a result leaves N_BP + 1 clocks after its operands
// entered.
//
// Active unit scaling: only BPs 0..n_active-1 take part; the others are never
// loaded (they stand for powered-off units).  Because each BP still needs
// N_BP clocks, the element then accepts n_active butterflies per N_BP
// clocks, and in_ready tells the controller when the next BP is free.
// A tag (for example the two memory addresses) travels with each butterfly.
// Distribution, collection and active unit scaling follow the document; the
// handshake and tag are this design's choices.
module fft_pe
  import fft_pkg::*;
#(
  parameter int N_BP  = 32,
  parameter int TAG_W = 20
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(N_BP+1)-1:0]   n_active,   // 1..N_BP (0 acts as 1)
  input  logic                        in_valid,
  output logic                        in_ready,
  input  cplx_t                       in_a,
  input  cplx_t                       in_b,
  input  cplx_t                       in_w,
  input  logic [TAG_W-1:0]            in_tag,
  output logic                        out_valid,
  output cplx_t                       out_a,
  output cplx_t                       out_b,
  output logic [TAG_W-1:0]            out_tag
);

  localparam int IW = (N_BP > 1) ? $clog2(N_BP) : 1;
  localparam int CW = $clog2(N_BP + 1);

  logic [IW-1:0]    ptr;                      // demultiplexer select
  logic [IW-1:0]    last;                     // highest active BP
  logic             busy   [N_BP];
  logic [CW-1:0]    cnt    [N_BP];            // clocks left for the BP
  cplx_t            op_a   [N_BP];
  cplx_t            op_b   [N_BP];
  cplx_t            op_w   [N_BP];
  logic [TAG_W-1:0] op_tag [N_BP];
  cplx_t            res_a  [N_BP];
  cplx_t            res_b  [N_BP];
  logic [N_BP-1:0]  done;                     // BP finishes this clock
  logic             issue;

  assign last     = (n_active == '0) ? '0 : IW'(n_active - 1'b1);
  assign in_ready = (ptr <= last) && (!busy[ptr] || done[ptr]);
  assign issue    = in_valid && in_ready;

  for (genvar i = 0; i < N_BP; i++) begin : g_bp
    fft_bp u_bp (.a(op_a[i]), .b(op_b[i]), .w(op_w[i]), .a_out(res_a[i]), .b_out(res_b[i]));
    assign done[i] = busy[i] && (cnt[i] == '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[i]   <= 1'b0;
        cnt[i]    <= '0;
        op_a[i]   <= '0;
        op_b[i]   <= '0;
        op_w[i]   <= '0;
        op_tag[i] <= '0;
      end else if (issue && ptr == IW'(i)) begin
        busy[i]   <= 1'b1;
        cnt[i]    <= CW'(N_BP - 1);
        op_a[i]   <= in_a;
        op_b[i]   <= in_b;
        op_w[i]   <= in_w;
        op_tag[i] <= in_tag;
      end else if (done[i]) begin
        busy[i] <= 1'b0;
      end else if (busy[i]) begin
        cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  // demultiplexer pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ptr <= '0;
    else if (ptr > last)    ptr <= '0;
    else if (issue)         ptr <= (ptr == last) ? '0 : ptr + 1'b1;
  end

  // collection multiplexer: at most one BP finishes per clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      for (int i = 0; i < N_BP; i++) begin
        if (done[i]) begin
          out_valid <= 1'b1;
          out_a     <= res_a[i];
          out_b     <= res_b[i];
          out_tag   <= op_tag[i];
        end
      end
    end
  end

  // the staggered schedule never lets two processors finish together
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) $countones(done) <= 1)
    else $error("two butterfly processors finished together");

endmodule
