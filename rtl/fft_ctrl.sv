// FFT controller: address generator of an in-place radix-2
// decimation-in-frequency FFT.
//
// For a transform of N = 2^log2n points it runs log2n stages of N/2
// butterflies.  In stage s (0 first) the butterfly span is h = N >> (s+1);
// butterfly j, with p = j mod h and g = j div h, reads and rewrites words
//     a = 2*g*h + p   and   b = a + h
// with twiddle W_N^(p * 2^s), given as the exponent of the 1024-point table
// e = p * 2^s * 1024/N.  One butterfly is issued per clock while rd_ok is
// high.  At the end of a stage the controller waits until every issued
// butterfly has been written back (the parallel processing element has a
// long latency) before the next stage reads its results.  done pulses when
// the last stage has been written; the spectrum is then in bit-reversed
// order.  log2n may range from 1 to LOG2_NMAX (<= 10), so the same hardware
// runs, e.g., 256-point and 1024-point transforms.  The controller itself is
// this design's own; the document only names it.
module fft_ctrl #(
  parameter int LOG2_NMAX = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [3:0]           log2n,
  input  logic                 rd_ok,      // the operand path can take a read
  input  logic                 wb,         // a butterfly result is written back
  output logic                 rd,         // read the operands of one butterfly
  output logic [LOG2_NMAX-1:0] addr_a,
  output logic [LOG2_NMAX-1:0] addr_b,
  output logic [8:0]           tw_e,       // twiddle exponent of the 1024-point table
  output logic                 busy,
  output logic                 draining,   // waiting for the stage to be written back
  output logic                 done
);

  localparam int AW = LOG2_NMAX;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [3:0]    len;        // log2 of the running transform size
  logic [3:0]    stage;
  logic [AW-1:0] j;          // butterfly index within the stage
  logic [AW:0]   outstanding;
  logic [3:0]    sh;         // log2 of the span
  logic [AW-1:0] span, pos, grp;
  logic [AW-1:0] last_j;

  always_comb begin
    sh     = len - stage - 4'd1;
    span   = AW'(1) << sh;
    pos    = j & (span - 1'b1);
    grp    = j >> sh;
    addr_a = (grp << (sh + 4'd1)) | pos;
    addr_b = addr_a | span;
    tw_e   = 9'((32'(pos) << stage) << (4'd10 - len));
    last_j = (AW'(1) << (len - 4'd1)) - 1'b1;
  end

  assign busy     = (state != S_IDLE);
  assign draining = (state == S_DRAIN);
  assign rd       = (state == S_RUN) && rd_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      len         <= 4'(LOG2_NMAX);
      stage       <= '0;
      j           <= '0;
      outstanding <= '0;
      done        <= 1'b0;
    end else begin
      done        <= 1'b0;
      outstanding <= outstanding + (AW+1)'(rd) - (AW+1)'(wb);
      unique case (state)
        S_IDLE: if (start) begin
          len   <= (log2n == 4'd0 || log2n > 4'(LOG2_NMAX)) ? 4'(LOG2_NMAX) : log2n;
          stage <= '0;
          j     <= '0;
          state <= S_RUN;
        end
        S_RUN: if (rd) begin
          if (j == last_j) state <= S_DRAIN;
          else             j     <= j + 1'b1;
        end
        S_DRAIN: if (outstanding == '0 || (outstanding == (AW+1)'(1) && wb)) begin
          if (stage == len - 4'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
            j     <= '0;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
