// ifft: zero padding and radix-2 decimation-in-time inverse FFT.
//
// Computes x(n) = 1/N * sum_k X(k) * exp(+i*2*pi*n*k/N) for one OFDM symbol.
// The NDATA data symbols go to bins 0..NDATA-1 and the remaining N-NDATA bins
// are zero (zero padding). The working store is an N-entry register array,
// loaded in bit-reversed order so that the in-place decimation-in-time stages
// leave the result in natural order. One radix2_butterfly is reused: each
// cycle it reads two entries, multiplies the lower one by the twiddle
// exp(+i*2*pi*t/N) and writes back the halved sum and difference, so the
// log2(N) halvings give the 1/N factor.
// Interface: in_valid/in_ready takes the symbols while the IFFT is idle;
// out_valid stays high with out_samples (natural order) until out_ready.
// Timing: log2(N)*N/2 butterfly cycles (192 for N = 64) after the load
// cycle, so out_valid rises log2(N)*N/2 + 1 clock edges after the load edge.
// The transform, the radix-2 decimation in time, its butterfly and the zero
// padding follow the published description; N, NDATA, the placement of the
// data bins, the single reused butterfly and the fixed-point scaling are this
// design's choice.
module ifft
  import fdm_pkg::*;
#(
  parameter int N     = 64,             // transform size, a power of two
  parameter int NDATA = 48              // data subcarriers, NDATA <= N
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_syms [NDATA],
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_samples [N]
);

  localparam int LOGN = $clog2(N);
  localparam int JW   = (LOGN > 1) ? LOGN - 1 : 1;   // butterfly index width
  localparam int SW   = (LOGN > 1) ? $clog2(LOGN) : 1;

  if ((1 << LOGN) != N || N < 2) begin : g_bad_n
    $error("N must be a power of two, at least 2");
  end
  if (NDATA > N) begin : g_bad_ndata
    $error("NDATA must not exceed N");
  end

  // Twiddle table, kept as separate real and imaginary arrays.
  typedef sample_t tw_table_t [N/2];

  function automatic tw_table_t make_twiddles(bit imag);
    tw_table_t t;
    cplx_t     w;
    for (int k = 0; k < N/2; k++) begin
      w    = twiddle(k, N);
      t[k] = imag ? w.im : w.re;
    end
    return t;
  endfunction

  localparam tw_table_t TW_RE = make_twiddles(1'b0);
  localparam tw_table_t TW_IM = make_twiddles(1'b1);

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] v);
    logic [LOGN-1:0] r;
    for (int b = 0; b < LOGN; b++) r[b] = v[LOGN-1-b];
    return r;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t          state_q;
  cplx_t           mem_q [N];
  logic [SW-1:0]   stage_q;   // current stage, 0 .. LOGN-1
  logic [JW-1:0]   bf_q;      // butterfly within the stage, 0 .. N/2-1

  logic [LOGN-1:0] idx0, idx1;
  logic [JW-1:0]   tw_idx;
  cplx_t           bf_a, bf_b, bf_w, bf_x0, bf_x1;

  // Addresses of the current butterfly: span 2^stage, group bf >> stage.
  always_comb begin
    logic [LOGN-1:0] pos, half;
    half   = LOGN'(1) << stage_q;
    pos    = LOGN'(bf_q) & (half - LOGN'(1));
    idx0   = ((LOGN'(bf_q) >> stage_q) << (stage_q + SW'(1))) | pos;
    idx1   = idx0 | half;
    tw_idx = JW'(pos << (SW'(LOGN - 1) - stage_q));
    bf_a   = mem_q[idx0];
    bf_b   = mem_q[idx1];
    bf_w   = '{re: TW_RE[tw_idx], im: TW_IM[tw_idx]};
  end

  radix2_butterfly u_bf (
    .a  (bf_a),
    .b  (bf_b),
    .w  (bf_w),
    .x0 (bf_x0),
    .x1 (bf_x1)
  );

  assign in_ready    = (state_q == S_IDLE);
  assign out_valid   = (state_q == S_DONE);
  assign out_samples = mem_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      stage_q <= '0;
      bf_q    <= '0;
      for (int k = 0; k < N; k++) mem_q[k] <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (in_valid) begin
          for (int k = 0; k < N; k++)
            mem_q[bitrev(LOGN'(k))] <= (k < NDATA) ? in_syms[k] : '0;
          stage_q <= '0;
          bf_q    <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          mem_q[idx0] <= bf_x0;
          mem_q[idx1] <= bf_x1;
          if (bf_q == JW'(N/2 - 1)) begin
            bf_q <= '0;
            if (stage_q == SW'(LOGN - 1)) state_q <= S_DONE;
            else                          stage_q <= stage_q + SW'(1);
          end else begin
            bf_q <= bf_q + JW'(1);
          end
        end
        S_DONE: if (out_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule : ifft
