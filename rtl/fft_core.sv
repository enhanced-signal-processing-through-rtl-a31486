// fft_core: N-point radix-2 FFT of a stream of complex samples, one
// channel's FFT in the direction-finding receiver.
//
// Samples (i_re + j*i_im, IN_W bits each) are written, as they arrive, into
// a load bank at bit-reversed addresses. When N samples have arrived, the
// banks swap. The full bank is transformed in place by a single butterfly
// unit, one butterfly per clock, log2(N) stages of N/2 butterflies each
// (decimation in time). Then its N bins are streamed out in natural order,
// one per clock. Meanwhile the other bank is already collecting the next
// frame. Every butterfly halves its results,
//   a' = (a + w*b) / 2,   b' = (a - w*b) / 2,   w = exp(-j*2*pi*t/N),
// so the output is the DFT divided by N and cannot overflow. Inputs are
// placed at W-bit words scaled by 2^(W-IN_W-1): a complex tone of amplitude
// A that falls exactly on bin k gives |X[k]| = A * 2^(W-IN_W-1).
// The twiddle factors are cos/sin(2*pi*t/N) * 2^14, computed at elaboration.
//
// The receiver this design follows calls for a pipelined FFT on each DDC
// output but gives neither its size nor its arithmetic: N = 64, the word
// width, the scaling and the sequential single-butterfly form are this
// design's choices.
//
// Timing: the last sample of a frame starts the transform on the next
// clock. The transform takes log2(N)*N/2 clocks, then the N bins follow on
// consecutive clocks with o_valid, o_bin and o_last on the final bin. A new
// frame must not complete before the previous one has been streamed out
// (N*(log2(N)/2 + 1) + 2 clocks); an assertion checks this. Asynchronous
// active-low reset.
module fft_core #(
  parameter int N    = 64,
  parameter int IN_W = ddc_pkg::SAMPLE_W,
  parameter int W    = 16
) (
  input  logic                 i_clk,
  input  logic                 i_rst_n,
  input  logic                 i_valid,
  input  logic signed [IN_W-1:0] i_re,
  input  logic signed [IN_W-1:0] i_im,
  output logic                 o_valid,
  output logic [$clog2(N)-1:0] o_bin,
  output logic                 o_last,
  output logic signed [W-1:0]  o_re,
  output logic signed [W-1:0]  o_im
);
  localparam int L    = $clog2(N);
  localparam int TW_W = 16;
  localparam int TW_F = 14;
  localparam real PI  = 3.14159265358979323846;

  typedef logic signed [W-1:0]    word_t;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t                    tw_tab_t [N/2];
  typedef enum logic [1:0] {IDLE, COMPUTE, STREAM} state_t;

  function automatic tw_tab_t mk_cos();
    tw_tab_t t;
    for (int i = 0; i < N / 2; i++)
      t[i] = TW_W'($rtoi($floor($cos(2.0 * PI * i / N) * real'(1 << TW_F) + 0.5)));
    return t;
  endfunction
  function automatic tw_tab_t mk_sin();
    tw_tab_t t;
    for (int i = 0; i < N / 2; i++)
      t[i] = TW_W'($rtoi($floor($sin(2.0 * PI * i / N) * real'(1 << TW_F) + 0.5)));
    return t;
  endfunction
  localparam tw_tab_t COS_T = mk_cos();
  localparam tw_tab_t SIN_T = mk_sin();

  function automatic logic [L-1:0] bitrev(input logic [L-1:0] v);
    for (int i = 0; i < L; i++) bitrev[i] = v[L-1-i];
  endfunction

  word_t mem_re [2][N];
  word_t mem_im [2][N];

  logic          lb;          // bank being loaded; !lb is transformed/streamed
  logic [L-1:0]  lcnt;
  state_t        state;
  logic [L-1:0]  stage;
  logic [L-2:0]  bfly;
  logic [L-1:0]  ocnt;

  // Butterfly addresses for (stage, bfly)
  logic [L-1:0]  a_idx, b_idx, pos;
  logic [L-2:0]  t_idx;
  always_comb begin
    pos   = L'(bfly) & ((L'(1) << stage) - L'(1));
    a_idx = ((L'(bfly) >> stage) << (stage + 1)) | pos;
    b_idx = a_idx | (L'(1) << stage);
    t_idx = (L-1)'(pos << (L'(L - 1) - stage));
  end

  // Butterfly arithmetic: w*b with w = cos - j*sin. The sums carry two guard
  // bits, but the halved results always fit in W bits: |a|, |b| <= M implies
  // |(a +- w*b)/2| <= M, and the loaded samples have a magnitude of at most
  // 2^(W-2)*sqrt(2) < 2^(W-1). Only the low W bits of s0/s1 are stored.
  localparam int P_W = W + TW_W + 1;
  logic signed [P_W-1:0] pr, pi_;
  logic signed [W+1:0]   wb_re, wb_im, s0_re, s0_im, s1_re, s1_im;
  word_t                 ar, ai, br, bi;
  tw_t                   wc, ws;
  always_comb begin
    ar = mem_re[!lb][a_idx];  ai = mem_im[!lb][a_idx];
    br = mem_re[!lb][b_idx];  bi = mem_im[!lb][b_idx];
    wc = COS_T[t_idx];
    ws = SIN_T[t_idx];
    // (br + j bi)(wc - j ws) = (br*wc + bi*ws) + j(bi*wc - br*ws)
    pr  = P_W'(br) * P_W'(wc) + P_W'(bi) * P_W'(ws);
    pi_ = P_W'(bi) * P_W'(wc) - P_W'(br) * P_W'(ws);
    wb_re = (W+2)'(pr  >>> TW_F);
    wb_im = (W+2)'(pi_ >>> TW_F);
    s0_re = ((W+2)'(ar) + wb_re) >>> 1;
    s0_im = ((W+2)'(ai) + wb_im) >>> 1;
    s1_re = ((W+2)'(ar) - wb_re) >>> 1;
    s1_im = ((W+2)'(ai) - wb_im) >>> 1;
  end

  logic frame_done;
  assign frame_done = i_valid && (lcnt == L'(N - 1));

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < N; k++) begin
          mem_re[b][k] <= '0;
          mem_im[b][k] <= '0;
        end
      lb      <= 1'b0;
      lcnt    <= '0;
      state   <= IDLE;
      stage   <= '0;
      bfly    <= '0;
      ocnt    <= '0;
      o_valid <= 1'b0;
      o_last  <= 1'b0;
      o_bin   <= '0;
      o_re    <= '0;
      o_im    <= '0;
    end else begin
      o_valid <= 1'b0;
      o_last  <= 1'b0;
      // Load side
      if (i_valid) begin
        mem_re[lb][bitrev(lcnt)] <= word_t'(i_re) <<< (W - IN_W - 1);
        mem_im[lb][bitrev(lcnt)] <= word_t'(i_im) <<< (W - IN_W - 1);
        lcnt <= lcnt + 1'b1;
      end
      case (state)
        IDLE: ;
        COMPUTE: begin
          mem_re[!lb][a_idx] <= s0_re[W-1:0];
          mem_im[!lb][a_idx] <= s0_im[W-1:0];
          mem_re[!lb][b_idx] <= s1_re[W-1:0];
          mem_im[!lb][b_idx] <= s1_im[W-1:0];
          if (bfly == (L-1)'(N / 2 - 1)) begin
            bfly <= '0;
            if (stage == L'(L - 1)) begin
              stage <= '0;
              state <= STREAM;
              ocnt  <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end else begin
            bfly <= bfly + 1'b1;
          end
        end
        STREAM: begin
          o_valid <= 1'b1;
          o_bin   <= ocnt;
          o_re    <= mem_re[!lb][ocnt];
          o_im    <= mem_im[!lb][ocnt];
          o_last  <= (ocnt == L'(N - 1));
          ocnt    <= ocnt + 1'b1;
          if (ocnt == L'(N - 1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      // Frame complete: swap banks and start the transform
      if (frame_done) begin
        lb    <= ~lb;
        state <= COMPUTE;
        stage <= '0;
        bfly  <= '0;
      end
    end
  end

  // A frame may only complete while no transform is in progress.
  a_no_overrun: assert property (@(posedge i_clk) disable iff (!i_rst_n)
                                 frame_done |-> state == IDLE);

endmodule
