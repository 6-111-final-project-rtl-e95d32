// fft128: N-point forward FFT of a real frame, one butterfly per clock.
//
// Operation, per frame:
//   load    - the first xn_valid starts a frame; N samples on consecutive
//             xn_valid cycles are written in natural order into the
//             working memory (re = sample << 7, im = 0).
//   compute - in-place radix-2 decimation-in-frequency: log2(N) stages of
//             N/2 butterflies, one per clock (7 x 64 = 448 clocks for
//             N = 128). A butterfly on (a, b) with twiddle W = e^{-j2pi m/N}
//             writes a' = (a + b) / 2 and b' = (a - b) * W / 2, so the whole
//             transform is scaled by 1/N and never overflows INT_W bits.
//             Twiddles are a Q1.14 table computed at elaboration.
//   unload  - the memory is read in address order, which after a DIF
//             transform is bit-reversed bin order: on each dv cycle
//             xk_index is the bin, xk_re/xk_im its value (>> 7, the input
//             sample scale) and mag = |xk_re| + |xk_im|, the cheap magnitude
//             estimate used by the note arrays. last marks the final bin.
// done pulses for one clock when the computation ends, just before the
// first dv. busy is high from the first loaded sample until after the last
// bin; samples offered while busy outside the load phase are ignored.
// One frame takes N + 448 + N clocks, well inside the 1039 clocks between
// 48 kHz audio samples.
//
// The frame size, 8-bit data, bit-reversed unload with an index, done
// strobe and |re|+|im| magnitude follow the document; the document uses a
// vendor core, so the radix-2 structure and scaling are this design's own.
module fft128 #(
  parameter int N     = 128,
  parameter int IN_W  = 8,
  parameter int OUT_W = 8,
  parameter int INT_W = 16,
  localparam int LOGN = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  xn,
  input  logic                    xn_valid,
  output logic                    busy,
  output logic                    done,
  output logic                    dv,
  output logic                    last,
  output logic [LOGN-1:0]         xk_index,
  output logic signed [OUT_W-1:0] xk_re,
  output logic signed [OUT_W-1:0] xk_im,
  output logic [OUT_W:0]          mag
);
  localparam int TW_FRAC = 14;
  localparam int IN_SH   = 7;

  typedef logic signed [15:0] tw_t [N/2];

  function automatic tw_t make_cos();
    tw_t t;
    for (int m = 0; m < N/2; m++)
      t[m] = 16'($rtoi($floor($cos(2.0 * 3.141592653589793 * m / N) * (2.0 ** TW_FRAC) + 0.5)));
    return t;
  endfunction

  function automatic tw_t make_sin();
    tw_t t;
    for (int m = 0; m < N/2; m++)
      t[m] = 16'($rtoi($floor($sin(2.0 * 3.141592653589793 * m / N) * (2.0 ** TW_FRAC) + 0.5)));
    return t;
  endfunction

  localparam tw_t TW_COS = make_cos();
  localparam tw_t TW_SIN = make_sin();

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) bitrev[i] = v[LOGN-1-i];
  endfunction

  function automatic logic [OUT_W-1:0] absval(input logic signed [OUT_W-1:0] v);
    return v[OUT_W-1] ? OUT_W'(-v) : OUT_W'(v);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP, S_UNLOAD} state_t;
  state_t state;

  logic signed [INT_W-1:0] mre [N];
  logic signed [INT_W-1:0] mim [N];

  logic [LOGN-1:0]          cnt;     // load / unload address
  logic [$clog2(LOGN)-1:0]  stage;
  logic [LOGN-2:0]          bfly;    // butterfly within the stage

  // Butterfly addressing for the current stage: span = N >> (stage+1).
  logic [LOGN-1:0]   a_addr, b_addr;
  logic [LOGN-2:0]   span_mask, pos, grp, tw_idx;
  always_comb begin
    span_mask = (LOGN-1)'((N >> (stage + 1)) - 1);
    pos       = bfly & span_mask;
    grp       = bfly & ~span_mask;
    a_addr    = {grp, 1'b0} | LOGN'(pos);
    b_addr    = a_addr | LOGN'(N >> (stage + 1));
    tw_idx    = (LOGN-1)'(pos << stage);
  end

  logic signed [INT_W:0]     sum_re, sum_im, dif_re, dif_im;
  logic signed [INT_W+17:0]  prod_re, prod_im;
  logic signed [INT_W-1:0]   new_a_re, new_a_im, new_b_re, new_b_im;
  always_comb begin
    sum_re  = (INT_W+1)'(mre[a_addr]) + (INT_W+1)'(mre[b_addr]);
    sum_im  = (INT_W+1)'(mim[a_addr]) + (INT_W+1)'(mim[b_addr]);
    dif_re  = (INT_W+1)'(mre[a_addr]) - (INT_W+1)'(mre[b_addr]);
    dif_im  = (INT_W+1)'(mim[a_addr]) - (INT_W+1)'(mim[b_addr]);
    // (dr + j di)(c - j s) = (dr c + di s) + j (di c - dr s)
    prod_re = (INT_W+18)'(dif_re * TW_COS[tw_idx]) + (INT_W+18)'(dif_im * TW_SIN[tw_idx]);
    prod_im = (INT_W+18)'(dif_im * TW_COS[tw_idx]) - (INT_W+18)'(dif_re * TW_SIN[tw_idx]);
    new_a_re = INT_W'(sum_re >>> 1);
    new_a_im = INT_W'(sum_im >>> 1);
    new_b_re = INT_W'(prod_re >>> (TW_FRAC + 1));
    new_b_im = INT_W'(prod_im >>> (TW_FRAC + 1));
  end

  logic signed [OUT_W-1:0] out_re, out_im;
  assign out_re = OUT_W'(mre[cnt] >>> IN_SH);
  assign out_im = OUT_W'(mim[cnt] >>> IN_SH);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      stage    <= '0;
      bfly     <= '0;
      done     <= 1'b0;
      dv       <= 1'b0;
      last     <= 1'b0;
      xk_index <= '0;
      xk_re    <= '0;
      xk_im    <= '0;
      mag      <= '0;
    end else begin
      done <= 1'b0;
      dv   <= 1'b0;
      last <= 1'b0;
      unique case (state)
        S_IDLE, S_LOAD: begin
          if (xn_valid) begin
            mre[cnt] <= INT_W'(xn) <<< IN_SH;
            mim[cnt] <= '0;
            cnt      <= cnt + 1'b1;
            state    <= S_LOAD;
            if (cnt == LOGN'(N - 1)) begin
              state <= S_COMP;
              stage <= '0;
              bfly  <= '0;
            end
          end
        end
        S_COMP: begin
          mre[a_addr] <= new_a_re;
          mim[a_addr] <= new_a_im;
          mre[b_addr] <= new_b_re;
          mim[b_addr] <= new_b_im;
          bfly <= bfly + 1'b1;
          if (bfly == (LOGN-1)'(N/2 - 1)) begin
            stage <= stage + 1'b1;
            if (stage == ($clog2(LOGN))'(LOGN - 1)) begin
              state <= S_UNLOAD;
              cnt   <= '0;
              done  <= 1'b1;
            end
          end
        end
        S_UNLOAD: begin
          dv       <= 1'b1;
          xk_index <= bitrev(cnt);
          xk_re    <= out_re;
          xk_im    <= out_im;
          mag      <= (OUT_W+1)'(absval(out_re)) + (OUT_W+1)'(absval(out_im));
          cnt      <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            last  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
