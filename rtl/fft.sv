// fft: N-point radix-2 floating point FFT / IFFT engine (N = 8 by default).
//
// Operation. On start, the N complex samples on entry_re/entry_im are
// latched into a register file of N complex IEEE-754 single precision
// words. A counter-driven controller then runs log2(N) stages of N/2
// butterflies each, issuing one butterfly per clock to a pipelined
// butterfly unit and writing both results back in place when they emerge
// (the tag that travels with each butterfly names the two registers). A
// stage's butterflies are independent, so they stream back to back; before
// the next stage the controller waits until the pipeline has drained.
// Finally the output registers are sent out one 32-bit word per clock on
// out_data: real part of bin 0, imaginary part of bin 0, real part of bin 1,
// and so on (2N words, out_index counts them, out_valid marks them), and
// done pulses for one cycle.
//
// Forward transform (mode = 0): decimation in time. Samples are stored at
// bit-reversed addresses so that the first stage pairs even and odd
// samples; stage 1 forms 2-point DFTs with the adders only (the multiplier
// is bypassed), later stages compute X[k] = Xt[k] + W^k Xc[k] and
// X[k+N/2] = Xt[k] - W^k Xc[k] in dit_bfly. Results end in natural order.
// Inverse transform (mode = 1): decimation in frequency with dif_bfly,
// Xt = (X[k]+X[k+N/2])/2 and Xc = (X[k]-X[k+N/2])/(2W^k) at every stage,
// which includes the 1/N scale. Samples are stored in natural order and
// results are read out from bit-reversed addresses.
//
// Phase factors come from a constant table of W8^k (fp_pkg::twiddle8); an
// N-point stage uses W_N^k = W8^(k*8/N), so N may be 2, 4 or 8.
//
// Timing: start is accepted only when busy is low. With the default
// latencies an N = 8 forward transform takes 1 load cycle, 3 stages of
// 4 issue cycles + pipeline drain, and 16 output cycles.
//
// From the source design: eight 32-bit complex inputs held in registers,
// phase factors as precomputed constants, the adder/multiplier split of a
// decimation-in-time butterfly, a counter sequencing the data serially
// through the arithmetic units, output registers and a 32-bit output.
// This design's own choices: the handshake (start/busy/done), separate
// real and imaginary input ports, the word order on the serial output,
// in-place write-back with a tag, sharing one FFT engine for both
// directions with a mode input, and the decimation-in-frequency form of the
// inverse butterfly.
module fft
  import fp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       mode,       // 0: FFT, 1: IFFT
  input  fp32_t                      entry_re [N],
  input  fp32_t                      entry_im [N],
  output logic                       busy,
  output logic                       done,
  output logic                       out_valid,
  output logic [$clog2(2*N)-1:0]     out_index,
  output fp32_t                      out_data
);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned AW    = (LOGN < 1) ? 1 : LOGN;
  localparam int unsigned TAG_W = 2 * AW;
  localparam int unsigned HALF  = N / 2;
  localparam int unsigned JW    = (LOGN - 1 < 1) ? 1 : LOGN - 1;
  localparam int unsigned SW    = $clog2(LOGN + 1);
  localparam int unsigned IW    = $clog2(2 * N);

  initial begin
    assert (N == 2 || N == 4 || N == 8)
      else $fatal(1, "fft: N must be 2, 4 or 8 (phase factor table holds W8)");
  end

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_DRAIN, S_OUT, S_DONE} state_t;

  state_t           state;
  logic             mode_q;
  logic [SW-1:0]    stage;
  logic [JW-1:0]    bcnt;        // butterfly counter within a stage
  logic [IW-1:0]    ocnt;        // output word counter
  logic [4:0]       inflight;    // butterflies issued and not yet written back
  cplx_t            mem [N];

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] x);
    logic [AW-1:0] r;
    r = '0;
    for (int i = 0; i < int'(LOGN); i++) r[i] = x[LOGN-1-i];
    return r;
  endfunction

  // ---------------- butterfly address and phase factor generation -------
  logic [AW-1:0] top_a, bot_a;
  logic [1:0]    wexp8;          // exponent of W8 (0..3)
  always_comb begin
    int unsigned h, grp, pos, k;
    // DIT spans grow 1, 2, 4, ...; DIF spans shrink N/2, N/4, ..., 1.
    h    = mode_q ? (HALF >> stage) : (1 << stage);
    grp  = int'(bcnt) / h;
    pos  = int'(bcnt) % h;
    top_a = AW'(grp * 2 * h + pos);
    bot_a = AW'(grp * 2 * h + pos + h);
    k     = pos * (HALF / h);              // exponent of W_N
    wexp8 = 2'(k * (8 / N));
  end

  cplx_t w_cur;
  assign w_cur = twiddle8(wexp8);

  logic issue;
  assign issue = (state == S_ISSUE);

  // ---------------- butterfly units ---------------------------------------
  logic             dit_v, dif_v;
  cplx_t            dit_y0, dit_y1, dif_y0, dif_y1;
  logic [TAG_W-1:0] dit_tag, dif_tag;

  dit_bfly #(.TAG_W(TAG_W)) u_dit (
    .clk, .rst_n,
    .in_valid (issue && !mode_q),
    .bypass   (stage == '0),
    .a        (mem[top_a]),
    .b        (mem[bot_a]),
    .w        (w_cur),
    .tag_in   ({top_a, bot_a}),
    .out_valid(dit_v),
    .y0       (dit_y0),
    .y1       (dit_y1),
    .tag_out  (dit_tag)
  );

  dif_bfly #(.TAG_W(TAG_W)) u_dif (
    .clk, .rst_n,
    .in_valid (issue && mode_q),
    .a        (mem[top_a]),
    .b        (mem[bot_a]),
    .w        (w_cur),
    .tag_in   ({top_a, bot_a}),
    .out_valid(dif_v),
    .y0       (dif_y0),
    .y1       (dif_y1),
    .tag_out  (dif_tag)
  );

  logic             wb_v;
  cplx_t            wb_y0, wb_y1;
  logic [TAG_W-1:0] wb_tag;
  assign wb_v   = dit_v | dif_v;
  assign wb_y0  = dif_v ? dif_y0  : dit_y0;
  assign wb_y1  = dif_v ? dif_y1  : dit_y1;
  assign wb_tag = dif_v ? dif_tag : dit_tag;

  // ---------------- output word selection ---------------------------------
  logic [AW-1:0] rd_a;
  always_comb begin
    logic [AW-1:0] bin;
    bin  = AW'(ocnt >> 1);
    rd_a = mode_q ? bitrev(bin) : bin;
  end

  // ---------------- controller and register file ---------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_q    <= 1'b0;
      stage     <= '0;
      bcnt      <= '0;
      ocnt      <= '0;
      inflight  <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_data  <= FP_ZERO;
      done      <= 1'b0;
      for (int i = 0; i < int'(N); i++) mem[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      inflight  <= inflight + 5'(issue) - 5'(wb_v);

      if (wb_v) begin
        mem[wb_tag[TAG_W-1:AW]] <= wb_y0;
        mem[wb_tag[AW-1:0]]     <= wb_y1;
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode_q <= mode;
            for (int i = 0; i < int'(N); i++) begin
              if (mode) mem[i]                 <= '{re: entry_re[i], im: entry_im[i]};
              else      mem[bitrev(AW'(i))]    <= '{re: entry_re[i], im: entry_im[i]};
            end
            stage <= '0;
            bcnt  <= '0;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (bcnt == JW'(HALF - 1)) begin
            bcnt  <= '0;
            state <= S_DRAIN;
          end else begin
            bcnt <= bcnt + 1'b1;
          end
        end
        S_DRAIN: begin
          if (inflight == '0) begin
            if (stage == SW'(LOGN - 1)) begin
              ocnt  <= '0;
              state <= S_OUT;
            end else begin
              stage <= stage + 1'b1;
              state <= S_ISSUE;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_index <= ocnt;
          out_data  <= ocnt[0] ? mem[rd_a].im : mem[rd_a].re;
          if (ocnt == IW'(2 * N - 1)) state <= S_DONE;
          else ocnt <= ocnt + 1'b1;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Write-back only happens while a transform is being computed.
  a_wb_busy: assert property (@(posedge clk) disable iff (!rst_n)
    wb_v |-> (state == S_ISSUE || state == S_DRAIN))
    else $error("fft: write-back outside a stage");
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n) !(dit_v && dif_v))
    else $error("fft: both butterfly units returned at once");
endmodule
