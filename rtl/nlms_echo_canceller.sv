// nlms_echo_canceller: adaptive echo canceller. An FIR filter of TAPS taps
// (the transversal filter) estimates the echo of the far-end signal u that
// reaches the microphone signal d; the estimate is subtracted and the weights
// are adapted with the normalised LMS rule
//     y(n)   = sum_k w_k u(n-k)                (echo estimate, y_o)
//     e(n)   = d(n) - y(n)                     (echo-free output, e_o)
//     w(n+1) = w(n) + mu e(n) u(n) / (delta + ||u(n)||^2)
//
// Structure: the filter is split into PARTS sections of L = TAPS/PARTS taps
// (nlms_part), which run in parallel, each with one multiplier. Per sample
// the controller
//   1. shifts the new u into section 0; every section passes its oldest
//      sample to the next one, the sample leaving the last section updates
//      the running energy ||u||^2 = sum of the last TAPS squared samples;
//   2. runs the convolution pass in all sections (L+2 clocks) and adds the
//      partial sums to y; e and y are output here (out_valid_o);
//   3. computes the step g = mu e / (delta + ||u||^2) with a sequential
//      divider (78 clocks);
//   4. runs the weight-update pass in all sections (L+2 clocks).
// With the defaults (1300 taps in 5 sections) one sample takes about 610
// clocks, within the 1088 clocks between samples at 48 MHz / 44117 Hz; the
// first result leaves L+8 clocks after in_valid_i. A sample offered while
// the previous one is still being processed is dropped and overrun_o pulses.
// ready_o is high when a sample can be taken (also low during the memory
// clearing after reset).
//
// Formats: u, d, e, y Q1.23 (24 bit); mu_i unsigned Q1.23 (0 .. <2);
// weights Q2.30; energy Q.46; g saturated to G_W bits with 30 fraction
// bits; DELTA is in units of 2^-46.
//
// Following the original design: NLMS with step size mu normalised by the squared
// Euclidean norm of the input, order 1300, the split into 5 parallel parts.
// This design's choices: the formats, the delta regulariser, and the
// normalisation by one division per sample followed by multiplications
// (the original design replaces the division by a multiplication without saying
// how).
module nlms_echo_canceller
  import dafx_pkg::*;
#(
  parameter int unsigned TAPS  = 1300,
  parameter int unsigned PARTS = 5,
  parameter longint      DELTA = 64'sd68719476736,   // 2^36 = 2^-10 in Q.46
  localparam int unsigned L     = TAPS / PARTS,
  localparam int unsigned W_W   = 32,
  localparam int unsigned G_W   = 40,
  localparam int unsigned ACC_W = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  // parameter settings
  input  logic [23:0] mu_i,
  // audio: far-end reference u, microphone d
  input  audio_t      u_i,
  input  audio_t      d_i,
  input  logic        in_valid_i,
  output logic        ready_o,
  output audio_t      e_o,
  output audio_t      y_o,
  output logic        out_valid_o,
  output logic        overrun_o
);
  localparam int unsigned N_W = 78;
  localparam int unsigned D_W = 64;

  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_SHIFT, C_CONV, C_CWAIT, C_SUM, C_DIV, C_UPD
  } cstate_e;

  cstate_e state;
  audio_t  u_q, d_q, e_c, y_c;
  logic    upd_phase;

  logic signed [ACC_W-1:0] acc   [PARTS];
  audio_t                  x_out [PARTS];
  audio_t                  x_in  [PARTS];
  logic [PARTS-1:0]        done;
  logic signed [G_W-1:0]   g_q;
  logic signed [63:0]      norm;
  logic signed [ACC_W+7:0] ysum_c;
  logic signed [48:0]      num_c;
  logic [N_W-1:0]          div_num;
  logic [G_W-2:0]          quot;
  logic                    num_neg, div_start, div_done, div_busy;
  logic                    conv_start, upd_start, shift_wr;

  for (genvar p = 0; p < PARTS; p++) begin : g_part
    if (p == 0) begin : g_first
      assign x_in[p] = u_q;
    end else begin : g_next
      assign x_in[p] = x_out[p-1];
    end
    nlms_part #(.L(L), .W_W(W_W), .W_FRAC(30), .G_W(G_W), .ACC_W(ACC_W)) u_part (
      .clk          (clk),
      .rst_n        (rst_n),
      .shift_wr_i   (shift_wr),
      .x_in_i       (x_in[p]),
      .x_out_o      (x_out[p]),
      .conv_start_i (conv_start),
      .upd_start_i  (upd_start),
      .g_i          (g_q),
      .acc_o        (acc[p]),
      .done_o       (done[p])
    );
  end

  always_comb begin
    ysum_c = '0;
    for (int p = 0; p < PARTS; p++) ysum_c = ysum_c + (ACC_W+8)'(acc[p]);
    y_c    = sat_audio(64'(ysum_c));
    e_c    = sat_audio(64'(d_q) - 64'(y_c));
    num_c  = $signed({1'b0, mu_i}) * 49'(e_c);
  end

  seq_divider #(.N_W(N_W), .D_W(D_W), .Q_W(G_W-1)) u_div (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (div_start),
    .dividend_i (div_num),
    .divisor_i  (D_W'(norm + DELTA)),
    .busy_o     (div_busy),
    .done_o     (div_done),
    .quotient_o (quot)
  );

  assign shift_wr   = (state == C_SHIFT);
  assign conv_start = (state == C_CONV) && !upd_phase;
  assign upd_start  = (state == C_CONV) &&  upd_phase;
  assign ready_o    = (state == C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_INIT;
      u_q         <= '0;
      d_q         <= '0;
      e_o         <= '0;
      y_o         <= '0;
      out_valid_o <= 1'b0;
      overrun_o   <= 1'b0;
      upd_phase   <= 1'b0;
      norm        <= '0;
      g_q         <= '0;
      num_neg     <= 1'b0;
      div_num     <= '0;
      div_start   <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      overrun_o   <= in_valid_i && (state != C_IDLE);
      div_start   <= 1'b0;
      case (state)
        C_INIT: if (&done) state <= C_IDLE;
        C_IDLE: begin
          if (in_valid_i) begin
            u_q   <= u_i;
            d_q   <= d_i;
            state <= C_SHIFT;
          end
        end
        C_SHIFT: begin
          // new sample enters, the oldest one leaves the running energy
          norm      <= norm + 64'(u_q) * 64'(u_q)
                            - 64'(x_out[PARTS-1]) * 64'(x_out[PARTS-1]);
          upd_phase <= 1'b0;
          state     <= C_CONV;
        end
        C_CONV:  state <= C_CWAIT;
        C_CWAIT: begin
          if (&done) state <= upd_phase ? C_IDLE : C_SUM;
        end
        C_SUM: begin
          y_o         <= y_c;
          e_o         <= e_c;
          out_valid_o <= 1'b1;
          num_neg     <= num_c < 0;
          div_num     <= N_W'(num_c < 0 ? 49'(-num_c) : num_c) << 30;
          div_start   <= 1'b1;
          state       <= C_DIV;
        end
        C_DIV: begin
          if (div_done) begin
            g_q       <= num_neg ? -$signed({1'b0, quot}) : $signed({1'b0, quot});
            upd_phase <= 1'b1;
            state     <= C_CONV;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // a pass is never started while the sections are busy
  assert property (@(posedge clk) disable iff (!rst_n)
                   (conv_start || upd_start) |-> &done);
endmodule
