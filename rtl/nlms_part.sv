// nlms_part: one of the parallel sections of the NLMS echo canceller. It holds
// L consecutive taps of the adaptive FIR filter: their input samples (a
// circular buffer) and their weights, and has one multiplier that is shared
// between the convolution pass and the weight-update pass.
//
// Tap j of part p is global tap k = p*L + j, with input u_k = x[n-k] and
// weight w_k.
//   x_out_o    : the oldest sample of the section, valid once the part has
//                been idle for two clocks. Chained parts take it as the
//                input of the next section; the last part's x_out_o is the
//                sample that leaves the filter, x[n-M].
//   shift_wr_i : store x_in_i as the newest sample (overwrites the oldest).
//   conv_start_i : acc_o <= sum_j (w_j * u_j) >>> W_FRAC (Q.23 units).
//   upd_start_i  : w_j <= sat(w_j + (g_i * u_j) >>> (AUDIO_W-1)) for all j.
// A pass issues one tap per clock and ends L+2 clocks after its start; done_o
// is low from the clock after a start until the pass has finished. After
// reset the part first clears both memories (L clocks, done_o low).
//
// Formats: samples Q1.23, weights W_W bits with W_FRAC fraction bits, step
// g_i G_W bits with W_FRAC fraction bits. The split of the filter into
// parallel sections, each with its own multiplier, follows the original design; the
// memory organisation, formats and pass timing are this design's choice.
module nlms_part
  import dafx_pkg::*;
#(
  parameter int unsigned L      = 260,
  parameter int unsigned W_W    = 32,
  parameter int unsigned W_FRAC = 30,
  parameter int unsigned G_W    = 40,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_wr_i,
  input  audio_t                  x_in_i,
  output audio_t                  x_out_o,
  input  logic                    conv_start_i,
  input  logic                    upd_start_i,
  input  logic signed [G_W-1:0]   g_i,
  output logic signed [ACC_W-1:0] acc_o,
  output logic                    done_o
);
  localparam int unsigned AW = $clog2(L);
  localparam int unsigned PW = G_W + AUDIO_W;

  typedef enum logic [1:0] {P_INIT, P_IDLE, P_PASS} pstate_e;
  typedef logic signed [W_W-1:0] weight_t;

  localparam weight_t W_MAX = weight_t'({1'b0, {(W_W-1){1'b1}}});
  localparam weight_t W_MIN = weight_t'({1'b1, {(W_W-1){1'b0}}});

  audio_t  xbuf [L];
  weight_t wbuf [L];

  pstate_e state;
  logic          is_upd, v1;
  logic [AW-1:0] wp, nwp, j, j1, xa, x_raddr;
  audio_t        x_rd;
  weight_t       w_rd, w_new;
  logic signed [PW-1:0] prod;
  logic signed [PW:0]   w_sum;

  always_comb begin
    nwp     = (wp == AW'(L - 1)) ? '0 : wp + 1'b1;
    x_raddr = (state == P_PASS) ? xa : nwp;
    prod    = (is_upd ? PW'(g_i) : PW'(w_rd)) * PW'(x_rd);
    w_sum   = (PW+1)'(w_rd) + (PW+1)'(prod >>> (AUDIO_W - 1));
    if (w_sum > (PW+1)'(W_MAX))      w_new = W_MAX;
    else if (w_sum < (PW+1)'(W_MIN)) w_new = W_MIN;
    else                             w_new = weight_t'(w_sum);
  end

  // sample memory: one read port (pass or shift), one write port
  always_ff @(posedge clk) begin
    x_rd <= xbuf[x_raddr];
    if (state == P_INIT)  xbuf[j]  <= '0;
    else if (shift_wr_i)  xbuf[nwp] <= x_in_i;
  end

  // weight memory: read at j, read-modify-write at j1 one clock later
  always_ff @(posedge clk) begin
    w_rd <= wbuf[j];
    if (state == P_INIT)      wbuf[j]  <= '0;
    else if (v1 && is_upd)    wbuf[j1] <= w_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= P_INIT;
      is_upd  <= 1'b0;
      v1      <= 1'b0;
      wp      <= '0;
      j       <= '0;
      j1      <= '0;
      xa      <= '0;
      acc_o   <= '0;
    end else begin
      v1 <= (state == P_PASS);
      j1 <= j;
      if (shift_wr_i) wp <= nwp;
      if (v1 && !is_upd) acc_o <= acc_o + ACC_W'(prod >>> W_FRAC);
      case (state)
        P_INIT: begin
          j <= j + 1'b1;
          if (j == AW'(L - 1)) begin
            j     <= '0;
            state <= P_IDLE;
          end
        end
        P_IDLE: begin
          if (conv_start_i || upd_start_i) begin
            is_upd <= upd_start_i;
            if (conv_start_i) acc_o <= '0;
            j      <= '0;
            xa     <= wp;
            state  <= P_PASS;
          end
        end
        default: begin   // P_PASS: tap j, sample at (wp - j) mod L
          xa <= (xa == '0) ? AW'(L - 1) : xa - 1'b1;
          j  <= j + 1'b1;
          if (j == AW'(L - 1)) begin
            j     <= '0;
            state <= P_IDLE;
          end
        end
      endcase
    end
  end

  assign done_o  = (state == P_IDLE) && !v1;
  assign x_out_o = x_rd;
endmodule
