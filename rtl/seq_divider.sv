// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start_i loads dividend_i and divisor_i; N_W clocks later done_o pulses and
// quotient_o holds floor(dividend / divisor), saturated to Q_W bits (a zero
// divisor also saturates). busy_o is high while a division runs.
// Used by the echo canceller to normalise its step size once per sample.
module seq_divider #(
  parameter int unsigned N_W = 78,
  parameter int unsigned D_W = 64,
  parameter int unsigned Q_W = 39
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_i,
  input  logic [N_W-1:0] dividend_i,
  input  logic [D_W-1:0] divisor_i,
  output logic           busy_o,
  output logic           done_o,
  output logic [Q_W-1:0] quotient_o
);
  localparam int unsigned CW = $clog2(N_W + 1);

  logic [N_W-1:0] num, quo;
  logic [D_W-1:0] den;
  logic [N_W-1:0] quo_next;
  logic [D_W:0]   rem, trial, rem_next;
  logic [CW-1:0]  cnt;
  logic           fits;

  always_comb begin
    trial    = {rem[D_W-1:0], num[N_W-1]};
    fits     = trial >= {1'b0, den};
    rem_next = fits ? trial - {1'b0, den} : trial;
    quo_next = {quo[N_W-2:0], fits};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num        <= '0;
      quo        <= '0;
      den        <= '0;
      rem        <= '0;
      cnt        <= '0;
      busy_o     <= 1'b0;
      done_o     <= 1'b0;
      quotient_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        num    <= dividend_i;
        den    <= divisor_i;
        rem    <= '0;
        quo    <= '0;
        cnt    <= CW'(N_W);
        busy_o <= 1'b1;
      end else if (busy_o) begin
        num <= {num[N_W-2:0], 1'b0};
        rem <= rem_next;
        quo <= quo_next;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          if (|quo_next[N_W-1:Q_W]) quotient_o <= '1;
          else                      quotient_o <= quo_next[Q_W-1:0];
        end
      end
    end
  end
endmodule
