// matched_filter: serial matched filter discriminator for one readout channel.
//
// Evaluates the deterministic-pulse approximation of the likelihood ratio,
// Lambda = sum_i y[i] * f[i], over the WIN samples of the selected window and
// accepts the event when Lambda > threshold (gamma). The window arrives as a
// stream, one sample per clock, flagged by first/last (it is the L1->L2
// transfer stream of the packet controller), so a single multiplier and an
// accumulator are enough. Coefficient coef[i] weights the i-th sample of the
// stream. Samples are unsigned ADC codes; coefficients, accumulator and
// threshold are two's complement.
//
// Timing: mf_valid pulses for one clock the cycle after the last sample, with
// mf_out and mf_accept held until the next window. Back-to-back windows are
// accepted. The document gives the equation, the template size (7 samples)
// and the finding that 16 to 18 coefficient bits match a 32-bit reference;
// the serial organisation and the unsigned sample format are this design's
// choices.
module matched_filter #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned COEF_W   = 16,
  parameter int unsigned WIN      = 7,
  parameter int unsigned OUT_W    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [SAMPLE_W-1:0]      sample,
  input  logic                     valid,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [COEF_W-1:0] coef [WIN],
  input  logic signed [OUT_W-1:0]  threshold,
  output logic                     mf_valid,
  output logic signed [OUT_W-1:0]  mf_out,
  output logic                     mf_accept
);

  localparam int unsigned IW = (WIN > 1) ? $clog2(WIN) : 1;

  logic [IW-1:0]            idx_reg, idx;
  logic signed [OUT_W-1:0]  acc_reg, acc_next, product;

  always_comb begin
    idx      = first ? '0 : idx_reg;
    product  = OUT_W'($signed({1'b0, sample})) * OUT_W'(coef[idx]);
    acc_next = (first ? '0 : acc_reg) + product;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_reg   <= '0;
      acc_reg   <= '0;
      mf_valid  <= 1'b0;
      mf_out    <= '0;
      mf_accept <= 1'b0;
    end else begin
      mf_valid <= valid && last;
      if (valid) begin
        acc_reg <= acc_next;
        idx_reg <= (idx == IW'(WIN-1)) ? '0 : idx + 1'b1;
        if (last) begin
          mf_out    <= acc_next;
          mf_accept <= (acc_next > threshold);
        end
      end
    end
  end

endmodule
