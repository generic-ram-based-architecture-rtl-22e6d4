// dwt_normalize: output normalisation of the 2-D lifting DWT with two
// multipliers.
//
// Neither 1-D module scales its outputs. In 2-D the lowpass factor 1/S and
// the highpass factor S combine to 1/S^2 for LL, S^2 for HH and 1 for LH and
// HL, so one multiplier by 1/S^2 on the vertical-lowpass output and one by S^2
// on the vertical-highpass output suffice: in_lo is LL when the column is a
// horizontal-lowpass one (hband = 0) and HL otherwise; in_hi is LH or HH.
// Outputs are registered (one cycle, enabled by adv); out_valid is high for
// exactly one cycle per new pair and low in stalled cycles. The two multipliers
// S^2 and 1/S^2 at the column output follow the document; S and the rounding
// are this design's choices (see dwt_pkg).
module dwt_normalize
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  logic  in_valid,
  input  logic  hband,    // 0: column from the row lowpass half, 1: highpass half
  input  word_t in_lo,    // LL (hband 0) or HL (hband 1), unscaled
  input  word_t in_hi,    // LH (hband 0) or HH (hband 1), unscaled
  output logic  out_valid,
  output logic  out_hband,
  output word_t out_lo,
  output word_t out_hi
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hband <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_hband <= hband;
      out_lo    <= hband ? in_lo : cmul(in_lo, C_INV_S2);
      out_hi    <= hband ? cmul(in_hi, C_S2) : in_hi;
    end else begin
      out_valid <= 1'b0;
    end
  end

endmodule
