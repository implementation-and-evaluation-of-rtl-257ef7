// ce_divider: decoder-based channel estimate H(n,i) = Y(n,i) / X~(n,i).
//
// X~ is the constellation point rebuilt from the decoded bits (re-encoded,
// re-interleaved, re-mapped); Y is the matching received bin read from the
// delay buffer. The complex division is done as the document's circuit does
// it: Y is multiplied by conj(X~) and by the real factor C = 2^Q / |X~|^2,
// and the lower bits of the product are truncated:
//     H = (Y * conj(X~) * C) >> (Q - F)      (C from integer |X~|^2, 2F fraction bits)
// The document draws C as a look-up table addressed by X~; it does not give
// the table's addressing, so here the table's content is produced by a
// constant-numerator division of |X~|^2. |X~|^2 = 0 (null sub-carrier) gives
// C = 0 and therefore H = 0. Q = 3F + 4 is this design's choice; it keeps C
// above 12 bits for the smallest 64-QAM point. The result is saturated.
// Timing: two pipeline stages (conjugate product and C, then scaling);
// out_* is valid two cycles after in_valid, one result per cycle.
module ce_divider
  import chest_pkg::*;
#(
  parameter int Q = 3*F + 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BW-1:0] in_bin,
  input  cpx_t          in_y,
  input  cpx_t          in_xt,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output cpx_t          out_h
);

  localparam int PWD = 2*W + 1;      // product width
  localparam int CWD = Q + 1;        // reciprocal width
  localparam int MW  = PWD + CWD;    // scaled product width

  typedef logic [CWD-1:0] recip_t;

  // Reciprocal table content: C = floor(2^Q / |X~|^2), 0 for |X~|^2 = 0.
  function automatic recip_t recip(input logic [PWD-1:0] mag2);
    logic [CWD-1:0] num;
    num = CWD'(1) << Q;
    if (mag2 == 0) return '0;
    return num / CWD'(mag2);
  endfunction

  cpx_prod_t     s1_prod;
  recip_t        s1_c;
  logic          s1_valid;
  logic [BW-1:0] s1_bin;

  logic [PWD-1:0] mag2;
  assign mag2 = PWD'(in_xt.re * in_xt.re) + PWD'(in_xt.im * in_xt.im);

  logic signed [MW-1:0] sc_re, sc_im;
  assign sc_re = MW'(s1_prod.re) * $signed({1'b0, s1_c});
  assign sc_im = MW'(s1_prod.im) * $signed({1'b0, s1_c});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_bin    <= '0;
      s1_prod   <= '0;
      s1_c      <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_h     <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_bin    <= in_bin;
      s1_prod   <= cmul_conj(in_y, in_xt);
      s1_c      <= recip(mag2);
      out_valid <= s1_valid;
      out_bin   <= s1_bin;
      out_h     <= '{re: sat(64'(sc_re >>> (Q - F))), im: sat(64'(sc_im >>> (Q - F)))};
    end
  end

endmodule
