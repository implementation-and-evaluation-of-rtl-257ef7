// phase_track: channel-estimate-based common phase error tracking and removal.
//
// Estimation. Each decoder-based channel estimate H(n,i) enters one bin per
// valid cycle. A one-symbol buffer supplies H(n,i-1) of the same bin, and a
// complex multiplier forms the phase difference indicator
//     P(n,i) = H(n,i) * conj(H(n,i-1))
// (the conjugate product has the phase of H(n,i)/H(n,i-1) without a divider).
// An accumulator sums P over all NSC bins. At the last bin the sum goes to an
// iterative CORDIC in vectoring mode, which returns its phase theta, i.e. the
// normalised average P/|P| as an angle.
// Prediction. The symbol being equalized is D symbols newer than the
// estimate (D = 6, 5, 5, 4, 4, 4, 4, 4 for rate index 0..7, read from the
// multiplier factor table), so the predicted rotation is phi = D * theta.
// Removal. A sine/cosine table turns phi into the rotation vector
// exp(-j*phi), and a complex multiplier applies it to every equalized bin:
//     X(n,k) = X'(n,k) * exp(-j*phi)
// The structure follows the document. This design's own choices: the phase
// word (PW = 16 bits per turn), CORDIC_IT = 14 iterations, a SCA = 10 bit
// (1024-entry) table addressed with rounding, and the rule that an initial
// (long-preamble) estimate, in_init = 1, only loads the buffer and resets the
// rotation to 1, since no phase difference exists yet.
// Timing: the rotation changes CORDIC_IT + 4 cycles after the last bin of an
// estimate; derotation has one cycle of latency, one bin per cycle.
module phase_track
  import chest_pkg::*;
#(
  parameter int CORDIC_IT = 14,
  parameter int SCA       = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    rate,
  // channel estimates H(n,i)
  input  logic          h_valid,
  input  logic [BW-1:0] h_bin,
  input  logic          h_init,
  input  cpx_t          h_data,
  // equalized bins X'(n,k) in, phase-corrected X(n,k) out
  input  logic          x_valid,
  input  logic [BW-1:0] x_bin,
  input  cpx_t          x_data,
  output logic          out_valid,
  output logic [BW-1:0] out_bin,
  output cpx_t          out_data,
  // status
  output logic          cpe_update,   // one-cycle pulse: new rotation in use
  output logic [PW-1:0] cpe_theta,    // phase change per symbol (2*pi = 2^PW)
  output logic [PW-1:0] cpe_phi       // applied rotation D * theta
);

  localparam int  AW  = 2*W + 1 + BW + 1;  // accumulator
  localparam int  XW  = AW + 2;            // CORDIC datapath (gain 1.65)
  localparam real PI  = 3.14159265358979323846;
  localparam int  NSC_TAB = 2**SCA;

  typedef logic signed [AW-1:0] acc_t;
  typedef logic signed [XW-1:0] cx_t;
  typedef logic [PW-1:0]        ang_t;
  typedef ang_t atan_tab_t [CORDIC_IT];
  typedef smp_t sc_tab_t [NSC_TAB];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < CORDIC_IT; i++)
      t[i] = ang_t'($rtoi($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** PW) + 0.5));
    return t;
  endfunction

  // cos (imag = 0) or sin (imag = 1) of 2*pi*a/2^SCA with F fraction bits
  function automatic sc_tab_t make_sc(input bit imag);
    sc_tab_t t;
    for (int a = 0; a < NSC_TAB; a++) begin
      real v;
      v = imag ? $sin(2.0 * PI * a / NSC_TAB) : $cos(2.0 * PI * a / NSC_TAB);
      v = v * (2.0 ** F);
      t[a] = smp_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  localparam atan_tab_t ATAN  = make_atan();
  localparam sc_tab_t   COS_T = make_sc(1'b0);
  localparam sc_tab_t   SIN_T = make_sc(1'b1);

  // ------------------------------------------------ phase difference indicator
  cpx_t          prev_h [NSC];
  cpx_prod_t     s1_p;
  logic          s1_valid, s1_init, s1_last;
  acc_t          acc_re, acc_im;

  always_ff @(posedge clk) begin
    if (h_valid) prev_h[h_bin] <= h_data;
  end

  // ------------------------------------------------ CORDIC (vectoring)
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_MUL, C_TAB} cstate_t;
  cstate_t                        cstate;
  cx_t                            cx, cy;
  ang_t                           cz;
  logic [$clog2(CORDIC_IT+1)-1:0] citer;
  cpx_t                           rot;     // exp(-j*phi)

  acc_t fin_re, fin_im;
  assign fin_re = acc_re + AW'(s1_p.re);
  assign fin_im = acc_im + AW'(s1_p.im);

  logic [SCA-1:0] tab_addr;
  assign tab_addr = SCA'((int'(cpe_phi) + 2**(PW-SCA-1)) >> (PW-SCA));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_init    <= 1'b0;
      s1_last    <= 1'b0;
      s1_p       <= '0;
      acc_re     <= '0;
      acc_im     <= '0;
      cstate     <= C_IDLE;
      cx         <= '0;
      cy         <= '0;
      cz         <= '0;
      citer      <= '0;
      rot        <= '{re: smp_t'(2**F), im: '0};
      cpe_update <= 1'b0;
      cpe_theta  <= '0;
      cpe_phi    <= '0;
    end else begin
      cpe_update <= 1'b0;
      s1_valid   <= h_valid;
      s1_init    <= h_init;
      s1_last    <= h_valid && h_bin == BW'(NSC-1);
      s1_p       <= cmul_conj(h_data, prev_h[h_bin]);
      // accumulator over the sub-carriers
      if (s1_valid && !s1_init) begin
        if (s1_last) begin
          acc_re <= '0;
          acc_im <= '0;
        end else begin
          acc_re <= fin_re;
          acc_im <= fin_im;
        end
      end
      // an initial estimate resets the prediction
      if (s1_valid && s1_init) begin
        acc_re <= '0;
        acc_im <= '0;
        if (s1_last) begin
          rot        <= '{re: smp_t'(2**F), im: '0};
          cpe_theta  <= '0;
          cpe_phi    <= '0;
          cpe_update <= 1'b1;
        end
      end
      case (cstate)
        C_IDLE: begin
          if (s1_valid && !s1_init && s1_last) begin
            // rotate into the right half plane first
            if (fin_re < 0) begin
              cx <= -XW'(fin_re);
              cy <= -XW'(fin_im);
              cz <= ang_t'(2**(PW-1));
            end else begin
              cx <= XW'(fin_re);
              cy <= XW'(fin_im);
              cz <= '0;
            end
            citer  <= '0;
            cstate <= C_RUN;
          end
        end
        C_RUN: begin
          if (cy >= 0) begin
            cx <= cx + (cy >>> citer);
            cy <= cy - (cx >>> citer);
            cz <= cz + ATAN[citer];
          end else begin
            cx <= cx - (cy >>> citer);
            cy <= cy + (cx >>> citer);
            cz <= cz - ATAN[citer];
          end
          citer <= citer + 1'b1;
          if (int'(citer) == CORDIC_IT - 1) cstate <= C_MUL;
        end
        C_MUL: begin
          // multiplier factor table: feedback delay of the current rate
          cpe_theta <= cz;
          cpe_phi   <= ang_t'(cz * ang_t'(feedback_delay(rate)));
          cstate    <= C_TAB;
        end
        C_TAB: begin
          // sine/cosine table: exp(-j*phi)
          rot        <= '{re: COS_T[tab_addr], im: sat(-64'(SIN_T[tab_addr]))};
          cpe_update <= 1'b1;
          cstate     <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // ------------------------------------------------ derotation
  cpx_prod_t xr;
  assign xr = cmul(x_data, rot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= x_valid;
      out_bin   <= x_bin;
      out_data  <= '{re: sat(64'(xr.re >>> F)), im: sat(64'(xr.im >>> F))};
    end
  end

endmodule
