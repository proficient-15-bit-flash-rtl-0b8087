// inv_gauss_pwl: piecewise-linear inverse Gaussian CDF that turns the ones
// count of the comparator bank back into a voltage.
//
// With Gaussian comparator offsets, the expected fraction of comparators that
// trip at input v is Phi(v/SIGMA). The raw count is therefore a compressive,
// S-shaped function of the input. Applying SIGMA * Phi^-1(count/N) undoes the
// S-shape and gives an estimate of v in mV. A full lookup table would have to
// be as fast as the converter and grows with the precision, so Phi^-1 is
// approximated piecewise-linearly instead:
//
//   1. q = count/N - 1/2, formed in Q16 by multiplying (2*count - N) by the
//      constant 2**24/(2N) and dropping 8 bits (no divider).
//   2. Phi^-1 is odd about q = 0, so only |q| is mapped; the sign is put back
//      at the end.
//   3. |q| is clamped to 0.45: only the central 90 % of the Gaussian is
//      linearised, and counts in the outer 5 % tails saturate at +-1.645 SIGMA.
//   4. Five segments with breakpoints |q| = 0, .15, .25, .35, .40, .45 (values
//      of Phi^-1: 0, .3853, .6745, 1.0364, 1.2816, 1.6449) give
//      y = Y[k] + SLOPE[k] * (|q| - Q[k]), rounded to whole mV.
//
// Segment ends Y[k] and slopes SLOPE[k] are computed at elaboration from
// SIGMA; only adds, one constant multiply, one small multiply and compares
// remain in hardware.
//
// Interface: count (0..N) in, vout (signed mV) out. With PIPE = 1 the output
// is registered (one cycle latency), otherwise it is combinational.
//
// Follows the document: a piecewise-linear inverse Gaussian CDF after the
// count, linearising the central 90 % of the comparators. Own choices: the
// number and placement of the breakpoints, the Q16 format, the saturation at
// the tails.
module inv_gauss_pwl
  import flash_adc_pkg::*;
#(
  parameter int unsigned N     = N_COMP,
  parameter int          SIGMA = SIGMA_MV,
  parameter bit          PIPE  = 1'b1,
  localparam int unsigned CW   = count_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] count,
  output sample_t       vout
);

  localparam int NSEG = 5;

  // Breakpoints in |q| and the value of Phi^-1(1/2 + |q|) there.
  function automatic real qb(input int k);
    case (k)
      0: return 0.00;
      1: return 0.15;
      2: return 0.25;
      3: return 0.35;
      4: return 0.40;
      default: return 0.45;
    endcase
  endfunction

  function automatic real zb(input int k);
    case (k)
      0: return 0.0;
      1: return 0.385320;
      2: return 0.674490;
      3: return 1.036433;
      4: return 1.281552;
      default: return 1.644854;
    endcase
  endfunction

  function automatic int q16(input int k);
    return int'(qb(k) * 65536.0);
  endfunction

  function automatic int y_at(input int k);
    return int'(real'(SIGMA) * zb(k));
  endfunction

  function automatic int slope(input int k);
    return int'(real'(SIGMA) * (zb(k + 1) - zb(k)) / (qb(k + 1) - qb(k)));
  endfunction

  // Reciprocal of 2N in Q24.
  localparam int KREC = int'((2.0 ** 24) / (2.0 * real'(N)));
  localparam int QMAX = q16(NSEG);

  // Per-segment constants, evaluated once at elaboration.
  localparam int QK [NSEG] = '{q16(0), q16(1), q16(2), q16(3), q16(4)};
  localparam int YK [NSEG] = '{y_at(0), y_at(1), y_at(2), y_at(3), y_at(4)};
  localparam int SK [NSEG] = '{slope(0), slope(1), slope(2), slope(3), slope(4)};

  // Index of the segment holding |q| (in Q16).
  function automatic int seg_of(input logic signed [31:0] a);
    int k;
    k = 0;
    for (int i = 1; i < NSEG; i++)
      if (a >= QK[i]) k = i;
    return k;
  endfunction

  logic signed [31:0] t, qf, qa, dq, prod;
  logic signed [31:0] y_abs;
  logic               neg;
  sample_t            y;

  always_comb begin
    // Step 1: q in Q16.
    t   = 32'(2 * int'({1'b0, count})) - 32'(N);
    qf  = (t * KREC + 32'sd128) >>> 8;
    // Step 2 and 3: magnitude, clamped to the linearised range.
    neg = qf[31];
    qa  = neg ? -qf : qf;
    if (qa > QMAX) qa = QMAX;
    // Step 4: pick the segment and interpolate.
    y_abs = YK[0];
    dq    = qa;
    for (int k = 1; k < NSEG; k++) begin
      if (qa >= QK[k]) begin
        dq    = qa - QK[k];
        y_abs = YK[k];
      end
    end
    prod  = SK[seg_of(qa)] * dq;
    y_abs = y_abs + ((prod + 32'sd32768) >>> 16);
    y     = sample_t'(neg ? -y_abs : y_abs);
  end

  // Interface rule: a count of N comparators never exceeds N.
  always_ff @(posedge clk) begin
    if (rst_n) assert (int'(count) <= int'(N))
      else $error("inv_gauss_pwl: count %0d exceeds N = %0d", count, N);
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) vout <= '0;
      else        vout <= y;
    end
  end else begin : g_comb
    assign vout = y;
  end

endmodule
