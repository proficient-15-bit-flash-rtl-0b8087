// sine_gen: digital sine-wave source that drives the converter's input.
//
// The converter is exercised with a sinusoidal input (Vsinin: 5 V peak to
// peak at 1.6 MHz). On an FPGA that input is produced digitally, and this
// module does so with a modified coupled-form (Goertzel-style) oscillator:
//
//     x[n+1] = x[n]   - E * y[n]
//     y[n+1] = y[n]   + E * x[n+1]
//
// with E = 2*sin(pi*FREQ_HZ/CLK_HZ). The recurrence has unit determinant, so
// the amplitude neither grows nor decays, and it needs no sine table. The
// state carries GUARD extra fraction bits to keep rounding drift small.
// x starts at AMPL_MV*cos(w/2), which makes the peak of y exactly AMPL_MV.
//
// Interface: sample is the sine in mV (signed, 1 LSB = 1 mV), cosine the
// quadrature output. Both start at sin = 0 after reset and advance by one
// step on each clock edge with en high. Output is registered: a step taken on
// an edge is visible right after that edge.
//
// Follows the document: the 1.6 MHz frequency and 5 V swing of the input.
// Own choices: the oscillator structure, the 100 MHz clock (the document
// gives no clock), the mV scale and the synchronous active-low reset.
module sine_gen
  import flash_adc_pkg::*;
#(
  parameter longint CLK_HZ  = 100_000_000,
  parameter longint FREQ_HZ = 1_600_000,
  parameter int     AMPL_MV = VSIN_MV / 2,
  parameter int     FRAC    = 20,
  parameter int     GUARD   = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  output sample_t sample,
  output sample_t cosine
);

  localparam int STATE_W = SAMPLE_W + GUARD + 2;
  // Step angle w = 2*pi*FREQ_HZ/CLK_HZ; E = 2*sin(w/2) and cos(w/2) by their
  // Taylor series, scaled to fixed point.
  function automatic longint e_fixed();
    real h;
    h = 3.14159265358979 * real'(FREQ_HZ) / real'(CLK_HZ);
    return longint'(2.0 * (h - h**3 / 6.0 + h**5 / 120.0) * (2.0 ** FRAC));
  endfunction

  function automatic longint x_start();
    real h;
    h = 3.14159265358979 * real'(FREQ_HZ) / real'(CLK_HZ);
    return longint'(real'(AMPL_MV) * (1.0 - h**2 / 2.0 + h**4 / 24.0) * (2.0 ** GUARD));
  endfunction

  // The sine must stay inside the reference range (7 V peak to peak).
  if (AMPL_MV > VREF_MV / 2) begin : g_range_check
    $error("sine_gen: AMPL_MV exceeds half the reference range");
  end

  localparam longint E_Q = e_fixed();
  localparam longint X0  = x_start();

  logic signed [STATE_W-1:0] x_q, y_q;
  logic signed [STATE_W-1:0] x_d, y_d;
  logic signed [63:0]        prod_x, prod_y;

  always_comb begin
    prod_x = 64'(E_Q) * 64'(y_q);
    x_d    = x_q - STATE_W'(prod_x >>> FRAC);
    prod_y = 64'(E_Q) * 64'(x_d);
    y_d    = y_q + STATE_W'(prod_y >>> FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= STATE_W'(X0);
      y_q <= '0;
    end else if (en) begin
      x_q <= x_d;
      y_q <= y_d;
    end
  end

  // Round the guard bits away.
  localparam logic signed [STATE_W-1:0] HALF_LSB = STATE_W'(1 << (GUARD - 1));
  assign sample = sample_t'((y_q + HALF_LSB) >>> GUARD);
  assign cosine = sample_t'((x_q + HALF_LSB) >>> GUARD);

endmodule
