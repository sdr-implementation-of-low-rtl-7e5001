// Pulse-shaping filter: raised-cosine interpolator for one branch (I or Q).
//
// Each new symbol level (lvl, lvl_valid) is latched and injected as a single
// impulse at the next shaper sample (os_en); the other OS-1 shaper samples of
// the symbol are zero.  This zero-stuffed sequence runs through a raised-cosine
// FIR of OS*SPAN+1 taps whose centre tap is 1.0, so at the symbol instants the
// output equals the symbol level and neighbouring symbols contribute nothing.
// The output is a sample at OS samples per symbol, held between os_en pulses.
// Taps come from h(t) = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2), t in
// symbols, evaluated at elaboration.  A raised-cosine shaper follows the
// design's specification; OS = 8, a 4-symbol span and beta = 0.5 are this
// implementation's choices.  Latency from an injected impulse to the pulse
// peak is 1 + OS*SPAN/2 shaper samples.
module pulse_shaping_filter
  import sdr_pkg::*;
#(
  parameter int OS       = sdr_pkg::OS_DEF,
  parameter int SPAN     = 4,
  parameter int BETA_PCT = 50
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t lvl,
  input  logic    lvl_valid,
  input  logic    os_en,
  output sample_t y
);
  localparam int TAPS = OS * SPAN + 1;
  typedef sample_t coef_t [TAPS];

  function automatic real rc(input real t, input real beta);
    real pi, s, d;
    pi = 3.14159265358979;
    s  = (t == 0.0) ? 1.0 : $sin(pi * t) / (pi * t);
    d  = 1.0 - (2.0 * beta * t) * (2.0 * beta * t);
    if (d > -1.0e-9 && d < 1.0e-9) begin
      // limit at t = +-1/(2*beta)
      real t0;
      t0 = 1.0 / (2.0 * beta);
      return (pi / 4.0) * $sin(pi * t0) / (pi * t0);
    end
    return s * $cos(pi * beta * t) / d;
  endfunction

  function automatic coef_t make_coef();
    coef_t c;
    for (int n = 0; n < TAPS; n++)
      c[n] = sample_t'($rtoi($floor(rc((n - (TAPS - 1) / 2) / real'(OS), BETA_PCT / 100.0)
                                    * COEF_ONE + 0.5)));
    return c;
  endfunction

  localparam coef_t COEF = make_coef();

  sample_t held;
  logic    pending;
  sample_t x;

  always_ff @(posedge clk) begin
    if (rst) begin
      held    <= '0;
      pending <= 1'b0;
    end else if (lvl_valid) begin
      held    <= lvl;
      pending <= 1'b1;
    end else if (os_en) begin
      pending <= 1'b0;
    end
  end

  always_comb x = pending ? held : '0;

  fir_filter #(.TAPS(TAPS), .COEF(COEF)) u_fir (
    .clk, .rst, .en(os_en), .x, .y
  );
endmodule
