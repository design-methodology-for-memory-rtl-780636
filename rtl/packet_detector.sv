// packet_detector: packet/frame detection accelerator.
//
// Detects the start of a packet from a preamble that repeats with period D,
// using the delayed autocorrelation of the received stream r:
//   c[n] = sum_{m<D} r[n-m] * conj(r[n-m-D])     (running sum)
//   p[n] = sum_{m<D} |r[n-m-D]|^2                 (power of the same window)
// When the preamble is on air |c| approaches p, while for noise or random data
// it stays small. |c| is approximated by max(|re|,|im|) + min(|re|,|im|)/2 and
// the condition 16*|c| > thr*p (thr in sixteenths) with p > pmin raises det
// for one cycle; the detector re-arms only after 16*|c| has fallen to
// thr*p/2 or below (hysteresis), so one preamble gives one pulse. 'above' is
// high from the detection until re-arming. Both running sums are exact
// (add new term, subtract the term leaving the window) and are updated one
// cycle after each valid input; det and the metrics follow in that cycle.
// clear empties the history. corr_re/corr_im give c itself: on a periodic
// preamble its angle is 2*pi*D times the residual frequency error in turns
// per sample, which the controller uses for fine frequency estimation.
// The document only names the packet detector; the algorithm, window, delay
// (D=64, the period of the IEEE 802.16e OFDM-256 short preamble) and
// threshold form are this design's.
module packet_detector
  import bb_pkg::*;
#(
  parameter int unsigned D = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [7:0]         thr,
  input  logic [31:0]        pmin,
  input  logic               in_valid,
  input  cplx_t              in_data,
  output logic               det,
  output logic               above,
  output logic [47:0]        metric_c,
  output logic [47:0]        metric_p,
  output logic signed [47:0] corr_re,
  output logic signed [47:0] corr_im
);

  cplx_t hist [2*D];            // hist[i] = r[n-1-i]
  logic signed [47:0] cr, ci, pw;
  cplx_t a, b, e, f;            // a=r[n], b=r[n-D], e=r[n-D], f=r[n-2D]
  logic signed [47:0] dcr, dci, dp;

  always_comb begin
    a = in_data;
    b = hist[D-1];
    e = hist[D-1];
    f = hist[2*D-1];
    // r[n]*conj(r[n-D]) - r[n-D]*conj(r[n-2D])
    dcr = 48'(a.re) * 48'(b.re) + 48'(a.im) * 48'(b.im)
        - 48'(e.re) * 48'(f.re) - 48'(e.im) * 48'(f.im);
    dci = 48'(a.im) * 48'(b.re) - 48'(a.re) * 48'(b.im)
        - 48'(e.im) * 48'(f.re) + 48'(e.re) * 48'(f.im);
    dp  = 48'(b.re) * 48'(b.re) + 48'(b.im) * 48'(b.im)
        - 48'(f.re) * 48'(f.re) - 48'(f.im) * 48'(f.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*D; i++) hist[i] <= '0;
      cr <= '0; ci <= '0; pw <= '0;
    end else if (clear) begin
      for (int i = 0; i < 2*D; i++) hist[i] <= '0;
      cr <= '0; ci <= '0; pw <= '0;
    end else if (in_valid) begin
      hist[0] <= in_data;
      for (int i = 1; i < 2*D; i++) hist[i] <= hist[i-1];
      cr <= cr + dcr;
      ci <= ci + dci;
      pw <= pw + dp;
    end
  end

  logic [47:0] ar, ai, mx, mn, mag;
  logic        cond, low, in_pkt;
  always_comb begin
    ar   = cr[47] ? 48'(-cr) : 48'(cr);
    ai   = ci[47] ? 48'(-ci) : 48'(ci);
    mx   = (ar > ai) ? ar : ai;
    mn   = (ar > ai) ? ai : ar;
    mag  = mx + (mn >> 1);
    cond = ((mag << 4) > 48'(pw) * 48'(thr)) && (48'(pw) > 48'(pmin));
    low  = ((mag << 5) <= 48'(pw) * 48'(thr));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                in_pkt <= 1'b0;
    else if (clear)            in_pkt <= 1'b0;
    else if (cond)             in_pkt <= 1'b1;
    else if (low)              in_pkt <= 1'b0;
  end

  assign above    = in_pkt;
  assign det      = cond && !in_pkt;
  assign metric_c = mag;
  assign metric_p = pw;
  assign corr_re  = cr;
  assign corr_im  = ci;

endmodule
