// front_end: the front-end accelerator group on the memory crossbar.
//
// Samples from the analog interface pass through frequency error
// compensation (freq_comp) and filtering/decimation (decim_filter); the
// packet detector watches the result. With cfg.capture set the unit writes
// up to cfg.cap_len of these samples, one per cycle, into the bank it owns
// through a narrow crossbar port, like any single-port device; with cfg.trig
// also set, writing waits for the first packet detection and starts with the
// next sample. clear (pulsed by the controller with a new cfg) restarts the
// phase, the filter, the detector and the sample count.
// Status: pkt_det pulses on a detection, captured counts the samples written,
// cap_done is high once cap_len samples are in memory. Writes are narrow, so
// req.wdata lanes 1..3 are constant zero. det_corr_re/im hold
// the detector's complex correlation where its magnitude peaked after the
// last detection (while the detector stays above its threshold), whose angle
// divided by 2*pi*D is the remaining frequency error (range +-1/(2D) turn per
// sample).
// That these three accelerators sit on the crossbar and feed a memory bank
// follows the document; their order and the capture control are this
// design's.
module front_end
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fe_cfg_t     cfg,
  input  logic        clear,
  input  logic        adc_valid,
  input  cplx_t       adc_data,
  output bank_req_t   req,
  output logic        pkt_det,
  output logic [15:0] captured,
  output logic        cap_done,
  output logic signed [47:0] det_corr_re,
  output logic signed [47:0] det_corr_im
);

  logic  fc_v, df_v;
  cplx_t fc_d, df_d;
  logic  armed;
  logic [47:0] mc, mp;
  logic signed [47:0] cr, ci;
  logic  above;

  freq_comp u_fc (
    .clk, .rst_n, .clear, .phase_inc(cfg.phase_inc),
    .in_valid(adc_valid), .in_data(adc_data),
    .out_valid(fc_v), .out_data(fc_d)
  );

  decim_filter u_df (
    .clk, .rst_n, .clear, .bypass(cfg.bypass), .decim(cfg.decim),
    .in_valid(fc_v), .in_data(fc_d),
    .out_valid(df_v), .out_data(df_d)
  );

  packet_detector u_pd (
    .clk, .rst_n, .clear, .thr(cfg.thr), .pmin(cfg.pmin),
    .in_valid(df_v), .in_data(df_d),
    .det(pkt_det), .above, .metric_c(mc), .metric_p(mp),
    .corr_re(cr), .corr_im(ci)
  );

  // Correlation at the peak of |c| after the last detection (the window is
  // then filled with preamble), for frequency error estimation.
  logic [47:0] peak;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_corr_re <= '0;
      det_corr_im <= '0;
      peak        <= '0;
    end else if (clear) begin
      det_corr_re <= '0;
      det_corr_im <= '0;
      peak        <= '0;
    end else if (pkt_det || (above && mc > peak)) begin
      det_corr_re <= cr;
      det_corr_im <= ci;
      peak        <= mc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      captured <= '0;
      armed    <= 1'b0;
    end else if (clear) begin
      captured <= '0;
      armed    <= 1'b0;
    end else begin
      if (pkt_det) armed <= 1'b1;
      if (req.en) captured <= captured + 16'd1;
    end
  end

  assign cap_done = (captured == cfg.cap_len);

  always_comb begin
    req          = '0;
    req.en       = df_v && cfg.capture && !cap_done && (!cfg.trig || armed || pkt_det);
    req.we       = 1'b1;
    req.wdata[0] = df_d;
  end

endmodule
