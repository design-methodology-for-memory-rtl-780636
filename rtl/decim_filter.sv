// decim_filter: filtering/decimation accelerator.
//
// An NTAPS-tap FIR low-pass filter (coefficients H, Q1.15, DC gain 1) runs on
// the complex sample stream; every input sample shifts the delay line, and
// every 2^decim-th one (decim = 0, 1, 2: by 1, 2 or 4) produces a filtered
// output. With bypass set, samples pass unfiltered and undecimated. Outputs
// appear one cycle after the input sample that completes them, rounded and
// saturated to 16 bits. clear empties the delay line and restarts the phase.
// The document names this accelerator only; the filter length, the default
// half-band coefficients [-1 0 9 16 9 0 -1]/32 and the decimation factors are
// this design's.
module decim_filter
  import bb_pkg::*;
#(
  parameter int unsigned NTAPS = 7,
  parameter int H [NTAPS] = '{-1024, 0, 9216, 16384, 9216, 0, -1024}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        bypass,
  input  logic [1:0]  decim,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data
);

  cplx_t      dl [NTAPS];
  logic [1:0] ph;
  logic signed [47:0] ar, ai;

  // Filter output including the new sample.
  always_comb begin
    ar = 48'(in_data.re) * 48'(H[0]);
    ai = 48'(in_data.im) * 48'(H[0]);
    for (int i = 1; i < NTAPS; i++) begin
      ar = ar + 48'(dl[i-1].re) * 48'(H[i]);
      ai = ai + 48'(dl[i-1].im) * 48'(H[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) dl[i] <= '0;
      ph        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      for (int i = 0; i < NTAPS; i++) dl[i] <= '0;
      ph        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int i = 1; i < NTAPS; i++) dl[i] <= dl[i-1];
        if (bypass) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else begin
          ph <= (ph + 2'd1) & ((2'd1 << decim) - 2'd1);
          if (ph == 2'd0) begin
            out_valid   <= 1'b1;
            out_data.re <= sat16((ar + 48'sd16384) >>> 15);
            out_data.im <= sat16((ai + 48'sd16384) >>> 15);
          end
        end
      end
    end
  end

endmodule
