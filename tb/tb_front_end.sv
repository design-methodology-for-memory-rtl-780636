// tb_front_end: two captures through the front-end accelerators.
// 1) Noise, then a 64-periodic preamble and data, all shifted by a carrier
//    offset; the front end is set to remove the offset, bypass the filter and
//    capture after a detection. Checks: one detection, inside the preamble,
//    with a correlation of zero phase (no offset left);
//    the captured samples are the original (offset-free) samples, consecutive,
//    within 4 LSB; exactly cap_len (300) are written and cap_done rises.
// 2) No offset, filter on with decimation by 2, capture without trigger:
//    the written samples are every second output of the half-band filter,
//    computed here, within 2 LSB.
module tb_front_end;
  import bb_pkg::*;
  localparam real H [7] = '{-1.0, 0.0, 9.0, 16.0, 9.0, 0.0, -1.0};
  logic clk = 0, rst_n = 0, clear = 0, adc_valid = 0, pkt_det, cap_done;
  cplx_t adc_data;
  fe_cfg_t cfg;
  bank_req_t req;
  logic [15:0] captured;
  logic signed [47:0] det_corr_re, det_corr_im;
  int checks = 0, failures = 0;

  front_end dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  real sr [2000], si [2000];
  cplx_t wr [$];
  int det_at [$];
  int nin;

  always @(negedge clk) begin
    if (req.en && req.we) wr.push_back(req.wdata[0]);
    if (pkt_det) det_at.push_back(nin);
  end

  initial begin
    localparam real F = 0.0123;   // offset, turns per sample
    cplx_t pre [64];
    int j0;
    adc_data = '0; cfg = '0; nin = 0;
    for (int i = 0; i < 64; i++) begin
      pre[i].re = 16'($urandom_range(0, 12000) - 6000);
      pre[i].im = 16'($urandom_range(0, 12000) - 6000);
    end
    for (int n = 0; n < 1000; n++) begin
      if (n < 300) begin
        sr[n] = $itor($urandom_range(0, 100)) - 50.0; si[n] = $itor($urandom_range(0, 100)) - 50.0;
      end else if (n < 300 + 5 * 64) begin
        sr[n] = $itor(pre[(n - 300) % 64].re); si[n] = $itor(pre[(n - 300) % 64].im);
      end else begin
        sr[n] = $itor($urandom_range(0, 12000)) - 6000.0; si[n] = $itor($urandom_range(0, 12000)) - 6000.0;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- capture 1 ----
    cfg.phase_inc = 32'($rtoi(F * 4294967296.0));
    cfg.bypass = 1; cfg.thr = 8'd12; cfg.pmin = 32'd1000000;
    cfg.capture = 1; cfg.trig = 1; cfg.cap_len = 16'd300;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < 1000; n++) begin
      real c, s;
      c = $cos(-6.283185307179586 * F * n); s = $sin(-6.283185307179586 * F * n);
      adc_data.re = 16'($rtoi(sr[n] * c - si[n] * s));
      adc_data.im = 16'($rtoi(sr[n] * s + si[n] * c));
      adc_valid = 1;
      @(negedge clk);
      nin++;
    end
    adc_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (det_at.size() != 1) begin
      failures++;
      $display("%0d detections", det_at.size());
    end
    // with the offset removed, the preamble correlation has no phase left
    checks++;
    if (det_corr_re <= 0 ||
        rabs($atan2($itor(det_corr_im), $itor(det_corr_re))) > 0.01) begin
      failures++;
      $display("correlation at detection %0d %0d", det_corr_re, det_corr_im);
    end
    checks++;
    if (wr.size() != 300 || captured != 16'd300 || !cap_done) begin
      failures++;
      $display("captured %0d (%0d), cap_done %b", wr.size(), captured, cap_done);
    end
    // locate the captured run among the originals (best match of all 300, which run into the data)
    begin
      real best;
      best = 1.0e9; j0 = 0;
      for (int j = 0; j < 800; j++) begin
        real d;
        d = 0.0;
        for (int i = 0; i < wr.size(); i++)
          d += rabs($itor(wr[i].re) - sr[j + i]) + rabs($itor(wr[i].im) - si[j + i]);
        if (d < best) begin best = d; j0 = j; end
      end
    end
    checks++;
    if (j0 < 300 + 64 || j0 >= 300 + 5 * 64) begin
      failures++;
      $display("capture started at sample %0d, outside the preamble", j0);
    end
    for (int i = 0; i < wr.size(); i++) begin
      checks++;
      if (rabs($itor(wr[i].re) - sr[j0 + i]) > 4.0 || rabs($itor(wr[i].im) - si[j0 + i]) > 4.0) begin
        failures++;
        if (failures < 10) $display("capture %0d: %h want %f %f", i, wr[i], sr[j0 + i], si[j0 + i]);
      end
    end
    // ---- capture 2: filter and decimate by 2 ----
    wr.delete();
    cfg = '0; cfg.decim = 2'd1; cfg.capture = 1; cfg.cap_len = 16'd100;
    cfg.thr = 8'd255; cfg.pmin = '1;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < 300; n++) begin
      adc_data.re = 16'($rtoi(sr[600 + n])); adc_data.im = 16'($rtoi(si[600 + n]));
      adc_valid = 1;
      @(negedge clk);
      adc_valid = 0;
      if (n % 3 == 0) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (wr.size() != 100) failures++;
    for (int k = 0; k < wr.size(); k++) begin
      real er, ei;
      er = 0.0; ei = 0.0;
      for (int t = 0; t < 7; t++)
        if (2 * k - t >= 0) begin
          er += H[t] * sr[600 + 2 * k - t] / 32.0;
          ei += H[t] * si[600 + 2 * k - t] / 32.0;
        end
      checks++;
      if (rabs($itor(wr[k].re) - er) > 2.0 || rabs($itor(wr[k].im) - ei) > 2.0) begin
        failures++;
        if (failures < 10) $display("decimated %0d: %h want %f %f", k, wr[k], er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
