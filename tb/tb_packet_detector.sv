// tb_packet_detector: sends noise, then a preamble that repeats every 64
// samples, then random data. It recomputes the delayed autocorrelation and
// window power here with 64-bit integers and checks metric_c and metric_p
// (and the complex correlation) after every sample, checks that no detection is flagged on noise, and that
// exactly one detection pulse comes during the preamble.
module tb_packet_detector;
  import bb_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, det, above;
  logic [7:0] thr = 8'd12;           // 0.75
  logic [31:0] pmin = 32'd100000;
  logic [47:0] metric_c, metric_p;
  logic signed [47:0] corr_re, corr_im;
  cplx_t in_data;
  int checks = 0, failures = 0;

  packet_detector #(.D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hre [$], him [$];   // history, newest first

  function automatic longint labs(longint v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    cplx_t pre [D];
    int ndet_noise = 0, ndet_pre = 0, ndet_data = 0;
    in_data = '0;
    for (int i = 0; i < 2 * D; i++) begin hre.push_back(0); him.push_back(0); end
    for (int i = 0; i < D; i++) begin
      pre[i].re = 16'($urandom_range(0, 8000) - 4000);
      pre[i].im = 16'($urandom_range(0, 8000) - 4000);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      longint cr, ci, pw, mx, mn;
      if (n < 400) begin
        in_data.re = 16'($urandom_range(0, 200) - 100);
        in_data.im = 16'($urandom_range(0, 200) - 100);
      end else if (n < 400 + 6 * D) begin
        in_data = pre[(n - 400) % D];
        in_data.re = in_data.re + 16'($urandom_range(0, 200) - 100);
      end else begin
        in_data.re = 16'($urandom_range(0, 8000) - 4000);
        in_data.im = 16'($urandom_range(0, 8000) - 4000);
      end
      hre.push_front(longint'(in_data.re));
      him.push_front(longint'(in_data.im));
      void'(hre.pop_back());
      void'(him.pop_back());
      cr = 0; ci = 0; pw = 0;
      for (int m = 0; m < D; m++) begin
        cr += hre[m] * hre[m + D] + him[m] * him[m + D];
        ci += him[m] * hre[m + D] - hre[m] * him[m + D];
        pw += hre[m + D] * hre[m + D] + him[m + D] * him[m + D];
      end
      mx = labs(cr) > labs(ci) ? labs(cr) : labs(ci);
      mn = labs(cr) > labs(ci) ? labs(ci) : labs(cr);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (longint'(metric_p) != pw || longint'(metric_c) != mx + mn / 2 ||
          longint'(corr_re) != cr || longint'(corr_im) != ci) begin
        failures++;
        if (failures < 10) $display("n=%0d metric %0d %0d want %0d %0d", n, metric_c, metric_p, mx + mn / 2, pw);
      end
      if (det) begin
        if (n < 400) ndet_noise++;
        else if (n < 400 + 6 * D) ndet_pre++;
        else ndet_data++;
      end
    end
    checks += 2;
    if (ndet_noise != 0) failures++;
    if (ndet_pre != 1) failures++;
    $display("detections: noise %0d preamble %0d data %0d", ndet_noise, ndet_pre, ndet_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
