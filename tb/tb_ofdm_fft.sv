// tb_ofdm_fft: symbol processing of the two large OFDM modes on the full-size
// processor (bb_top with its default bank sizes), acting as the controller:
//  * a 4096-point symbol (4k mode, 5120 samples with a 1024-sample guard
//    interval; FFT of 6 radix-4 stages) and
//  * a 2048-point symbol (2560 samples with a 512-sample guard interval; FFT
//    of 5 radix-4 stages whose butterfly inputs are 512 = 2*4^4 words apart,
//    then one radix-2 stage).
// For each size the symbol is written into DM0 so that its useful part starts
// at word 4096; the first FFT stage reads it there (the guard interval is
// never touched), the later stages ping-pong between DM2 and DM1, twiddles
// come from one N-word table in CM, and the channel compensation reads the
// FFT output in natural order (digit-reversed addressing, one instruction per
// half for the 2048-point size) and multiplies it by N coefficients stored in
// CM behind the twiddles. The result is read back through the external port
// and compared with a DFT times the coefficients computed here in floating
// point. Every instruction must take len+3 cycles, and FFT plus compensation
// must fit in the symbol time at 80 MHz (462 us and 1246 us).
// Last, synchronisation by cyclic correlation on 256 points: FFT, multiply by
// the conjugated reference spectrum, FFT again; the peak must sit at the
// circular shift of the received block.
module tb_ofdm_fft;
  import bb_pkg::*;

  logic clk = 0, rst_n = 0;
  bank_cfg_t bank_cfg [NBANK];
  logic [NBANK-1:0] bank_cfg_load = '0;
  logic [2:0] xbar_owner [NBANK];
  bank_req_t ext_req;
  bank_rsp_t ext_rsp;
  logic adc_valid = 0;
  cplx_t adc_data = '0;
  fe_cfg_t fe_cfg = '0;
  logic fe_clear = 0, pkt_det, fe_cap_done;
  logic signed [47:0] fe_det_corr_re, fe_det_corr_im;
  logic [15:0] fe_captured;
  logic cmac_start = 0, cmac_conj = 0, cmac_busy, cmac_done;
  cmac_op_e cmac_op = OP_BFLY4;
  logic [15:0] cmac_len = '0;
  logic [1:0] cmac_shift = '0;
  logic [3:0] cmac_bhold = '0;
  logic signed [47:0] cmac_dot_re, cmac_dot_im;
  logic mdm_mode = 0, mdm_bits_in_valid = 0, mdm_start = 0;
  modu_e mdm_modu = MOD_QPSK;
  logic [15:0] mdm_scale = '0, mdm_len = '0;
  logic [23:0] mdm_bits_in = '0, mdm_bits_out;
  logic mdm_busy, mdm_done, mdm_bits_out_valid;
  int checks = 0, failures = 0;
  int cmac_cycles = 0;

  bb_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic void own(int b, int p);
    for (int i = 0; i < NBANK; i++) if (int'(xbar_owner[i]) == p && i != b) xbar_owner[i] = 3'(7);
    xbar_owner[b] = 3'(p);
  endfunction

  task automatic bank(int b, agu_mode_e mode, int start, int step, logic wide, int lstride,
                      logic lhalf = 0, int base = 0, int rbits = 0);
    bank_cfg[b] = '0;
    bank_cfg[b].agu.mode = mode; bank_cfg[b].agu.start = AW'(start);
    bank_cfg[b].agu.step = AW'(step); bank_cfg[b].agu.base = AW'(base);
    bank_cfg[b].agu.rbits = 5'(rbits); bank_cfg[b].agu.rdig2 = 1'b1;
    bank_cfg[b].wide = wide; bank_cfg[b].lstride = 3'(lstride); bank_cfg[b].lhalf = lhalf;
    bank_cfg_load[b] = 1;
    @(negedge clk);
    bank_cfg_load = '0;
  endtask

  task automatic ext_write(cplx_t d);
    ext_req = '0; ext_req.en = 1; ext_req.we = 1; ext_req.wdata[0] = d;
    @(negedge clk);
    ext_req = '0;
  endtask

  task automatic ext_read(output cplx_t d);
    ext_req = '0; ext_req.en = 1;
    @(negedge clk);
    ext_req = '0;
    d = ext_rsp.rdata[0];
  endtask

  task automatic cmac_run(cmac_op_e o, int n, int sh, int hold);
    int cyc;
    cmac_op = o; cmac_len = 16'(n); cmac_shift = 2'(sh); cmac_conj = 0; cmac_bhold = 4'(hold);
    cmac_start = 1;
    @(negedge clk);
    cmac_start = 0;
    cyc = 1;
    while (!cmac_done && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    cmac_cycles += cyc;
    checks++;
    if (cyc != n + 3) begin
      failures++;
      $display("CMAC %s len %0d took %0d cycles, want %0d", o.name(), n, cyc, n + 3);
    end
  endtask

  function automatic cplx_t q14(real re, real im);
    cplx_t c;
    c.re = 16'($rtoi(re * 16384.0 + (re >= 0 ? 0.5 : -0.5)));
    c.im = 16'($rtoi(im * 16384.0 + (im >= 0 ? 0.5 : -0.5)));
    return c;
  endfunction

  // One symbol of n points (n = 4^L or 2*4^L) with an n/4 guard interval;
  // budget is the symbol time in cycles at 80 MHz.
  task automatic symbol(int n, int budget);
    real pi2 = 6.283185307179586;
    real xr [], xi [], cs [], sn [], hr [], hi [];
    int nl = 0, mixed, src, dst, half, errs = 0;
    real worst = 0.0;
    while ((4 << (2 * nl)) <= n) nl++;
    mixed = ((1 << (2 * nl)) != n);
    half = mixed ? n / 2 : n;
    xr = new[n]; xi = new[n]; cs = new[n]; sn = new[n]; hr = new[n]; hi = new[n];
    for (int i = 0; i < n; i++) begin
      cs[i] = $cos(pi2 * i / n);
      sn[i] = $sin(pi2 * i / n);
    end
    cmac_cycles = 0;
    // ---- CM: twiddle table (word 4i+k = W^(k*i)), then channel coefficients ----
    own(BANK_CM, PORT_EXT);
    bank(BANK_CM, AGU_NORMAL, 0, 1, 0, 0);
    for (int i = 0; i < n / 4; i++)
      for (int k = 0; k < 4; k++)
        ext_write(q14(cs[(k * i) % n], -sn[(k * i) % n]));
    for (int i = 0; i < n; i++) begin
      cplx_t h;
      h.re = 16'($urandom_range(0, 20000) - 10000);
      h.im = 16'($urandom_range(0, 20000) - 10000);
      hr[i] = $itor(h.re) / 16384.0; hi[i] = $itor(h.im) / 16384.0;
      ext_write(h);
    end
    // ---- DM0: guard interval then useful part, which starts at word 4096 ----
    own(BANK_DM0, PORT_EXT);
    bank(BANK_DM0, AGU_NORMAL, 4096 - n / 4, 1, 0, 0);
    for (int i = 0; i < n / 4 + n; i++) begin
      cplx_t c;
      c.re = 16'($urandom_range(0, 16000) - 8000);
      c.im = 16'($urandom_range(0, 16000) - 8000);
      if (i >= n / 4) begin
        xr[i - n / 4] = $itor(c.re);
        xi[i - n / 4] = $itor(c.im);
      end
      ext_write(c);
    end
    // ---- radix-4 stages: DM0 -> DM2 -> DM1 -> DM2 ... ----
    src = BANK_DM0;
    dst = BANK_DM2;
    for (int s = 0; s < nl; s++) begin
      own(src, PORT_CA); own(dst, PORT_CC); own(BANK_CM, PORT_CB);
      bank(src, AGU_NORMAL, (s == 0) ? 4096 : 0, 1, 1, nl - 1, 1'(mixed));
      bank(dst, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 0, 4 << (2 * s), 1, 0);
      cmac_run(OP_BFLY4, n / 4, 2, 2 * s);
      src = dst;
      dst = (src == BANK_DM2) ? BANK_DM1 : BANK_DM2;
    end
    // ---- radix-2 stage, same addresses on both sides ----
    if (mixed) begin
      own(src, PORT_CA); own(dst, PORT_CC); own(BANK_CM, 7);
      bank(src, AGU_NORMAL, 0, 1, 1, nl - 1, 1'b1);
      bank(dst, AGU_NORMAL, 0, 1, 1, nl - 1, 1'b1);
      cmac_run(OP_BFLY2, n / 4, 1, 0);
      src = dst;
      dst = (src == BANK_DM2) ? BANK_DM1 : BANK_DM2;
    end
    // ---- channel compensation in natural order: src (digit-reversed) x CM -> dst ----
    own(src, PORT_CA); own(BANK_CM, PORT_CB); own(dst, PORT_CC);
    bank(BANK_CM, AGU_NORMAL, n, 4, 1, 0);
    bank(dst, AGU_NORMAL, 0, 4, 1, 0);
    for (int h = 0; h < n; h += half) begin
      bank(src, AGU_BITREV, 0, 1, 1, nl - 1, 1'b0, h, 2 * nl - 2);
      cmac_run(OP_VMUL, half / 4, 0, 0);
    end
    checks++;
    if (cmac_cycles > budget) begin
      failures++;
      $display("N=%0d: %0d cycles exceed the symbol time of %0d", n, cmac_cycles, budget);
    end
    // ---- read back and compare ----
    own(src, 7); own(BANK_CM, 7); own(dst, PORT_EXT);
    bank(dst, AGU_NORMAL, 0, 1, 0, 0);
    for (int f = 0; f < n; f++) begin
      real rr = 0.0, ri = 0.0, yr, yi;
      cplx_t got;
      for (int i = 0; i < n; i++) begin
        int w = (f * i) % n;
        rr += xr[i] * cs[w] + xi[i] * sn[w];
        ri += xi[i] * cs[w] - xr[i] * sn[w];
      end
      rr /= n; ri /= n;
      yr = rr * hr[f] - ri * hi[f];
      yi = rr * hi[f] + ri * hr[f];
      ext_read(got);
      checks++;
      if (rabs($itor(got.re) - yr) > worst) worst = rabs($itor(got.re) - yr);
      if (rabs($itor(got.im) - yi) > worst) worst = rabs($itor(got.im) - yi);
      if (rabs($itor(got.re) - yr) > 8.0 || rabs($itor(got.im) - yi) > 8.0) begin
        failures++;
        errs++;
        if (errs < 6) $display("N=%0d bin %0d: %h want %f %fj", n, f, got, yr, yi);
      end
    end
    $display("N=%0d: FFT and channel compensation %0d cycles (symbol time %0d), worst error %f LSB",
             n, cmac_cycles, budget, worst);
  endtask

  // Radix-4 FFT of n = 4^L points: stage 0 reads bank src from word start,
  // later stages alternate between banks a and b; res is the bank holding
  // the digit-reversed result. Twiddles: table at CM word 0.
  task automatic fft4(int n, int src, int start, int a, int b, output int res);
    int nl = 0, dst;
    while ((4 << (2 * nl)) <= n) nl++;
    dst = a;
    for (int s = 0; s < nl; s++) begin
      own(src, PORT_CA); own(dst, PORT_CC); own(BANK_CM, PORT_CB);
      bank(src, AGU_NORMAL, (s == 0) ? start : 0, 1, 1, nl - 1);
      bank(dst, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 0, 4 << (2 * s), 1, 0);
      cmac_run(OP_BFLY4, n / 4, 2, 2 * s);
      src = dst;
      dst = (src == a) ? b : a;
    end
    res = src;
  endtask

  // Synchronisation by cyclic correlation, n = 256: the received block is
  // x[t] = r[(t + sh) mod n], r a reference sequence with a flat spectrum,
  // R[k] = e^(j*th[k]); CM holds R, used conjugated. FFT(x) = R[k] *
  // e^(j*2*pi*k*sh/n); times conj(R) (vector multiply with conjugated
  // coefficients) and FFT again, it peaks at bin sh.
  task automatic sync(int n, int sh);
    real pi2 = 6.283185307179586;
    real th [], rr [], ri [];
    int nl = 0, r1, r2, best = 0;
    real bmag = 0.0, second = 0.0;
    while ((4 << (2 * nl)) <= n) nl++;
    th = new[n]; rr = new[n]; ri = new[n];
    for (int k = 0; k < n; k++) th[k] = pi2 * $itor($urandom_range(0, 9999)) / 10000.0;
    for (int t = 0; t < n; t++) begin
      rr[t] = 0.0; ri[t] = 0.0;
      for (int k = 0; k < n; k++) begin
        rr[t] += $cos(th[k] + pi2 * k * t / n);
        ri[t] += $sin(th[k] + pi2 * k * t / n);
      end
    end
    cmac_cycles = 0;
    own(BANK_CM, PORT_EXT);
    bank(BANK_CM, AGU_NORMAL, 0, 1, 0, 0);
    for (int i = 0; i < n / 4; i++)
      for (int k = 0; k < 4; k++)
        ext_write(q14($cos(pi2 * k * i / n), -$sin(pi2 * k * i / n)));
    for (int k = 0; k < n; k++) ext_write(q14(0.99 * $cos(th[k]), 0.99 * $sin(th[k])));   // R
    own(BANK_DM0, PORT_EXT);
    bank(BANK_DM0, AGU_NORMAL, 4096, 1, 0, 0);
    for (int t = 0; t < n; t++) begin
      cplx_t c;
      c.re = 16'($rtoi(250.0 * rr[(t + sh) % n]));
      c.im = 16'($rtoi(250.0 * ri[(t + sh) % n]));
      ext_write(c);
    end
    fft4(n, BANK_DM0, 4096, BANK_DM2, BANK_DM1, r1);
    // spectrum in natural order times conj(R) into the other FFT bank
    r2 = (r1 == BANK_DM1) ? BANK_DM2 : BANK_DM1;
    own(r1, PORT_CA); own(BANK_CM, PORT_CB); own(r2, PORT_CC);
    bank(r1, AGU_BITREV, 0, 1, 1, nl - 1, 1'b0, 0, 2 * nl - 2);
    bank(BANK_CM, AGU_NORMAL, n, 4, 1, 0);
    bank(r2, AGU_NORMAL, 0, 4, 1, 0);
    cmac_conj_run(n / 4);
    fft4(n, r2, 0, r1, BANK_DM0, r1);
    // read the correlation in natural order and find its peak
    own(BANK_CM, 7); own(r1, PORT_EXT);
    bank(r1, AGU_BITREV, 0, 1, 0, 0, 1'b0, 0, 2 * nl);
    for (int t = 0; t < n; t++) begin
      cplx_t got;
      real m;
      ext_read(got);
      m = $sqrt($itor(got.re) * $itor(got.re) + $itor(got.im) * $itor(got.im));
      if (m > bmag) begin second = bmag; bmag = m; best = t; end
      else if (m > second) second = m;
    end
    checks += 2;
    if (best != sh) begin
      failures++;
      $display("correlation peak at %0d, want %0d", best, sh);
    end
    if (bmag < 200.0 || second > bmag / 4.0) begin
      failures++;
      $display("correlation peak %f, next %f", bmag, second);
    end
    $display("sync N=%0d: peak %f at %0d (next %f), %0d cycles", n, bmag, best, second, cmac_cycles);
  endtask

  task automatic cmac_conj_run(int n);
    int cyc;
    cmac_op = OP_VMUL; cmac_len = 16'(n); cmac_shift = '0; cmac_conj = 1; cmac_bhold = '0;
    cmac_start = 1;
    @(negedge clk);
    cmac_start = 0;
    cyc = 1;
    while (!cmac_done && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    cmac_conj = 0;
    cmac_cycles += cyc;
    checks++;
    if (cyc != n + 3) failures++;
  endtask

  initial begin
    ext_req = '0;
    for (int b = 0; b < NBANK; b++) begin bank_cfg[b] = '0; xbar_owner[b] = 3'(7); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    symbol(4096, 462 * 80);
    symbol(2048, 1246 * 80);
    sync(256, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
