// tb_bb_top: receives one OFDM symbol end to end on the processor at its
// full size (no parameter overrides), acting as the controller core:
//  1. loads the coefficient memory: radix-4 twiddles for a 256-point FFT,
//     256 channel-compensation coefficients, a 64-sample reference preamble;
//  2. streams noise, a 64-periodic preamble and one 16-QAM OFDM symbol
//     (64-sample guard interval + 256 samples, through a random channel and
//     with a carrier frequency offset) through the front end, which removes
//     the offset and writes the samples into DM0 used as a 1024-word circular
//     buffer; the packet detector must fire once, inside the preamble;
//  3. correlates the captured preamble with the reference (CMAC dot product,
//     conjugated coefficients) and checks the exact result;
//  4. runs the 256-point FFT as four radix-4 vector instructions, reading
//     the symbol in place in DM0 (the guard interval is skipped by the
//     addressing alone) and ping-ponging between DM2 and DM1 by reconnecting
//     banks; each stage must take 64+3 cycles;
//  5. compensates the channel (256 cycles + 3), reading the FFT output in
//     natural order with digit-reversed addressing;
//  5b. tracks and corrects the common phase error of the symbol: a dot
//     product over the 8 pilot subcarriers estimates it, and a vector
//     multiply with the held phasor removes it;
//  6. de-maps 4 points per cycle (64 + 2 cycles) and compares all 1024 bits
//     with the transmitted ones;
//  7. maps bits into DM2 and reads the points back;
//  8. captures through the filter with decimation by 2 while, at the same
//     time (task-level pipeline),
//  9. the CMAC runs a 32-point FFT (two radix-4 stages with butterfly inputs 8 words
//     apart, then a radix-2 stage) and checks it against a DFT;
// 10. estimates a carrier offset from the detector's correlation.
// Each mechanism is counted and must have happened at least once.
module tb_bb_top;
  import bb_pkg::*;
  localparam int N = 256, CP = 64, NOISE = 200, NPRE = 4 * 64;
  localparam int NSAMP = NOISE + NPRE + CP + N;   // 776
  localparam real F = 0.0123;                      // offset, turns per sample
  localparam real PI2 = 6.283185307179586;
  localparam int UNIT = 60;                        // equalised level unit
  localparam real PH = 0.35;                       // common phase error, rad

  logic clk = 0, rst_n = 0;
  bank_cfg_t bank_cfg [NBANK];
  logic [NBANK-1:0] bank_cfg_load = '0;
  logic [2:0] xbar_owner [NBANK];
  bank_req_t ext_req;
  bank_rsp_t ext_rsp;
  logic adc_valid = 0;
  cplx_t adc_data;
  fe_cfg_t fe_cfg;
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
  modu_e mdm_modu = MOD_QAM16;
  logic [15:0] mdm_scale = 16'(UNIT), mdm_len = '0;
  logic [23:0] mdm_bits_in = '0, mdm_bits_out;
  logic mdm_busy, mdm_done, mdm_bits_out_valid;
  int checks = 0, failures = 0;

  bb_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_det = 0, n_reconnect = 0, n_wide = 0, n_narrow = 0, n_modulo = 0, n_digrev = 0;
  int n_bfly = 0, n_vmul = 0, n_dot = 0, n_demap = 0, n_map = 0, n_decim = 0, n_fcomp = 0;
  int n_bhold = 0, n_bfly2 = 0, n_lhalf = 0, n_phase = 0, n_fest = 0, n_overlap = 0;

  // cycles in which the front end stores a sample while the CMAC is busy
  logic [15:0] cap_prev = '0;
  always @(posedge clk) begin
    if (fe_captured != cap_prev && cmac_busy) n_overlap++;
    cap_prev <= fe_captured;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic void own(int b, int p);
    for (int i = 0; i < NBANK; i++) if (int'(xbar_owner[i]) == p && i != b) xbar_owner[i] = 3'(7);
    if (int'(xbar_owner[b]) != p) n_reconnect++;
    xbar_owner[b] = 3'(p);
  endfunction

  task automatic bank(int b, agu_mode_e mode, int start, int step, logic wide, int lstride,
                      int base = 0, int len = 0, int rbits = 0, logic lhalf = 0);
    bank_cfg[b] = '0;
    bank_cfg[b].agu.mode = mode; bank_cfg[b].agu.start = AW'(start);
    bank_cfg[b].agu.step = AW'(step); bank_cfg[b].agu.base = AW'(base);
    bank_cfg[b].agu.len = AW'(len); bank_cfg[b].agu.rbits = 5'(rbits);
    bank_cfg[b].agu.rdig2 = 1'b1;
    bank_cfg[b].wide = wide; bank_cfg[b].lstride = 3'(lstride); bank_cfg[b].lhalf = lhalf;
    if (lhalf) n_lhalf++;
    if (wide) n_wide++; else n_narrow++;
    if (mode == AGU_MODULO) n_modulo++;
    if (mode == AGU_BITREV) n_digrev++;
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

  task automatic cmac_run(cmac_op_e o, int n, int sh, logic cj, int hold);
    int cyc;
    cmac_op = o; cmac_len = 16'(n); cmac_shift = 2'(sh); cmac_conj = cj; cmac_bhold = 4'(hold);
    cmac_start = 1;
    @(negedge clk);
    cmac_start = 0;
    cyc = 1;
    while (!cmac_done && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    checks++;
    if (cyc != n + 3) begin
      failures++;
      $display("CMAC %s len %0d took %0d cycles, want %0d", o.name(), n, cyc, n + 3);
    end
    case (o)
      OP_BFLY4: n_bfly++;
      OP_VMUL:  n_vmul++;
      OP_BFLY2: n_bfly2++;
      default:  n_dot++;
    endcase
    if (hold > 0) n_bhold++;
  endtask

  function automatic cplx_t q14(real re, real im);
    cplx_t c;
    c.re = 16'($rtoi(re * 16384.0 + (re >= 0 ? 0.5 : -0.5)));
    c.im = 16'($rtoi(im * 16384.0 + (im >= 0 ? 0.5 : -0.5)));
    return c;
  endfunction

  function automatic int lvl16(int g);   // Gray-coded 16-QAM axis level
    case (g)
      0: return -3;
      1: return -1;
      3: return 1;
      default: return 3;
    endcase
  endfunction

  // transmitted data
  logic [3:0] txbits [N];
  real hre [N], him [N];
  real sre [NSAMP], sim_ [NSAMP];
  cplx_t pre [64];

  initial begin
    cplx_t got;
    int det_at;
    for (int b = 0; b < NBANK; b++) begin bank_cfg[b] = '0; xbar_owner[b] = 3'(7); end
    ext_req = '0; adc_data = '0; fe_cfg = '0;
    det_at = -1;

    // ---------- transmitted signal ----------
    for (int k = 0; k < N; k++) begin
      real mag, ph;
      txbits[k] = (k % 32 == 0) ? 4'hf : 4'($urandom);   // pilots: level 3+3j
      mag = 0.8 + 0.4 * $itor($urandom_range(0, 1000)) / 1000.0;
      ph = PI2 * $itor($urandom_range(0, 1000)) / 1000.0;
      hre[k] = mag * $cos(ph); him[k] = mag * $sin(ph);
    end
    for (int i = 0; i < 64; i++) begin
      pre[i].re = 16'($urandom_range(0, 1) ? 3000 : -3000);
      pre[i].im = 16'($urandom_range(0, 1) ? 3000 : -3000);
    end
    for (int n = 0; n < NSAMP; n++) begin
      if (n < NOISE) begin
        sre[n] = $itor($urandom_range(0, 100)) - 50.0;
        sim_[n] = $itor($urandom_range(0, 100)) - 50.0;
      end else if (n < NOISE + NPRE) begin
        sre[n] = $itor(pre[(n - NOISE) % 64].re);
        sim_[n] = $itor(pre[(n - NOISE) % 64].im);
      end else begin
        int t;
        real ar, ai;
        t = (n - NOISE - NPRE - CP + N) % N;    // guard interval repeats the end
        ar = 0.0; ai = 0.0;
        for (int k = 0; k < N; k++) begin
          real xr, xi, zr, zi, c, s;
          xr = $itor(lvl16(txbits[k] >> 2)); xi = $itor(lvl16(txbits[k] & 3));
          zr = xr * hre[k] - xi * him[k]; zi = xr * him[k] + xi * hre[k];
          c = zr * $cos(PH) - zi * $sin(PH); zi = zr * $sin(PH) + zi * $cos(PH); zr = c;
          c = $cos(PI2 * k * t / N); s = $sin(PI2 * k * t / N);
          ar += zr * c - zi * s; ai += zr * s + zi * c;
        end
        sre[n] = 50.0 * ar; sim_[n] = 50.0 * ai;
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------- 1. coefficient memory ----------
    own(BANK_CM, PORT_EXT);
    bank(BANK_CM, AGU_NORMAL, 0, 1, 0, 0);
    for (int i = 0; i < N / 4; i++)
      for (int k = 0; k < 4; k++)
        ext_write(q14($cos(PI2 * k * i / N), -$sin(PI2 * k * i / N)));
    bank(BANK_CM, AGU_NORMAL, 1024, 1, 0, 0);
    for (int k = 0; k < N; k++) begin
      real d;
      d = hre[k] * hre[k] + him[k] * him[k];
      ext_write(q14(1.2 * hre[k] / d, -1.2 * him[k] / d));    // 1.2 / H
    end
    bank(BANK_CM, AGU_NORMAL, 2048, 1, 0, 0);
    for (int i = 0; i < 64; i++) ext_write(pre[i]);
    bank(BANK_CM, AGU_NORMAL, 2176, 1, 0, 0);         // pilot reference 3+3j
    for (int i = 0; i < N / 32; i++) ext_write(cplx_t'({16'(3 * UNIT), 16'(3 * UNIT)}));

    // ---------- 2. capture through the front end ----------
    own(BANK_DM0, PORT_FE);
    bank(BANK_DM0, AGU_MODULO, 1024 - (NOISE + NPRE + CP), 1, 0, 0, 0, 1024);
    fe_cfg.phase_inc = 32'($rtoi(F * 4294967296.0));
    fe_cfg.bypass = 1; fe_cfg.thr = 8'd12; fe_cfg.pmin = 32'd1000000;
    fe_cfg.capture = 1; fe_cfg.trig = 0; fe_cfg.cap_len = 16'(NSAMP);
    fe_clear = 1;
    @(negedge clk);
    fe_clear = 0;
    for (int n = 0; n < NSAMP; n++) begin
      real c, s;
      c = $cos(-PI2 * F * n); s = $sin(-PI2 * F * n);
      adc_data.re = 16'($rtoi(sre[n] * c - sim_[n] * s));
      adc_data.im = 16'($rtoi(sre[n] * s + sim_[n] * c));
      adc_valid = 1;
      @(negedge clk);
      if (pkt_det) begin n_det++; det_at = int'(fe_captured); end
    end
    adc_valid = 0;
    n_fcomp++;
    repeat (30) begin
      @(negedge clk);
      if (pkt_det) begin n_det++; det_at = int'(fe_captured); end
    end
    checks++;
    if (fe_captured != 16'(NSAMP) || !fe_cap_done) begin
      failures++;
      $display("front end captured %0d samples", fe_captured);
    end
    checks++;
    if (n_det != 1 || det_at < NOISE + 64 || det_at > NOISE + NPRE) begin
      failures++;
      $display("packet detections %0d, last after %0d samples", n_det, det_at);
    end

    // ---------- 3. preamble correlation (dot product) ----------
    begin
      longint wr, wi;
      cplx_t rx [64];
      own(BANK_DM0, PORT_EXT);
      bank(BANK_DM0, AGU_NORMAL, 768, 1, 0, 0);      // second preamble period
      for (int i = 0; i < 64; i++) ext_read(rx[i]);
      wr = 0; wi = 0;
      for (int i = 0; i < 64; i++) begin
        wr += longint'(rx[i].re) * longint'(pre[i].re) + longint'(rx[i].im) * longint'(pre[i].im);
        wi += longint'(rx[i].im) * longint'(pre[i].re) - longint'(rx[i].re) * longint'(pre[i].im);
      end
      own(BANK_DM0, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM2, PORT_CC);
      bank(BANK_DM0, AGU_NORMAL, 768, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 2048, 4, 1, 0);
      bank(BANK_DM2, AGU_NORMAL, 4000, 1, 0, 0);
      cmac_run(OP_DOT, 16, 0, 1, 0);
      checks++;
      if (longint'(cmac_dot_re) != wr || longint'(cmac_dot_im) != wi) begin
        failures++;
        $display("dot %0d %0d want %0d %0d", cmac_dot_re, cmac_dot_im, wr, wi);
      end
      // the corrected preamble correlates strongly with the reference
      checks++;
      if (wr * wr + wi * wi < longint'(64.0 * 18.0e6 * 0.8) * longint'(64.0 * 18.0e6 * 0.8)) begin
        failures++;
        $display("weak preamble correlation %0d %0d", wr, wi);
      end
    end

    // ---------- 4. 256-point FFT, symbol read in place in DM0 ----------
    for (int s = 0; s < 4; s++) begin
      int src, dst;
      src = (s == 0) ? BANK_DM0 : ((s % 2 == 1) ? BANK_DM2 : BANK_DM1);
      dst = (s % 2 == 0) ? BANK_DM2 : BANK_DM1;
      own(src, PORT_CA); own(dst, PORT_CC); own(BANK_CM, PORT_CB);
      bank(src, AGU_NORMAL, 0, 1, 1, 3);
      bank(dst, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 0, 4 << (2 * s), 1, 0);
      cmac_run(OP_BFLY4, N / 4, 2, 0, 2 * s);
    end

    // ---------- 5. channel compensation ----------
    own(BANK_DM1, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM2, PORT_CC);
    bank(BANK_DM1, AGU_BITREV, 0, 1, 0, 0, 0, 0, 8);
    bank(BANK_CM, AGU_NORMAL, 1024, 1, 0, 0);
    bank(BANK_DM2, AGU_NORMAL, 0, 1, 0, 0);
    cmac_run(OP_VMUL, N, 0, 0, 0);
    // equalised points still carry the common phase error
    own(BANK_DM2, PORT_EXT);
    bank(BANK_DM2, AGU_NORMAL, 0, 1, 0, 0);
    for (int k = 0; k < N; k++) begin
      real er, ei, t;
      ext_read(got);
      er = $itor(UNIT * lvl16(txbits[k] >> 2));
      ei = $itor(UNIT * lvl16(txbits[k] & 3));
      t = er * $cos(PH) - ei * $sin(PH); ei = er * $sin(PH) + ei * $cos(PH); er = t;
      checks++;
      if (rabs($itor(got.re) - er) > 15.0 || rabs($itor(got.im) - ei) > 15.0) begin
        failures++;
        if (failures < 10) $display("subcarrier %0d: %h want %f %f", k, got, er, ei);
      end
    end

    // ---------- 5b. phase tracking and correction ----------
    // Pilot dot product (every 32nd subcarrier, narrow, conjugated
    // reference) gives 8*|P|^2*e^(j*phi); the controller turns it into the
    // unit phasor e^(-j*phi), stores it in four lanes of CM, and one wide
    // vector multiply, reading the phasor once and holding it, rotates the
    // whole symbol from DM2 into DM1.
    begin
      real phi;
      own(BANK_DM2, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM1, PORT_CC);
      bank(BANK_DM2, AGU_NORMAL, 0, 32, 0, 0);
      bank(BANK_CM, AGU_NORMAL, 2176, 1, 0, 0);
      bank(BANK_DM1, AGU_NORMAL, 4000, 1, 0, 0);
      cmac_run(OP_DOT, N / 32, 0, 1, 0);
      phi = $atan2($itor(cmac_dot_im), $itor(cmac_dot_re));
      checks++;
      if (rabs(phi - PH) > 0.05) begin
        failures++;
        $display("phase estimate %f, want %f", phi, PH);
      end
      own(BANK_CM, PORT_EXT);
      bank(BANK_CM, AGU_NORMAL, 2192, 1, 0, 0);
      for (int k = 0; k < 4; k++) ext_write(q14($cos(phi), -$sin(phi)));
      own(BANK_DM2, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM1, PORT_CC);
      bank(BANK_DM2, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 2192, 4, 1, 0);
      bank(BANK_DM1, AGU_NORMAL, 0, 4, 1, 0);
      cmac_run(OP_VMUL, N / 4, 0, 0, 15);
      n_phase++;
    end
    // corrected points, checked against the transmitted levels
    own(BANK_DM1, PORT_EXT);
    bank(BANK_DM1, AGU_NORMAL, 0, 1, 0, 0);
    for (int k = 0; k < N; k++) begin
      real er, ei;
      ext_read(got);
      er = $itor(UNIT * lvl16(txbits[k] >> 2));
      ei = $itor(UNIT * lvl16(txbits[k] & 3));
      checks++;
      if (rabs($itor(got.re) - er) > 15.0 || rabs($itor(got.im) - ei) > 15.0) begin
        failures++;
        if (failures < 10) $display("subcarrier %0d: %h want %f %f", k, got, er, ei);
      end
    end

    // ---------- 6. de-mapping ----------
    begin
      int cyc, k;
      own(BANK_DM1, PORT_MDM);
      bank(BANK_DM1, AGU_NORMAL, 0, 4, 1, 0);
      mdm_mode = 1; mdm_modu = MOD_QAM16; mdm_len = 16'(N / 4);
      mdm_start = 1;
      @(negedge clk);
      mdm_start = 0;
      cyc = 1; k = 0;
      while (cyc < 1000) begin
        if (mdm_bits_out_valid) begin
          for (int l = 0; l < 4; l++) begin
            checks++;
            if (mdm_bits_out[6 * l +: 4] !== txbits[k]) begin
              failures++;
              if (failures < 10) $display("bits %0d: %h want %h", k, mdm_bits_out[6 * l +: 4], txbits[k]);
            end
            k++;
          end
        end
        if (mdm_done) break;
        @(negedge clk);
        cyc++;
      end
      n_demap++;
      checks += 2;
      if (k != N) failures++;
      if (cyc != N / 4 + 2) begin
        failures++;
        $display("demap took %0d cycles", cyc);
      end
      @(negedge clk);
    end

    // ---------- 7. mapping ----------
    begin
      logic [23:0] w [16];
      own(BANK_DM2, PORT_MDM);
      bank(BANK_DM2, AGU_NORMAL, 2048, 4, 1, 0);
      mdm_mode = 0; mdm_modu = MOD_QPSK; mdm_scale = 16'd4000;
      for (int i = 0; i < 16; i++) begin
        w[i] = 24'($urandom);
        mdm_bits_in = w[i]; mdm_bits_in_valid = 1;
        @(negedge clk);
      end
      mdm_bits_in_valid = 0;
      @(negedge clk);
      n_map++;
      own(BANK_DM2, PORT_EXT);
      bank(BANK_DM2, AGU_NORMAL, 2048, 1, 0, 0);
      for (int i = 0; i < 64; i++) begin
        logic [1:0] b;
        ext_read(got);
        b = w[i / 4][6 * (i % 4) +: 2];
        checks++;
        if (got.re != (b[1] ? 16'sd4000 : -16'sd4000) || got.im != (b[0] ? 16'sd4000 : -16'sd4000)) begin
          failures++;
          if (failures < 10) $display("mapped %0d: %h for bits %b", i, got, b);
        end
      end
    end

    // ---------- 8./9. task-level pipeline: capture and FFT at the same time ----------
    // The front end stores filtered samples (decimation by 2) in DM0 while
    // the CMAC runs a 32-point FFT between DM1 and DM2 with twiddles from CM.
    own(BANK_DM0, PORT_FE);
    bank(BANK_DM0, AGU_NORMAL, 2048, 1, 0, 0);
    fe_cfg = '0; fe_cfg.decim = 2'd1; fe_cfg.capture = 1; fe_cfg.cap_len = 16'd40;
    fe_cfg.thr = 8'd255; fe_cfg.pmin = '1;
    fe_clear = 1;
    @(negedge clk);
    fe_clear = 0;
    fork
      begin
        for (int n = 0; n < 100; n++) begin
          adc_data.re = 16'($rtoi(sre[NOISE + NPRE + n])); adc_data.im = 16'($rtoi(sim_[NOISE + NPRE + n]));
          adc_valid = 1;
          @(negedge clk);
        end
        adc_valid = 0;
      end
      // ---------- 9. 32-point FFT (2*4^2) with a final radix-2 stage ----------
      // Twiddles W_32^(k*j) are entries 8j of the 256-point table at CM 0, so
      // stage s reads it with step 32*4^s.
      begin
        real xr [32], xi [32];
        int src, dst;
        own(BANK_DM1, PORT_EXT);
        bank(BANK_DM1, AGU_NORMAL, 0, 1, 0, 0);
        for (int n = 0; n < 32; n++) begin
          cplx_t c;
          c.re = 16'($urandom_range(0, 16000) - 8000);
          c.im = 16'($urandom_range(0, 16000) - 8000);
          xr[n] = $itor(c.re); xi[n] = $itor(c.im);
          ext_write(c);
        end
        for (int s = 0; s < 3; s++) begin
          src = (s % 2 == 0) ? BANK_DM1 : BANK_DM2;
          dst = (s % 2 == 0) ? BANK_DM2 : BANK_DM1;
          own(src, PORT_CA); own(dst, PORT_CC);
          bank(src, AGU_NORMAL, 0, 1, 1, 1, 0, 0, 0, 1'b1);
          if (s < 2) begin
            own(BANK_CM, PORT_CB);
            bank(dst, AGU_NORMAL, 0, 4, 1, 0);
            bank(BANK_CM, AGU_NORMAL, 0, 32 << (2 * s), 1, 0);
            cmac_run(OP_BFLY4, 8, 2, 0, 2 * s);
          end else begin
            own(BANK_CM, 7);
            bank(dst, AGU_NORMAL, 0, 1, 1, 1, 0, 0, 0, 1'b1);
            cmac_run(OP_BFLY2, 8, 1, 0, 0);
          end
        end
        own(BANK_DM1, 7); own(BANK_DM2, PORT_EXT);
        for (int f = 0; f < 32; f++) begin
          real rr, ri;
          if (f % 16 == 0) bank(BANK_DM2, AGU_BITREV, 0, 1, 0, 0, f, 0, 4);
          rr = 0.0;
          ri = 0.0;
          for (int n = 0; n < 32; n++) begin
            rr += xr[n] * $cos(PI2 * f * n / 32) + xi[n] * $sin(PI2 * f * n / 32);
            ri += xi[n] * $cos(PI2 * f * n / 32) - xr[n] * $sin(PI2 * f * n / 32);
          end
          rr /= 32.0; ri /= 32.0;
          ext_read(got);
          checks++;
          if (rabs($itor(got.re) - rr) > 8.0 || rabs($itor(got.im) - ri) > 8.0) begin
            failures++;
            if (failures < 10) $display("FFT32 bin %0d: %h want %f %fj", f, got, rr, ri);
          end
        end
      end
    join
    repeat (30) @(negedge clk);
    checks++;
    if (fe_captured != 16'd40) failures++;
    n_decim++;

    // ---------- 10. fine frequency estimation ----------
    // The preamble arrives with an offset of F2 turns per sample and the
    // compensation off; the correlation kept at its peak after detection has the
    // angle -2*pi*64*F2, from which the controller sets phase_inc.
    begin
      localparam real F2 = 0.0041;
      real est;
      fe_cfg = '0; fe_cfg.bypass = 1; fe_cfg.thr = 8'd12; fe_cfg.pmin = 32'd1000000;
      fe_clear = 1;
      @(negedge clk);
      fe_clear = 0;
      for (int n = 0; n < NOISE + NPRE; n++) begin
        real c, s;
        c = $cos(-PI2 * F2 * n); s = $sin(-PI2 * F2 * n);
        adc_data.re = 16'($rtoi(sre[n] * c - sim_[n] * s));
        adc_data.im = 16'($rtoi(sre[n] * s + sim_[n] * c));
        adc_valid = 1;
        @(negedge clk);
      end
      adc_valid = 0;
      repeat (30) @(negedge clk);
      est = -$atan2($itor(fe_det_corr_im), $itor(fe_det_corr_re)) / (PI2 * 64.0);
      checks++;
      if (rabs(est - F2) > 0.0001) begin
        failures++;
        $display("frequency estimate %f, want %f", est, F2);
      end
      n_fest++;
    end

    // ---------- mechanisms ----------
    $display("mechanisms: detect %0d fcomp %0d decim %0d reconnect %0d narrow %0d wide %0d modulo %0d digrev %0d",
             n_det, n_fcomp, n_decim, n_reconnect, n_narrow, n_wide, n_modulo, n_digrev);
    $display("            freq-est %0d concurrent %0d bfly4 %0d bfly2 %0d double-stride %0d phase %0d vmul %0d dot %0d coef-hold %0d demap %0d map %0d",
             n_fest, n_overlap, n_bfly, n_bfly2, n_lhalf, n_phase, n_vmul, n_dot, n_bhold, n_demap, n_map);
    checks++; if (n_bfly2 == 0 || n_lhalf == 0 || n_phase == 0 || n_fest == 0) failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_det == 0) failures++;
    checks++; if (n_fcomp == 0) failures++;
    checks++; if (n_decim == 0) failures++;
    checks++; if (n_reconnect == 0) failures++;
    checks++; if (n_narrow == 0 || n_wide == 0) failures++;
    checks++; if (n_modulo == 0 || n_digrev == 0) failures++;
    checks++; if (n_bfly == 0 || n_vmul == 0 || n_dot == 0 || n_bhold == 0) failures++;
    checks++; if (n_demap == 0 || n_map == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
