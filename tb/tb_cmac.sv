// tb_cmac: runs the CMAC unit on real memory banks joined by the memory
// crossbar, as in the processor:
//  * a complete 64-point FFT in three constant-geometry radix-4 stages,
//    ping-ponging between two banks, twiddles from one table held for 4^s
//    steps; the digit-reversed result is read back in natural order and
//    compared with a DFT computed here in floating point (within 8 LSB);
//  * a 32-point FFT (2*4^2): two radix-4 stages whose butterfly inputs are
//    8 = 2*4 words apart (lane spacing doubled), then a radix-2 stage; the
//    result is read back in natural order, each half digit-reversed;
//  * a narrow complex vector multiply (one point per cycle) against products
//    computed here, with conjugated coefficients;
//  * a wide dot product, checked exactly at full precision.
// Each instruction must finish in len+3 cycles.
module tb_cmac;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  bank_cfg_t cfg [NBANK];
  logic [NBANK-1:0] cfg_load = '0;
  logic [2:0] owner [NBANK];
  bank_req_t port_req [NPORT];
  bank_rsp_t port_rsp [NPORT];
  bank_req_t bank_req [NBANK];
  bank_rsp_t bank_rsp [NBANK];
  logic start = 0, conj_b = 0, busy, done;
  cmac_op_e op = OP_BFLY4;
  logic [15:0] len = '0;
  logic [1:0] shift = '0;
  logic [3:0] b_hold = '0;
  logic signed [47:0] dot_re, dot_im;
  int checks = 0, failures = 0;

  mem_xbar #(.NB(NBANK), .NP(NPORT)) u_x (.clk, .rst_n, .owner, .port_req, .port_rsp, .bank_req, .bank_rsp);
  for (genvar b = 0; b < NBANK; b++) begin : g_b
    mem_bank #(.DEPTH(256)) u_b (.clk, .rst_n, .cfg(cfg[b]), .cfg_load(cfg_load[b]),
                                 .req(bank_req[b]), .rsp(bank_rsp[b]));
  end
  cmac dut (.clk, .rst_n, .start, .op, .len, .shift, .conj_b, .b_hold, .busy, .done,
            .dot_re, .dot_im,
            .a_req(port_req[PORT_CA]), .a_rsp(port_rsp[PORT_CA]),
            .b_req(port_req[PORT_CB]), .b_rsp(port_rsp[PORT_CB]),
            .c_req(port_req[PORT_CC]));
  assign port_req[PORT_FE]  = '0;
  assign port_req[PORT_MDM] = '0;
  bank_req_t ext;
  assign port_req[PORT_EXT] = ext;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bank(int b, agu_mode_e mode, int start_a, int step, logic wide, int lstride,
                      int rbits = 0, logic lhalf = 0, int base = 0);
    cfg[b] = '0;
    cfg[b].agu.mode = mode; cfg[b].agu.start = AW'(start_a); cfg[b].agu.step = AW'(step);
    cfg[b].agu.rbits = 5'(rbits); cfg[b].agu.rdig2 = 1'b1; cfg[b].agu.base = AW'(base);
    cfg[b].wide = wide; cfg[b].lstride = 3'(lstride); cfg[b].lhalf = lhalf;
    cfg_load[b] = 1;
    @(negedge clk);
    cfg_load = '0;
  endtask

  // Give bank b to port p; a bank that port held before is released.
  function automatic void own(int b, int p);
    for (int i = 0; i < NBANK; i++) if (int'(owner[i]) == p) owner[i] = 3'(7);
    owner[b] = 3'(p);
  endfunction

  task automatic ext_write(cplx_t d);
    ext = '0; ext.en = 1; ext.we = 1; ext.wdata[0] = d;
    @(negedge clk);
    ext = '0;
  endtask

  task automatic ext_read(output cplx_t d);
    ext = '0; ext.en = 1;
    @(negedge clk);
    ext = '0;
    d = port_rsp[PORT_EXT].rdata[0];
  endtask

  // Issue one instruction and check that it completes in len+lat cycles.
  task automatic run(cmac_op_e o, int n, int sh, logic cj, int hold, int lat);
    int cyc;
    op = o; len = 16'(n); shift = 2'(sh); conj_b = cj; b_hold = 4'(hold);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    checks++;
    if (cyc != n + lat) begin
      failures++;
      $display("op %s len %0d took %0d cycles, want %0d", o.name(), n, cyc, n + lat);
    end
  endtask

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic cplx_t q14(real re, real im);
    cplx_t c;
    c.re = 16'($rtoi(re * 16384.0 + (re >= 0 ? 0.5 : -0.5)));
    c.im = 16'($rtoi(im * 16384.0 + (im >= 0 ? 0.5 : -0.5)));
    return c;
  endfunction

  // FFT of n points, n = 4^L (L radix-4 stages) or 2*4^L (L radix-4 stages
  // and a final radix-2 stage), in the same constant-geometry scheme.
  task automatic fft_test(int n);
    real pi2 = 6.283185307179586;
    real xr [], xi [];
    cplx_t got;
    int nl = 0, mixed, src, dst, half;
    while ((4 << (2 * nl)) <= n) nl++;
    mixed = ((1 << (2 * nl)) != n);
    half = mixed ? n / 2 : n;
    xr = new[n]; xi = new[n];
    // ---- twiddle table in CM: entry i holds W^(k*i), k = 0..3 ----
    own(BANK_CM, PORT_EXT);
    bank(BANK_CM, AGU_NORMAL, 0, 1, 0, 0);
    for (int i = 0; i < n / 4; i++)
      for (int k = 0; k < 4; k++)
        ext_write(q14($cos(pi2 * k * i / n), -$sin(pi2 * k * i / n)));
    // ---- input signal in DM1 ----
    own(BANK_DM1, PORT_EXT);
    bank(BANK_DM1, AGU_NORMAL, 0, 1, 0, 0);
    for (int i = 0; i < n; i++) begin
      cplx_t c;
      c.re = 16'($urandom_range(0, 16000) - 8000);
      c.im = 16'($urandom_range(0, 16000) - 8000);
      xr[i] = $itor(c.re); xi[i] = $itor(c.im);
      ext_write(c);
    end
    // ---- radix-4 stages, ping-pong DM1 <-> DM2; butterfly inputs n/4 apart ----
    dst = BANK_DM1;
    for (int s = 0; s < nl; s++) begin
      src = (s % 2 == 0) ? BANK_DM1 : BANK_DM2;
      dst = (s % 2 == 0) ? BANK_DM2 : BANK_DM1;
      own(src, PORT_CA); own(dst, PORT_CC); own(BANK_CM, PORT_CB);
      bank(src, AGU_NORMAL, 0, 1, 1, nl - 1, 0, 1'(mixed));
      bank(dst, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 0, 4 << (2 * s), 1, 0);
      run(OP_BFLY4, n / 4, 2, 0, 2 * s, 3);
    end
    // ---- final radix-2 stage, same addresses on both sides ----
    if (mixed) begin
      src = dst;
      dst = (src == BANK_DM1) ? BANK_DM2 : BANK_DM1;
      own(BANK_CM, 7); own(src, PORT_CA); own(dst, PORT_CC);
      bank(src, AGU_NORMAL, 0, 1, 1, nl - 1, 0, 1'b1);
      bank(dst, AGU_NORMAL, 0, 1, 1, nl - 1, 0, 1'b1);
      run(OP_BFLY2, n / 4, 1, 0, 0, 3);
    end
    // ---- read result in natural order (digit-reversed addressing, each half) ----
    own(dst, PORT_EXT); own(BANK_DM1 + BANK_DM2 - dst, 7); own(BANK_CM, 7);
    for (int f = 0; f < n; f++) begin
      real rr, ri;
      if (f % half == 0) bank(dst, AGU_BITREV, 0, 1, 0, 0, 2 * nl, 0, f);
      rr = 0.0;
      ri = 0.0;
      for (int i = 0; i < n; i++) begin
        rr += xr[i] * $cos(pi2 * f * i / n) + xi[i] * $sin(pi2 * f * i / n);
        ri += xi[i] * $cos(pi2 * f * i / n) - xr[i] * $sin(pi2 * f * i / n);
      end
      rr /= n; ri /= n;
      ext_read(got);
      checks++;
      if (rabs($itor(got.re) - rr) > 8.0 || rabs($itor(got.im) - ri) > 8.0) begin
        failures++;
        if (failures < 10) $display("FFT%0d bin %0d: %h want %f %fj", n, f, got, rr, ri);
      end
    end
  endtask

  initial begin
    cplx_t got;
    ext = '0;
    for (int b = 0; b < NBANK; b++) begin cfg[b] = '0; own(b, 7); end
    repeat (2) @(negedge clk);
    rst_n = 1;

    fft_test(64);
    fft_test(32);

    // ---- narrow vector multiply with conjugated coefficients ----
    begin
      cplx_t va [32], vb [32];
      for (int i = 0; i < 32; i++) begin
        va[i].re = 16'($urandom_range(0, 20000) - 10000);
        va[i].im = 16'($urandom_range(0, 20000) - 10000);
        vb[i].re = 16'($urandom_range(0, 40000) - 20000);
        vb[i].im = 16'($urandom_range(0, 40000) - 20000);
      end
      own(BANK_DM0, PORT_EXT);
      bank(BANK_DM0, AGU_NORMAL, 512, 1, 0, 0);
      for (int i = 0; i < 32; i++) ext_write(va[i]);
      own(BANK_CM, PORT_EXT);
      bank(BANK_CM, AGU_NORMAL, 512, 1, 0, 0);
      for (int i = 0; i < 32; i++) ext_write(vb[i]);
      own(BANK_DM0, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM2, PORT_CC);
      bank(BANK_DM0, AGU_NORMAL, 512, 1, 0, 0);
      bank(BANK_CM, AGU_NORMAL, 512, 1, 0, 0);
      bank(BANK_DM2, AGU_NORMAL, 100, 1, 0, 0);
      run(OP_VMUL, 32, 0, 1, 0, 3);
      own(BANK_DM0, 7); own(BANK_CM, 7); own(BANK_DM2, PORT_EXT);
      bank(BANK_DM2, AGU_NORMAL, 100, 1, 0, 0);
      for (int i = 0; i < 32; i++) begin
        real pr, pim;
        pr  = ($itor(va[i].re) * $itor(vb[i].re) + $itor(va[i].im) * $itor(vb[i].im)) / 16384.0;
        pim = ($itor(va[i].im) * $itor(vb[i].re) - $itor(va[i].re) * $itor(vb[i].im)) / 16384.0;
        if (pr > 32767.0) pr = 32767.0;
        if (pr < -32768.0) pr = -32768.0;
        if (pim > 32767.0) pim = 32767.0;
        if (pim < -32768.0) pim = -32768.0;
        ext_read(got);
        checks++;
        if (rabs($itor(got.re) - pr) > 1.0 || rabs($itor(got.im) - pim) > 1.0) begin
          failures++;
          if (failures < 10) $display("VMUL %0d: %0d %0dj want %f %fj", i, got.re, got.im, pr, pim);
        end
      end
    end

    // ---- wide dot product over 8 steps (32 terms), data left in DM1 ----
    begin
      longint wr = 0, wi = 0;
      cplx_t da [32], db [32];
      own(BANK_DM1, PORT_EXT);
      bank(BANK_DM1, AGU_NORMAL, 0, 1, 0, 0);
      for (int i = 0; i < 32; i++) begin
        da[i].re = 16'($urandom); da[i].im = 16'($urandom);
        ext_write(da[i]);
      end
      own(BANK_DM1, 7); own(BANK_CM, PORT_EXT);
      bank(BANK_CM, AGU_NORMAL, 0, 1, 0, 0);
      for (int i = 0; i < 32; i++) begin
        db[i].re = 16'($urandom); db[i].im = 16'($urandom);
        ext_write(db[i]);
      end
      for (int i = 0; i < 32; i++) begin
        wr += longint'(da[i].re) * longint'(db[i].re) - longint'(da[i].im) * longint'(db[i].im);
        wi += longint'(da[i].re) * longint'(db[i].im) + longint'(da[i].im) * longint'(db[i].re);
      end
      own(BANK_DM1, PORT_CA); own(BANK_CM, PORT_CB); own(BANK_DM2, PORT_CC);
      bank(BANK_DM1, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_CM, AGU_NORMAL, 0, 4, 1, 0);
      bank(BANK_DM2, AGU_NORMAL, 300, 1, 0, 0);
      run(OP_DOT, 8, 0, 0, 0, 3);
      checks++;
      if (longint'(dot_re) != wr || longint'(dot_im) != wi) begin
        failures++;
        $display("DOT %0d %0d want %0d %0d", dot_re, dot_im, wr, wi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
