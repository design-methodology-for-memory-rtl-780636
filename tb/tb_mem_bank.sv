// tb_mem_bank: fills a 4-way bank one word per cycle through the narrow
// port, then reads it back in wide mode (consecutive lanes, lanes 4^e and
// 2*4^e apart),
// through bit- and digit-reversed and modulo address sequences, and writes
// wide and reads narrow. Every returned word is compared with the value the
// address pattern should give, and read data must arrive exactly one cycle
// after the request.
module tb_mem_bank;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, cfg_load = 0;
  bank_cfg_t cfg;
  bank_req_t req;
  bank_rsp_t rsp;
  int checks = 0, failures = 0;

  mem_bank #(.DEPTH(2048)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t pat(int a, int salt);
    cplx_t c;
    c.re = 16'(a + salt);
    c.im = 16'(a * 3 - salt);
    return c;
  endfunction

  function automatic int digrev8(int v);
    int r = 0;
    for (int i = 0; i < 4; i++) r = (r << 2) | ((v >> (2 * i)) & 3);
    return r;
  endfunction

  task automatic setup(agu_mode_e mode, int start, int step, int base, int len,
                       logic wide, int lstride, logic rdig2 = 0, int rbits = 0,
                       logic lhalf = 0);
    cfg = '0;
    cfg.agu.mode = mode; cfg.agu.start = AW'(start); cfg.agu.step = AW'(step);
    cfg.agu.base = AW'(base); cfg.agu.len = AW'(len);
    cfg.agu.rdig2 = rdig2; cfg.agu.rbits = 5'(rbits);
    cfg.wide = wide; cfg.lstride = 3'(lstride); cfg.lhalf = lhalf;
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
  endtask

  // Issue n reads; after each, check the lanes against want[i][k].
  task automatic reads(int n, int want [][4], int nl, int salt, string name);
    for (int i = 0; i < n; i++) begin
      req = '0; req.en = 1;
      @(negedge clk);
      req = '0;
      checks++;
      if (!rsp.rvalid) failures++;
      for (int k = 0; k < nl; k++) begin
        checks++;
        if (rsp.rdata[k] !== pat(want[i][k], salt)) begin
          failures++;
          if (failures < 10) $display("%s read %0d lane %0d: %h want %h", name, i, k,
                                       rsp.rdata[k], pat(want[i][k], salt));
        end
      end
      for (int k = nl; k < LANES; k++) begin
        checks++;
        if (rsp.rdata[k] !== '0) failures++;
      end
    end
    @(negedge clk);
    checks++;
    if (rsp.rvalid) failures++;
  endtask

  initial begin
    int want [][4];
    req = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // narrow writes of words 0..1023
    setup(AGU_NORMAL, 0, 1, 0, 0, 0, 0);
    for (int a = 0; a < 1024; a++) begin
      req = '0; req.en = 1; req.we = 1; req.wdata[0] = pat(a, 0);
      @(negedge clk);
    end
    req = '0;
    // wide consecutive: lanes get 4i+k
    setup(AGU_NORMAL, 0, 4, 0, 0, 1, 0);
    want = new[256];
    foreach (want[i]) for (int k = 0; k < 4; k++) want[i][k] = 4 * i + k;
    reads(256, want, 4, 0, "wide");
    // wide with lane stride 4^4 = 256: lanes get i + 256k
    setup(AGU_NORMAL, 0, 1, 0, 0, 1, 4);
    foreach (want[i]) for (int k = 0; k < 4; k++) want[i][k] = i + 256 * k;
    reads(256, want, 4, 0, "stride256");
    // wide with doubled lane stride 2*4^3 = 128: lanes get i + 128k
    setup(AGU_NORMAL, 0, 1, 0, 0, 1, 3, 0, 0, 1);
    want = new[128];
    foreach (want[i]) for (int k = 0; k < 4; k++) want[i][k] = i + 128 * k;
    reads(128, want, 4, 0, "stride128");
    // wide with lane stride 4: words 16j + r + 4k
    setup(AGU_NORMAL, 1, 16, 0, 0, 1, 1);
    want = new[64];
    foreach (want[i]) for (int k = 0; k < 4; k++) want[i][k] = 1 + 16 * i + 4 * k;
    reads(64, want, 4, 0, "stride4");
    // narrow digit-reversed over 8 bits from base 256
    setup(AGU_BITREV, 0, 1, 256, 0, 0, 0, 1, 8);
    want = new[256];
    foreach (want[i]) want[i][0] = 256 + digrev8(i);
    reads(256, want, 1, 0, "digrev");
    // narrow modulo: buffer [10,30), start 25, step 7
    setup(AGU_MODULO, 25, 7, 10, 20, 0, 0);
    want = new[40];
    begin
      int p = 25;
      foreach (want[i]) begin
        want[i][0] = p;
        p += 7;
        if (p >= 30) p -= 20;
      end
    end
    reads(40, want, 1, 0, "modulo");
    // wide writes at 2048.., then narrow reads
    setup(AGU_NORMAL, 2048, 4, 0, 0, 1, 0);
    for (int i = 0; i < 128; i++) begin
      req = '0; req.en = 1; req.we = 1;
      for (int k = 0; k < 4; k++) req.wdata[k] = pat(2048 + 4 * i + k, 5);
      @(negedge clk);
    end
    req = '0;
    setup(AGU_NORMAL, 2048, 1, 0, 0, 0, 0);
    want = new[512];
    foreach (want[i]) want[i][0] = 2048 + i;
    reads(512, want, 1, 5, "narrow-after-wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
