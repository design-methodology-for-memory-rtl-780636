// tb_mapper_demapper: maps random bit groups with QPSK, 16-QAM and 64-QAM and
// checks every written point against a Gray-code table built here; then
// de-maps noisy points (noise below half the level spacing) served by a
// memory model, checks the recovered bits, and checks that 64 words
// (a 256-point symbol) take 64 + 2 cycles from start to done.
module tb_mapper_demapper;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, mode = 0, bits_in_valid = 0, start = 0;
  modu_e modu = MOD_QPSK;
  logic [15:0] scale = 16'd2000, len = '0;
  logic [23:0] bits_in = '0, bits_out;
  logic busy, done, bits_out_valid;
  bank_req_t req;
  bank_rsp_t rsp;
  int checks = 0, failures = 0;

  mapper_demapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(int g, int m, int sc);
    for (int i = 0; i < (1 << m); i++)
      if ((i ^ (i >> 1)) == g) return (2 * i - ((1 << m) - 1)) * sc;
    return 0;
  endfunction

  // memory model for de-mapping: serves words from a queue one cycle later
  lanes_t words [$];
  always_ff @(posedge clk) begin
    rsp.rvalid <= req.en && !req.we;
    if (req.en && !req.we) rsp.rdata <= words.pop_front();
  end

  initial begin
    lanes_t sent [$];
    logic [23:0] exp_bits [$];
    rsp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mi = 0; mi < 3; mi++) begin
      int m;
      m = mi + 1;
      modu = modu_e'(mi);
      // ---- map ----
      mode = 0;
      for (int n = 0; n < 40; n++) begin
        bits_in = 24'($urandom);
        bits_in_valid = 1;
        @(negedge clk);
        bits_in_valid = 0;
        checks++;
        if (!(req.en && req.we)) failures++;
        for (int k = 0; k < 4; k++) begin
          int sb;
          sb = (bits_in >> (6 * k)) & ((1 << (2 * m)) - 1);
          checks++;
          if (int'(req.wdata[k].re) != lvl(sb >> m, m, scale)
              || int'(req.wdata[k].im) != lvl(sb & ((1 << m) - 1), m, scale)) begin
            failures++;
            if (failures < 10) $display("map m=%0d lane %0d bits %0h: %h", m, k, sb, req.wdata[k]);
          end
        end
      end
      @(negedge clk);
      // ---- demap ----
      mode = 1;
      for (int n = 0; n < 64; n++) begin
        lanes_t w;
        logic [23:0] b;
        b = '0;
        for (int k = 0; k < 4; k++) begin
          int sb;
          sb = $urandom_range(0, (1 << (2 * m)) - 1);
          b[6 * k +: 6] = 6'(sb);
          w[k].re = 16'(lvl(sb >> m, m, scale) + $urandom_range(0, 1800) - 900);
          w[k].im = 16'(lvl(sb & ((1 << m) - 1), m, scale) + $urandom_range(0, 1800) - 900);
        end
        words.push_back(w);
        exp_bits.push_back(b);
      end
      len = 16'd64;
      start = 1;
      @(negedge clk);
      start = 0;
      begin
        int cyc, got;
        cyc = 1; got = 0;
        while (!done && cyc < 1000) begin
          if (bits_out_valid) begin
            logic [23:0] e;
            e = exp_bits.pop_front();
            got++;
            checks++;
            if (bits_out !== e) begin
              failures++;
              if (failures < 10) $display("demap m=%0d: %h want %h", m, bits_out, e);
            end
          end
          @(negedge clk);
          cyc++;
        end
        if (bits_out_valid) begin
          got++;
          checks++;
          if (bits_out !== exp_bits.pop_front()) failures++;
        end
        checks += 2;
        if (got != 64) failures++;
        if (cyc != 64 + 2) begin
          failures++;
          $display("demap took %0d cycles", cyc);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
