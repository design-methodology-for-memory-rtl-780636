// tb_freq_comp: feeds a constant and a random sample stream through the
// frequency compensation with several phase increments and compares every
// output with x[n]*exp(j*2*pi*n*inc/2^32) computed here in floating point
// (within 3 LSB), checking the STAGES+2 cycle latency and that clear
// restarts the phase.
module tb_freq_comp;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic [31:0] phase_inc = '0;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  real ref_re [$], ref_im [$];
  int lat_q [$];
  int cyc = 0;

  freq_comp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // output checker
  always @(negedge clk) begin
    if (out_valid) begin
      real er, ei;
      int t;
      er = ref_re.pop_front();
      ei = ref_im.pop_front();
      t = lat_q.pop_front();
      checks++;
      if (rabs($itor(out_data.re) - er) > 3.0 || rabs($itor(out_data.im) - ei) > 3.0) begin
        failures++;
        if (failures < 10) $display("got %h want %f,%f", out_data, er, ei);
      end
      checks++;
      if (cyc - t != 18) begin
        failures++;
        if (failures < 10) $display("latency %0d", cyc - t);
      end
    end
  end

  task automatic stream(int n, logic [31:0] inc, int amp, logic rnd, logic gaps);
    real ph;
    phase_inc = inc;
    clear = 1;
    @(negedge clk);
    clear = 0;
    ph = 0.0;
    for (int i = 0; i < n; i++) begin
      real xr, xi, c, s;
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        in_valid = 0;
        @(negedge clk);
      end
      if (rnd) begin
        in_data.re = 16'($urandom_range(0, 2 * amp) - amp);
        in_data.im = 16'($urandom_range(0, 2 * amp) - amp);
      end else begin
        in_data.re = 16'(amp);
        in_data.im = 16'(0);
      end
      xr = $itor(in_data.re); xi = $itor(in_data.im);
      c = $cos(6.283185307179586 * ph); s = $sin(6.283185307179586 * ph);
      ref_re.push_back(xr * c - xi * s);
      ref_im.push_back(xr * s + xi * c);
      lat_q.push_back(cyc);
      in_valid = 1;
      @(negedge clk);
      // the NCO angle is the top 24 bits of the 32-bit phase
      ph = ph + $itor(inc) / 4294967296.0;
      if (ph >= 1.0) ph -= 1.0;
      ph = $itor($rtoi(ph * 16777216.0)) / 16777216.0;
    end
    in_valid = 0;
    repeat (25) @(negedge clk);
  endtask

  initial begin
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    stream(200, 32'h0100_0000, 20000, 0, 0);    // 1/256 turn per sample
    stream(300, 32'hF234_0000, 12000, 1, 1);    // negative frequency, gaps
    stream(300, 32'h4000_0000, 30000, 1, 0);    // quarter turn per sample
    stream(300, 32'h0765_0000, 32767, 0, 0);    // full scale
    checks++;
    if (ref_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
